// tb_fpga_array: end-to-end test of the default 4 x 4 array.
// A small circuit is mapped onto five cells, with random truth tables f0..f4:
//   cell(0,0): a = c = W edge input x, b = NW edge input y, d unused;  o00 = f0(x, y, x, 0)
//              output to E (cell 0,1) and SE (cell 1,1)
//   cell(0,1): a = o00 from W, b = N edge input z;                     o01 = f1(o00, z, 0, 0)
//   cell(1,1): a = o00 from NW;                                        o11 = f2(o00, 0, 0, 0)
//              output to NE (cell 0,2)
//   cell(0,2): a = o01 from W, b = o11 from SW;                        o02 = f3(o01, o11, 0, 0)
//   cell(0,3): a = o02 from W;  output to the E and NE edges           o03 = f4(o02, 0, 0, 0)
// An extra edge source drives the unused S input of cell(3,3). The two edge outputs must both
// carry o03 for every token. With ready neighbours the result must arrive 40 steps after the
// inputs (4 cells of 10 steps) and then one every 2 steps. The test counts each mechanism of the
// design and fails if one never happened: data sets handed to LUT0 and to LUT1 (dual pipeline),
// FPDR spacers, the acknowledge join of two Input CBs on one channel, tokens from a disabled
// (constant) Input CB, fan-out of the Output CB, back-pressure from a stalling receiver and an
// unused input channel being drained.
module tb_fpga_array;
  import fpga_pkg::*;
  localparam int N    = 200;
  localparam int ROWS = 4;
  localparam int COLS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  int   cycle = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cell_cfg_t [ROWS-1:0][COLS-1:0]          cfg;
  ledr_t     [ROWS-1:0][COLS-1:0][NDIR-1:0] edge_in, edge_out;
  logic      [ROWS-1:0][COLS-1:0][NDIR-1:0] edge_in_ack, edge_out_ack;

  fpga_array dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .edge_in(edge_in),
                  .edge_in_ack(edge_in_ack), .edge_out(edge_out), .edge_out_ack(edge_out_ack));

  // Edge traffic: sources x, y, z, a spare source w; sinks on the two outputs of cell(0,3).
  logic [N-1:0] bx, by, bz, bw;
  int           n = 0, src_stall = 0, snk_stall = 0;
  int           sx, sy, sz, sw;
  ledr_t        chx, chy, chz, chw;
  logic [N-1:0] gotE, gotNE;
  int           rE, rNE, tfE, tlE, tfNE, tlNE, stE, stNE;
  logic         ackE, ackNE;

  ledr_src #(.MAXN(N)) u_x (.clk(clk), .rst_n(rst_n), .bits(bx), .n(n), .stall_pct(src_stall),
    .ch(chx), .ack(edge_in_ack[0][0][DIR_W]),  .sent(sx));
  ledr_src #(.MAXN(N)) u_y (.clk(clk), .rst_n(rst_n), .bits(by), .n(n), .stall_pct(src_stall),
    .ch(chy), .ack(edge_in_ack[0][0][DIR_NW]), .sent(sy));
  ledr_src #(.MAXN(N)) u_z (.clk(clk), .rst_n(rst_n), .bits(bz), .n(n), .stall_pct(src_stall),
    .ch(chz), .ack(edge_in_ack[0][1][DIR_N]),  .sent(sz));
  ledr_src #(.MAXN(N)) u_w (.clk(clk), .rst_n(rst_n), .bits(bw), .n(n), .stall_pct(src_stall),
    .ch(chw), .ack(edge_in_ack[3][3][DIR_S]),  .sent(sw));
  ledr_sink #(.MAXN(N)) u_e (.clk(clk), .rst_n(rst_n), .cycle(cycle), .stall_pct(snk_stall),
    .ch(edge_out[0][3][DIR_E]), .ack(ackE), .got(gotE), .rcvd(rE), .t_first(tfE),
    .t_last(tlE), .stalls(stE));
  ledr_sink #(.MAXN(N)) u_ne (.clk(clk), .rst_n(rst_n), .cycle(cycle), .stall_pct(snk_stall),
    .ch(edge_out[0][3][DIR_NE]), .ack(ackNE), .got(gotNE), .rcvd(rNE), .t_first(tfNE),
    .t_last(tlNE), .stalls(stNE));

  always_comb begin
    edge_in = '0;
    edge_in[0][0][DIR_W]  = chx;
    edge_in[0][0][DIR_NW] = chy;
    edge_in[0][1][DIR_N]  = chz;
    edge_in[3][3][DIR_S]  = chw;
    edge_out_ack = '0;
    edge_out_ack[0][3][DIR_E]  = ackE;
    edge_out_ack[0][3][DIR_NE] = ackNE;
  end

  // Mechanism counters.
  int lut0_sets = 0, lut1_sets = 0, spacers = 0, joins = 0, const_toks = 0, backpress = 0;
  int drained = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.g_row[0].g_col[0].u_cell.u_lb.u_in_conv.can_send) begin
        if (dut.g_row[0].g_col[0].u_cell.u_lb.u_in_conv.exp_ph) lut1_sets <= lut1_sets + 1;
        else lut0_sets <= lut0_sets + 1;
        // Input CBs 0 and 2 of cell(0,0) both listen to the W channel.
        joins <= joins + 1;
      end
      if (dut.g_row[0].g_col[2].u_cell.u_lb.g_lut[0].u_lut.s1_full
          && dut.g_row[0].g_col[2].u_cell.u_lb.g_lut[0].u_lut.in_empty
          && dut.g_row[0].g_col[2].u_cell.u_lb.g_lut[0].u_lut.s2_full)
        spacers <= spacers + 1;
      if (dut.g_row[0].g_col[3].u_cell.u_lb.u_in_conv.can_send) const_toks <= const_toks + 1;
      // Output CB of cell(0,3) holds a token its receiver has not taken.
      if (ledr_phase(edge_out[0][3][DIR_E]) != ackE) backpress <= backpress + 1;
    end
  end
  always @(negedge clk) if (rst_n && ledr_phase(chw) == edge_in_ack[3][3][DIR_S] && sw > 0) drained <= sw;

  task automatic configure();
    cfg = '0;
    cfg[0][0].icb[0] = '{en: 1'b1, sel: DIR_W};
    cfg[0][0].icb[1] = '{en: 1'b1, sel: DIR_NW};
    cfg[0][0].icb[2] = '{en: 1'b1, sel: DIR_W};
    cfg[0][0].ocb_en = NDIR'((1 << DIR_E) | (1 << DIR_SE));
    cfg[0][1].icb[0] = '{en: 1'b1, sel: DIR_W};
    cfg[0][1].icb[1] = '{en: 1'b1, sel: DIR_N};
    cfg[0][1].ocb_en = NDIR'(1 << DIR_E);
    cfg[1][1].icb[0] = '{en: 1'b1, sel: DIR_NW};
    cfg[1][1].ocb_en = NDIR'(1 << DIR_NE);
    cfg[0][2].icb[0] = '{en: 1'b1, sel: DIR_W};
    cfg[0][2].icb[1] = '{en: 1'b1, sel: DIR_SW};
    cfg[0][2].ocb_en = NDIR'(1 << DIR_E);
    cfg[0][3].icb[0] = '{en: 1'b1, sel: DIR_W};
    cfg[0][3].ocb_en = NDIR'((1 << DIR_E) | (1 << DIR_NE));
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) cfg[r][c].lut = LUT_SIZE'($urandom());
  endtask

  function automatic logic model(int j);
    logic o00, o01, o11, o02;
    o00 = cfg[0][0].lut[{1'b0, bx[j], by[j], bx[j]}];
    o01 = cfg[0][1].lut[{2'b00, bz[j], o00}];
    o11 = cfg[1][1].lut[{3'b000, o00}];
    o02 = cfg[0][2].lut[{2'b00, o11, o01}];
    return cfg[0][3].lut[{3'b000, o02}];
  endfunction

  task automatic run(input int sst, input int kst);
    int start;
    rst_n = 1'b0;
    n = 0;
    src_stall = sst;
    snk_stall = kst;
    configure();
    for (int j = 0; j < N; j++) begin
      bx[j] = 1'($urandom()); by[j] = 1'($urandom());
      bz[j] = 1'($urandom()); bw[j] = 1'($urandom());
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = cycle;
    n = N;
    while ((rE < N || rNE < N) && cycle < start + 60 * N) @(negedge clk);
    repeat (10) @(negedge clk);
    checks++;
    if (rE != N || rNE != N || sx != N || sy != N || sz != N) begin
      failures++;
      $display("FAIL: sent %0d/%0d/%0d, received E %0d NE %0d", sx, sy, sz, rE, rNE);
    end
    for (int j = 0; j < N; j++) begin
      logic e;
      e = model(j);
      checks += 2;
      if (gotE[j] !== e)  begin failures++; if (failures < 10) $display("FAIL: E token %0d", j); end
      if (gotNE[j] !== e) begin failures++; if (failures < 10) $display("FAIL: NE token %0d", j); end
    end
    if (sst == 0 && kst == 0) begin
      checks++;
      if (tfE - start != 40 || tlE - tfE > 2 * (N - 1) || tlE - tfE < 2 * (N - 1) - 2) begin
        failures++;
        $display("FAIL: latency %0d, %0d results in %0d steps", tfE - start, N, tlE - tfE);
      end
      $display("array: latency %0d steps, %0d results in %0d steps", tfE - start, N, tlE - tfE);
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", what);
    end
    $display("%-34s %0d", what, count);
  endtask

  initial begin
    run(0, 0);
    run(30, 40);
    need("sets to LUT0", lut0_sets);
    need("sets to LUT1", lut1_sets);
    need("FPDR spacers in a LUT", spacers);
    need("joined acknowledges (2 CBs, 1 ch)", joins);
    need("constant tokens (disabled CB)", const_toks);
    need("output fan-out tokens (E and NE)", (rE == rNE) ? rE : 0);
    need("back-pressure steps", backpress);
    need("receiver stalls", stE + stNE);
    need("tokens drained on unused input", drained);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
