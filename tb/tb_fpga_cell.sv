// tb_fpga_cell: self-checking test of one cell (four Input CBs, logic block, Output CB).
// Eight LEDR senders drive the input channels, eight receivers sit on the output channels.
// Each run picks two distinct channels A and B, routes A to LUT inputs a and c (two Input CBs on
// one channel, so the acknowledge join is exercised), B to input b, and leaves input d unused
// (constant 0). Every enabled output must carry lut[{0, A, B, A}] for each token, unused input
// channels must be drained, and with ready neighbours the cell must show a 10-step latency and
// one result every 2 steps.
module tb_fpga_cell;
  import fpga_pkg::*;
  localparam int N = 100;

  logic clk = 1'b0, rst_n = 1'b0;
  int   cycle = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cell_cfg_t        cfg;
  ledr_t [NDIR-1:0] ch_in, ch_out;
  logic  [NDIR-1:0] ch_in_ack, ch_out_ack;
  logic  [N-1:0]    bits [NDIR];
  int               sent [NDIR];
  int               n = 0, src_stall = 0, snk_stall = 0;
  logic  [N-1:0]    got [NDIR];
  int               rcvd [NDIR], t_first [NDIR], t_last [NDIR], stalls [NDIR];

  for (genvar k = 0; k < NDIR; k++) begin : g_io
    ledr_src #(.MAXN(N)) u_src (
      .clk(clk), .rst_n(rst_n), .bits(bits[k]), .n(n), .stall_pct(src_stall),
      .ch(ch_in[k]), .ack(ch_in_ack[k]), .sent(sent[k]));
    ledr_sink #(.MAXN(N)) u_snk (
      .clk(clk), .rst_n(rst_n), .cycle(cycle), .stall_pct(snk_stall), .ch(ch_out[k]),
      .ack(ch_out_ack[k]), .got(got[k]), .rcvd(rcvd[k]), .t_first(t_first[k]),
      .t_last(t_last[k]), .stalls(stalls[k]));
  end

  fpga_cell dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .ch_in(ch_in), .ch_in_ack(ch_in_ack),
                 .ch_out(ch_out), .ch_out_ack(ch_out_ack));

  task automatic run(input int a, input int b, input logic [NDIR-1:0] mask, input int sst,
                     input int kst);
    int start;
    rst_n = 1'b0;
    n = 0;
    cfg.icb[0] = '{en: 1'b1, sel: 3'(a)};
    cfg.icb[1] = '{en: 1'b1, sel: 3'(b)};
    cfg.icb[2] = '{en: 1'b1, sel: 3'(a)};
    cfg.icb[3] = '{en: 1'b0, sel: 3'($urandom())};
    cfg.lut    = LUT_SIZE'($urandom());
    cfg.ocb_en = mask;
    src_stall = sst;
    snk_stall = kst;
    for (int k = 0; k < NDIR; k++)
      for (int j = 0; j < N; j++) bits[k][j] = 1'($urandom());
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = cycle;
    n = N;
    while (cycle < start + 40 * N) begin
      int done;
      done = 1;
      for (int k = 0; k < NDIR; k++) if (mask[k] && rcvd[k] < N) done = 0;
      if (done == 1) break;
      @(negedge clk);
    end
    repeat (20) @(negedge clk);
    for (int k = 0; k < NDIR; k++) begin
      checks++;
      if (sent[k] != N) begin
        failures++;
        $display("FAIL: input channel %0d stuck at %0d", k, sent[k]);
      end
      checks++;
      if (rcvd[k] != (mask[k] ? N : 0)) begin
        failures++;
        $display("FAIL: output channel %0d got %0d", k, rcvd[k]);
      end
      if (mask[k]) begin
        for (int j = 0; j < N; j++) begin
          checks++;
          if (got[k][j] !== cfg.lut[{1'b0, bits[a][j], bits[b][j], bits[a][j]}]) begin
            failures++;
            if (failures < 10) $display("FAIL: out %0d token %0d", k, j);
          end
        end
        if (sst == 0 && kst == 0) begin
          checks++;
          if (t_first[k] - start != 10 || t_last[k] - t_first[k] > 2 * (N - 1)
              || t_last[k] - t_first[k] < 2 * (N - 1) - 2) begin
            failures++;
            $display("FAIL: latency %0d, %0d tokens in %0d steps", t_first[k] - start, N,
                     t_last[k] - t_first[k]);
          end
        end
      end
    end
  endtask

  initial begin
    cfg = '0;
    run(6, 0, 8'b0000_0100, 0, 0);
    for (int t = 0; t < 8; t++) begin
      int a, b;
      a = $urandom_range(7);
      b = (a + 1 + $urandom_range(6)) % 8;
      run(a, b, NDIR'($urandom()) | NDIR'(1 << t), (t % 2) * 30, (t % 2) * 30);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
