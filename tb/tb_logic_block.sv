// tb_logic_block: self-checking test of the dual-pipeline logic block.
// Four LEDR senders feed random input sets; the result stream is compared with the truth
// table looked up in the testbench. Checks: every result, that both LUTs are used in turn,
// the first-result latency (5 steps inside the block) and the full-rate throughput of one
// result every 2 steps (allowing one step of slack while the pipeline fills), then a run with random stalls on both sides.
module tb_logic_block;
  import fpga_pkg::*;
  localparam int N = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  int   cycle = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic [LUT_SIZE-1:0] lut_cfg;
  ledr_t [LUT_K-1:0]   lb_in;
  logic                lb_in_ack, lb_out_ack;
  ledr_t               lb_out;
  logic [N-1:0]        bits [LUT_K];
  int                  n = 0, src_stall = 0, snk_stall = 0;
  int                  sent [LUT_K];
  logic [N-1:0]        got;
  int                  rcvd, t_first, t_last, stalls;

  for (genvar i = 0; i < LUT_K; i++) begin : g_src
    ledr_src #(.MAXN(N)) u_src (
      .clk(clk), .rst_n(rst_n), .bits(bits[i]), .n(n), .stall_pct(src_stall),
      .ch(lb_in[i]), .ack(lb_in_ack), .sent(sent[i]));
  end
  ledr_sink #(.MAXN(N)) u_snk (
    .clk(clk), .rst_n(rst_n), .cycle(cycle), .stall_pct(snk_stall), .ch(lb_out),
    .ack(lb_out_ack), .got(got), .rcvd(rcvd), .t_first(t_first), .t_last(t_last),
    .stalls(stalls));

  logic_block dut (
    .clk(clk), .rst_n(rst_n), .lut_cfg(lut_cfg), .lb_in(lb_in), .lb_in_ack(lb_in_ack),
    .lb_out(lb_out), .lb_out_ack(lb_out_ack));

  // Count data hand-overs to each LUT.
  int lut_use [NLUT];
  initial foreach (lut_use[k]) lut_use[k] = 0;
  always @(posedge clk)
    if (rst_n && dut.u_in_conv.can_send) lut_use[dut.u_in_conv.exp_ph] <= lut_use[dut.u_in_conv.exp_ph] + 1;

  task automatic run(input int count, input int sst, input int kst, input bit timing);
    int start;
    rst_n = 1'b0;
    n = 0;
    src_stall = sst;
    snk_stall = kst;
    lut_cfg = LUT_SIZE'($urandom());
    for (int i = 0; i < LUT_K; i++)
      for (int j = 0; j < N; j++) bits[i][j] = 1'($urandom());
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = cycle;
    n = count;
    while (rcvd < count && cycle < start + 20 * count + 100) @(negedge clk);
    checks++;
    if (rcvd != count) begin
      failures++;
      $display("FAIL: received %0d of %0d results", rcvd, count);
    end
    for (int j = 0; j < count; j++) begin
      logic exp;
      exp = lut_cfg[{bits[3][j], bits[2][j], bits[1][j], bits[0][j]}];
      checks++;
      if (got[j] !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL: result %0d = %0b, expected %0b", j, got[j], exp);
      end
    end
    if (timing) begin
      // Sources send at step start; the block holds 5 registers between input and output.
      checks++;
      if (t_first - start > 8) begin
        failures++;
        $display("FAIL: first-result latency %0d steps", t_first - start);
      end
      checks++;
      if ((t_last - t_first) > 2 * (count - 1) || (t_last - t_first) < 2 * (count - 1) - 2) begin
        failures++;
        $display("FAIL: %0d results took %0d steps, expected one per 2 steps after fill",
                 count, t_last - t_first);
      end
      $display("latency %0d steps, %0d results in %0d steps", t_first - start, count,
               t_last - t_first);
    end
  endtask

  initial begin
    run(100, 0, 0, 1'b1);
    run(N, 30, 30, 1'b0);
    run(N, 0, 60, 1'b0);
    for (int k = 0; k < NLUT; k++) begin
      checks++;
      if (lut_use[k] < N) begin
        failures++;
        $display("FAIL: LUT%0d used %0d times", k, lut_use[k]);
      end
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL: receiver never stalled");
    end
    $display("LUT0 used %0d, LUT1 used %0d times", lut_use[0], lut_use[1]);
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
