// tb_fpdr_ledr_conv: self-checking test of the FPDR-to-LEDR converter.
// Two four-phase sources stand in for LUT0 and LUT1; source k sends the results with even/odd
// index (k = 1 holds results 0, 2, 4, ... because the first token after reset has phase 1).
// An LEDR receiver with random stalls collects the output. Checks: the stream comes out in the
// original order with correct LEDR phases, each source sees its acknowledge and returns to
// spacer, and with sources and receiver that answer within half a step the converter adds no
// bubble: one result per step.
module tb_fpdr_ledr_conv;
  import fpga_pkg::*;
  localparam int N = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  int   cycle = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fpdr_t [NLUT-1:0] lut_out;
  logic  [NLUT-1:0] lut_ack;
  ledr_t            lb_out;
  logic             lb_ack;
  logic  [N-1:0]    bits;
  logic  [N-1:0]    got;
  int               rcvd, t_first, t_last, stalls, snk_stall = 0;
  int               idx [NLUT];
  logic             run = 1'b0;

  ledr_sink #(.MAXN(N)) u_snk (
    .clk(clk), .rst_n(rst_n), .cycle(cycle), .stall_pct(snk_stall), .ch(lb_out), .ack(lb_ack),
    .got(got), .rcvd(rcvd), .t_first(t_first), .t_last(t_last), .stalls(stalls));

  fpdr_ledr_conv dut (.clk(clk), .rst_n(rst_n), .lut_out(lut_out), .lut_ack(lut_ack),
                      .lb_out(lb_out), .lb_ack(lb_ack));

  // Phase checker: each new output token must alternate phase, starting at 1.
  logic last_ph = 1'b0;
  int   toks = 0;
  always @(posedge clk) begin
    if (rst_n && ledr_phase(lb_out) != last_ph) begin
      last_ph <= ledr_phase(lb_out);
      toks    <= toks + 1;
    end
  end

  // Four-phase sources.
  always @(negedge clk) begin
    if (!rst_n) begin
      lut_out <= '0;
      idx[0]  <= 1;
      idx[1]  <= 0;
    end else if (run) begin
      for (int k = 0; k < NLUT; k++) begin
        if (!fpdr_valid(lut_out[k]) && !lut_ack[k] && idx[k] < N)
          lut_out[k] <= fpdr_enc(bits[idx[k]]);
        else if (fpdr_valid(lut_out[k]) && lut_ack[k]) begin
          lut_out[k] <= '0;
          idx[k]     <= idx[k] + 2;
        end
      end
    end
  end

  task automatic go(input int st);
    rst_n = 1'b0;
    run = 1'b0;
    snk_stall = st;
    for (int j = 0; j < N; j++) bits[j] = 1'($urandom());
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run = 1'b1;
    while (rcvd < N && cycle < 20000) @(negedge clk);
    for (int j = 0; j < N; j++) begin
      checks++;
      if (got[j] !== bits[j]) begin
        failures++;
        if (failures < 10) $display("FAIL: token %0d = %b expected %b", j, got[j], bits[j]);
      end
    end
    checks++;
    if (rcvd != N) begin
      failures++;
      $display("FAIL: %0d tokens", rcvd);
    end
    if (st == 0) begin
      checks++;
      if (t_last - t_first != N - 1) begin
        failures++;
        $display("FAIL: %0d tokens in %0d steps", N, t_last - t_first);
      end
    end
  endtask

  initial begin
    go(0);
    go(50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
