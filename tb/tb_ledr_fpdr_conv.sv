// tb_ledr_fpdr_conv: self-checking test of the LEDR-to-FPDR converter.
// Four LEDR senders (with random stalls, so inputs arrive skewed) feed input sets; two simple
// four-phase LUT stand-ins take the FPDR words with random delays. Checks: each set reaches the
// LUT given by its phase (phase 1 first after reset, then 0, 1, ...), with its values, no set is
// sent before all four inputs arrived, words are never partial, and the order is kept.
module tb_ledr_fpdr_conv;
  import fpga_pkg::*;
  localparam int N = 150;

  logic clk = 1'b0, rst_n = 1'b0;
  int   cycle = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  ledr_t [LUT_K-1:0]                lb_in;
  logic                             lb_ack;
  fpdr_t [NLUT-1:0][LUT_K-1:0]      lut_in;
  logic  [NLUT-1:0]                 lut_ack;
  logic  [N-1:0]                    bits [LUT_K];
  int                               n = 0;
  int                               sent [LUT_K];
  int                               taken = 0;
  int                               per_lut [NLUT];

  for (genvar i = 0; i < LUT_K; i++) begin : g_src
    ledr_src #(.MAXN(N)) u_src (
      .clk(clk), .rst_n(rst_n), .bits(bits[i]), .n(n), .stall_pct(40),
      .ch(lb_in[i]), .ack(lb_ack), .sent(sent[i]));
  end

  ledr_fpdr_conv dut (.clk(clk), .rst_n(rst_n), .lb_in(lb_in), .lb_ack(lb_ack),
                      .lut_in(lut_in), .lut_ack(lut_ack));

  // LUT stand-ins: check each FPDR word when it appears, acknowledge it after a random delay,
  // release after the spacer.
  logic [NLUT-1:0] seen;
  initial begin
    lut_ack = '0;
    seen = '0;
    per_lut[0] = 0;
    per_lut[1] = 0;
  end
  always @(negedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < NLUT; k++) begin
        logic full, empty;
        full = 1'b1; empty = 1'b1;
        for (int i = 0; i < LUT_K; i++) begin
          if (!fpdr_valid(lut_in[k][i])) full = 1'b0;
          if (fpdr_valid(lut_in[k][i]))  empty = 1'b0;
        end
        checks++;
        if (!full && !empty) begin
          failures++;
          $display("FAIL: LUT%0d offered a partial word", k);
        end
        if (full && !seen[k]) begin
          // New set: it must be the next one in order and go to the LUT of its phase.
          seen[k] = 1'b1;
          checks++;
          if (k != ((taken + 1) % 2)) begin
            failures++;
            $display("FAIL: set %0d went to LUT%0d", taken, k);
          end
          for (int i = 0; i < LUT_K; i++) begin
            checks++;
            if (lut_in[k][i].t !== bits[i][taken] || lut_in[k][i].f !== ~bits[i][taken]) begin
              failures++;
              $display("FAIL: set %0d input %0d wrong", taken, i);
            end
            checks++;
            if (taken >= sent[i]) begin
              failures++;
              $display("FAIL: set %0d converted before input %0d arrived", taken, i);
            end
          end
          per_lut[k]++;
          taken++;
        end
        if (full && !lut_ack[k] && $urandom_range(2) == 0) lut_ack[k] <= 1'b1;
        else if (empty && lut_ack[k] && $urandom_range(1) == 0) begin
          lut_ack[k] <= 1'b0;
          seen[k] = 1'b0;
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < LUT_K; i++)
      for (int j = 0; j < N; j++) bits[i][j] = 1'($urandom());
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    n = N;
    while (taken < N && cycle < 40 * N) @(negedge clk);
    checks++;
    if (taken != N) begin
      failures++;
      $display("FAIL: only %0d sets converted", taken);
    end
    checks++;
    if (per_lut[0] != N / 2 || per_lut[1] != N / 2) begin
      failures++;
      $display("FAIL: LUT0 got %0d, LUT1 got %0d", per_lut[0], per_lut[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
