// tb_fpdr_lut: self-checking test of one three-stage FPDR look-up table.
// A four-phase sender presents data, waits for in_ack, presents the spacer, waits for in_ack to
// fall; a four-phase receiver acknowledges each output. Every output is compared with the truth
// table indexed by the inputs, for several random tables. Also checked: the first output appears
// 3 steps after the data (one per stage), outputs alternate with spacers, and a single LUT needs
// more than 2 steps per result, the spacer overhead the dual LUT of the logic block hides.
module tb_fpdr_lut;
  import fpga_pkg::*;
  localparam int N = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  int   cycle = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic [LUT_SIZE-1:0] cfg;
  fpdr_t [LUT_K-1:0]   in_d;
  logic                in_ack, out_ack;
  fpdr_t               out_d;
  logic [3:0]          vec [N];
  int                  spacers = 0;

  fpdr_lut dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .in_d(in_d), .in_ack(in_ack),
                .out_d(out_d), .out_ack(out_ack));

  function automatic fpdr_t [LUT_K-1:0] enc4(logic [3:0] v);
    fpdr_t [LUT_K-1:0] e;
    for (int i = 0; i < LUT_K; i++) e[i] = fpdr_enc(v[i]);
    return e;
  endfunction

  task automatic sender();
    for (int j = 0; j < N; j++) begin
      while (in_ack) @(negedge clk);
      in_d = enc4(vec[j]);
      while (!in_ack) @(negedge clk);
      in_d = '0;
    end
  endtask

  task automatic receiver(output int t0, output int t1);
    for (int j = 0; j < N; j++) begin
      while (!fpdr_valid(out_d)) @(negedge clk);
      if (j == 0) t0 = cycle;
      t1 = cycle;
      checks++;
      if (out_d.t !== cfg[vec[j]] || out_d.f !== ~cfg[vec[j]]) begin
        failures++;
        if (failures < 10) $display("FAIL: vec %h out (%b,%b) expected %b", vec[j], out_d.t, out_d.f, cfg[vec[j]]);
      end
      out_ack = 1'b1;
      while (fpdr_valid(out_d)) @(negedge clk);
      spacers++;
      out_ack = 1'b0;
    end
  endtask

  initial begin
    int t0, t1, start;
    in_d = '0;
    out_ack = 1'b0;
    for (int run = 0; run < 6; run++) begin
      rst_n = 1'b0;
      cfg = (run == 0) ? 16'h8000 : (run == 1) ? 16'h6996 : LUT_SIZE'($urandom());
      foreach (vec[j]) vec[j] = 4'($urandom());
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      @(negedge clk);
      start = cycle;
      fork
        sender();
        receiver(t0, t1);
      join
      if (run == 0) begin
        checks++;
        if (t0 - start != 3) begin
          failures++;
          $display("FAIL: latency %0d steps, expected 3", t0 - start);
        end
        checks++;
        if ((t1 - t0) <= 2 * (N - 1)) begin
          failures++;
          $display("FAIL: single LUT ran at %0d steps for %0d results", t1 - t0, N);
        end
        $display("single LUT: latency %0d, %0d results in %0d steps", t0 - start, N, t1 - t0);
      end
    end
    checks++;
    if (spacers != 6 * N) begin
      failures++;
      $display("FAIL: %0d spacers seen", spacers);
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
