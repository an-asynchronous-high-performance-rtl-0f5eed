// tb_output_cb: self-checking test of the Output Connection Block.
// One LEDR sender stands for the LB; eight LEDR receivers, each stalling at random, sit on the
// output channels. For random enable masks every enabled channel must receive the whole stream
// in order, disabled channels nothing, and the sender must be held back until all enabled
// receivers took a token (fan-out join). Also checks the 3-step latency and one token per
// 2 steps with ready receivers, and that a mask of 0 drops the stream.
module tb_output_cb;
  import fpga_pkg::*;
  localparam int N = 100;

  logic clk = 1'b0, rst_n = 1'b0;
  int   cycle = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic  [NDIR-1:0] cfg_en;
  ledr_t            lb_in;
  logic             lb_ack;
  ledr_t [NDIR-1:0] ch_out;
  logic  [NDIR-1:0] ch_ack;
  logic  [N-1:0]    bits;
  int               sent, n = 0, src_stall = 0, snk_stall = 0;
  logic  [N-1:0]    got [NDIR];
  int               rcvd [NDIR], t_first [NDIR], t_last [NDIR], stalls [NDIR];

  ledr_src #(.MAXN(N)) u_src (
    .clk(clk), .rst_n(rst_n), .bits(bits), .n(n), .stall_pct(src_stall), .ch(lb_in),
    .ack(lb_ack), .sent(sent));
  for (genvar k = 0; k < NDIR; k++) begin : g_snk
    ledr_sink #(.MAXN(N)) u_snk (
      .clk(clk), .rst_n(rst_n), .cycle(cycle), .stall_pct(snk_stall), .ch(ch_out[k]),
      .ack(ch_ack[k]), .got(got[k]), .rcvd(rcvd[k]), .t_first(t_first[k]), .t_last(t_last[k]),
      .stalls(stalls[k]));
  end

  output_cb dut (.clk(clk), .rst_n(rst_n), .cfg_en(cfg_en), .lb_in(lb_in), .lb_ack(lb_ack),
                 .ch_out(ch_out), .ch_ack(ch_ack));

  // The sender may run ahead of the slowest enabled receiver by at most the 3 register levels
  // plus the token on the wire.
  int max_lead = 0;
  always @(negedge clk) begin
    if (rst_n && cfg_en != 0) begin
      int lo;
      lo = N;
      for (int k = 0; k < NDIR; k++) if (cfg_en[k] && rcvd[k] < lo) lo = rcvd[k];
      if (sent - lo > max_lead) max_lead = sent - lo;
    end
  end

  task automatic run(input logic [NDIR-1:0] mask, input int sst, input int kst);
    int start;
    rst_n = 1'b0;
    n = 0;
    cfg_en = mask;
    src_stall = sst;
    snk_stall = kst;
    for (int j = 0; j < N; j++) bits[j] = 1'($urandom());
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = cycle;
    n = N;
    while (sent < N && cycle < start + 40 * N) @(negedge clk);
    repeat (60) @(negedge clk);
    checks++;
    if (sent != N) begin
      failures++;
      $display("FAIL: mask %b: sender stuck at %0d", mask, sent);
    end
    for (int k = 0; k < NDIR; k++) begin
      checks++;
      if (rcvd[k] != (mask[k] ? N : 0)) begin
        failures++;
        $display("FAIL: mask %b: channel %0d got %0d tokens", mask, k, rcvd[k]);
      end
      if (mask[k])
        for (int j = 0; j < N; j++) begin
          checks++;
          if (got[k][j] !== bits[j]) begin
            failures++;
            if (failures < 10) $display("FAIL: mask %b channel %0d token %0d", mask, k, j);
          end
        end
      if (mask[k] && sst == 0 && kst == 0) begin
        checks++;
        if (t_first[k] - start != 3 || t_last[k] - t_first[k] != 2 * (N - 1)) begin
          failures++;
          $display("FAIL: channel %0d latency %0d, %0d tokens in %0d steps", k,
                   t_first[k] - start, N, t_last[k] - t_first[k]);
        end
      end
    end
  endtask

  initial begin
    run(8'b0000_0001, 0, 0);
    run(8'b1000_0000, 0, 0);
    run(8'b1010_0101, 0, 0);
    run(8'b1111_1111, 0, 0);
    for (int t = 0; t < 6; t++) run(NDIR'($urandom()) | 8'h10, 30, 40);
    run(8'b0000_0000, 0, 0);
    checks++;
    if (max_lead > 4) begin
      failures++;
      $display("FAIL: sender ran %0d tokens ahead of a receiver", max_lead);
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
