// tb_input_cb: self-checking test of the Input Connection Block.
// Eight LEDR senders, one per input channel, each with its own random stream and random
// stalls. For every channel select the LB-side receiver must get exactly the selected channel's
// stream, in order; the selected channel's acknowledge must follow, ch_listen must be one-hot on
// it, and the other channels must not advance. With the block disabled it must deliver a steady
// stream of 0 tokens. Also checks the 2-step latency and the rate of one token per 2 steps.
module tb_input_cb;
  import fpga_pkg::*;
  localparam int N = 100;

  logic clk = 1'b0, rst_n = 1'b0;
  int   cycle = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  icb_cfg_t         cfg;
  ledr_t [NDIR-1:0] ch_in;
  logic  [NDIR-1:0] ch_ack, ch_listen;
  ledr_t            lb_out;
  logic             lb_ack;
  logic  [N-1:0]    bits [NDIR];
  int               sent [NDIR];
  int               n = 0, src_stall = 0, snk_stall = 0;
  logic  [N-1:0]    got;
  int               rcvd, t_first, t_last, stalls;

  for (genvar k = 0; k < NDIR; k++) begin : g_src
    ledr_src #(.MAXN(N)) u_src (
      .clk(clk), .rst_n(rst_n), .bits(bits[k]), .n(n), .stall_pct(src_stall),
      .ch(ch_in[k]), .ack(ch_ack[k]), .sent(sent[k]));
  end
  ledr_sink #(.MAXN(N)) u_snk (
    .clk(clk), .rst_n(rst_n), .cycle(cycle), .stall_pct(snk_stall), .ch(lb_out), .ack(lb_ack),
    .got(got), .rcvd(rcvd), .t_first(t_first), .t_last(t_last), .stalls(stalls));

  input_cb dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .ch_in(ch_in), .ch_ack(ch_ack),
                .ch_listen(ch_listen), .lb_out(lb_out), .lb_ack(lb_ack));

  task automatic run(input logic en, input logic [2:0] sel, input int sst, input int kst);
    int start, want;
    rst_n = 1'b0;
    n = 0;
    cfg = '{en: en, sel: sel};
    src_stall = sst;
    snk_stall = kst;
    for (int k = 0; k < NDIR; k++)
      for (int j = 0; j < N; j++) bits[k][j] = 1'($urandom());
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = cycle;
    n = N;
    while (rcvd < N && cycle < start + 30 * N) @(negedge clk);
    repeat (4) @(negedge clk);
    checks++;
    if (rcvd < N) begin
      failures++;
      $display("FAIL: en=%b sel=%0d received %0d", en, sel, rcvd);
    end
    for (int j = 0; j < N; j++) begin
      checks++;
      if (got[j] !== (en ? bits[sel][j] : 1'b0)) begin
        failures++;
        if (failures < 10) $display("FAIL: en=%b sel=%0d token %0d", en, sel, j);
      end
    end
    for (int k = 0; k < NDIR; k++) begin
      // Unselected senders never get past their first token (acknowledge does not move).
      checks++;
      want = (en && k == int'(sel)) ? N : 1;
      if (sent[k] != want) begin
        failures++;
        $display("FAIL: en=%b sel=%0d channel %0d sent %0d, expected %0d", en, sel, k, sent[k], want);
      end
      checks++;
      if (ch_listen[k] != (en && k == int'(sel))) begin
        failures++;
        $display("FAIL: ch_listen[%0d]", k);
      end
    end
    if (en && sst == 0 && kst == 0) begin
      checks++;
      if (t_first - start != 2 || t_last - t_first != 2 * (N - 1)) begin
        failures++;
        $display("FAIL: latency %0d, %0d tokens in %0d steps", t_first - start, N, t_last - t_first);
      end
    end
  endtask

  initial begin
    for (int s = 0; s < NDIR; s++) run(1'b1, 3'(s), 0, 0);
    for (int s = 0; s < NDIR; s++) run(1'b1, 3'(s), 30, 30);
    run(1'b0, 3'd5, 0, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
