// ledr_sink: testbench LEDR receiver. Records each new token's value in got[] and the cycle of
// the first and the latest arrival; acknowledges by copying the token's phase, optionally
// holding back a random share of the steps (stall_pct). Acts on the falling clk edge.
module ledr_sink
  import fpga_pkg::*;
#(
  parameter int MAXN = 256
) (
  input  logic            clk,
  input  logic            rst_n,
  input  int              cycle,
  input  int              stall_pct,
  input  ledr_t           ch,
  output logic            ack,
  output logic [MAXN-1:0] got,
  output int              rcvd,
  output int              t_first,
  output int              t_last,
  output int              stalls
);
  initial begin
    ack = 1'b0; got = '0; rcvd = 0; t_first = 0; t_last = 0; stalls = 0;
  end
  always @(negedge clk) begin
    if (!rst_n) begin
      ack  <= 1'b0;
      rcvd <= 0;
    end else if (ledr_phase(ch) != ack) begin
      if (int'($urandom_range(99)) < stall_pct) begin
        stalls <= stalls + 1;
      end else begin
        if (rcvd < MAXN) got[rcvd] <= ch.v;
        if (rcvd == 0) t_first <= cycle;
        t_last <= cycle;
        rcvd   <= rcvd + 1;
        ack    <= ledr_phase(ch);
      end
    end
  end
endmodule
