// ledr_src: testbench LEDR sender. Sends bits[0..n-1] in order on one LEDR channel, one token
// per accepted handshake, optionally holding back a random share of the steps (stall_pct).
// Drives on the falling clk edge so it never races the design's rising-edge registers.
module ledr_src
  import fpga_pkg::*;
#(
  parameter int MAXN = 256
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [MAXN-1:0] bits,
  input  int              n,
  input  int              stall_pct,
  output ledr_t           ch,
  input  logic            ack,
  output int              sent
);
  initial begin
    ch   = LEDR_RESET;
    sent = 0;
  end
  always @(negedge clk) begin
    if (!rst_n) begin
      ch   <= LEDR_RESET;
      sent <= 0;
    end else if (sent < n && ack == ledr_phase(ch) && !(int'($urandom_range(99)) < stall_pct)) begin
      ch   <= ledr_enc(bits[sent], ~ledr_phase(ch));
      sent <= sent + 1;
    end
  end
endmodule
