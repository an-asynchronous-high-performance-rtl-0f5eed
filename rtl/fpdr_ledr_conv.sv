// fpdr_ledr_conv: FPDR-to-LEDR converter at the output of the logic block.
//
// The two LUTs take input sets alternately (phase 0 to LUT0, phase 1 to LUT1), so the converter
// reads their outputs alternately: the next LEDR token has phase p = ~(current phase) and is
// taken from LUT p. It is emitted once LUT p presents FPDR data that has not yet been taken and
// the receiver acknowledges the current token (lb_ack equals the current phase). The converter
// then raises the FPDR acknowledge of LUT p and drops it when that LUT returns to spacer. The
// document gives the alternating behaviour; the registers are this design's own.
//
// Timing: one clk step per token; at most one token every 2 steps with a two-phase receiver.
module fpdr_ledr_conv
  import fpga_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  fpdr_t [NLUT-1:0]       lut_out,
  output logic  [NLUT-1:0]       lut_ack,
  output ledr_t                  lb_out,
  input  logic                   lb_ack
);
  logic cur_ph, nxt_ph;
  assign cur_ph = ledr_phase(lb_out);
  assign nxt_ph = ~cur_ph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lb_out  <= LEDR_RESET;
      lut_ack <= '0;
    end else begin
      for (int k = 0; k < int'(NLUT); k++)
        if (lut_ack[k] && !fpdr_valid(lut_out[k])) lut_ack[k] <= 1'b0;
      if (fpdr_valid(lut_out[nxt_ph]) && !lut_ack[nxt_ph] && lb_ack == cur_ph) begin
        lb_out           <= ledr_enc(lut_out[nxt_ph].t, nxt_ph);
        lut_ack[nxt_ph]  <= 1'b1;
      end
    end
  end

  // LEDR rule: one wire changes per token, and only after the receiver held the previous phase.
  property p_ledr_step;
    @(posedge clk) disable iff (!rst_n)
      (lb_out != $past(lb_out)) |->
        ($countones(lb_out ^ $past(lb_out)) == 1 && $past(lb_ack) == ledr_phase($past(lb_out)));
  endproperty
  a_ledr_step: assert property (p_ledr_step);
endmodule
