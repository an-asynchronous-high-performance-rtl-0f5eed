// ledr_fpdr_conv: LEDR-to-FPDR converter at the input of the logic block.
//
// It waits until all four LEDR inputs carry the phase it expects next (the complement of the
// phase it last acknowledged). A set in phase 0 is sent as FPDR data to LUT0 and a set in phase 1
// to LUT1, as the document describes; the other LUT meanwhile receives its spacer. The data is
// written only while that LUT's FPDR register holds a spacer and the LUT's first stage is empty
// (lut_ack low); the register returns to spacer once the LUT acknowledges (lut_ack high).
// Because successive sets alternate between the LUTs, each LUT sees data and spacer at half the
// LEDR token rate, which hides the spacer time.
//
// Interface: lb_ack is a level equal to the phase of the last consumed input set, shared by the
// four input connection blocks. Timing: one clk step to convert; at most one set every 2 steps.
module ledr_fpdr_conv
  import fpga_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  ledr_t [LUT_K-1:0]             lb_in,
  output logic                          lb_ack,
  output fpdr_t [NLUT-1:0][LUT_K-1:0]   lut_in,
  input  logic  [NLUT-1:0]              lut_ack
);
  logic exp_ph;     // phase of the next input set
  logic arrived;    // all four inputs show exp_ph
  logic can_send;

  assign exp_ph = ~lb_ack;

  always_comb begin
    arrived = 1'b1;
    for (int i = 0; i < int'(LUT_K); i++)
      if (ledr_phase(lb_in[i]) != exp_ph) arrived = 1'b0;
  end

  assign can_send = arrived && !fpdr_valid(lut_in[exp_ph][0]) && !lut_ack[exp_ph];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lb_ack <= 1'b0;
      lut_in <= {(NLUT*LUT_K){FPDR_SPACER}};
    end else begin
      for (int k = 0; k < int'(NLUT); k++)
        if (fpdr_valid(lut_in[k][0]) && lut_ack[k]) lut_in[k] <= {LUT_K{FPDR_SPACER}};
      if (can_send) begin
        for (int i = 0; i < int'(LUT_K); i++) lut_in[exp_ph][i] <= fpdr_enc(lb_in[i].v);
        lb_ack <= exp_ph;
      end
    end
  end

  // FPDR rule: a LUT input word is all spacer or all data, never partial.
  for (genvar k = 0; k < int'(NLUT); k++) begin : g_chk
    logic [LUT_K-1:0] rail_valid;
    for (genvar i = 0; i < int'(LUT_K); i++) begin : g_v
      assign rail_valid[i] = fpdr_valid(lut_in[k][i]);
    end
    property p_whole_word;
      @(posedge clk) disable iff (!rst_n) (rail_valid == '0) || (&rail_valid);
    endproperty
    a_whole_word: assert property (p_whole_word);
  end
endmodule
