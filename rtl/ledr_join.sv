// ledr_join: acknowledge join (C-element) for one LEDR token consumed by several receivers.
//
// A sender in the two-phase LEDR protocol may present its next token once the acknowledge level
// equals the phase of its current token. When a token fans out to several receivers, each
// receiver reports the phase it holds; the joint acknowledge must show the new phase only once
// every enabled receiver holds it. Receivers never run ahead of the sender, so the C-element
// reduces to: ack = token phase when all enabled receivers match it, else its complement.
// With no receiver enabled the token is acknowledged at once (the channel acts as a sink).
// Purely combinational; all inputs come from registers. The join itself is this design's own
// formulation of the acknowledge merge that fan-out requires.
module ledr_join #(
  parameter int unsigned N = 2
) (
  input  logic         tok_phase,  // phase of the token being offered
  input  logic [N-1:0] rx_phase,   // phase held by each receiver
  input  logic [N-1:0] rx_en,      // receivers that take part
  output logic         ack
);
  logic all_have;
  always_comb begin
    all_have = 1'b1;
    for (int i = 0; i < int'(N); i++)
      if (rx_en[i] && (rx_phase[i] != tok_phase)) all_have = 1'b0;
    ack = all_have ? tok_phase : ~tok_phase;
  end
endmodule
