// input_cb: Input Connection Block, selects one of a cell's eight LEDR input channels as one
// LB input.
//
// Per the document the block is built from multiplexers that double as LEDR registers and forms
// a two-stage pipeline. Here stage 1 is two 4:1 mux registers (channels 0-3 and 4-7) and stage 2
// is one 2:1 mux register; only the first-level register of the selected half moves. Each LEDR
// register follows the two-phase rule: it copies its input when the input shows a new phase and
// the next stage already acknowledges (holds) the register's current phase. The acknowledge
// returned for the selected channel is the phase of the first-level register serving it; other
// channels see 0. ch_listen tells the cell which channel is selected, so the cell can join the
// acknowledges of several CBs listening to one channel.
// With cfg.en = 0 the block is a constant-0 source: stage 2 issues a fresh 0 token each time the
// LB acknowledges, so an unused LUT input never stalls the LB (this design's own choice).
//
// Timing: one clk step per register; a token crosses the block in 2 steps and the block
// accepts one token every 2 steps when the LB keeps up. Configuration is static.
module input_cb
  import fpga_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  icb_cfg_t            cfg,
  input  ledr_t [NDIR-1:0]    ch_in,
  output logic  [NDIR-1:0]    ch_ack,
  output logic  [NDIR-1:0]    ch_listen,
  output ledr_t               lb_out,
  input  logic                lb_ack
);
  ledr_t [1:0] s1;   // first-level 4:1 mux registers
  ledr_t       s2;   // second-level 2:1 mux register

  logic sel_hi;
  assign sel_hi = cfg.sel[2];

  // Stage 1.
  for (genvar g = 0; g < 2; g++) begin : g_s1
    ledr_t src;
    logic  take;
    assign src  = ch_in[{g[0], cfg.sel[1:0]}];
    assign take = cfg.en && (sel_hi == g[0])
                  && (ledr_phase(src) != ledr_phase(s1[g]))
                  && (ledr_phase(s2) == ledr_phase(s1[g]));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    s1[g] <= LEDR_RESET;
      else if (take) s1[g] <= src;
    end
  end

  // Stage 2.
  ledr_t src2;
  assign src2 = s1[sel_hi];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2 <= LEDR_RESET;
    end else if (ledr_phase(s2) == lb_ack) begin
      if (!cfg.en)
        s2 <= ledr_enc(1'b0, ~ledr_phase(s2));
      else if (ledr_phase(src2) != ledr_phase(s2))
        s2 <= src2;
    end
  end

  assign lb_out = s2;

  always_comb begin
    for (int k = 0; k < int'(NDIR); k++) begin
      ch_listen[k] = cfg.en && (cfg.sel == 3'(k));
      ch_ack[k]    = ch_listen[k] && ledr_phase(s1[k / 4]);
    end
  end

  // LEDR rule: a new token differs from the previous one in exactly one wire and is issued
  // only after the LB holds the previous token's phase.
  property p_ledr_step;
    @(posedge clk) disable iff (!rst_n)
      (lb_out != $past(lb_out)) |->
        ($countones(lb_out ^ $past(lb_out)) == 1 && $past(lb_ack) == ledr_phase($past(lb_out)));
  endproperty
  a_ledr_step: assert property (p_ledr_step);
endmodule
