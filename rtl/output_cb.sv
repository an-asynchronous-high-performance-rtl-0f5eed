// output_cb: Output Connection Block, distributes the LB output to any set of the eight output
// channels.
//
// Per the document it is built from demultiplexers that double as LEDR registers and forms a
// three-stage pipeline. Here it is a tree of 1:2 demux registers: level 1 has 2 registers,
// level 2 has 4 and level 3 has 8, one per output channel. A register is active when its subtree
// holds an enabled channel (cfg_en); it copies its parent's token when the parent shows a new
// phase and every active child already holds the register's current phase (C-element join of the
// children's acknowledges). The LB is acknowledged through a join of the active level-1
// registers; with no channel enabled the LB output is consumed and dropped. The tree shape and
// the enable mask are this design's own choices.
//
// Timing: one clk step per level, 3 steps from lb_in to ch_out, one token every 2 steps at best.
// ch_ack[k] is the phase the receiver of channel k holds. Configuration is static.
module output_cb
  import fpga_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic  [NDIR-1:0]    cfg_en,
  input  ledr_t               lb_in,
  output logic                lb_ack,
  output ledr_t [NDIR-1:0]    ch_out,
  input  logic  [NDIR-1:0]    ch_ack
);
  ledr_t [1:0] l1;
  ledr_t [3:0] l2;
  ledr_t [7:0] l3;

  logic [1:0] en1;
  logic [3:0] en2;
  logic [1:0] ph1;
  logic [3:0] ph2;
  logic [7:0] ph3;

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      en1[i] = |cfg_en[4*i +: 4];
      ph1[i] = ledr_phase(l1[i]);
    end
    for (int j = 0; j < 4; j++) begin
      en2[j] = |cfg_en[2*j +: 2];
      ph2[j] = ledr_phase(l2[j]);
    end
    for (int k = 0; k < 8; k++) ph3[k] = ledr_phase(l3[k]);
  end

  // Level 1: fed by the LB.
  for (genvar i = 0; i < 2; i++) begin : g_l1
    logic kids_ok;
    assign kids_ok = (!en2[2*i]   || ph2[2*i]   == ph1[i])
                  && (!en2[2*i+1] || ph2[2*i+1] == ph1[i]);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) l1[i] <= LEDR_RESET;
      else if (en1[i] && kids_ok && ledr_phase(lb_in) != ph1[i]) l1[i] <= lb_in;
    end
  end

  // Level 2.
  for (genvar j = 0; j < 4; j++) begin : g_l2
    logic kids_ok;
    assign kids_ok = (!cfg_en[2*j]   || ph3[2*j]   == ph2[j])
                  && (!cfg_en[2*j+1] || ph3[2*j+1] == ph2[j]);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) l2[j] <= LEDR_RESET;
      else if (en2[j] && kids_ok && ph1[j/2] != ph2[j]) l2[j] <= l1[j/2];
    end
  end

  // Level 3: the output channel registers.
  for (genvar k = 0; k < 8; k++) begin : g_l3
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) l3[k] <= LEDR_RESET;
      else if (cfg_en[k] && ch_ack[k] == ph3[k] && ph2[k/2] != ph3[k]) l3[k] <= l2[k/2];
    end
  end

  assign ch_out = l3;

  ledr_join #(.N(2)) u_join (
    .tok_phase (ledr_phase(lb_in)),
    .rx_phase  (ph1),
    .rx_en     (en1),
    .ack       (lb_ack)
  );

  // LEDR rule on every output channel: one wire changes per token, and only after the
  // receiver held the previous token's phase.
  for (genvar k = 0; k < 8; k++) begin : g_chk
    property p_ledr_step;
      @(posedge clk) disable iff (!rst_n)
        (ch_out[k] != $past(ch_out[k])) |->
          ($countones(ch_out[k] ^ $past(ch_out[k])) == 1
           && $past(ch_ack[k]) == ledr_phase($past(ch_out[k])));
    endproperty
    a_ledr_step: assert property (p_ledr_step);
  end
endmodule
