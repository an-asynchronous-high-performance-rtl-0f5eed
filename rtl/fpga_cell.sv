// fpga_cell: one cell of the array, with four Input CBs, one logic block and one Output CB.
//
// Each cell talks to its eight neighbours through LEDR channels (value, redundant and
// acknowledge wires, three per bit). Every Input CB picks one of the eight input channels for
// one LB input; the Output CB sends the LB result to any subset of the eight output channels.
// Several Input CBs may listen to the same input channel; the channel's acknowledge is then the
// C-element join of their first-level registers, and a channel no CB listens to is acknowledged
// at once. The composition follows the document; the acknowledge join is this design's own.
//
// Timing (clk steps): 2 through an Input CB, 5 through the LB, 3 through the Output CB, so
// 10 steps from an input channel to an output channel; one token every 2 steps at full rate.
module fpga_cell
  import fpga_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  cell_cfg_t           cfg,
  input  ledr_t [NDIR-1:0]    ch_in,
  output logic  [NDIR-1:0]    ch_in_ack,
  output ledr_t [NDIR-1:0]    ch_out,
  input  logic  [NDIR-1:0]    ch_out_ack
);
  ledr_t [LUT_K-1:0]             lb_in;
  logic                          lb_in_ack;
  ledr_t                         lb_out;
  logic                          lb_out_ack;
  logic  [LUT_K-1:0][NDIR-1:0]   cb_ack;
  logic  [LUT_K-1:0][NDIR-1:0]   cb_listen;

  for (genvar i = 0; i < int'(LUT_K); i++) begin : g_icb
    input_cb u_icb (
      .clk       (clk),
      .rst_n     (rst_n),
      .cfg       (cfg.icb[i]),
      .ch_in     (ch_in),
      .ch_ack    (cb_ack[i]),
      .ch_listen (cb_listen[i]),
      .lb_out    (lb_in[i]),
      .lb_ack    (lb_in_ack)
    );
  end

  // Acknowledge join per input channel.
  for (genvar k = 0; k < int'(NDIR); k++) begin : g_join
    logic [LUT_K-1:0] ph, en;
    for (genvar i = 0; i < int'(LUT_K); i++) begin : g_b
      assign ph[i] = cb_ack[i][k];
      assign en[i] = cb_listen[i][k];
    end
    ledr_join #(.N(LUT_K)) u_join (
      .tok_phase (ledr_phase(ch_in[k])),
      .rx_phase  (ph),
      .rx_en     (en),
      .ack       (ch_in_ack[k])
    );
  end

  logic_block u_lb (
    .clk        (clk),
    .rst_n      (rst_n),
    .lut_cfg    (cfg.lut),
    .lb_in      (lb_in),
    .lb_in_ack  (lb_in_ack),
    .lb_out     (lb_out),
    .lb_out_ack (lb_out_ack)
  );

  output_cb u_ocb (
    .clk    (clk),
    .rst_n  (rst_n),
    .cfg_en (cfg.ocb_en),
    .lb_in  (lb_out),
    .lb_ack (lb_out_ack),
    .ch_out (ch_out),
    .ch_ack (ch_out_ack)
  );
endmodule
