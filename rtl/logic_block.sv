// logic_block: the LB, a dual-pipeline hybrid of LEDR and FPDR.
//
// Four LEDR inputs enter an LEDR-to-FPDR converter, which hands input sets of phase 0 to LUT0
// and of phase 1 to LUT1. Both LUTs are identical three-stage FPDR pipelines holding the same
// truth table; while one evaluates data the other returns to spacer, so the spacer does not cost
// throughput. An FPDR-to-LEDR converter takes the LUT outputs alternately and rebuilds one LEDR
// stream. This structure follows the document; sharing one truth table between the two LUTs is
// this design's reading of "the LUT is duplicated".
//
// Interface: lb_in/lb_in_ack towards the input connection blocks, lb_out/lb_out_ack towards the
// output connection block, all LEDR two-phase. Timing: 5 clk steps from input set to output
// token (converter, 3 LUT stages, converter); one result every 2 steps at full rate.
module logic_block
  import fpga_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [LUT_SIZE-1:0]   lut_cfg,
  input  ledr_t [LUT_K-1:0]     lb_in,
  output logic                  lb_in_ack,
  output ledr_t                 lb_out,
  input  logic                  lb_out_ack
);
  fpdr_t [NLUT-1:0][LUT_K-1:0] lut_in;
  logic  [NLUT-1:0]            lut_in_ack;
  fpdr_t [NLUT-1:0]            lut_out;
  logic  [NLUT-1:0]            lut_out_ack;

  ledr_fpdr_conv u_in_conv (
    .clk     (clk),
    .rst_n   (rst_n),
    .lb_in   (lb_in),
    .lb_ack  (lb_in_ack),
    .lut_in  (lut_in),
    .lut_ack (lut_in_ack)
  );

  for (genvar k = 0; k < int'(NLUT); k++) begin : g_lut
    fpdr_lut u_lut (
      .clk     (clk),
      .rst_n   (rst_n),
      .cfg     (lut_cfg),
      .in_d    (lut_in[k]),
      .in_ack  (lut_in_ack[k]),
      .out_d   (lut_out[k]),
      .out_ack (lut_out_ack[k])
    );
  end

  fpdr_ledr_conv u_out_conv (
    .clk     (clk),
    .rst_n   (rst_n),
    .lut_out (lut_out),
    .lut_ack (lut_out_ack),
    .lb_out  (lb_out),
    .lb_ack  (lb_out_ack)
  );
endmodule
