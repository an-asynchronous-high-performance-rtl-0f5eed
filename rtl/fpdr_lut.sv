// fpdr_lut: four-input, one-output look-up table in the four-phase dual-rail (FPDR) code,
// pipelined in three stages.
//
// The document gives the function (any 4-input boolean function, FPDR, three pipeline stages,
// domino logic). The stage contents are this design's own:
//   stage 1 latches the four dual-rail inputs a,b,c,d (in_d[0..3]);
//   stage 2 decodes a,b into one of four minterm lines and ANDs/ORs them with the truth table,
//           giving four dual-rail candidates m[cd] = cfg[{cd,ab}], and passes c,d on;
//   stage 3 decodes c,d and selects one candidate, the dual-rail output.
// As in domino dual-rail logic, a stage's output is a spacer when its input is a spacer, so the
// same equations make data and spacer. Each stage is a Muller-pipeline register: it takes data
// when its input is complete and the next stage is empty, and takes the spacer when its input is
// all-spacer and the next stage is full.
//
// Interface: in_ack = stage 1 full (FPDR acknowledge to the sender); out_ack = receiver full.
// Timing: 3 clk steps from input to output; a data+spacer round takes several steps, which is
// why the logic block duplicates this LUT.
module fpdr_lut
  import fpga_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [LUT_SIZE-1:0]    cfg,
  input  fpdr_t [LUT_K-1:0]      in_d,
  output logic                   in_ack,
  output fpdr_t                  out_d,
  input  logic                   out_ack
);
  typedef struct packed {
    fpdr_t [3:0] m;   // candidates per (c,d)
    fpdr_t       c;
    fpdr_t       d;
  } s2_t;

  fpdr_t [LUT_K-1:0] s1;
  s2_t               s2, s2_next;
  fpdr_t             s3, s3_next;

  // Completion detection: every rail pair valid / every rail pair spacer.
  function automatic logic all_valid(fpdr_t [5:0] w, int n);
    logic ok;
    ok = 1'b1;
    for (int i = 0; i < n; i++) if (!fpdr_valid(w[i])) ok = 1'b0;
    return ok;
  endfunction

  function automatic logic all_spacer(fpdr_t [5:0] w, int n);
    logic ok;
    ok = 1'b1;
    for (int i = 0; i < n; i++) if (fpdr_valid(w[i])) ok = 1'b0;
    return ok;
  endfunction

  logic in_full, in_empty, s1_full, s1_empty, s2_full, s2_empty, s3_full, s3_empty;

  assign in_full  = all_valid({4'b0, in_d}, 4);
  assign in_empty = all_spacer({4'b0, in_d}, 4);
  assign s1_full  = all_valid({4'b0, s1}, 4);
  assign s1_empty = all_spacer({4'b0, s1}, 4);
  assign s2_full  = all_valid(s2, 6);
  assign s2_empty = all_spacer(s2, 6);
  assign s3_full  = fpdr_valid(s3);
  assign s3_empty = !fpdr_valid(s3);

  // Stage 2 logic: a,b minterm decode, AND-OR with the truth table.
  always_comb begin
    logic [3:0] ab;
    ab[0] = s1[0].f & s1[1].f;
    ab[1] = s1[0].t & s1[1].f;
    ab[2] = s1[0].f & s1[1].t;
    ab[3] = s1[0].t & s1[1].t;
    for (int cd = 0; cd < 4; cd++) begin
      s2_next.m[cd].t = |(ab &  cfg[4*cd +: 4]);
      s2_next.m[cd].f = |(ab & ~cfg[4*cd +: 4]);
    end
    s2_next.c = s1[2];
    s2_next.d = s1[3];
  end

  // Stage 3 logic: c,d minterm decode selects one candidate.
  always_comb begin
    logic [3:0] cd;
    cd[0] = s2.c.f & s2.d.f;
    cd[1] = s2.c.t & s2.d.f;
    cd[2] = s2.c.f & s2.d.t;
    cd[3] = s2.c.t & s2.d.t;
    s3_next.t = 1'b0;
    s3_next.f = 1'b0;
    for (int i = 0; i < 4; i++) begin
      s3_next.t |= cd[i] & s2.m[i].t;
      s3_next.f |= cd[i] & s2.m[i].f;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
      s3 <= '0;
    end else begin
      if ((in_full && s1_empty && !s2_full) || (in_empty && s1_full && s2_full))
        s1 <= in_d;
      if ((s1_full && s2_empty && !s3_full) || (s1_empty && s2_full && s3_full))
        s2 <= s2_next;
      if ((s2_full && s3_empty && !out_ack) || (s2_empty && s3_full && out_ack))
        s3 <= s3_next;
    end
  end

  assign in_ack = s1_full;
  assign out_d  = s3;

  // FPDR never carries (1,1).
  property p_no_illegal;
    @(posedge clk) disable iff (!rst_n) !(s3.t && s3.f);
  endproperty
  a_no_illegal: assert property (p_no_illegal);
endmodule
