// fpga_pkg: shared types, constants and codec functions of the LEDR/FPDR hybrid FPGA.
//
// Two dual-rail codes are used. LEDR (level-encoded dual-rail) carries a value bit V and a
// redundant bit R = V xor phase; a new token is recognised by a change of phase (V xor R), so
// consecutive tokens differ in exactly one wire and no spacer is needed. It is used on every
// channel between cells and inside the connection blocks. FPDR (four-phase dual-rail) carries
// a true rail and a false rail: value 1 = (1,0), value 0 = (0,1), spacer = (0,0); (1,1) is
// illegal. It is used inside the look-up tables. These codes follow the document.
//
// The cell configuration layout (cell_cfg_t) and the direction numbering are this design's own
// choices.
package fpga_pkg;

  // LEDR codeword: value bit and redundant bit.
  typedef struct packed {
    logic v;
    logic r;
  } ledr_t;

  // FPDR codeword: true rail and false rail.
  typedef struct packed {
    logic t;
    logic f;
  } fpdr_t;

  localparam int unsigned NDIR     = 8;   // neighbours of a cell
  localparam int unsigned LUT_K    = 4;   // LUT inputs
  localparam int unsigned LUT_SIZE = 16;  // truth-table bits
  localparam int unsigned NLUT     = 2;   // duplicated LUTs (dual pipeline)

  localparam fpdr_t FPDR_SPACER = '{t: 1'b0, f: 1'b0};
  localparam ledr_t LEDR_RESET  = '{v: 1'b0, r: 1'b0};

  // Channel directions; a cell's channel d faces the neighbour at (row+DR, col+DC).
  typedef enum logic [2:0] {
    DIR_N  = 3'd0,
    DIR_NE = 3'd1,
    DIR_E  = 3'd2,
    DIR_SE = 3'd3,
    DIR_S  = 3'd4,
    DIR_SW = 3'd5,
    DIR_W  = 3'd6,
    DIR_NW = 3'd7
  } dir_e;

  // Input connection block configuration: enable and channel select.
  typedef struct packed {
    logic       en;
    logic [2:0] sel;
  } icb_cfg_t;

  // Whole-cell configuration.
  typedef struct packed {
    icb_cfg_t [LUT_K-1:0]    icb;     // one per LB input
    logic     [LUT_SIZE-1:0] lut;     // truth table, index {d,c,b,a}
    logic     [NDIR-1:0]     ocb_en;  // output channels driven by the LB
  } cell_cfg_t;

  function automatic logic ledr_phase(ledr_t c);
    return c.v ^ c.r;
  endfunction

  function automatic ledr_t ledr_enc(logic value, logic phase);
    ledr_t c;
    c.v = value;
    c.r = value ^ phase;
    return c;
  endfunction

  function automatic fpdr_t fpdr_enc(logic value);
    fpdr_t c;
    c.t = value;
    c.f = ~value;
    return c;
  endfunction

  function automatic logic fpdr_valid(fpdr_t c);
    return c.t | c.f;
  endfunction

  // Row offset of a direction.
  function automatic int dir_dr(int d);
    case (d)
      0, 1, 7: return -1;
      3, 4, 5: return 1;
      default: return 0;
    endcase
  endfunction

  // Column offset of a direction.
  function automatic int dir_dc(int d);
    case (d)
      1, 2, 3: return 1;
      5, 6, 7: return -1;
      default: return 0;
    endcase
  endfunction

endpackage
