// fpga_array: top level, a ROWS x COLS array of cells connected to their eight neighbours.
//
// Cell (r,c) receives on its channel d what its neighbour at (r+dr, c+dc) sends on the opposite
// channel (d+4) mod 8, and returns the acknowledge the same way. Channel slots that face outside
// the array are the top-level ports edge_in / edge_out, indexed [row][col][direction]; slots that
// face a neighbour are internal, so those port entries are ignored (edge_in, edge_out_ack) or
// driven to 0 (edge_out, edge_in_ack). Directions are numbered N=0, NE, E, SE, S, SW, W, NW=7.
// The eight-neighbour mesh follows the document; the array size (4 x 4 by default), the edge
// ports and the static parallel configuration input are this design's own choices.
//
// All channels are LEDR two-phase; clk is the emulation time step of the asynchronous circuit
// and rst_n an active-low reset.
module fpga_array
  import fpga_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  cell_cfg_t [ROWS-1:0][COLS-1:0]          cfg,
  input  ledr_t     [ROWS-1:0][COLS-1:0][NDIR-1:0] edge_in,
  output logic      [ROWS-1:0][COLS-1:0][NDIR-1:0] edge_in_ack,
  output ledr_t     [ROWS-1:0][COLS-1:0][NDIR-1:0] edge_out,
  input  logic      [ROWS-1:0][COLS-1:0][NDIR-1:0] edge_out_ack
);
  ledr_t [ROWS-1:0][COLS-1:0][NDIR-1:0] c_in;
  logic  [ROWS-1:0][COLS-1:0][NDIR-1:0] c_in_ack;
  ledr_t [ROWS-1:0][COLS-1:0][NDIR-1:0] c_out;
  logic  [ROWS-1:0][COLS-1:0][NDIR-1:0] c_out_ack;

  for (genvar r = 0; r < int'(ROWS); r++) begin : g_row
    for (genvar c = 0; c < int'(COLS); c++) begin : g_col
      for (genvar d = 0; d < int'(NDIR); d++) begin : g_dir
        localparam int NR = r + dir_dr(d);
        localparam int NC = c + dir_dc(d);
        localparam int OD = (d + 4) % 8;
        if (NR >= 0 && NR < int'(ROWS) && NC >= 0 && NC < int'(COLS)) begin : g_inner
          assign c_in[r][c][d]        = c_out[NR][NC][OD];
          assign c_out_ack[r][c][d]   = c_in_ack[NR][NC][OD];
          assign edge_out[r][c][d]    = LEDR_RESET;
          assign edge_in_ack[r][c][d] = 1'b0;
        end else begin : g_edge
          assign c_in[r][c][d]        = edge_in[r][c][d];
          assign c_out_ack[r][c][d]   = edge_out_ack[r][c][d];
          assign edge_out[r][c][d]    = c_out[r][c][d];
          assign edge_in_ack[r][c][d] = c_in_ack[r][c][d];
        end
      end

      fpga_cell u_cell (
        .clk        (clk),
        .rst_n      (rst_n),
        .cfg        (cfg[r][c]),
        .ch_in      (c_in[r][c]),
        .ch_in_ack  (c_in_ack[r][c]),
        .ch_out     (c_out[r][c]),
        .ch_out_ack (c_out_ack[r][c])
      );
    end
  end
endmodule
