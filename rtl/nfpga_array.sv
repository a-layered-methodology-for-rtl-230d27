// Nanowire FPGA (NFPGA) fabric: a ROWS x COLS tiling of identical cells.
//
// Each cell (nfpga_cell) has a K-input LUT and directional routing of W
// tracks per side.  Neighbouring cells are joined edge to edge: the south
// output of cell (r, c) is the north input of cell (r+1, c), its east output
// the west input of cell (r, c+1), and so on.  Row 0 is the north edge,
// column 0 the west edge.  The signals crossing the outer edges are the
// fabric's I/O: *_edge_in enter the border cells, *_edge_out leave them.
// All compute-plane signals are dual-rail pairs (nfpga_pkg::dual_t).
//
// Configuration: one write per clock cycle.  cfg_row / cfg_col pick the
// cell, cfg (nfpga_pkg::cfg_wr_t) says what is written there (see
// nfpga_cell).  A write lands on the rising clock edge.  Reset (active low,
// synchronous) clears every cell's configuration.
//
// Timing: the fabric is combinational from the edge inputs to the edge
// outputs; a signal path is as long as the route configured through it.
//
// The regular two-dimensional tiling of K-LUT cells with 4xW multiplexers
// follows the NFPGA description.  The array size, the row/column addressed
// configuration port and the observation port f_obs are this design's own.
//
// Circuit warnings: because each cell forwards signals in all four
// directions, the netlist contains structural combinational loops through
// the routing multiplexers of neighbouring cells (as any island FPGA
// fabric does).  A loop only becomes a real one if a configuration closes
// it; reset configuration (every output mux forwards its LUT, every LUT
// listens north) closes none, and a configuration that loops a signal back
// onto itself is a configuration error, not a fabric error.
module nfpga_array
  import nfpga_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4,
  parameter int unsigned K    = 3,
  parameter int unsigned W    = 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // configuration
  input  logic [$clog2(ROWS+1)-1:0]        cfg_row,
  input  logic [$clog2(COLS+1)-1:0]        cfg_col,
  input  cfg_wr_t                          cfg,
  // fabric edges
  input  dual_t [COLS-1:0][W-1:0]          north_edge_in,
  input  dual_t [COLS-1:0][W-1:0]          south_edge_in,
  input  dual_t [ROWS-1:0][W-1:0]          west_edge_in,
  input  dual_t [ROWS-1:0][W-1:0]          east_edge_in,
  output dual_t [COLS-1:0][W-1:0]          north_edge_out,
  output dual_t [COLS-1:0][W-1:0]          south_edge_out,
  output dual_t [ROWS-1:0][W-1:0]          west_edge_out,
  output dual_t [ROWS-1:0][W-1:0]          east_edge_out,
  // LUT output of every cell, for observation
  output dual_t [ROWS-1:0][COLS-1:0]       f_obs
);

  // Signals leaving each cell through each side.
  dual_t [ROWS-1:0][COLS-1:0][W-1:0] n_out, s_out, e_out, w_out;
  // Signals entering each cell through each side.
  dual_t [ROWS-1:0][COLS-1:0][W-1:0] n_in, s_in, e_in, w_in;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      cfg_wr_t cell_cfg;

      always_comb begin
        cell_cfg    = cfg;
        cell_cfg.we = cfg.we && (cfg_row == ($bits(cfg_row))'(r))
                             && (cfg_col == ($bits(cfg_col))'(c));
      end

      // Neighbour wiring.
      if (r == 0) begin : g_n_edge
        assign n_in[r][c] = north_edge_in[c];
        assign north_edge_out[c] = n_out[r][c];
      end else begin : g_n_nb
        assign n_in[r][c] = s_out[r-1][c];
      end
      if (r == ROWS - 1) begin : g_s_edge
        assign s_in[r][c] = south_edge_in[c];
        assign south_edge_out[c] = s_out[r][c];
      end else begin : g_s_nb
        assign s_in[r][c] = n_out[r+1][c];
      end
      if (c == 0) begin : g_w_edge
        assign w_in[r][c] = west_edge_in[r];
        assign west_edge_out[r] = w_out[r][c];
      end else begin : g_w_nb
        assign w_in[r][c] = e_out[r][c-1];
      end
      if (c == COLS - 1) begin : g_e_edge
        assign e_in[r][c] = east_edge_in[r];
        assign east_edge_out[r] = e_out[r][c];
      end else begin : g_e_nb
        assign e_in[r][c] = w_out[r][c+1];
      end

      nfpga_cell #(.K(K), .W(W)) u_cell (
        .clk       (clk),
        .rst_n     (rst_n),
        .cfg       (cell_cfg),
        .north_in  (n_in[r][c]),
        .south_in  (s_in[r][c]),
        .east_in   (e_in[r][c]),
        .west_in   (w_in[r][c]),
        .north_out (n_out[r][c]),
        .south_out (s_out[r][c]),
        .east_out  (e_out[r][c]),
        .west_out  (w_out[r][c]),
        .f_out     (f_obs[r][c])
      );
    end
  end

endmodule
