// One tile of the nanowire FPGA (NFPGA).
//
// A cell holds a K-input LUT and neighbour-to-neighbour directional routing
// with channel width W:
//   * K input multiplexers (4-to-1).  Input mux i feeds LUT input x(i+1) and
//     picks the signal arriving from the north, south, east or west on
//     track i mod W (select 0..3 in that order).
//   * 4*W output multiplexers (4-to-1), one per direction and track.  The
//     mux driving direction d on track t picks the LUT output F (select 0)
//     or the signal arriving on track t from one of the three other sides
//     (selects 1..3, in the order north, south, east, west with d left out).
//     Tracks never change number: the routing is disjoint.
//   * Two routing configuration registers (one for the output muxes, one
//     for the input muxes) and the LUT's own configuration store.
// Every compute-plane signal is a dual-rail pair (nfpga_pkg::dual_t).
//
// Configuration: one write per cycle through cfg (nfpga_pkg::cfg_wr_t):
//   tgt = CFG_LUT : LUT bit idx[K-1:0] := msb ? data[1] : data[0]
//   tgt = CFG_OUT : select bits of output mux idx := data,
//                   with idx = direction * W + track (direction per dir_e)
//   tgt = CFG_IN  : select bits of input mux idx := data
// A write lands on the rising clock edge.  Reset (active low, synchronous)
// clears all configuration: every output mux then forwards F and every LUT
// input listens to the north.
//
// Timing: from the *_in ports to the *_out ports the cell is combinational.
//
// The cell contents (a K-LUT, 4xW 4-to-1 multiplexers, disjoint routing,
// configuration registers holding 2 select bits per mux) follow the NFPGA
// description.  The mux input order, the track used by each LUT input mux,
// the configuration write format and the reset are this design's choices.
module nfpga_cell
  import nfpga_pkg::*;
#(
  parameter int unsigned K = 3,  // LUT inputs
  parameter int unsigned W = 1   // channel width (tracks per side)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cfg_wr_t       cfg,
  input  dual_t [W-1:0] north_in,
  input  dual_t [W-1:0] south_in,
  input  dual_t [W-1:0] east_in,
  input  dual_t [W-1:0] west_in,
  output dual_t [W-1:0] north_out,
  output dual_t [W-1:0] south_out,
  output dual_t [W-1:0] east_out,
  output dual_t [W-1:0] west_out,
  output dual_t         f_out      // LUT output, for observation
);

  localparam int unsigned NOUT = 4 * W;

  // ---------------------------------------------------------------- config
  logic [NOUT-1:0] out_sel_x;
  logic [K-1:0]    in_sel_x;
  logic            lut_we;

  always_comb begin
    out_sel_x = '0;
    in_sel_x  = '0;
    lut_we    = 1'b0;
    if (cfg.we) begin
      unique case (cfg.tgt)
        CFG_LUT: lut_we = 1'b1;
        CFG_OUT: for (int unsigned m = 0; m < NOUT; m++)
                   out_sel_x[m] = (cfg.idx == CFG_IDX_W'(m));
        CFG_IN:  for (int unsigned m = 0; m < K; m++)
                   in_sel_x[m] = (cfg.idx == CFG_IDX_W'(m));
        default: ;
      endcase
    end
  end

  logic [NOUT-1:0][1:0] out_sel, out_sel_n;
  logic [K-1:0][1:0]    in_sel,  in_sel_n;

  routing_config #(.NMUX(NOUT)) u_out_cfg (
    .clk       (clk),
    .rst_n     (rst_n),
    .sel_x     (out_sel_x),
    .cfg_data  (cfg.data),
    .mux_sel   (out_sel),
    .mux_sel_n (out_sel_n)
  );

  routing_config #(.NMUX(K)) u_in_cfg (
    .clk       (clk),
    .rst_n     (rst_n),
    .sel_x     (in_sel_x),
    .cfg_data  (cfg.data),
    .mux_sel   (in_sel),
    .mux_sel_n (in_sel_n)
  );

  // ------------------------------------------------------ LUT input muxes
  dual_t [K-1:0] x;
  dual_t f;

  for (genvar i = 0; i < K; i++) begin : g_in_mux
    localparam int unsigned TRK = i % W;
    switch_mux u_mux (
      .in  ({west_in[TRK], east_in[TRK], south_in[TRK], north_in[TRK]}),
      .sel (in_sel[i]),
      .out (x[i])
    );
  end

  // ------------------------------------------------------------------ LUT
  nfpga_lut #(.K(K)) u_lut (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (lut_we),
    .wr_addr (cfg.idx[K-1:0]),
    .wr_data (cfg.data),
    .wr_msb  (cfg.msb),
    .x       (x),
    .f       (f)
  );

  assign f_out = f;

  // --------------------------------------------------------- output muxes
  // Inputs of the mux for each direction: F, then the other three sides in
  // the order north, south, east, west.
  for (genvar t = 0; t < W; t++) begin : g_trk
    switch_mux u_mux_n (
      .in  ({west_in[t], east_in[t], south_in[t], f}),
      .sel (out_sel[int'(DIR_N) * W + t]),
      .out (north_out[t])
    );
    switch_mux u_mux_s (
      .in  ({west_in[t], east_in[t], north_in[t], f}),
      .sel (out_sel[int'(DIR_S) * W + t]),
      .out (south_out[t])
    );
    switch_mux u_mux_e (
      .in  ({west_in[t], south_in[t], north_in[t], f}),
      .sel (out_sel[int'(DIR_E) * W + t]),
      .out (east_out[t])
    );
    switch_mux u_mux_w (
      .in  ({east_in[t], south_in[t], north_in[t], f}),
      .sel (out_sel[int'(DIR_W) * W + t]),
      .out (west_out[t])
    );
  end

  // The complemented select rails are not needed by this two-valued model.
  logic unused_sel_n;
  assign unused_sel_n = ^{out_sel_n, in_sel_n, cfg.idx};

endmodule
