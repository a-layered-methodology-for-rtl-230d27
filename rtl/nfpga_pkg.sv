// Shared types and constants of the nanowire FPGA (NFPGA).
//
// The target technology carries every logic signal on two wires, the value
// and its complement, so the compute plane of the fabric is built from
// dual-rail pairs (dual_t).  The four routing directions and the layout of a
// configuration write are also defined here, because the cell and the array
// both need them.
package nfpga_pkg;

  // One signal in dual-rail form: t is the true rail, c its complement.
  typedef struct packed {
    logic t;
    logic c;
  } dual_t;

  // Routing directions, in the order the cell's input multiplexers list
  // their inputs (north, south, east, west).
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_S = 2'd1,
    DIR_E = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // Which configuration store of a cell a write goes to.
  typedef enum logic [1:0] {
    CFG_LUT   = 2'd0,  // one LUT truth-table bit
    CFG_OUT   = 2'd1,  // the 2 select bits of one output (switch) multiplexer
    CFG_IN    = 2'd2,  // the 2 select bits of one LUT input multiplexer
    CFG_NONE  = 2'd3
  } cfg_tgt_e;

  // Width of the index field of a configuration write.  It must hold a LUT
  // address, an output mux number (4 * channel width) and an input mux
  // number; 8 bits cover every size the parameters are meant for.
  localparam int unsigned CFG_IDX_W = 8;

  // One configuration write as seen by a cell.
  typedef struct packed {
    logic                 we;    // write strobe, one clock cycle
    cfg_tgt_e             tgt;   // target store
    logic [CFG_IDX_W-1:0] idx;   // LUT address or multiplexer number
    logic [1:0]           data;  // config1 (MSB), config0 (LSB)
    logic                 msb;   // LUT writes only: 1 writes data[1], 0 writes data[0]
  } cfg_wr_t;

  function automatic dual_t to_dual(input logic v);
    return '{t: v, c: ~v};
  endfunction

endpackage
