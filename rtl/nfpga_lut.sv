// K-input look-up table of the NFPGA cell.
//
// The table is cut into the same units as the nanowire layout:
//   A  (write)     - the configuration bit to store is taken either from the
//   A1 (selection)   MSB or from the LSB of a 2-bit configuration word, as
//                    chosen by wr_msb, so that the configuration arrives one
//                    bit at a time; the row is picked by a decoder on wr_addr.
//   B  (store)     - 2^K configuration bits.
//   C  (read)      - the stored bits are read out to the decoding unit.
//   D  (decoding)  - a decoder on the compute-plane inputs x selects one bit.
//   D1 (output)    - the selected bit is given with its complement.
// With K = 3 the behaviour is the truth table of the reference 3-input LUT:
// f = mem[x], where x = {x3, x2, x1} and x1 is the least significant bit.
//
// Interface: x (compute plane, dual rail), f (dual rail).  Configuration:
// wr_en, wr_addr, wr_data[1:0], wr_msb.
// Timing: x to f is combinational.  A write lands on the rising clock edge.
// An assertion checks on every clock edge that the output rails differ.
// Reset (active low, synchronous) clears the table, a choice of this design.
module nfpga_lut
  import nfpga_pkg::*;
#(
  parameter int unsigned K = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration plane
  input  logic          wr_en,
  input  logic [K-1:0]  wr_addr,
  input  logic [1:0]    wr_data,
  input  logic          wr_msb,
  // compute plane
  input  dual_t [K-1:0] x,
  output dual_t         f
);

  localparam int unsigned DEPTH = 2**K;

  logic [DEPTH-1:0] wr_row, wr_row_n;
  logic [DEPTH-1:0] rd_row, rd_row_n;
  logic [DEPTH-1:0] store_q;   // part B
  logic             wval;      // part A / A1 output
  logic [K-1:0]     x_t;

  // Part A1: pick the MSB or the LSB of the configuration word.
  assign wval = wr_msb ? wr_data[1] : wr_data[0];

  // Part A: row selection of the write.
  addr_decoder #(.N(K)) u_wr_dec (
    .addr  (wr_addr),
    .sel   (wr_row),
    .sel_n (wr_row_n)
  );

  // Part B: storage.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      store_q <= '0;
    end else if (wr_en) begin
      for (int unsigned i = 0; i < DEPTH; i++) begin
        if (wr_row[i]) store_q[i] <= wval;
      end
    end
  end

  // Part D: decode the compute-plane address (true rails).
  always_comb begin
    for (int unsigned b = 0; b < K; b++) x_t[b] = x[b].t;
  end

  addr_decoder #(.N(K)) u_rd_dec (
    .addr  (x_t),
    .sel   (rd_row),
    .sel_n (rd_row_n)
  );

  // Parts C and D1: read the selected bit and form both rails.  The
  // complement rail is built from the complemented store, as the layout
  // produces the two outputs from separate product terms.
  always_comb begin
    f.t = |(rd_row & store_q);
    f.c = |(rd_row & ~store_q);
  end

  // The two output rails are always complementary.
  a_rails : assert property (@(posedge clk) disable iff (!rst_n) f.t != f.c)
    else $error("nfpga_lut: output rails not complementary");

  // The complement rails of the decoders and of x only mirror the true
  // rails and are not needed by this two-valued model.
  logic unused_rails;
  always_comb begin
    unused_rails = ^{wr_row_n, rd_row_n};
    for (int unsigned b = 0; b < K; b++) unused_rails = unused_rails ^ x[b].c;
  end

endmodule
