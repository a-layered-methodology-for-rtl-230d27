// Address decoder of the NFPGA LUT.
//
// Turns an N-bit address into 2^N one-hot select lines, each also given in
// complementary form, as the nanowire decoder does: its lower half forms the
// product term of every address combination and its upper half lets exactly
// one output line be active.  N = 4 (16 lines s0..s15) is the size of the
// decoder layout the design starts from; the LUT uses it with N = K.
//
// Interface: addr (a0 is bit 0), sel[i] is 1 exactly when addr == i, sel_n is
// the complement of sel.  Purely combinational.
module addr_decoder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]      addr,
  output logic [2**N-1:0]   sel,
  output logic [2**N-1:0]   sel_n
);

  // Each output is the AND of every address bit in true or complemented form.
  always_comb begin
    for (int unsigned i = 0; i < 2**N; i++) begin
      logic term;
      term = 1'b1;
      for (int unsigned b = 0; b < N; b++) begin
        term = term & (i[b] ? addr[b] : ~addr[b]);
      end
      sel[i]   = term;
      sel_n[i] = ~term;
    end
  end

endmodule
