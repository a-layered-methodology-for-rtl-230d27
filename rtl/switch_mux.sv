// Dual-rail 4-to-1 switch multiplexer of the NFPGA routing.
//
// Four complementary input pairs come from the compute plane (the LUT output
// F and the signals arriving from three neighbours, or four neighbours for a
// LUT input mux).  Two address bits, held in the routing configuration
// register, pick one pair.  As in the nanowire layout, the true and the
// complementary rails are switched by separate halves of the multiplexer,
// so the output pair is {in[sel].t, in[sel].c}.
//
// Interface: in[0..3] (dual_t), sel[1:0] (a1, a0), out (dual_t).
// Purely combinational.
module switch_mux
  import nfpga_pkg::*;
(
  input  dual_t [3:0] in,
  input  logic  [1:0] sel,
  output dual_t       out
);

  always_comb begin
    // True rail: a product term for each address combination, then an OR.
    out.t = 1'b0;
    out.c = 1'b0;
    for (int unsigned i = 0; i < 4; i++) begin
      if (sel == 2'(i)) begin
        out.t = out.t | in[i].t;
        out.c = out.c | in[i].c;
      end
    end
  end

endmodule
