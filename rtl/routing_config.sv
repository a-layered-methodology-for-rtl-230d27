// Routing configuration register of an NFPGA cell.
//
// Holds the 2 select bits of each of NMUX switch multiplexers (4 in the
// reference layout: configX10..configX41).  One multiplexer is written per
// access: the one-hot selX line picks the row and config1/config0 give the
// two bits.  All stored bits are read at the same time, each with its
// complement, because every multiplexer needs its select bits continuously.
//
// Interface: sel_x (one-hot, all zero = no write), cfg_data[1] = config1,
// cfg_data[0] = config0.  mux_sel[m] / mux_sel_n[m] are the stored bits of
// mux m and their complements.
// Timing: a write lands on the rising clock edge and is visible after it.
// Reset (active low, synchronous) clears every select, a choice of this
// design; the nanowire storage itself has no reset.
module routing_config #(
  parameter int unsigned NMUX = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NMUX-1:0]       sel_x,
  input  logic [1:0]            cfg_data,
  output logic [NMUX-1:0][1:0]  mux_sel,
  output logic [NMUX-1:0][1:0]  mux_sel_n
);

  logic [NMUX-1:0][1:0] store_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      store_q <= '0;
    end else begin
      for (int unsigned m = 0; m < NMUX; m++) begin
        if (sel_x[m]) store_q[m] <= cfg_data;
      end
    end
  end

  assign mux_sel   = store_q;
  assign mux_sel_n = ~store_q;

  // A write addresses at most one multiplexer row.
  a_onehot_sel : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel_x))
    else $error("routing_config: more than one selX line active");

endmodule
