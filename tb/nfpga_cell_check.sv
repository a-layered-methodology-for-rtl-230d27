// Randomised checker of one nfpga_cell instance, used by nfpga_cell_tb.
//
// Drives random configuration writes (LUT bits through MSB and LSB, output
// and input multiplexer selects) and random dual-rail edge inputs, keeps its
// own model of the configuration, and compares all four output sides and
// the LUT output with values computed from that model:
//   x(i+1) = side in_sel[i] (north, south, east, west) on track i mod W
//   F      = lut[{x3, x2, x1}]
//   out of side d, track t = F (select 0) or the track-t input of the
//            select-th of the other sides, taken in the order N, S, E, W.
// Also counts how often each multiplexer select was exercised.
module nfpga_cell_check
  import nfpga_pkg::*;
#(
  parameter int unsigned K = 3,
  parameter int unsigned W = 1,
  parameter int unsigned ROUNDS = 400
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   sel_hits [4]
);

  logic          rst_n;
  cfg_wr_t       cfg;
  dual_t [W-1:0] side_in  [4];
  dual_t [W-1:0] side_out [4];
  dual_t         f_out;

  nfpga_cell #(.K(K), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .cfg(cfg),
    .north_in(side_in[DIR_N]), .south_in(side_in[DIR_S]),
    .east_in(side_in[DIR_E]), .west_in(side_in[DIR_W]),
    .north_out(side_out[DIR_N]), .south_out(side_out[DIR_S]),
    .east_out(side_out[DIR_E]), .west_out(side_out[DIR_W]),
    .f_out(f_out)
  );

  logic [2**K-1:0] m_lut;
  logic [1:0]      m_out [4][W];
  logic [1:0]      m_in  [K];

  task automatic write(input cfg_tgt_e tgt, input int idx, input logic [1:0] data,
                       input logic msb);
    cfg.we   = 1'b1;
    cfg.tgt  = tgt;
    cfg.idx  = CFG_IDX_W'(idx);
    cfg.data = data;
    cfg.msb  = msb;
    @(posedge clk);
    #1;
    cfg.we = 1'b0;
  endtask

  function automatic dual_t expect_side(int d, int t, dual_t f);
    int others [3];
    int k;
    k = 0;
    for (int s = 0; s < 4; s++) if (s != d) begin others[k] = s; k++; end
    if (m_out[d][t] == 2'd0) return f;
    return side_in[others[int'(m_out[d][t]) - 1]][t];
  endfunction

  task automatic compare();
    logic [K-1:0] xa;
    dual_t ef;
    for (int i = 0; i < K; i++) xa[i] = side_in[int'(m_in[i])][i % W].t;
    ef = to_dual(m_lut[xa]);
    checks++;
    if (f_out !== ef) begin
      failures++;
      $display("FAIL W=%0d F=%b expected %b", W, f_out, ef);
    end
    for (int d = 0; d < 4; d++) begin
      for (int t = 0; t < W; t++) begin
        dual_t e;
        e = expect_side(d, t, ef);
        checks++;
        if (side_out[d][t] !== e) begin
          failures++;
          $display("FAIL W=%0d side %0d track %0d out=%b expected %b (sel %0d)",
                   W, d, t, side_out[d][t], e, m_out[d][t]);
        end
        sel_hits[m_out[d][t]]++;
      end
    end
  endtask

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    for (int s = 0; s < 4; s++) sel_hits[s] = 0;
    rst_n = 1'b0;
    cfg = '0;
    cfg.tgt = CFG_NONE;
    for (int s = 0; s < 4; s++) side_in[s] = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    m_lut = '0;
    for (int d = 0; d < 4; d++) for (int t = 0; t < W; t++) m_out[d][t] = '0;
    for (int i = 0; i < K; i++) m_in[i] = '0;
    compare();

    for (int r = 0; r < ROUNDS; r++) begin
      int what;
      what = int'($urandom_range(0, 2));
      if (what == 0) begin
        int a;
        logic b, msb;
        a = int'($urandom_range(0, 2**K - 1));
        b = 1'($urandom);
        msb = 1'($urandom);
        write(CFG_LUT, a, msb ? {b, ~b} : {~b, b}, msb);
        m_lut[a] = b;
      end else if (what == 1) begin
        int d, t;
        logic [1:0] v;
        d = int'($urandom_range(0, 3));
        t = int'($urandom_range(0, W - 1));
        v = 2'($urandom);
        write(CFG_OUT, d * W + t, v, 1'b0);
        m_out[d][t] = v;
      end else begin
        int i;
        logic [1:0] v;
        i = int'($urandom_range(0, K - 1));
        v = 2'($urandom);
        write(CFG_IN, i, v, 1'b0);
        m_in[i] = v;
      end
      for (int n = 0; n < 4; n++) begin
        for (int s = 0; s < 4; s++)
          for (int t = 0; t < W; t++) side_in[s][t] = to_dual(1'($urandom));
        #1;
        compare();
      end
    end
    done = 1'b1;
  end
endmodule
