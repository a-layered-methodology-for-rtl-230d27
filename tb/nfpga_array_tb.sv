// End-to-end testbench of the NFPGA fabric at its default size (4 x 4 cells,
// 3-input LUTs, one track per side).  No parameter of the fabric is changed.
//
// A small application is mapped by hand through the configuration port:
//   row 0      : a parity chain.  Cell (0,c) takes x1 from the west and x2
//                from the north edge and computes x1 ^ x2, so its output is
//                p_c = west_edge_in[0] ^ north_edge_in[0..c].  p_c leaves
//                through the north edge (c < 3) and the chain ends at the
//                east edge.
//   rows 1..3  : every south output forwards the north input, so each p_c
//                also reaches the south edge (southward pass-through).
//   column 3   : every north output forwards the south input, so
//                south_edge_in[3] reaches north_edge_out[3].
//   cell (1,2) : buffer of its north input (p2); cell (1,1) takes it from
//                the east and inverts it; cell (1,0) forwards it west.
//   row 2      : every west output forwards the east input.
//   cell (3,0) : majority of west_edge_in[3], south_edge_in[0] and p0 from
//                the north; cells (3,1..3) forward it east.
// Random edge inputs are applied and every edge output and the relevant LUT
// outputs are compared, on both rails, with values computed from the
// application.  Then row 0 is reprogrammed to an AND chain (a change of
// function in a configured fabric) and checked again.  Each mechanism used
// (LUT functions, every input and output multiplexer direction, MSB and LSB
// configuration writes, reprogramming, write timing) is counted and must
// have happened at least once.
module nfpga_array_tb;
  import nfpga_pkg::*;

  localparam int unsigned ROWS = 4;
  localparam int unsigned COLS = 4;

  logic    clk = 1'b0;
  logic    rst_n;
  logic [$clog2(ROWS+1)-1:0] cfg_row;
  logic [$clog2(COLS+1)-1:0] cfg_col;
  cfg_wr_t cfg;
  dual_t [COLS-1:0][0:0] north_edge_in, south_edge_in, north_edge_out, south_edge_out;
  dual_t [ROWS-1:0][0:0] west_edge_in, east_edge_in, west_edge_out, east_edge_out;
  dual_t [ROWS-1:0][COLS-1:0] f_obs;

  int checks = 0, failures = 0;
  int cycles = 0;

  typedef enum int {
    M_LUT_XOR, M_LUT_AND, M_LUT_MAJ, M_LUT_BUF, M_LUT_INV,
    M_IN_N, M_IN_S, M_IN_E, M_IN_W,
    M_PASS_N, M_PASS_S, M_PASS_E, M_PASS_W, M_OUT_F,
    M_WR_MSB, M_WR_LSB, M_REPROGRAM, M_WR_TIMING, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"lut xor", "lut and", "lut majority", "lut buffer",
    "lut inverter", "input mux north", "input mux south", "input mux east",
    "input mux west", "pass to north", "pass to south", "pass to east",
    "pass to west", "output mux F", "config write msb", "config write lsb",
    "reprogram", "write timing"};

  nfpga_array dut (
    .clk(clk), .rst_n(rst_n), .cfg_row(cfg_row), .cfg_col(cfg_col), .cfg(cfg),
    .north_edge_in(north_edge_in), .south_edge_in(south_edge_in),
    .west_edge_in(west_edge_in), .east_edge_in(east_edge_in),
    .north_edge_out(north_edge_out), .south_edge_out(south_edge_out),
    .west_edge_out(west_edge_out), .east_edge_out(east_edge_out),
    .f_obs(f_obs)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ config
  task automatic write(input int r, input int c, input cfg_tgt_e tgt, input int idx,
                       input logic [1:0] data, input logic msb);
    cfg_row  = ($bits(cfg_row))'(r);
    cfg_col  = ($bits(cfg_col))'(c);
    cfg.we   = 1'b1;
    cfg.tgt  = tgt;
    cfg.idx  = CFG_IDX_W'(idx);
    cfg.data = data;
    cfg.msb  = msb;
    @(posedge clk);
    #1;
    cfg.we = 1'b0;
  endtask

  // Truth table, one bit per write, odd addresses through the MSB.
  task automatic program_lut(input int r, input int c, input logic [7:0] tt);
    for (int a = 0; a < 8; a++) begin
      logic b;
      b = tt[a];
      if (a[0]) begin
        write(r, c, CFG_LUT, a, {b, ~b}, 1'b1);
        mech[M_WR_MSB]++;
      end else begin
        write(r, c, CFG_LUT, a, {~b, b}, 1'b0);
        mech[M_WR_LSB]++;
      end
    end
  endtask

  // Output mux number of side d (track 0).
  function automatic int omux(dir_e d);
    return int'(d);
  endfunction

  localparam logic [7:0] TT_XOR12 = 8'b0110_0110;  // x1 ^ x2
  localparam logic [7:0] TT_AND12 = 8'b1000_1000;  // x1 & x2
  localparam logic [7:0] TT_MAJ   = 8'b1110_1000;  // majority of x1, x2, x3
  localparam logic [7:0] TT_BUF1  = 8'b1010_1010;  // x1
  localparam logic [7:0] TT_INV1  = 8'b0101_0101;  // ~x1

  // Output mux selects: north out {F, S, E, W}, south out {F, N, E, W},
  // east out {F, N, S, W}, west out {F, N, S, E}.  Input mux {N, S, E, W}.
  task automatic configure_application();
    for (int c = 0; c < COLS; c++) begin
      write(0, c, CFG_IN, 0, 2'd3, 1'b0);          // x1 from the west
      write(0, c, CFG_IN, 1, 2'd0, 1'b0);          // x2 from the north
      program_lut(0, c, TT_XOR12);
    end
    for (int r = 1; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        write(r, c, CFG_OUT, omux(DIR_S), 2'd1, 1'b0);   // south out := north in
    for (int r = 0; r < ROWS; r++)
      write(r, 3, CFG_OUT, omux(DIR_N), 2'd1, 1'b0);     // north out := south in
    program_lut(1, 2, TT_BUF1);                          // x1 from north (reset)
    write(1, 1, CFG_IN, 0, 2'd2, 1'b0);                  // x1 from the east
    program_lut(1, 1, TT_INV1);
    write(1, 0, CFG_OUT, omux(DIR_W), 2'd3, 1'b0);       // west out := east in
    for (int c = 0; c < COLS; c++)
      write(2, c, CFG_OUT, omux(DIR_W), 2'd3, 1'b0);     // west out := east in
    write(3, 0, CFG_IN, 0, 2'd3, 1'b0);                  // x1 from the west
    write(3, 0, CFG_IN, 1, 2'd1, 1'b0);                  // x2 from the south
    write(3, 0, CFG_IN, 2, 2'd0, 1'b0);                  // x3 from the north
    program_lut(3, 0, TT_MAJ);
    for (int c = 1; c < COLS; c++)
      write(3, c, CFG_OUT, omux(DIR_E), 2'd3, 1'b0);     // east out := west in
  endtask

  // ------------------------------------------------------------ checks
  task automatic expect_dual(input dual_t got, input logic exp, string what);
    checks++;
    if (got !== to_dual(exp)) begin
      failures++;
      $display("FAIL %s = %b, expected %b", what, got, to_dual(exp));
    end
  endtask

  task automatic check_vectors(input bit and_mode, input int n);
    for (int v = 0; v < n; v++) begin
      logic [COLS-1:0] nin, sin;
      logic [ROWS-1:0] win, ein;
      logic p [COLS];
      logic maj;
      nin = COLS'($urandom);
      sin = COLS'($urandom);
      win = ROWS'($urandom);
      ein = ROWS'($urandom);
      for (int c = 0; c < COLS; c++) begin
        north_edge_in[c][0] = to_dual(nin[c]);
        south_edge_in[c][0] = to_dual(sin[c]);
      end
      for (int r = 0; r < ROWS; r++) begin
        west_edge_in[r][0] = to_dual(win[r]);
        east_edge_in[r][0] = to_dual(ein[r]);
      end
      #1;
      // Reference values of the mapped application.
      for (int c = 0; c < COLS; c++) begin
        logic prev;
        prev = (c == 0) ? win[0] : p[c-1];
        p[c] = and_mode ? (prev & nin[c]) : (prev ^ nin[c]);
      end
      maj = (win[3] & sin[0]) | (win[3] & p[0]) | (sin[0] & p[0]);

      for (int c = 0; c < COLS; c++) begin
        expect_dual(f_obs[0][c], p[c], $sformatf("row 0 LUT %0d", c));
        expect_dual(south_edge_out[c][0], p[c], $sformatf("south_edge_out[%0d]", c));
      end
      for (int c = 0; c < COLS - 1; c++)
        expect_dual(north_edge_out[c][0], p[c], $sformatf("north_edge_out[%0d]", c));
      expect_dual(north_edge_out[3][0], sin[3], "north_edge_out[3]");
      expect_dual(east_edge_out[0][0], p[3], "east_edge_out[0]");
      expect_dual(east_edge_out[1][0], 1'b0, "east_edge_out[1]");
      expect_dual(east_edge_out[2][0], 1'b0, "east_edge_out[2]");
      expect_dual(east_edge_out[3][0], maj, "east_edge_out[3]");
      expect_dual(west_edge_out[0][0], p[0], "west_edge_out[0]");
      expect_dual(west_edge_out[1][0], ~p[2], "west_edge_out[1]");
      expect_dual(west_edge_out[2][0], ein[2], "west_edge_out[2]");
      expect_dual(west_edge_out[3][0], maj, "west_edge_out[3]");
      expect_dual(f_obs[1][2], p[2], "LUT (1,2)");
      expect_dual(f_obs[1][1], ~p[2], "LUT (1,1)");
      expect_dual(f_obs[3][0], maj, "LUT (3,0)");

      if (and_mode) mech[M_LUT_AND]++; else mech[M_LUT_XOR]++;
      mech[M_LUT_MAJ]++;
      mech[M_LUT_BUF]++;
      mech[M_LUT_INV]++;
      mech[M_IN_N]++;
      mech[M_IN_S]++;
      mech[M_IN_E]++;
      mech[M_IN_W]++;
      mech[M_PASS_N]++;
      mech[M_PASS_S]++;
      mech[M_PASS_E]++;
      mech[M_PASS_W]++;
      mech[M_OUT_F]++;
    end
  endtask

  initial begin
    int cfg_start, cfg_cycles;
    for (int m = 0; m < M_NUM; m++) mech[m] = 0;
    rst_n = 1'b0;
    cfg = '0;
    cfg.tgt = CFG_NONE;
    cfg_row = '0;
    cfg_col = '0;
    north_edge_in = '0;
    south_edge_in = '0;
    west_edge_in = '0;
    east_edge_in = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;

    // After reset every LUT holds 0 and every output forwards its LUT.
    north_edge_in = '1;
    #1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        expect_dual(f_obs[r][c], 1'b0, $sformatf("reset LUT (%0d,%0d)", r, c));
    for (int c = 0; c < COLS; c++)
      expect_dual(north_edge_out[c][0], 1'b0, $sformatf("reset north_edge_out[%0d]", c));

    cfg_start = cycles;
    configure_application();
    cfg_cycles = cycles - cfg_start;
    $display("application configured in %0d cycles (one write per cycle)", cfg_cycles);
    check_vectors(1'b0, 200);

    // Write timing: a LUT bit changes the output only after the clock edge.
    // With west_edge_in[0] = 0 and north_edge_in[0] = 1, cell (0,0) reads
    // address x1=0, x2=1, x3=1 (x3 listens north) = 6.
    west_edge_in[0][0] = to_dual(1'b0);
    north_edge_in[0][0] = to_dual(1'b1);
    cfg_row = '0;
    cfg_col = '0;
    cfg.we = 1'b1;
    cfg.tgt = CFG_LUT;
    cfg.idx = CFG_IDX_W'(6);
    cfg.data = 2'b10;
    cfg.msb = 1'b0;                       // writes data[0] = 0
    #1;
    expect_dual(f_obs[0][0], 1'b1, "LUT (0,0) before the edge");
    @(posedge clk);
    #1;
    cfg.we = 1'b0;
    expect_dual(f_obs[0][0], 1'b0, "LUT (0,0) after the edge");
    mech[M_WR_TIMING]++;
    program_lut(0, 0, TT_XOR12);          // restore
    check_vectors(1'b0, 20);

    // Reprogram row 0 from XOR to AND; everything else stays.
    for (int c = 0; c < COLS; c++) program_lut(0, c, TT_AND12);
    mech[M_REPROGRAM]++;
    check_vectors(1'b1, 200);

    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      $display("mechanism %-18s happened %0d times", mech_name[m], mech[m]);
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
