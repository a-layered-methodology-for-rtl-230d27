// Self-checking testbench of routing_config (4 multiplexers, as in the
// reference layout).  Checks the reset value, single-row writes (only the
// selected row may change, and only after the clock edge), idle cycles with
// no row selected, and that the complement outputs always mirror the store.
module routing_config_tb;
  localparam int unsigned NMUX = 4;

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic [NMUX-1:0]      sel_x;
  logic [1:0]           cfg_data;
  logic [NMUX-1:0][1:0] mux_sel, mux_sel_n;
  logic [NMUX-1:0][1:0] model;
  int checks = 0, failures = 0;

  routing_config #(.NMUX(NMUX)) dut (
    .clk(clk), .rst_n(rst_n), .sel_x(sel_x), .cfg_data(cfg_data),
    .mux_sel(mux_sel), .mux_sel_n(mux_sel_n)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    checks++;
    if (mux_sel !== model || mux_sel_n !== ~model) begin
      failures++;
      $display("FAIL %s: mux_sel=%b mux_sel_n=%b expected %b", what, mux_sel, mux_sel_n, model);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    sel_x = '0;
    cfg_data = '0;
    repeat (2) @(posedge clk);
    #1;
    model = '0;
    compare("reset");
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      int row;
      row = int'($urandom_range(0, NMUX));   // NMUX means: no row selected
      cfg_data = 2'($urandom);
      sel_x = '0;
      if (row < NMUX) sel_x[row] = 1'b1;
      #1;
      compare("before edge");          // nothing changes before the edge
      @(posedge clk);
      #1;
      if (row < NMUX) model[row] = cfg_data;
      compare("after edge");
    end
    sel_x = '0;
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    model = '0;
    compare("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
