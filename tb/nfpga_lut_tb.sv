// Self-checking testbench of nfpga_lut (K = 3).
//
// Truth tables are written one bit per cycle.  Even addresses are written
// through the LSB of the 2-bit configuration word and odd ones through the
// MSB, with the unused bit set to the opposite value, so a wrong MSB/LSB
// selection is caught.  Every input combination is then applied and f must
// be mem[x] on the true rail and its complement on the other rail, the same
// cycle (the read path is combinational).  The first table is the reference
// example: f equals the data bit chosen by the 3-bit address, bit 0 at
// address 000.
module nfpga_lut_tb;
  import nfpga_pkg::*;
  localparam int unsigned K = 3;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          wr_en;
  logic [K-1:0]  wr_addr;
  logic [1:0]    wr_data;
  logic          wr_msb;
  dual_t [K-1:0] x;
  dual_t         f;
  int checks = 0, failures = 0;

  nfpga_lut #(.K(K)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr),
    .wr_data(wr_data), .wr_msb(wr_msb), .x(x), .f(f)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_table(input logic [2**K-1:0] tt);
    for (int a = 0; a < 2**K; a++) begin
      wr_en   = 1'b1;
      wr_addr = K'(a);
      wr_msb  = a[0];
      wr_data = a[0] ? {tt[a], ~tt[a]} : {~tt[a], tt[a]};
      @(posedge clk);
      #1;
    end
    wr_en = 1'b0;
  endtask

  task automatic check_table(input logic [2**K-1:0] tt, string name);
    for (int a = 0; a < 2**K; a++) begin
      for (int b = 0; b < K; b++) x[b] = to_dual(a[b]);
      #1;
      checks++;
      if (f !== to_dual(tt[a])) begin
        failures++;
        $display("FAIL %s x=%0d f=%b expected %b", name, a, f, to_dual(tt[a]));
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    wr_en = 1'b0;
    wr_addr = '0;
    wr_data = '0;
    wr_msb = 1'b0;
    x = '0;
    repeat (2) @(posedge clk);
    #1;
    check_table('0, "reset");
    rst_n = 1'b1;

    // Reference example: address 000 selects the last data bit.
    write_table(8'b1000_0001);
    check_table(8'b1000_0001, "reference");
    write_table(8'b1001_0110);           // 3-input XOR
    check_table(8'b1001_0110, "xor3");
    write_table(8'b1110_1000);           // majority
    check_table(8'b1110_1000, "maj3");

    // A write without wr_en must not change anything.
    wr_en = 1'b0;
    wr_addr = 3'd0;
    wr_data = 2'b11;
    wr_msb = 1'b0;
    @(posedge clk);
    #1;
    check_table(8'b1110_1000, "no write");

    // The write is visible only after the clock edge.
    for (int b = 0; b < K; b++) x[b] = to_dual(1'b0);
    wr_en = 1'b1;
    wr_data = 2'b01;
    #1;
    checks++;
    if (f !== to_dual(1'b0)) begin
      failures++;
      $display("FAIL write visible before the clock edge");
    end
    @(posedge clk);
    #1;
    wr_en = 1'b0;
    checks++;
    if (f !== to_dual(1'b1)) begin
      failures++;
      $display("FAIL write not visible after the clock edge");
    end

    for (int n = 0; n < 20; n++) begin
      logic [2**K-1:0] tt;
      tt = (2**K)'($urandom);
      write_table(tt);
      check_table(tt, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
