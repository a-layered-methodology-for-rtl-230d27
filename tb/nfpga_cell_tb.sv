// Self-checking testbench of nfpga_cell.  Runs the randomised checker on a
// cell at its default size (K = 3, one track per side) and on a cell with
// two tracks per side, which exercises the disjoint track assignment, and
// requires every multiplexer select value to have been exercised.
module nfpga_cell_tb;
  logic clk = 1'b0;
  logic done1, done2;
  int   c1, f1, c2, f2;
  int   h1 [4];
  int   h2 [4];
  int   checks, failures;

  always #5 clk = ~clk;

  nfpga_cell_check #(.K(3), .W(1)) u_w1 (
    .clk(clk), .done(done1), .checks(c1), .failures(f1), .sel_hits(h1));
  nfpga_cell_check #(.K(3), .W(2)) u_w2 (
    .clk(clk), .done(done2), .checks(c2), .failures(f2), .sel_hits(h2));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (done1 && done2);
    checks = c1 + c2;
    failures = f1 + f2;
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (h1[s] == 0 || h2[s] == 0) begin
        failures++;
        $display("FAIL select %0d never exercised", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
