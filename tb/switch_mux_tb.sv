// Self-checking testbench of switch_mux.  Random dual-rail input pairs
// (including non-complementary ones, so that the two rails are checked
// separately) are applied under every select value; the output pair must
// equal the selected input pair.
module switch_mux_tb;
  import nfpga_pkg::*;

  dual_t [3:0] in;
  logic  [1:0] sel;
  dual_t       out;
  int checks = 0, failures = 0;

  switch_mux dut (.in(in), .sel(sel), .out(out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      in  = 8'($urandom);
      sel = 2'($urandom);
      #1;
      checks++;
      if (out !== in[sel]) begin
        failures++;
        $display("FAIL in=%b sel=%0d out=%b", in, sel, out);
      end
    end
    // Each select with a single active input pair.
    for (int s = 0; s < 4; s++) begin
      for (int hot = 0; hot < 4; hot++) begin
        in = '0;
        in[hot] = to_dual(1'b1);
        sel = 2'(s);
        #1;
        checks++;
        if (out !== ((s == hot) ? to_dual(1'b1) : dual_t'(2'b00))) begin
          failures++;
          $display("FAIL sel=%0d hot=%0d out=%b", s, hot, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
