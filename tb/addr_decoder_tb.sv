// Self-checking testbench of addr_decoder at its default size (4 address
// bits, 16 lines).  Every address is applied; exactly line `addr` must be
// high, and sel_n must be the complement of sel.
module addr_decoder_tb;
  localparam int unsigned N = 4;

  logic [N-1:0]    addr;
  logic [2**N-1:0] sel, sel_n;
  int checks = 0, failures = 0;

  addr_decoder dut (.addr(addr), .sel(sel), .sel_n(sel_n));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**N; a++) begin
      logic [2**N-1:0] exp_sel;
      addr = N'(a);
      #1;
      exp_sel = '0;
      exp_sel[a] = 1'b1;
      checks++;
      if (sel !== exp_sel) begin
        failures++;
        $display("FAIL addr=%0d sel=%b expected %b", a, sel, exp_sel);
      end
      checks++;
      if (sel_n !== ~exp_sel) begin
        failures++;
        $display("FAIL addr=%0d sel_n=%b expected %b", a, sel_n, ~exp_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
