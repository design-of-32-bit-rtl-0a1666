// tb_ksa_grey_cell: exhaustive test of the Kogge-Stone grey cell.
// The output is the carry out of the upper span: 1 if the upper span
// generates, or if it propagates and the lower span (down to bit 0)
// generates.
module tb_ksa_grey_cell;
  import adder_pkg::*;

  pg_t  hi;
  logic g_lo, g, exp_g;
  int   checks = 0, failures = 0;

  ksa_grey_cell dut (.hi, .g_lo, .g);

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {hi, g_lo} = 3'(v);
      #1;
      exp_g = hi.g ? 1'b1 : (hi.p ? g_lo : 1'b0);
      checks++;
      if (g != exp_g) begin
        failures++;
        $display("FAIL hi=%b g_lo=%b g=%b", hi, g_lo, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
