// tb_ksa_black_cell: exhaustive test of the Kogge-Stone black cell.
// For every (G, P) pair of the upper and lower span the merged generate must
// be "upper generates, or upper propagates and lower generates", and the
// merged propagate "both propagate".
module tb_ksa_black_cell;
  import adder_pkg::*;

  pg_t hi, lo, out;
  int  checks = 0, failures = 0;
  logic exp_g, exp_p;

  ksa_black_cell dut (.hi, .lo, .out);

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {hi, lo} = 4'(v);
      #1;
      // Reference by cases rather than by the cell's formula.
      exp_g = hi.g ? 1'b1 : (hi.p ? lo.g : 1'b0);
      exp_p = (hi.p && lo.p);
      checks++;
      if (out.g != exp_g || out.p != exp_p) begin
        failures++;
        $display("FAIL hi=%b lo=%b out=%b", hi, lo, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
