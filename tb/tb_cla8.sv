// tb_cla8: exhaustive test of the 8-bit CLA (two linked 4-bit CLAs).
// All 131072 combinations of a, b and cin. It also counts how often a carry
// crosses the link between the two 4-bit blocks and fails if that never
// happens.
module tb_cla8;

  logic [7:0] a, b, sum;
  logic       cin, cout;
  int         checks = 0, failures = 0, link_carries = 0;

  cla8 dut (.a, .b, .cin, .sum, .cout);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {cin, a, b} = 17'(v);
      #1;
      checks++;
      if (int'(a[3:0]) + int'(b[3:0]) + int'(cin) > 15) link_carries++;
      if ({cout, sum} != 9'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h cin=%b: got %b_%h", a, b, cin, cout, sum);
      end
    end
    checks++;
    if (link_carries == 0) begin
      failures++;
      $display("FAIL no carry crossed the 4-bit link");
    end
    $display("carries across the 4-bit link: %0d", link_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
