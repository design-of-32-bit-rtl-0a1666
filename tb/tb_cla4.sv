// tb_cla4: exhaustive test of the 4-bit carry look-ahead adder.
// All 512 combinations of a, b and cin; {cout, sum} must equal a + b + cin.
module tb_cla4;

  logic [3:0] a, b, sum;
  logic       cin, cout;
  int         checks = 0, failures = 0;

  cla4 dut (.a, .b, .cin, .sum, .cout);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin, a, b} = 9'(v);
      #1;
      checks++;
      if ({cout, sum} != 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h cin=%b: got %b_%h", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
