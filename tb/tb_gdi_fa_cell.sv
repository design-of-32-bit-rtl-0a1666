// tb_gdi_fa_cell: exhaustive self-checking test of the GDI full-adder cell.
// All eight input combinations are applied; h must be a XOR b and
// {carry, sum} must equal the arithmetic sum a + b + cin.
module tb_gdi_fa_cell;

  logic a, b, cin, h, sum, carry;
  int   checks = 0, failures = 0;

  gdi_fa_cell dut (.a, .b, .cin, .h, .sum, .carry);

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} != 2'(int'(a) + int'(b) + int'(cin)) || h != (a != b)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b: h=%b sum=%b carry=%b", a, b, cin, h, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
