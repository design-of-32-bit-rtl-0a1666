// tb_hybrid_adder16: test of the 16-bit KSA + CLA hybrid adder.
// Directed cases (carries generated at every bit and rippling to the top,
// all-ones plus carry-in) and random operands; {cout, sum} must equal
// a + b + cin. Counts carries across the KSA-to-CLA boundary at bit 8 and
// fails if none occurs.
module tb_hybrid_adder16;

  logic [15:0] a, b, sum;
  logic        cin, cout;
  int          checks = 0, failures = 0, cross8 = 0;

  hybrid_adder16 dut (.a, .b, .cin, .sum, .cout);

  task automatic check();
    #1;
    checks++;
    if (int'(a[7:0]) + int'(b[7:0]) + int'(cin) > 255) cross8++;
    if ({cout, sum} != 17'(int'(a) + int'(b) + int'(cin))) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%b: got %b_%h", a, b, cin, cout, sum);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      a = 16'hFFFF << k; b = 16'(1) << k; cin = 1'b0; check();
      a = 16'(1) << k;   b = 16'(1) << k; cin = 1'b1; check();
    end
    a = 16'hFFFF; b = '0;      cin = 1'b1; check();
    a = 16'hFFFF; b = 16'hFFFF; cin = 1'b1; check();
    a = '0;       b = '0;      cin = 1'b0; check();
    for (int n = 0; n < 200000; n++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom); check();
    end
    checks++;
    if (cross8 == 0) begin
      failures++;
      $display("FAIL no carry crossed from the KSA into the CLA");
    end
    $display("carries from the KSA byte into the CLA byte: %0d", cross8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
