// tb_hybrid_adder32: end-to-end test of the 32-bit hybrid adder at its
// default (and only) size.
//
// Applies directed operands (a carry generated at every bit and rippling to
// the top, all ones plus carry-in, the largest sums) and 300000 random
// operand pairs, and compares {cout, sum} with a + b + cin computed in
// 64-bit arithmetic. The carry into bit k is worked out independently as
// ((a mod 2^k) + (b mod 2^k) + cin) >> k, and the test counts how often a
// carry crosses each internal boundary of the structure:
//   bit 4  : between the prefix levels of the low KSA (inside the tree)
//   bit 8  : low KSA byte into the low CLA byte
//   bit 12 : between the two linked 4-bit CLAs of the low 16-bit adder
//   bit 16 : low 16-bit hybrid adder into the high one
//   bit 24 : high KSA byte into the high CLA byte
//   bit 28 : between the two 4-bit CLAs of the high 16-bit adder
//   bit 32 : carry out
// plus the case where cin alone ripples through all 32 bits. Each must
// happen at least once, or a failure is counted.
module tb_hybrid_adder32;

  localparam int NB = 7;
  localparam int BOUNDARY [NB] = '{4, 8, 12, 16, 24, 28, 32};

  logic [31:0] a, b, sum;
  logic        cin, cout;
  int          checks = 0, failures = 0;
  int          crossed [NB];
  int          full_ripple = 0;

  hybrid_adder32 dut (.a, .b, .cin, .sum, .cout);

  function automatic logic carry_into(logic [31:0] x, logic [31:0] y, logic c, int k);
    longint unsigned mask = (64'd1 << k) - 1;
    longint unsigned s = (longint'(x) & mask) + (longint'(y) & mask) + longint'(c);
    return s[k];
  endfunction

  task automatic check();
    longint unsigned expected;
    #1;
    expected = longint'(a) + longint'(b) + longint'(cin);
    checks++;
    for (int i = 0; i < NB; i++)
      if (carry_into(a, b, cin, BOUNDARY[i])) crossed[i]++;
    if (cin && ((a ^ b) == 32'hFFFF_FFFF)) full_ripple++;
    if ({cout, sum} != expected[32:0]) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%b: got %b_%h expected %h", a, b, cin, cout, sum,
                 expected[32:0]);
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
    foreach (crossed[i]) crossed[i] = 0;
    for (int k = 0; k < 32; k++) begin
      a = 32'hFFFF_FFFF << k; b = 32'(1) << k; cin = 1'b0; check();
      a = 32'(1) << k;        b = 32'(1) << k; cin = 1'b1; check();
    end
    a = 32'hFFFF_FFFF; b = '0;            cin = 1'b1; check();
    a = 32'hAAAA_AAAA; b = 32'h5555_5555; cin = 1'b1; check();
    a = 32'hFFFF_FFFF; b = 32'hFFFF_FFFF; cin = 1'b1; check();
    a = '0;            b = '0;            cin = 1'b0; check();
    for (int n = 0; n < 300000; n++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom); check();
    end
    for (int i = 0; i < NB; i++) begin
      $display("carries into bit %0d: %0d", BOUNDARY[i], crossed[i]);
      checks++;
      if (crossed[i] == 0) begin
        failures++;
        $display("FAIL no carry into bit %0d", BOUNDARY[i]);
      end
    end
    $display("cin rippled through all 32 bits: %0d", full_ripple);
    checks++;
    if (full_ripple == 0) begin
      failures++;
      $display("FAIL no full-length carry chain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
