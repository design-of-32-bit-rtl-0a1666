// tb_ksa8: test of the Kogge-Stone adder.
// The default 8-bit adder is checked exhaustively (131072 cases of a, b,
// cin). A second instance with WIDTH = 16 (four prefix levels) is checked on
// random operands and on full-length carry chains, to exercise the generic
// tree construction.
module tb_ksa8;

  logic [7:0]  a, b, sum;
  logic        cin, cout;
  logic [15:0] a16, b16, sum16;
  logic        cin16, cout16;
  int          checks = 0, failures = 0;

  ksa8 dut (.a, .b, .cin, .sum, .cout);
  ksa8 #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(cin16), .sum(sum16), .cout(cout16));

  task automatic check16();
    #1;
    checks++;
    if ({cout16, sum16} != 17'(int'(a16) + int'(b16) + int'(cin16))) begin
      failures++;
      if (failures < 10)
        $display("FAIL16 a=%h b=%h cin=%b: got %b_%h", a16, b16, cin16, cout16, sum16);
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
    a16 = '0; b16 = '0; cin16 = 1'b0;
    for (int v = 0; v < (1 << 17); v++) begin
      {cin, a, b} = 17'(v);
      #1;
      checks++;
      if ({cout, sum} != 9'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h cin=%b: got %b_%h", a, b, cin, cout, sum);
      end
    end
    // Carry generated at each bit k and propagated to the top.
    for (int k = 0; k < 16; k++) begin
      a16 = 16'hFFFF << k; b16 = 16'(1) << k; cin16 = 1'b0; check16();
      a16 = 16'hFFFF;      b16 = '0;          cin16 = 1'b1; check16();
    end
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); cin16 = 1'($urandom); check16();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
