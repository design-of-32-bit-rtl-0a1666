// hybrid_adder32: 32-bit hybrid adder, the top of the design.
//
// Two 16-bit hybrid adders (each an 8-bit Kogge-Stone adder followed by an
// 8-bit carry look-ahead adder) are joined through their carry: the low one
// adds bits 15:0 with the external carry-in, the high one adds bits 31:16
// with the low one's carry-out. Bit by bit, from bit 0 upwards, the operand
// is therefore split as KSA / CLA / KSA / CLA bytes.
//
// Interface: a, b (32 bits), cin in; sum (32 bits) and cout out, with
// {cout, sum} = a + b + cin (unsigned). There is no clock, register or reset:
// the adder is purely combinational and its result follows the inputs after
// the propagation delay of the carry chain.
module hybrid_adder32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  output logic [31:0] sum,
  output logic        cout
);

  logic c16;  // carry from the low 16-bit hybrid adder into the high one

  hybrid_adder16 u_lo (
    .a   (a[15:0]),
    .b   (b[15:0]),
    .cin (cin),
    .sum (sum[15:0]),
    .cout(c16)
  );

  hybrid_adder16 u_hi (
    .a   (a[31:16]),
    .b   (b[31:16]),
    .cin (c16),
    .sum (sum[31:16]),
    .cout(cout)
  );

endmodule
