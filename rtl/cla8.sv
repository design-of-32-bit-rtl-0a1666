// cla8: 8-bit carry look-ahead adder built from two 4-bit CLAs.
//
// The low CLA adds bits 3:0 with the external carry-in; its carry-out is the
// carry-in of the high CLA, which adds bits 7:4. Inside each 4-bit block the
// carries are looked ahead; between the two blocks the carry is passed on,
// as in the design where a second 4-bit CLA is linked to the first one.
//
// Interface: a, b (8 bits), cin in; sum (8 bits), cout out. Combinational.
module cla8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] sum,
  output logic       cout
);

  logic c4;  // carry from bit 3 into bit 4

  cla4 u_lo (
    .a   (a[3:0]),
    .b   (b[3:0]),
    .cin (cin),
    .sum (sum[3:0]),
    .cout(c4)
  );

  cla4 u_hi (
    .a   (a[7:4]),
    .b   (b[7:4]),
    .cin (c4),
    .sum (sum[7:4]),
    .cout(cout)
  );

endmodule
