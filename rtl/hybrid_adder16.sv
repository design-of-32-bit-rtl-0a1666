// hybrid_adder16: 16-bit heterogeneous hybrid adder.
//
// Two different adder types are cascaded: an 8-bit Kogge-Stone adder (ksa8)
// adds the low byte, and its carry-out feeds an 8-bit carry look-ahead adder
// (cla8, itself two linked 4-bit CLAs) that adds the high byte. The
// parallel-prefix adder gives the low bits, whose carry has the longest path
// to the top, the fastest carry; the cheaper CLA handles the upper byte.
// Which of the two adders takes the low byte is this design's own choice.
//
// Interface: a, b (16 bits), cin in; sum (16 bits), cout out. Combinational.
module hybrid_adder16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout
);

  logic c8;  // carry from the KSA byte into the CLA byte

  ksa8 u_ksa (
    .a   (a[7:0]),
    .b   (b[7:0]),
    .cin (cin),
    .sum (sum[7:0]),
    .cout(c8)
  );

  cla8 u_cla (
    .a   (a[15:8]),
    .b   (b[15:8]),
    .cin (c8),
    .sum (sum[15:8]),
    .cout(cout)
  );

endmodule
