// gdi_fa_cell: one-bit full-adder cell in the Gate Diffusion Input (GDI) style.
//
// The cell is built around one intermediate signal, H = A XOR B. The SUM and
// CARRY cells are then two-way selectors steered by H:
//   SUM   = H ? ~CIN : CIN     (an odd number of ones gives 1)
//   CARRY = H ?  CIN : A       (when A == B the carry is A, otherwise CIN)
// This is the behaviour of the 8-transistor GDI SUM/CARRY pair: for
// A,B,CIN = 1,0,1 the H node is 1, the SUM pass device outputs 0 and the
// CARRY pass device forwards CIN = 1. The transistor-level circuit is
// analogue; this module models only its logic function, so it is
// synthesizable and the netlist a synthesis tool makes from it will not be a
// GDI circuit.
//
// Interface: a, b, cin in; h (the XOR node, also the bit propagate), sum and
// carry out. Purely combinational, no clock.
module gdi_fa_cell (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic h,
  output logic sum,
  output logic carry
);

  always_comb begin
    h     = a ^ b;
    sum   = h ? ~cin : cin;
    carry = h ? cin : a;
  end

endmodule
