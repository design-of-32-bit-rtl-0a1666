// cla4: 4-bit carry look-ahead adder.
//
// Each bit forms a generate G(i) = a(i) AND b(i) and a propagate
// P(i) = a(i) XOR b(i). Instead of rippling, every carry is written out as a
// two-level sum of products of the G, P terms and cin, the expansion of
// C(i) = G(i) + P(i).C(i-1), so all four carries settle after the same few
// gate levels. The sum of bit i is P(i) XOR C(i-1) with C(-1) = cin.
//
// The XOR (propagate) and the sum of each bit come from a GDI full-adder cell
// (gdi_fa_cell), following the design in which sum generation is done with
// GDI cells. The cell's own CARRY output computes the one-step recurrence
// C(i) = G(i) + P(i).C(i-1) from the look-ahead carry below it; the
// look-ahead carries are the ones used, and a deferred assertion checks that
// the two agree for every bit.
//
// Interface: a, b (4 bits), cin in; sum (4 bits), cout out.
// Combinational, no clock.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout
);

  logic [3:0] g;  // bit generate
  logic [3:0] p;  // bit propagate (H node of the GDI cell)
  logic [3:0] c;  // c[i]: carry out of bit i
  logic [3:0] rc; // rc[i]: carry of bit i from its GDI cell

  // Sum generation: one GDI cell per bit, carry-in from the look-ahead logic.
  for (genvar i = 0; i < 4; i++) begin : g_bit
    gdi_fa_cell u_cell (
      .a    (a[i]),
      .b    (b[i]),
      .cin  ((i == 0) ? cin : c[i-1]),
      .h    (p[i]),
      .sum  (sum[i]),
      .carry(rc[i])
    );
  end

  // Generate stage and carry look-ahead stage.
  always_comb begin
    g    = a & b;
    c[0] = g[0] | (p[0] & cin);
    c[1] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[2] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0])
         | (p[2] & p[1] & p[0] & cin);
    c[3] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1])
         | (p[3] & p[2] & p[1] & g[0]) | (p[3] & p[2] & p[1] & p[0] & cin);
    cout = c[3];
  end

  // Each look-ahead carry must equal the one-step carry of its GDI cell.
  always_comb begin
    assert final (rc == c)
      else $error("cla4: look-ahead carry %b differs from cell carry %b", c, rc);
  end

endmodule
