// ksa8: 8-bit Kogge-Stone adder (parallel-prefix carry tree).
//
// Three stages:
//   1. Preprocessing: every bit forms P(i) = A(i) XOR B(i) and
//      G(i) = A(i) AND B(i). The carry-in is folded into bit 0, whose
//      generate becomes G(0) + P(0).cin, so the tree's bit-0 span already
//      includes the carry-in.
//   2. Carry generation: log2(WIDTH) levels of prefix cells. At level l each
//      node i >= 2^l is merged with node i - 2^l. If that partner already
//      spans down to bit 0, the result does too and only its generate is
//      needed: a grey cell. Otherwise a black cell forms both generate and
//      propagate. Nodes below 2^l pass through unchanged. Every node has a
//      fan-out of at most two, and the carry of every bit is ready after
//      log2(WIDTH) cell delays.
//   3. Postprocessing: S(i) = P(i) XOR C(i-1), with C(-1) = cin.
//
// Interface: a, b (WIDTH bits), cin in; sum (WIDTH bits), cout out.
// Combinational, no clock. WIDTH defaults to 8, the size used in the design;
// it must be a power of two.
module ksa8
  import adder_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS = $clog2(WIDTH);

  logic [WIDTH-1:0] p;  // bit propagate
  logic [WIDTH-1:0] g;  // bit generate
  logic [WIDTH-1:0] c;  // c[i]: carry out of bit i

  pg_t lvl0 [WIDTH];  // (G, P) of each bit after preprocessing

  // Preprocessing.
  always_comb begin
    p = a ^ b;
    g = a & b;
    for (int unsigned i = 0; i < WIDTH; i++) lvl0[i] = '{g: g[i], p: p[i]};
    lvl0[0].g = g[0] | (p[0] & cin);
  end

  // Carry generation. g_lvl[l].nxt[i] is the (G, P) of the span ending at
  // bit i after level l.
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned D = 1 << l;
    pg_t prv [WIDTH];
    pg_t nxt [WIDTH];
    if (l == 0) begin : g_first
      assign prv = lvl0;
    end else begin : g_next
      assign prv = g_lvl[l-1].nxt;
    end
    for (genvar i = 0; i < WIDTH; i++) begin : g_node
      if (i < D) begin : g_pass
        assign nxt[i] = prv[i];
      end else if (i < 2 * D) begin : g_grey
        logic gout;
        ksa_grey_cell u_grey (
          .hi  (prv[i]),
          .g_lo(prv[i-D].g),
          .g   (gout)
        );
        // The span now reaches bit 0; its propagate is never used again.
        assign nxt[i] = '{g: gout, p: 1'b0};
      end else begin : g_black
        ksa_black_cell u_black (
          .hi (prv[i]),
          .lo (prv[i-D]),
          .out(nxt[i])
        );
      end
    end
  end

  // Postprocessing.
  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) c[i] = g_lvl[LEVELS-1].nxt[i].g;
    sum  = p ^ {c[WIDTH-2:0], cin};
    cout = c[WIDTH-1];
  end

endmodule
