// vedic_2x2 -- 2x2 unsigned multiplier, the leaf of the Vedic multiplier tree.
//
// Urdhva-Tiryagbhyam ("vertically and crosswise") on two bits, built as the
// source design specifies from four AND gates and two half adders:
//   p0           = a0 b0                    (vertical)
//   {c1, p1}     = a1 b0 + a0 b1            (crosswise, first half adder)
//   {p3, p2}     = a1 b1 + c1               (vertical, second half adder)
// Which product feeds which half adder is not spelled out in the source
// design; the standard wiring above is this design's choice.
// Interface: a, b (2 bits) in; p (4 bits) out. Purely combinational.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a1b0, a0b1, a1b1;
  logic c1;

  // The four AND gates
  assign a0b0 = a[0] & b[0];
  assign a1b0 = a[1] & b[0];
  assign a0b1 = a[0] & b[1];
  assign a1b1 = a[1] & b[1];

  assign p[0] = a0b0;

  half_adder u_ha_cross (.a(a1b0), .b(a0b1), .s(p[1]), .c(c1));
  half_adder u_ha_top   (.a(a1b1), .b(c1),   .s(p[2]), .c(p[3]));
endmodule
