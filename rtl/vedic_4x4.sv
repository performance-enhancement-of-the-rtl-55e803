// vedic_4x4 -- 4x4 unsigned Urdhva-Tiryagbhyam (Vedic) multiplier.
//
// Each operand is split into a high and a low 2-bit half (m = {mh, ml},
// n = {nh, nl}) and four 2x2 Vedic multipliers form the partial products
//   q0 = ml*nl (vertical), q1 = mh*nl, q2 = ml*nh (crosswise), q3 = mh*nh (vertical).
// They are then combined with the adder network of the source design's schematic:
//   RCA1 (4 bit): q2 + q1                       -> s1, carry ca1
//   RCA2 (4 bit): s1 + {0, 0, q0[3:2]}          -> s2, carry ca2
//   half adder  : ca1 + ca2                     -> {hc, hs}
//   RCA3 (4 bit): q3 + {hc, hs, s2[3:2]}        -> f[7:4], carry ca3
// with f[1:0] = q0[1:0] and f[3:2] = s2[1:0]. The carries ca1 and ca2 both
// weigh 2^6 in the product, so the half adder folds them into the two bits
// that enter RCA3 at weights 2^6 and 2^7. ca3 is brought out as the source
// design's diagram shows it; it is always 0 because 15*15 fits in 8 bits.
// The structure, the adder widths and the zero padding follow the source design;
// the naming of internal nets (q*, s*, h*) is this design's own.
// Interface: m, n (4 bits) in; f (8 bits), ca3 out. Purely combinational.
module vedic_4x4 (
  input  logic [3:0] m,
  input  logic [3:0] n,
  output logic [7:0] f,
  output logic       ca3
);
  logic [3:0] q0, q1, q2, q3;
  logic [3:0] s1, s2;
  logic       ca1, ca2;
  logic       hs, hc;

  vedic_2x2 u_mul_ll (.a(m[1:0]), .b(n[1:0]), .p(q0));
  vedic_2x2 u_mul_hl (.a(m[3:2]), .b(n[1:0]), .p(q1));
  vedic_2x2 u_mul_lh (.a(m[1:0]), .b(n[3:2]), .p(q2));
  vedic_2x2 u_mul_hh (.a(m[3:2]), .b(n[3:2]), .p(q3));

  rca #(.WIDTH(4)) u_rca_cross (
    .a(q2), .b(q1), .cin(1'b0), .s(s1), .cout(ca1)
  );
  rca #(.WIDTH(4)) u_rca_mid (
    .a(s1), .b({2'b00, q0[3:2]}), .cin(1'b0), .s(s2), .cout(ca2)
  );
  half_adder u_ha_carry (.a(ca1), .b(ca2), .s(hs), .c(hc));
  rca #(.WIDTH(4)) u_rca_high (
    .a(q3), .b({hc, hs, s2[3:2]}), .cin(1'b0), .s(f[7:4]), .cout(ca3)
  );

  assign f[3:2] = s2[1:0];
  assign f[1:0] = q0[1:0];
endmodule
