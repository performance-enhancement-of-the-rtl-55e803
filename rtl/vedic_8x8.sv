// vedic_8x8 -- 8x8 unsigned Urdhva-Tiryagbhyam (Vedic) multiplier, the top.
//
// The same scheme as the 4x4 multiplier one level up: each operand is split
// into 4-bit halves (m = {MH, ML}, n = {NH, NL}) and four 4x4 Vedic
// multipliers form
//   q0 = ML*NL, q1 = MH*NL, q2 = ML*NH, q3 = MH*NH
// so that m*n = q3*2^8 + (q1 + q2)*2^4 + q0. The adder network of the
// source design's block diagram combines them:
//   RCA1 (8 bit): q2 + q1                           -> s1, carry ca1
//   RCA2 (8 bit): s1 + {0000, q0[7:4]}              -> s2, carry ca2
//   half adder  : ca1 + ca2                         -> {hc, hs}
//   RCA3 (8 bit): q3 + {00, hc, hs, s2[7:4]}        -> f[15:8], carry ca3
// with f[3:0] = q0[3:0] and f[7:4] = s2[3:0]. ca3 is brought out as the source
// design's diagram shows it; it is always 0 because 255*255 fits in 16 bits.
// The carry-out pins of the four 4x4 multipliers are left open: each is
// constant 0 (see vedic_4x4), and the source design does not connect them.
// Structure, adder widths and zero padding follow the source design; net names
// are this design's own.
// Interface: m, n (8 bits) in; f (16 bits), ca3 out. Purely combinational;
// the longest path runs through a 4x4 multiplier and three 8-bit ripple
// adders.
module vedic_8x8 (
  input  logic [7:0]  m,
  input  logic [7:0]  n,
  output logic [15:0] f,
  output logic        ca3
);
  logic [7:0] q0, q1, q2, q3;
  logic [7:0] s1, s2;
  logic       ca1, ca2;
  logic       hs, hc;
  logic [3:0] unused_co;

  vedic_4x4 u_mul_ll (.m(m[3:0]), .n(n[3:0]), .f(q0), .ca3(unused_co[0]));
  vedic_4x4 u_mul_hl (.m(m[7:4]), .n(n[3:0]), .f(q1), .ca3(unused_co[1]));
  vedic_4x4 u_mul_lh (.m(m[3:0]), .n(n[7:4]), .f(q2), .ca3(unused_co[2]));
  vedic_4x4 u_mul_hh (.m(m[7:4]), .n(n[7:4]), .f(q3), .ca3(unused_co[3]));

  rca #(.WIDTH(8)) u_rca_cross (
    .a(q2), .b(q1), .cin(1'b0), .s(s1), .cout(ca1)
  );
  rca #(.WIDTH(8)) u_rca_mid (
    .a(s1), .b({4'b0000, q0[7:4]}), .cin(1'b0), .s(s2), .cout(ca2)
  );
  half_adder u_ha_carry (.a(ca1), .b(ca2), .s(hs), .c(hc));
  rca #(.WIDTH(8)) u_rca_high (
    .a(q3), .b({2'b00, hc, hs, s2[7:4]}), .cin(1'b0), .s(f[15:8]), .cout(ca3)
  );

  assign f[7:4] = s2[3:0];
  assign f[3:0] = q0[3:0];
endmodule
