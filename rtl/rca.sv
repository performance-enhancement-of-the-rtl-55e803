// rca -- WIDTH-bit ripple-carry adder.
//
// A chain of WIDTH full adders; the carry of stage i feeds stage i+1 and the
// carry of the last stage is cout. The Vedic multipliers use it at WIDTH = 4
// (4x4 multiplier) and WIDTH = 8 (8x8 multiplier) and tie cin to 0; the
// carry-in port is this design's own addition so the adder stays general.
// Interface: a, b (WIDTH bits), cin in; s (WIDTH bits), cout out.
// Purely combinational; the critical path runs through all WIDTH stages.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    full_adder u_fa (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (carry[i]),
      .s    (s[i]),
      .cout (carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
