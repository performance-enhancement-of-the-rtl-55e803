// full_adder -- one-bit full adder, the stage of the ripple-carry adders.
//
// s = a XOR b XOR cin, cout = majority(a, b, cin). The multiplier is meant to
// be built from gate-diffusion-input (GDI) cells; only the logic function is
// given here, in the usual sum-of-products form of the carry.
// Interface: a, b, cin in; s, cout out. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
