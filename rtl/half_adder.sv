// half_adder -- one-bit half adder.
//
// Adds two bits: s = a XOR b, c = a AND b. It is the cell the 2x2 Vedic
// multiplier is built from, and the multipliers also use one to add the two
// carries that leave their ripple-carry adders. The multiplier is meant to be
// built from gate-diffusion-input (GDI) cells; this RTL gives only the logic
// function and leaves the circuit style to the cell library.
// Interface: a, b in; s (sum), c (carry) out. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  always_comb begin
    s = a ^ b;
    c = a & b;
  end
endmodule
