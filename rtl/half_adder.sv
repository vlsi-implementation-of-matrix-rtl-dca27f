// half_adder: the summing node of the Matrix-Diagonal multiplier.
//
// Adds two bits: s = a XOR b, c = a AND b, so a + b == 2*c + s. The
// multiplier is built from half adders only, never full adders, as the
// method prescribes; this cell is that building block.
// Interface: a, b in; s, c out. Purely combinational, no clock.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  assign s = a ^ b;
  assign c = a & b;

endmodule
