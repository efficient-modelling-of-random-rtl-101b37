// qca_inv -- QCA inverter.
//
// In QCA an inverter is made by letting a wire of cells meet a cell that is
// only diagonally coupled to it, which forces the opposite polarisation. Both
// common layouts (a short "basic" inverter and the more robust "regular" one
// that splits the wire in two branches) compute the same function, which is
// all this module models: y = ~a.
//
// Interface: a in, y out, one bit each. Timing: combinational.
module qca_inv (
  input  logic a,
  output logic y
);

  always_comb y = ~a;

endmodule
