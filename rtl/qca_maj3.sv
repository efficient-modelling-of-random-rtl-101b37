// qca_maj3 -- three-input majority gate (voter), the basic logic primitive of
// quantum-dot cellular automata (QCA).
//
// The output takes the value held by at least two of the three inputs:
// y = a&b | b&c | c&a. Fixing one input to 0 turns the gate into a two-input
// AND, fixing it to 1 turns it into a two-input OR; the 2:1 multiplexer of the
// RAM cell is built that way.
//
// Interface: a, b, c in, y out, all one bit. Timing: purely combinational. In
// the QCA layout the gate spans three clocking zones (inputs, centre cell,
// output wire); here that delay is part of the one-cycle register in
// qca_ram_cell, so the gate itself has no delay.
module qca_maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  always_comb y = (a & b) | (b & c) | (c & a);

endmodule
