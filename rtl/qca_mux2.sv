// qca_mux2 -- 2:1 multiplexer built only from QCA primitives.
//
// The structure is the usual majority-logic multiplexer:
//   y = M( M(a, ~s, 0), M(b, s, 0), 1 )
// The two inner majority gates have one input tied to logic 0 (a cell fixed at
// polarisation -1) and act as AND gates for a&~s and b&s; the outer majority
// gate has one input tied to logic 1 (polarisation +1) and acts as an OR. One
// inverter supplies ~s. So y = b when s = 1 and y = a when s = 0.
//
// The RAM cell uses two of these multiplexers. That a previously published
// majority-gate multiplexer is reused follows the design description; the
// exact gate arrangement above is the standard one for that multiplexer and is
// this implementation's choice.
//
// Interface: a (passed when s = 0), b (passed when s = 1), s, y; all one bit.
// Timing: combinational.
module qca_mux2 (
  input  logic a,
  input  logic b,
  input  logic s,
  output logic y
);

  logic s_n;      // inverted select
  logic a_and;    // a & ~s
  logic b_and;    // b & s

  qca_inv  u_inv   (.a(s),     .y(s_n));
  qca_maj3 u_and_a (.a(a),     .b(s_n),   .c(1'b0), .y(a_and));
  qca_maj3 u_and_b (.a(b),     .b(s),     .c(1'b0), .y(b_and));
  qca_maj3 u_or    (.a(a_and), .b(b_and), .c(1'b1), .y(y));

endmodule
