// qca_ram_cell -- one-bit random access memory cell with set/reset, made of
// two majority-gate 2:1 multiplexers and a storage loop.
//
// How it works. MUX-1, steered by sel, picks the value to be written: the
// set/reset level when sel = 0, the data input din when sel = 1. MUX-2,
// steered by rd_wr, picks what goes round the storage loop: MUX-1's output
// when rd_wr = 1 (write, set or reset), or the loop's own value when
// rd_wr = 0 (hold / read). The loop value is the cell output dout. The
// resulting truth table is
//
//   rd_wr sel set_reset | dout(t)
//     0    x     x      | dout(t-1)    hold, read
//     1    0     0      | 0            reset
//     1    0     1      | 1            set
//     1    1     x      | din          write
//
// Timing. In the QCA layout the signal needs one full clock cycle (four
// clocking zones) to go from the inputs round the loop; here the loop is one
// flip-flop clocked by clk, one clk period standing for one QCA clock cycle.
// Inputs sampled at a rising edge of clk appear on dout right after that
// edge, a latency of one cycle. Writing a bit and reading it back therefore
// takes two cycles: the write cycle and the read cycle that follows it. In the
// QCA layout extra clocking zones delay rd_wr so that it reaches MUX-2 together
// with MUX-1's output; in synchronous logic both arrive in the same cycle
// without them.
//
// The multiplexer arrangement, the truth table and the one-cycle latency
// follow the design description. The synchronous active-low rst_n, which
// clears the stored bit to 0 at a clock edge, is an addition of this implementation: a QCA
// cell has no power-on state, but simulation and silicon need one. The
// set/reset operation (rd_wr = 1, sel = 0) is the cell's own way to force it.
//
// Interface: clk, rst_n (synchronous), rd_wr, sel, set_reset, din in; dout out; all one bit.
module qca_ram_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic rd_wr,      // 1: write (MUX-1 output into the loop), 0: hold/read
  input  logic sel,        // 0: set/reset operation, 1: write din
  input  logic set_reset,  // level written when sel = 0
  input  logic din,        // data written when sel = 1
  output logic dout        // stored bit
);

  logic wr_val;     // MUX-1 output: value a write would store
  logic loop_next;  // MUX-2 output: value entering the storage loop
  logic loop_q;     // storage loop

  qca_mux2 u_mux1 (.a(set_reset), .b(din),    .s(sel),   .y(wr_val));
  qca_mux2 u_mux2 (.a(loop_q),    .b(wr_val), .s(rd_wr), .y(loop_next));

  always_ff @(posedge clk) begin
    if (!rst_n) loop_q <= 1'b0;
    else        loop_q <= loop_next;
  end

  assign dout = loop_q;

  // A read (rd_wr = 0) never changes the stored bit.
  a_read_keeps: assert property (@(posedge clk) disable iff (!rst_n)
                                 !rd_wr |=> $stable(loop_q))
    else $error("qca_ram_cell: stored bit changed during a read");

  // Set and reset force the level given on set_reset.
  a_set_reset: assert property (@(posedge clk) disable iff (!rst_n)
                                (rd_wr && !sel) |=> (loop_q == $past(set_reset)))
    else $error("qca_ram_cell: set/reset did not take effect");

endmodule
