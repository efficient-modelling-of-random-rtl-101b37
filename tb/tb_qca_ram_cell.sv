// tb_qca_ram_cell -- end-to-end self-checking test of the one-bit QCA RAM cell
// at its only configuration.
//
// Part 1 replays the operation sequence of the cell's reference simulation:
// reset, set, write 1, write 0, reads, and holds with either select value,
// each checked against a value written out by hand. Part 2 drives a few
// thousand random operations and compares dout, one cycle after each clock
// edge, with a behavioural reference that follows the truth table row by row.
// Every operation also checks the timing: dout must still show the old value
// just before the edge that samples the operation and the new value right
// after it (latency of one cycle), and a written bit must be readable in the
// following cycle (write then read in two cycles).
//
// The test counts how often each operation happened (initialising reset,
// set, reset operation, write 0, write 1, read, hold with sel = 0) and counts
// a failure for any that never did.
module tb_qca_ram_cell;
  logic clk;
  logic rst_n, rd_wr, sel, set_reset, din, dout;
  int   checks = 0, failures = 0;

  // operation counters
  int n_init = 0, n_set = 0, n_reset = 0, n_wr0 = 0, n_wr1 = 0, n_read = 0, n_hold_s0 = 0;

  logic model;  // reference for the stored bit

  qca_ram_cell dut (
    .clk(clk), .rst_n(rst_n), .rd_wr(rd_wr), .sel(sel),
    .set_reset(set_reset), .din(din), .dout(dout)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp_v, input string what);
    checks++;
    if (dout !== exp_v) begin
      failures++;
      $display("FAIL %s: dout=%b expected %b (t=%0t)", what, dout, exp_v, $time);
    end
  endtask

  // Apply one operation for one cycle. Inputs change on the falling edge;
  // dout is checked just before the sampling edge (old value) and just after
  // it (new value = exp_v).
  task automatic op(input logic w, input logic s, input logic sr, input logic d,
                    input logic exp_v, input string what);
    logic old_v;
    @(negedge clk);
    rd_wr = w; sel = s; set_reset = sr; din = d;
    old_v = dout;
    #4;  // 1 time unit before the rising edge
    checks++;
    if (dout !== old_v) begin
      failures++;
      $display("FAIL %s: dout changed before the clock edge", what);
    end
    @(posedge clk);
    #1;
    check(exp_v, what);
    // operation bookkeeping
    if (!w)          begin if (s) n_read++; else n_hold_s0++; end
    else if (s)      begin if (d) n_wr1++; else n_wr0++; end
    else             begin if (sr) n_set++; else n_reset++; end
  endtask

  initial begin
    rst_n = 1'b0; rd_wr = 1'b0; sel = 1'b0; set_reset = 1'b0; din = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check(1'b0, "initialising reset");
    n_init++;
    @(negedge clk);
    rst_n = 1'b1;

    // ---- Part 1: directed sequence (inputs rd_wr, sel, set_reset, din) ----
    op(1, 0, 1, 0, 1'b1, "set");
    op(0, 1, 0, 0, 1'b1, "read after set");
    op(0, 0, 0, 1, 1'b1, "hold with sel=0 after set");
    op(1, 0, 0, 1, 1'b0, "reset");
    op(0, 1, 1, 1, 1'b0, "read after reset");
    op(1, 1, 0, 1, 1'b1, "write 1");
    op(0, 1, 0, 0, 1'b1, "read after write 1");
    op(1, 1, 1, 0, 1'b0, "write 0 (set_reset ignored)");
    op(0, 1, 1, 1, 1'b0, "read after write 0");
    op(1, 1, 0, 1, 1'b1, "write 1 again");
    op(1, 0, 0, 1, 1'b0, "reset overrides din");
    op(1, 0, 1, 0, 1'b1, "set back to back");
    op(0, 0, 0, 0, 1'b1, "hold with sel=0, set_reset=0");
    op(0, 1, 0, 0, 1'b1, "read");
    // mid-run initialising reset
    @(negedge clk);
    rst_n = 1'b0; rd_wr = 1'b1; sel = 1'b1; din = 1'b1;
    @(posedge clk); #1;
    check(1'b0, "reset while writing 1");
    n_init++;
    @(negedge clk);
    rst_n = 1'b1; rd_wr = 1'b0;
    @(posedge clk); #1;
    check(1'b0, "idle cycle after reset");
    op(0, 1, 1, 1, 1'b0, "read after reset");

    // ---- Part 2: random operations against the reference ----
    model = dout;
    for (int i = 0; i < 4000; i++) begin
      logic w, s, sr, d;
      w = 1'($urandom); s = 1'($urandom); sr = 1'($urandom); d = 1'($urandom);
      case ({w, s})
        2'b00, 2'b01: model = model;   // Write/Read = 0: Out(t-1)
        2'b10:        model = sr;      // select 0: Set/Reset
        default:      model = d;       // select 1: Input
      endcase
      op(w, s, sr, d, model, "random operation");
    end

    $display("operations: init=%0d set=%0d reset=%0d write0=%0d write1=%0d read=%0d hold_sel0=%0d",
             n_init, n_set, n_reset, n_wr0, n_wr1, n_read, n_hold_s0);
    if (n_init == 0)    begin failures++; $display("FAIL no initialising reset"); end
    if (n_set == 0)     begin failures++; $display("FAIL no set"); end
    if (n_reset == 0)   begin failures++; $display("FAIL no reset"); end
    if (n_wr0 == 0)     begin failures++; $display("FAIL no write 0"); end
    if (n_wr1 == 0)     begin failures++; $display("FAIL no write 1"); end
    if (n_read == 0)    begin failures++; $display("FAIL no read"); end
    if (n_hold_s0 == 0) begin failures++; $display("FAIL no hold with sel=0"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
