// tb_spot_fifo: self-checking testbench for the record FIFO.
//
// Pushes and pops at random (including both in one cycle) against a queue
// model, checks every word read, the level, empty and full flags, that a push
// into a full FIFO is dropped and raises the sticky overflow flag, and that the
// flag clears on request. A small depth keeps the full case frequent.
module tb_spot_fifo;
  localparam int W = 32, D = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push = 0, pop = 0, clr_overflow = 0;
  logic [W-1:0] din = 0, dout;
  logic empty, full, overflow;
  logic [$clog2(D):0] level;

  spot_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0, n_full_push = 0;
  logic [W-1:0] model[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit ovf_ref = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int bias;
      bit was_full;
      bias = (i / 500) % 2;   // phases that fill and phases that drain
      @(negedge clk);
      check(int'(level) == model.size(), $sformatf("level %0d vs %0d", level, model.size()));
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      check(overflow == ovf_ref, "overflow flag");
      if (model.size() != 0) check(dout == model[0], "head word");
      push = ($urandom_range(0, 9) < (bias != 0 ? 7 : 3));
      pop  = ($urandom_range(0, 9) < (bias != 0 ? 3 : 7));
      clr_overflow = ($urandom_range(0, 99) == 0);
      din  = $urandom;
      // what the FIFO does at the coming edge: a push into a full FIFO is dropped
      was_full = (model.size() == D);
      if (pop && model.size() != 0) void'(model.pop_front());
      if (push && !was_full) model.push_back(din);
      if (push && was_full) begin ovf_ref = 1; n_full_push++; end
      else if (clr_overflow) ovf_ref = 0;
    end
    check(n_full_push > 0, "never pushed into a full FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
