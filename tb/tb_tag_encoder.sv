// tb_tag_encoder: self-checking testbench for the tag modulator.
//
// Runs the modulator with a slow clock (20 clocks per bit), builds the expected
// LED waveform of each broadcast clock by clock from the start code, the
// identifier, the shortened off slot and the pause, and compares it with the
// LED output. It also checks the broadcast period (13 bits minus the shortening
// plus the pause) and that a new identifier is picked up at the next broadcast.
module tb_tag_encoder;
  localparam int BT = 20, SH = BT / 8, GAP = BT / 4;
  localparam logic [4:0] SC = 5'b10101;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] id = 8'hA6;
  logic led, bcast_start;

  tag_encoder #(.CLK_HZ(BT * 60), .BIT_HZ(60)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int last = -1;
    automatic int cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 6; b++) begin
      logic [12:0] bits;
      logic expect_led[$];
      // wait for a broadcast to begin
      do begin @(posedge clk); #1; cyc++; end while (!bcast_start);
      if (last >= 0) check(cyc - last == 13 * BT - SH + GAP, $sformatf("broadcast period %0d", cyc - last));
      last = cyc;
      bits = {SC, id};
      expect_led.delete();
      for (int s = 0; s < 13; s++)
        for (int t = 0; t < (s == 3 ? BT - SH : BT); t++) expect_led.push_back(bits[12 - s]);
      for (int t = 0; t < GAP; t++) expect_led.push_back(1'b0);
      if (b == 2) id = 8'h3C;   // changes mid-broadcast: must show at the next one
      foreach (expect_led[i]) begin
        if (i != 0) begin @(posedge clk); #1; cyc++; end
        check(led == expect_led[i], $sformatf("broadcast %0d clock %0d led %0d", b, i, led));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
