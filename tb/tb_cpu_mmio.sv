// tb_cpu_mmio: self-checking testbench for the processor register interface.
//
// The FIFO, detector and I2C master around the block are modelled by the
// testbench: a queue stands in for the record FIFO. It checks reset values,
// register write and read-back, the one-clock read latency, that reading
// REG_SPOT pops exactly one record (and none when empty), the complete-frame
// count kept from end-of-frame records, the sticky flags and their clearing, and
// that an I2C write is started with the right fields and refused while busy.
module tb_cpu_mmio;
  import remoteeyes_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bus_cs = 0, bus_we = 0;
  logic [4:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_rvalid;
  logic det_enable;
  logic [PIX_W-1:0] det_threshold;
  logic [SIZE_W-1:0] det_max_width;
  logic det_frame_done = 0, det_label_ovf = 0;
  spot_t fifo_dout;
  logic fifo_empty, fifo_full = 0, fifo_overflow = 0, fifo_pop, fifo_clr_overflow;
  logic [10:0] fifo_level;
  logic i2c_start;
  logic [6:0] i2c_dev;
  logic [7:0] i2c_reg, i2c_data;
  logic i2c_busy = 0, i2c_nack = 0;

  cpu_mmio dut (.*);

  int checks = 0, failures = 0, n_clr = 0;
  spot_t q[$];
  assign fifo_empty = (q.size() == 0);
  assign fifo_level = 11'(q.size());
  assign fifo_dout  = (q.size() != 0) ? q[0] : '0;

  always @(posedge clk) begin
    if (fifo_pop) void'(q.pop_front());
    if (fifo_clr_overflow) n_clr++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); bus_cs = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_cs = 0; bus_we = 0;
  endtask

  task automatic rd(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk); bus_cs = 1; bus_we = 0; bus_addr = a;
    @(negedge clk); bus_cs = 0;
    check(bus_rvalid, "rvalid one clock after read");
    d = bus_rdata;
    @(negedge clk);
    check(!bus_rvalid, "rvalid lasts one clock");
  endtask

  task automatic push_marker(input int f);
    spot_t m;
    m = '0; m.x = X_W'(f);
    q.push_back(m);
    @(negedge clk); det_frame_done = 1; @(negedge clk); det_frame_done = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    spot_t r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    rd(REG_ID, d);     check(d == ID_WORD, "id word");
    rd(REG_THRESH, d); check(d == 40, "threshold reset value");
    rd(REG_MAXW, d);   check(d == 32, "max width reset value");
    rd(REG_CTRL, d);   check(d == 0 && !det_enable, "detector off after reset");
    wr(REG_THRESH, 32'h0000_0155); check(det_threshold == 8'h55, "threshold written");
    wr(REG_MAXW, 32'h0000_0011);   check(det_max_width == 6'h11, "max width written");
    wr(REG_CTRL, 32'h1);           check(det_enable, "enable written");
    rd(REG_THRESH, d); check(d == 32'h55, "threshold read back");
    // empty FIFO reads 0 and pops nothing
    rd(REG_SPOT, d); check(d == 0, "empty read is zero");
    // records of two frames
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < 3; i++) begin
        r.size = SIZE_W'($urandom_range(1, 20)); r.bpgin = ID_W'($urandom); r.y = Y_W'($urandom); r.x = X_W'($urandom);
        q.push_back(r);
      end
      push_marker(f);
    end
    rd(REG_STATUS, d);
    check(d[15:0] == 8 && d[23:16] == 2, $sformatf("status level/frames %h", d));
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < 4; i++) begin
        spot_t e;
        e = q[0];
        rd(REG_SPOT, d);
        check(d == e, "record read in order");
      end
      rd(REG_STATUS, d);
      check(int'(d[23:16]) == 1 - f, $sformatf("frames ready after draining frame %0d: %0d", f, d[23:16]));
    end
    check(q.size() == 0, "every read popped exactly one record");
    rd(REG_FRAMES, d); check(d == 2, "frames processed");
    // sticky flags
    @(negedge clk); det_label_ovf = 1; fifo_overflow = 1; @(negedge clk); det_label_ovf = 0;
    rd(REG_STATUS, d); check(d[24] && d[25], "sticky error flags set");
    wr(REG_CTRL, 32'h3); fifo_overflow = 0;
    check(n_clr == 1, "overflow clear pulse");
    rd(REG_STATUS, d); check(!d[24] && !d[25], "sticky error flags cleared");
    check(det_enable, "enable kept by clear");
    // I2C
    @(negedge clk); bus_cs = 1; bus_we = 1; bus_addr = REG_I2C; bus_wdata = 32'h0060_1234;
    @(posedge clk); #1 bus_cs = 0; bus_we = 0;
    check(i2c_start && i2c_dev == 7'h60 && i2c_reg == 8'h12 && i2c_data == 8'h34, "i2c start fields");
    i2c_busy = 1;
    @(negedge clk); bus_cs = 1; bus_we = 1; bus_addr = REG_I2C; bus_wdata = 32'h0061_5678;
    @(posedge clk); #1 bus_cs = 0; bus_we = 0;
    check(!i2c_start && i2c_reg == 8'h12, "i2c write refused while busy");
    i2c_nack = 1;
    rd(REG_I2C, d); check(d == 32'h3, "i2c busy and nack readable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
