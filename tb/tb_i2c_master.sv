// tb_i2c_master: self-checking testbench for the camera I2C write master.
//
// The bus is modelled as two wired-AND lines with pull-ups. A slave model
// decodes START and STOP, shifts in bytes on rising SCL and acknowledges them
// only when the device address matches its own. The testbench performs writes
// to the slave and to an absent device, and checks the bytes the slave received,
// the nack flag, that SDA changes only while SCL is low except at START/STOP,
// and the SCL period (4 x QUARTER clocks per bit).
module tb_i2c_master;
  localparam int Q = 5;
  localparam logic [6:0] SLAVE = 7'h60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [6:0] dev_addr = 0;
  logic [7:0] reg_addr = 0, wr_data = 0;
  logic busy, nack, scl_oe, sda_oe;
  logic slave_sda_oe = 0;
  wire  scl = !scl_oe;
  wire  sda = !(sda_oe || slave_sda_oe);

  i2c_master #(.QUARTER(Q)) dut (.clk, .rst_n, .start, .dev_addr, .reg_addr, .wr_data,
                                 .busy, .nack, .scl_oe, .sda_oe, .sda_i(sda));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- slave model, sampled on the FPGA clock ----
  logic scl_d = 1, sda_d = 1;
  int   nbit = 0, nbyte = 0, n_start = 0, n_stop = 0;
  logic [7:0] sh = 0;
  logic [7:0] got[$];
  bit   addressed = 0, in_ack = 0;
  int   last_rise = 0, period = 0, cyc = 0;

  always @(posedge clk) begin
    cyc++;
    scl_d <= scl; sda_d <= sda;
    if (scl && scl_d && sda_d && !sda) begin           // START
      n_start++; nbit = 0; nbyte = 0; addressed = 0; in_ack = 0; slave_sda_oe <= 0;
    end else if (scl && scl_d && !sda_d && sda) begin  // STOP
      n_stop++;
    end else if (scl && !scl_d) begin                   // rising SCL
      if (last_rise != 0) period = cyc - last_rise;
      last_rise = cyc;
      if (!in_ack) begin
        sh = {sh[6:0], sda};
        nbit++;
      end
    end else if (!scl && scl_d) begin                   // falling SCL
      if (in_ack) begin
        in_ack = 0; slave_sda_oe <= 0;
      end else if (nbit == 8) begin
        got.push_back(sh);
        if (nbyte == 0) addressed = (sh[7:1] == SLAVE);
        nbyte++; nbit = 0; in_ack = 1;
        slave_sda_oe <= addressed;
      end
    end
  end

  task automatic write(input logic [6:0] a, input logic [7:0] r, input logic [7:0] d);
    @(posedge clk);
    dev_addr <= a; reg_addr <= r; wr_data <= d; start <= 1;
    @(posedge clk); start <= 0;
    @(posedge clk);
    check(busy, "busy after start");
    wait (!busy);
    repeat (3 * Q) @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(scl && sda, "bus idle after reset");
    for (int i = 0; i < 4; i++) begin
      logic [7:0] r, d;
      r = 8'($urandom); d = 8'($urandom);
      got.delete();
      write(SLAVE, r, d);
      check(got.size() == 3, $sformatf("bytes received %0d", got.size()));
      if (got.size() == 3) begin
        check(got[0] == {SLAVE, 1'b0}, "address byte");
        check(got[1] == r, "register byte");
        check(got[2] == d, "data byte");
      end
      check(!nack, "acknowledged write flagged nack");
      check(period == 4 * Q, $sformatf("SCL period %0d", period));
      check(scl && sda, "bus released after STOP");
    end
    write(7'h21, 8'h12, 8'h34);
    check(nack, "write to absent device must flag nack");
    write(SLAVE, 8'h01, 8'h02);
    check(!nack, "nack cleared by next transfer");
    check(n_start == 6 && n_stop == 6, $sformatf("start/stop counts %0d %0d", n_start, n_stop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
