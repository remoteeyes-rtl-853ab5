// tb_workload_tag60: the published operating point, end to end at default size.
//
// The camera model runs 352 x 288 frames at 60 frames/s (PCLK period 144 ns,
// with vertical blanking filling the frame time to 16.667 ms); the tag runs at
// its default 1 MHz clock, one bit per 1/60 s, broadcasting its 5-bit start code
// and 8-bit identifier. A processor model drains each frame's records through
// the register bus, checks them against the reference model, and after every
// frame looks for the start code and identifier in the last 13 frames. The
// testbench measures the time from the start of the tag's first broadcast to
// the frame at which the identifier is decoded: 13 bits at 60 bit/s, about
// 217 ms, plus up to one frame of phase between tag and camera.
module tb_workload_tag60;
  import remoteeyes_pkg::*;

  localparam int W = CAM_W, H = CAM_H, DEPTH = 1024, HB = 32;
  localparam int VBLANK = 115741 - 7 - H * (W + HB) - 5;   // 115741 x 144 ns = 1/60 s
  localparam logic [7:0] TAG_ID = 8'h3C;
  localparam logic [6:0] CAM_I2C = 7'h60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tag_clk = 0, tag_rst_n = 0;
  always #500 tag_clk = ~tag_clk;   // 1 MHz with the 10 ns FPGA clock

  logic cam_pclk = 0, cam_href = 0, cam_vsync = 0;
  logic [PIX_W-1:0] cam_data = 0;
  logic cam_scl_oe, cam_sda_oe;
  logic bus_cs = 0, bus_we = 0;
  logic [4:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_rvalid;
  logic tag_led, tag_bcast_start;
  logic slave_sda_oe = 0;
  wire  scl = !cam_scl_oe;
  wire  sda = !(cam_sda_oe || slave_sda_oe);

  remoteeyes_top dut (
    .clk, .rst_n, .cam_pclk, .cam_href, .cam_vsync, .cam_data,
    .cam_scl_oe, .cam_sda_oe, .cam_sda_i(sda),
    .bus_cs, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .bus_rvalid,
    .tag_clk, .tag_rst_n, .tag_id(TAG_ID), .tag_led, .tag_bcast_start
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_accept = 0, n_wide = 0, n_eol = 0, n_inherit = 0, n_tag_on = 0, n_tag_off = 0;
  int n_i2c = 0, n_frames_read = 0;

  // ---------------- I2C slave model (camera configuration port) ----------------
  logic scl_d = 1, sda_d = 1;
  int   i2c_nbit = 0, i2c_nbyte = 0;
  logic [7:0] i2c_sh = 0;
  logic [7:0] i2c_got[$];
  bit   i2c_ack = 0;
  always @(posedge clk) begin
    scl_d <= scl; sda_d <= sda;
    if (scl && scl_d && sda_d && !sda) begin i2c_nbit = 0; i2c_nbyte = 0; i2c_ack = 0; end
    else if (scl && !scl_d) begin if (!i2c_ack) begin i2c_sh = {i2c_sh[6:0], sda}; i2c_nbit++; end end
    else if (!scl && scl_d) begin
      if (i2c_ack) begin i2c_ack = 0; slave_sda_oe <= 0; end
      else if (i2c_nbit == 8) begin
        i2c_got.push_back(i2c_sh); i2c_nbyte++; i2c_nbit = 0; i2c_ack = 1; slave_sda_oe <= 1;
      end
    end
  end

  // ---------------- camera model and detector reference ----------------
  int    img [H][W];
  spot_t expq[$];
  bit    led_seen[$];     // LED state the camera saw, one per frame
  bit    stop_compare = 0;
  int    frame_no = 0;

  task automatic put_diamond(input int cy, input int cx, input int r, input int v);
    for (int y = cy - r; y <= cy + r; y++)
      for (int x = cx - r; x <= cx + r; x++)
        if (y >= 0 && y < H && x >= 0 && x < W && ((y > cy ? y - cy : cy - y) + (x > cx ? x - cx : cx - x)) <= r)
          img[y][x] = v;
  endtask

  task automatic model_frame(input int fno, input int th, input int maxw);
    int lab_prev [W];
    int lab_cur [W];
    int next_lab = 1;
    spot_t m;
    foreach (lab_prev[i]) lab_prev[i] = 0;
    for (int y = 0; y < H; y++) begin
      bit in_run = 0;
      int s = 0;
      foreach (lab_cur[i]) lab_cur[i] = 0;
      for (int x = 1; x < W; x++) begin
        bit up   = img[y][x] - img[y][x-1] > th;
        bit down = img[y][x-1] - img[y][x] > th;
        if (!in_run) begin
          if (up) begin in_run = 1; s = x; end
        end else if (down) begin
          int lab = 0;
          spot_t r;
          for (int k = s; k < x; k++) if (lab == 0 && lab_prev[k] != 0) lab = lab_prev[k];
          if (lab == 0) begin lab = next_lab; next_lab++; end
          else n_inherit++;
          for (int k = s; k < x; k++) lab_cur[k] = lab;
          r.size = SIZE_W'(x - s); r.bpgin = ID_W'(lab); r.y = Y_W'(y); r.x = X_W'((s + x - 1) / 2);
          expq.push_back(r);
          n_accept++;
          in_run = 0;
        end else if (x - s + 1 > maxw) begin
          in_run = 0; n_wide++;
        end
      end
      if (in_run) n_eol++;
      lab_prev = lab_cur;
    end
    m = '0; m.x = X_W'(fno);
    expq.push_back(m);
  endtask

  task automatic pclk_cycle(input bit href, input logic [PIX_W-1:0] d);
    #72 cam_pclk = 0; cam_href = href; cam_data = d;
    #72 cam_pclk = 1;
  endtask

  // Sends one frame; the LED state at the frame start decides whether the tag shows.
  task automatic camera_frame(input int th, input int maxw);
    bit on = tag_led;
    led_seen.push_back(on);
    if (on) n_tag_on++; else n_tag_off++;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = $urandom_range(0, 30);
    if (on) put_diamond(6, 20, 2, 210);
    put_diamond(3, 38, 1, 190);                               // stationary spots
    put_diamond(270, 300, 4, 200);
    put_diamond(150, 340, 3, 170);
    for (int x = 8; x < 60; x++) img[120][x] = 235;           // lamp: too wide
    for (int x = W - 3; x < W; x++) img[14][x] = 240;         // cut by the line end
    if (!stop_compare) model_frame(frame_no, th, maxw);
    frame_no++;
    cam_vsync = 1; repeat (3) pclk_cycle(0, 0);
    cam_vsync = 0; repeat (4) pclk_cycle(0, 0);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) pclk_cycle(1, PIX_W'(img[y][x]));
      repeat (HB) pclk_cycle(0, 0);
    end
    repeat (5) pclk_cycle(0, 0);
    repeat (VBLANK) pclk_cycle(0, 0);
  endtask

  // ---------------- processor model ----------------
  task automatic bus_wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); bus_cs = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_cs = 0; bus_we = 0;
  endtask

  task automatic bus_rd(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk); bus_cs = 1; bus_we = 0; bus_addr = a;
    @(negedge clk); bus_cs = 0;
    d = bus_rdata;
  endtask

  bit led_read[$];   // tag seen in the records, one per frame

  // Reads the records of one complete frame and compares them.
  task automatic read_frame();
    logic [31:0] d;
    spot_t r;
    bit tag_here = 0;
    do bus_rd(REG_STATUS, d); while (d[23:16] == 0);
    do begin
      bus_rd(REG_SPOT, d);
      r = spot_t'(d);
      if (expq.size() == 0) check(0, "record nobody expected");
      else begin
        spot_t e;
        e = expq.pop_front();
        check(r == e, $sformatf("frame %0d record %h expected %h", n_frames_read, r, e));
      end
      if (r.size != 0 && r.y >= 4 && r.y <= 8 && r.x >= 17 && r.x <= 23) tag_here = 1;
    end while (r.size != 0);
    led_read.push_back(tag_here);
    n_frames_read++;
  endtask

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NFRAMES = 16;
  localparam logic [12:0] PATTERN = {5'b10101, TAG_ID};
  realtime t_bcast = 0, t_decode = 0;
  always @(posedge tag_bcast_start) if (t_bcast == 0) t_bcast = $realtime;

  initial begin
    logic [31:0] d;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge tag_clk);
    tag_rst_n = 1;
    // camera configuration over I2C
    bus_wr(REG_I2C, {9'b0, CAM_I2C, 8'h12, 8'h24});
    do bus_rd(REG_I2C, d); while (d[0]);
    check(!d[1], "camera acknowledged");
    check(i2c_got.size() == 3 && i2c_got[0] == {CAM_I2C, 1'b0} && i2c_got[1] == 8'h12 && i2c_got[2] == 8'h24,
          "camera received its register write");
    if (i2c_got.size() == 3) n_i2c++;
    // detector set-up
    bus_wr(REG_THRESH, 50);
    bus_wr(REG_MAXW, 32);
    bus_wr(REG_CTRL, 1);
    fork
      for (int f = 0; f < NFRAMES; f++) camera_frame(50, 32);
      for (int f = 0; f < NFRAMES; f++) begin
        read_frame();
        if (led_read.size() >= 13 && t_decode == 0) begin
          logic [12:0] w;
          for (int k = 0; k < 13; k++) w[12 - k] = led_read[led_read.size() - 13 + k];
          if (w == PATTERN) t_decode = $realtime;
        end
      end
    join
    check(expq.size() == 0, "records missing");
    check(led_read == led_seen, "tag visibility seen in the records");
    bus_rd(REG_FRAMES, d);
    check(d == NFRAMES, $sformatf("frames counted %0d", d));
    $display("accepted=%0d wide=%0d eol=%0d inherit=%0d tag_on=%0d tag_off=%0d i2c=%0d",
             n_accept, n_wide, n_eol, n_inherit, n_tag_on, n_tag_off, n_i2c);
    check(n_accept > 0, "no run accepted");
    check(n_wide > 0, "width rejection never happened");
    check(n_eol > 0, "line-end rejection never happened");
    check(n_inherit > 0, "group number never inherited");
    check(n_i2c > 0, "no I2C write");
    check(n_tag_on > 0 && n_tag_off > 0, "tag never blinked");
    check(t_decode != 0, "tag identifier never decoded");
    $display("first broadcast at %0.3f ms, identifier decoded at %0.3f ms: latency %0.1f ms",
             t_bcast / 1e6, t_decode / 1e6, (t_decode - t_bcast) / 1e6);
    // 13 bit times (216.7 ms), plus up to one frame of phase and the readout of the last frame
    check(t_decode - t_bcast >= 12 * 16.667e6 && t_decode - t_bcast <= 14 * 16.667e6 + 2e6,
          "decode latency differs from 13 frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
