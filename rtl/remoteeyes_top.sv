// remoteeyes_top: FPGA logic of one remote sensing unit, with the tag modulator
// beside it.
//
// The sensing unit watches a room through a CMOS camera behind an infrared
// filter. Its FPGA turns the camera's pixel stream into spot records while the
// frame arrives: camera_if brings the camera bus into the FPGA clock, bsd finds
// the runs of bright pixels and numbers them, spot_fifo holds the records, and
// cpu_mmio lets the embedded processor configure the detector, drain the
// records and configure the camera through i2c_master. Grouping the records
// into spots, rejecting implausible spots, decoding the tags' blink patterns
// and the 3-D position solve are processor and host software and are not part
// of this RTL; their inputs and outputs are the processor bus ports.
//
// tag_encoder is the logic of a tag, a separate battery device: it shares no
// clock or signal with the sensing unit and is placed here with its own ports so
// that one top holds the whole design. Its LED reaches the camera only through
// the air.
//
// Parameters: image size (352 x 288 by default, the camera's full resolution),
// record FIFO depth, I2C quarter-bit time in FPGA clocks, tag clock rate. Bus
// timing is that of cpu_mmio; camera timing is that of camera_if.
module remoteeyes_top
  import remoteeyes_pkg::*;
#(
  parameter int unsigned IMG_W       = CAM_W,
  parameter int unsigned IMG_H       = CAM_H,
  parameter int unsigned FIFO_DEPTH  = 1024,
  parameter int unsigned I2C_QUARTER = 250,
  parameter int unsigned TAG_CLK_HZ  = 1_000_000
) (
  input  logic              clk,
  input  logic              rst_n,
  // camera pixel bus
  input  logic              cam_pclk,
  input  logic              cam_href,
  input  logic              cam_vsync,
  input  logic [PIX_W-1:0]  cam_data,
  // camera configuration bus (open drain: *_oe pulls the line low)
  output logic              cam_scl_oe,
  output logic              cam_sda_oe,
  input  logic              cam_sda_i,
  // embedded processor bus
  input  logic              bus_cs,
  input  logic              bus_we,
  input  logic [4:0]        bus_addr,
  input  logic [31:0]       bus_wdata,
  output logic [31:0]       bus_rdata,
  output logic              bus_rvalid,
  // tag (separate device)
  input  logic              tag_clk,
  input  logic              tag_rst_n,
  input  logic [7:0]        tag_id,
  output logic              tag_led,
  output logic              tag_bcast_start
);

  localparam int unsigned LEVEL_W = $clog2(FIFO_DEPTH) + 1;

  logic              pix_valid, line_end, frame_start;
  logic [PIX_W-1:0]  pix;
  logic              det_enable, frame_done, label_ovf, rec_valid;
  logic [PIX_W-1:0]  threshold;
  logic [SIZE_W-1:0] max_width;
  spot_t             rec, fifo_dout;
  logic              fifo_pop, fifo_empty, fifo_full, fifo_overflow, fifo_clr_overflow;
  logic [LEVEL_W-1:0] fifo_level;
  logic              i2c_start, i2c_busy, i2c_nack;
  logic [6:0]        i2c_dev;
  logic [7:0]        i2c_reg, i2c_data;

  camera_if u_camera_if (
    .clk, .rst_n, .cam_pclk, .cam_href, .cam_vsync, .cam_data,
    .pix_valid, .pix, .line_end, .frame_start
  );

  bsd #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_bsd (
    .clk, .rst_n, .enable(det_enable), .threshold, .max_width,
    .frame_start, .line_end, .pix_valid, .pix,
    .rec_valid, .rec, .frame_done, .label_ovf
  );

  spot_fifo #(.WIDTH($bits(spot_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(rec_valid), .din(rec), .pop(fifo_pop), .dout(fifo_dout),
    .empty(fifo_empty), .full(fifo_full), .level(fifo_level),
    .overflow(fifo_overflow), .clr_overflow(fifo_clr_overflow)
  );

  cpu_mmio #(.LEVEL_W(LEVEL_W)) u_mmio (
    .clk, .rst_n, .bus_cs, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .bus_rvalid,
    .det_enable, .det_threshold(threshold), .det_max_width(max_width),
    .det_frame_done(frame_done), .det_label_ovf(label_ovf),
    .fifo_dout, .fifo_empty, .fifo_level, .fifo_full, .fifo_overflow,
    .fifo_pop, .fifo_clr_overflow,
    .i2c_start, .i2c_dev, .i2c_reg, .i2c_data, .i2c_busy, .i2c_nack
  );

  i2c_master #(.QUARTER(I2C_QUARTER)) u_i2c (
    .clk, .rst_n, .start(i2c_start), .dev_addr(i2c_dev), .reg_addr(i2c_reg),
    .wr_data(i2c_data), .busy(i2c_busy), .nack(i2c_nack),
    .scl_oe(cam_scl_oe), .sda_oe(cam_sda_oe), .sda_i(cam_sda_i)
  );

  tag_encoder #(.CLK_HZ(TAG_CLK_HZ), .BIT_HZ(60), .ID_BITS(8)) u_tag (
    .clk(tag_clk), .rst_n(tag_rst_n), .id(tag_id), .led(tag_led), .bcast_start(tag_bcast_start)
  );

endmodule
