// cpu_mmio: memory-mapped register interface between the processor and the FPGA.
//
// The embedded processor sees the sensing logic as eight 32-bit registers
// (map in remoteeyes_pkg::reg_addr_e). It sets the detector's edge threshold
// and largest run width, enables it, starts camera register writes over I2C,
// and drains the spot records: each read of REG_SPOT returns the oldest record
// and removes it from the FIFO. REG_STATUS tells how many records wait (bits
// 15:0), how many complete frames they hold (bits 23:16, counted by the
// end-of-frame records), and the sticky error flags: FIFO overflow (bit 24) and
// group-number overflow (bit 25), both cleared by writing CTRL bit 1. Bit 26 is
// the I2C busy flag and bit 27 its missing-acknowledge flag. Reading REG_SPOT
// while the FIFO is empty returns 0 and removes nothing.
//
// Bus timing: a single-clock synchronous bus. A write takes effect at the clock
// edge where `bus_cs && bus_we`; a read (`bus_cs && !bus_we`) returns its data
// on `bus_rdata` with `bus_rvalid` one clock later. Register mapping itself
// follows the published design (memory-mapped I/O between the processor and
// the FPGA); the bus protocol, the addresses, the reset values (detector off,
// threshold 40, width 32) and the status layout are this design's choices.
module cpu_mmio
  import remoteeyes_pkg::*;
#(
  parameter logic [PIX_W-1:0]  DEF_THRESH = 8'd40,
  parameter logic [SIZE_W-1:0] DEF_MAXW   = 6'd32,
  parameter int unsigned       LEVEL_W    = 11
) (
  input  logic               clk,
  input  logic               rst_n,
  // processor bus
  input  logic               bus_cs,
  input  logic               bus_we,
  input  logic [4:0]         bus_addr,
  input  logic [31:0]        bus_wdata,
  output logic [31:0]        bus_rdata,
  output logic               bus_rvalid,
  // detector configuration and status
  output logic               det_enable,
  output logic [PIX_W-1:0]   det_threshold,
  output logic [SIZE_W-1:0]  det_max_width,
  input  logic               det_frame_done,
  input  logic               det_label_ovf,
  // record FIFO
  input  spot_t              fifo_dout,
  input  logic               fifo_empty,
  input  logic [LEVEL_W-1:0] fifo_level,
  input  logic               fifo_full,
  input  logic               fifo_overflow,
  output logic               fifo_pop,
  output logic               fifo_clr_overflow,
  // camera I2C master
  output logic               i2c_start,
  output logic [6:0]         i2c_dev,
  output logic [7:0]         i2c_reg,
  output logic [7:0]         i2c_data,
  input  logic               i2c_busy,
  input  logic               i2c_nack
);

  logic        wr, rd;
  logic [7:0]  frames_ready;
  logic [31:0] frames_total;
  logic        label_ovf_sticky;
  logic        marker_in, marker_out;
  logic [31:0] status;

  assign wr         = bus_cs && bus_we;
  assign rd         = bus_cs && !bus_we;
  assign fifo_pop   = rd && (bus_addr == REG_SPOT) && !fifo_empty;
  assign marker_in  = det_frame_done && !fifo_full;
  assign marker_out = fifo_pop && (fifo_dout.size == '0);
  assign status     = {4'b0, i2c_nack, i2c_busy, label_ovf_sticky, fifo_overflow,
                       frames_ready, 16'(fifo_level)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det_enable        <= 1'b0;
      det_threshold     <= DEF_THRESH;
      det_max_width     <= DEF_MAXW;
      fifo_clr_overflow <= 1'b0;
      i2c_start         <= 1'b0;
      i2c_dev           <= '0;
      i2c_reg           <= '0;
      i2c_data          <= '0;
      frames_ready      <= '0;
      frames_total      <= '0;
      label_ovf_sticky  <= 1'b0;
      bus_rdata         <= '0;
      bus_rvalid        <= 1'b0;
    end else begin
      fifo_clr_overflow <= 1'b0;
      i2c_start         <= 1'b0;

      if (wr) begin
        unique case (bus_addr)
          REG_CTRL: begin
            det_enable <= bus_wdata[0];
            if (bus_wdata[1]) begin
              fifo_clr_overflow <= 1'b1;
              label_ovf_sticky  <= 1'b0;
            end
          end
          REG_THRESH: det_threshold <= bus_wdata[PIX_W-1:0];
          REG_MAXW:   det_max_width <= bus_wdata[SIZE_W-1:0];
          REG_I2C: if (!i2c_busy) begin
            i2c_start <= 1'b1;
            i2c_dev   <= bus_wdata[22:16];
            i2c_reg   <= bus_wdata[15:8];
            i2c_data  <= bus_wdata[7:0];
          end
          default: ;
        endcase
      end

      if (det_label_ovf) label_ovf_sticky <= 1'b1;
      if (det_frame_done) frames_total <= frames_total + 1'b1;
      if (marker_in && !marker_out && frames_ready != '1) frames_ready <= frames_ready + 1'b1;
      else if (marker_out && !marker_in && frames_ready != '0) frames_ready <= frames_ready - 1'b1;

      bus_rvalid <= rd;
      if (rd) begin
        unique case (bus_addr)
          REG_ID:     bus_rdata <= ID_WORD;
          REG_CTRL:   bus_rdata <= {31'b0, det_enable};
          REG_STATUS: bus_rdata <= status;
          REG_SPOT:   bus_rdata <= fifo_empty ? '0 : fifo_dout;
          REG_THRESH: bus_rdata <= 32'(det_threshold);
          REG_MAXW:   bus_rdata <= 32'(det_max_width);
          REG_FRAMES: bus_rdata <= frames_total;
          REG_I2C:    bus_rdata <= {30'b0, i2c_nack, i2c_busy};
          default:    bus_rdata <= '0;
        endcase
      end
    end
  end

endmodule
