// camera_if: camera pixel bus front end.
//
// The CMOS camera drives an 8-bit grey pixel bus with its own pixel clock
// (PCLK), a line-valid strobe (HREF) and a frame strobe (VSYNC). The detector
// runs on the faster FPGA clock, so this block passes all four through two
// synchronising flip-flops and turns the camera timing into single-cycle events
// in the FPGA clock domain:
//   pix_valid   one cycle per PCLK rising edge while HREF is high, with `pix`
//               holding the byte present at that edge;
//   line_end    the cycle after HREF falls;
//   frame_start the cycle after VSYNC rises.
// The three never fall in the same cycle. The camera clock feeding the pixel
// path follows the published unit; oversampling it with a faster FPGA clock
// (at least three FPGA clocks per PCLK period) is this design's choice, and it
// assumes the camera changes its data on the falling PCLK edge, so the byte is
// stable around the rising one. Latency from a PCLK edge to `pix_valid` is three
// to four FPGA clocks.
module camera_if
  import remoteeyes_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cam_pclk,
  input  logic             cam_href,
  input  logic             cam_vsync,
  input  logic [PIX_W-1:0] cam_data,
  output logic             pix_valid,
  output logic [PIX_W-1:0] pix,
  output logic             line_end,
  output logic             frame_start
);

  logic [2:0]       pclk_q, href_q, vsync_q;
  logic [PIX_W-1:0] data_q [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pclk_q      <= '0;
      href_q      <= '0;
      vsync_q     <= '0;
      data_q      <= '{default: '0};
      pix_valid   <= 1'b0;
      pix         <= '0;
      line_end    <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      pclk_q    <= {pclk_q[1:0], cam_pclk};
      href_q    <= {href_q[1:0], cam_href};
      vsync_q   <= {vsync_q[1:0], cam_vsync};
      data_q[0] <= cam_data;
      data_q[1] <= data_q[0];

      pix_valid   <= pclk_q[1] && !pclk_q[2] && href_q[1] && !vsync_q[1];
      pix         <= data_q[1];
      line_end    <= href_q[2] && !href_q[1];
      frame_start <= vsync_q[1] && !vsync_q[2];
    end
  end

endmodule
