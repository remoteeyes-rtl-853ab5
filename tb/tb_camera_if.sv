// tb_camera_if: self-checking testbench for the camera front end.
//
// A small camera model drives PCLK at one quarter of the FPGA clock rate (the
// slowest PCLK phase is not a multiple of the FPGA period, so the sampling
// phase drifts), changes data on the falling PCLK edge, and sends two frames of
// a few lines each with HREF and VSYNC. The testbench checks that every byte
// sent while HREF is high arrives once and in order, that no byte is sent while
// HREF is low, one line_end after the last pixel of each line and one frame_start per frame, and that
// the events never share a cycle.
module tb_camera_if;
  import remoteeyes_pkg::*;

  localparam int LINES = 5, PIXELS = 17, FRAMES = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cam_pclk = 0, cam_href = 0, cam_vsync = 0;
  logic [PIX_W-1:0] cam_data = 0;
  logic pix_valid, line_end, frame_start;
  logic [PIX_W-1:0] pix;

  camera_if dut (.*);

  int checks = 0, failures = 0;
  logic [PIX_W-1:0] sent[$];
  int n_line = 0, n_frame = 0, n_pix = 0, pix_in_line = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One PCLK period: rising edge, then falling edge where the data changes.
  task automatic pclk_cycle(input bit next_href, input logic [PIX_W-1:0] next_data);
    #21 cam_pclk = 1;
    #21 cam_pclk = 0;
    cam_href = next_href;
    cam_data = next_data;
  endtask

  always @(posedge clk) begin
    if (pix_valid) begin
      n_pix++;
      if (sent.size() == 0) check(0, "pixel nobody sent");
      else check(pix == sent.pop_front(), "pixel value or order");
    end
    if (pix_valid) pix_in_line++;
    if (line_end) begin
      n_line++;
      check(pix_in_line == PIXELS, $sformatf("line_end after %0d pixels of the line", pix_in_line));
      pix_in_line = 0;
    end
    if (frame_start) n_frame++;
    if (rst_n) check(int'(pix_valid) + int'(line_end) + int'(frame_start) <= 1, "events share a cycle");
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      cam_vsync = 1;
      repeat (3) pclk_cycle(0, 8'($urandom));
      cam_vsync = 0;
      repeat (4) pclk_cycle(0, 8'($urandom));
      for (int l = 0; l < LINES; l++) begin
        logic [PIX_W-1:0] d;
        d = 8'($urandom);
        pclk_cycle(1, d);          // HREF rises with the first byte
        for (int p = 0; p < PIXELS; p++) begin
          logic [PIX_W-1:0] nd;
          sent.push_back(d);
          nd = 8'($urandom);
          pclk_cycle(p < PIXELS - 1, nd);
          d = nd;
        end
        repeat (5) pclk_cycle(0, 8'($urandom));
      end
    end
    repeat (20) @(posedge clk);
    check(sent.size() == 0, "pixels lost");
    check(n_pix == FRAMES * LINES * PIXELS, $sformatf("pixel count %0d", n_pix));
    check(n_line == FRAMES * LINES, $sformatf("line count %0d", n_line));
    check(n_frame == FRAMES, $sformatf("frame count %0d", n_frame));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
