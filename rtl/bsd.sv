// bsd: streaming bright spot detector.
//
// Finds the bright spots that infrared tags leave in a camera frame while the
// pixels arrive, without a frame buffer. Each scanline is searched pixel by pixel:
// an intensity rise from the previous pixel larger than `threshold` opens a run
// (up-edge), and a fall larger than `threshold` closes it (down-edge). A run whose
// down-edge does not come within `max_width` pixels of its up-edge, or that is
// still open at the end of the line, is dropped as too big to be a tag, and the
// search resumes for the next up-edge. This much follows the published algorithm.
//
// Every accepted run gets a bright pixel group identification number (BPGIN).
// A run that touches a run of the row above (a pixel directly above one of its
// pixels) takes the number of the first such run, scanning left to right; any
// other run opens a new number. The published example labels pixel by pixel, so
// a run can carry several numbers there; here each run carries one, because the
// spot record holds one number per horizontal centre. Runs that should be one
// spot but got different numbers are merged later, in software, by the
// published grouping step. Numbers start at 1 in each frame and stop at 255
// (all later new groups get 255 and `label_ovf` is raised for that frame).
//
// The accepted runs of the previous row are kept in a small run list (start,
// end, number), and the current row's runs are written to a second list; the
// two swap at each line end. A pointer walks the previous list in step with the
// pixel column, so the look-up costs one compare per pixel.
//
// Records leave at the end of each row, as in the published design: at
// `line_end` the row's run list is read out, one record per clock, while the next
// row streams in (the list is then the "row above" list and is only read, and
// a row of IMG_W pixels leaves time for its at most IMG_W/2 runs). The column
// centre is the floor of the mean of the run's first and last columns; the
// size is the run's pixel count.
//
// Interface and timing: one pixel per `pix_valid` cycle, at most one per clock.
// `line_end` and `frame_start` are single-cycle pulses that never coincide with
// `pix_valid`. A row's records appear on `rec_valid` from the second clock after
// its `line_end`, on consecutive clocks. After the last row (IMG_H) of a frame
// the detector emits one end-of-frame record, size 0 with the frame number in
// its low bits, right after that row's records, and pulses `frame_done` in the
// same cycle. The vertical blanking must leave the read-out of the last row
// (at most IMG_W/2 + 1 clocks) time to finish before the next `frame_start`.
module bsd
  import remoteeyes_pkg::*;
#(
  parameter int unsigned IMG_W    = CAM_W,
  parameter int unsigned IMG_H    = CAM_H,
  parameter int unsigned MAX_RUNS = IMG_W / 2   // runs per row are separated by a dark pixel
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [PIX_W-1:0]  threshold,
  input  logic [SIZE_W-1:0] max_width,
  input  logic              frame_start,
  input  logic              line_end,
  input  logic              pix_valid,
  input  logic [PIX_W-1:0]  pix,
  output logic              rec_valid,
  output spot_t             rec,
  output logic              frame_done,
  output logic              label_ovf
);

  localparam int unsigned RUN_AW = $clog2(MAX_RUNS + 1);

  typedef struct packed {
    logic [X_W-1:0]  first;
    logic [X_W-1:0]  last;
    logic [ID_W-1:0] bpgin;
  } run_t;

  // Two run lists, selected by `cur_sel` (current row) and `!cur_sel` (row above).
  run_t run_mem [2][MAX_RUNS];

  logic              cur_sel;
  logic [RUN_AW-1:0] prev_cnt, cur_cnt, ptr;
  logic [X_W-1:0]    x;
  logic [Y_W-1:0]    y;
  logic              line_first;     // next pixel is the first of its line
  logic              frame_active;   // rows of the current frame are still expected
  logic [PIX_W-1:0]  prev_pix;
  logic              in_run;
  logic [X_W-1:0]    run_first;
  logic              cand_has;
  logic [ID_W-1:0]   cand_bpgin;
  logic [ID_W-1:0]   next_bpgin;
  logic [ID_W-1:0]   frame_no;
  // read-out of the finished row
  logic              drain_active;
  logic              drain_sel;
  logic              drain_eof;
  logic [RUN_AW-1:0] drain_idx, drain_cnt;
  logic [Y_W-1:0]    drain_y;

  // ---- per-pixel combinational decisions ----
  run_t              above;
  logic              above_hit, up_edge, down_edge, too_wide;
  logic [X_W-1:0]    run_len;
  logic [ID_W-1:0]   new_bpgin;
  logic [X_W:0]      centre_sum;
  run_t              drained;

  always_comb begin
    above     = run_mem[!cur_sel][(ptr < RUN_AW'(MAX_RUNS)) ? ptr : '0];
    above_hit = (ptr < prev_cnt) && (above.first <= x) && (x <= above.last);
    up_edge   = !line_first && (pix > prev_pix) && ((pix - prev_pix) > threshold);
    down_edge = !line_first && (prev_pix > pix) && ((prev_pix - pix) > threshold);
    run_len   = x - run_first;   // pixels in the run if this pixel is its down-edge
    too_wide  = run_len >= X_W'(max_width);
    new_bpgin = cand_has ? cand_bpgin : next_bpgin;
    drained    = run_mem[drain_sel][(drain_idx < RUN_AW'(MAX_RUNS)) ? drain_idx : '0];
    centre_sum = {1'b0, drained.first} + {1'b0, drained.last};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_sel      <= 1'b0;
      prev_cnt     <= '0;
      cur_cnt      <= '0;
      ptr          <= '0;
      x            <= '0;
      y            <= '0;
      line_first   <= 1'b1;
      frame_active <= 1'b0;
      prev_pix     <= '0;
      in_run       <= 1'b0;
      run_first    <= '0;
      cand_has     <= 1'b0;
      cand_bpgin   <= '0;
      next_bpgin   <= ID_W'(1);
      frame_no     <= '0;
      label_ovf    <= 1'b0;
      rec_valid    <= 1'b0;
      rec          <= '0;
      frame_done   <= 1'b0;
      drain_active <= 1'b0;
      drain_sel    <= 1'b0;
      drain_eof    <= 1'b0;
      drain_idx    <= '0;
      drain_cnt    <= '0;
      drain_y      <= '0;
    end else begin
      rec_valid  <= 1'b0;
      frame_done <= 1'b0;

      // Read out the finished row: one record per clock, then the end-of-frame
      // record after the last row.
      if (drain_active) begin
        if (drain_idx < drain_cnt) begin
          rec_valid <= 1'b1;
          rec       <= '{size:  SIZE_W'(drained.last - drained.first + 1'b1),
                         bpgin: drained.bpgin,
                         y:     drain_y,
                         x:     centre_sum[X_W:1]};
          drain_idx <= drain_idx + 1'b1;
        end else begin
          drain_active <= 1'b0;
          if (drain_eof) begin
            frame_done <= 1'b1;
            rec_valid  <= 1'b1;
            rec        <= '{size: '0, bpgin: '0, y: '0, x: X_W'(frame_no)};
            frame_no   <= frame_no + 1'b1;
          end
        end
      end

      if (frame_start) begin
        frame_active <= enable;
        y            <= '0;
        x            <= '0;
        line_first   <= 1'b1;
        prev_cnt     <= '0;
        cur_cnt      <= '0;
        ptr          <= '0;
        in_run       <= 1'b0;
        next_bpgin   <= ID_W'(1);
        label_ovf    <= 1'b0;
      end else if (line_end && frame_active) begin
        // An open run at the line end never found its down-edge: dropped.
        in_run       <= 1'b0;
        cur_sel      <= !cur_sel;
        prev_cnt     <= cur_cnt;
        cur_cnt      <= '0;
        ptr          <= '0;
        x            <= '0;
        line_first   <= 1'b1;
        y            <= y + 1'b1;
        drain_active <= 1'b1;
        drain_sel    <= cur_sel;
        drain_cnt    <= cur_cnt;
        drain_idx    <= '0;
        drain_y      <= y;
        drain_eof    <= (y == Y_W'(IMG_H - 1));
        if (y == Y_W'(IMG_H - 1)) frame_active <= 1'b0;
      end else if (pix_valid && frame_active) begin
        line_first <= 1'b0;
        prev_pix   <= pix;
        x          <= x + 1'b1;
        // Keep the pointer on the first run of the row above that ends at or
        // after the next column.
        if (ptr < prev_cnt && x >= above.last) ptr <= ptr + 1'b1;

        if (!in_run) begin
          if (up_edge) begin
            in_run     <= 1'b1;
            run_first  <= x;
            cand_has   <= above_hit;
            cand_bpgin <= above.bpgin;
          end
        end else if (down_edge) begin
          in_run    <= 1'b0;
          if (cur_cnt < RUN_AW'(MAX_RUNS)) begin
            run_mem[cur_sel][cur_cnt] <= '{first: run_first, last: x - 1'b1, bpgin: new_bpgin};
            cur_cnt <= cur_cnt + 1'b1;
          end
          if (!cand_has) begin
            if (next_bpgin == '1) label_ovf <= 1'b1;
            else                  next_bpgin <= next_bpgin + 1'b1;
          end
        end else if (too_wide) begin
          in_run <= 1'b0;   // no down-edge within max_width pixels: not a tag
        end else if (!cand_has && above_hit) begin
          cand_has   <= 1'b1;
          cand_bpgin <= above.bpgin;
        end
      end
    end
  end

  // The camera front end never delivers a pixel in a line-end or frame-start cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(pix_valid && (line_end || frame_start)));
  // A row's read-out ends before the next line end or frame start.
  assert property (@(posedge clk) disable iff (!rst_n) drain_active |-> !(line_end || frame_start));

endmodule
