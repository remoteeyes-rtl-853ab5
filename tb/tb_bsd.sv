// tb_bsd: self-checking testbench for the bright spot detector.
//
// Builds small synthetic frames (dim noisy background, diamond-shaped spots,
// touching spots, bars too wide to be a tag, runs still open at the line end),
// streams them into the detector with random gaps between pixels, and compares
// every record with a reference model. The model labels pixel by pixel with a
// label line of the row above, an approach independent of the detector's run
// lists. It also checks that a row's records leave on consecutive clocks from
// the second clock after that row's line end, the end-of-frame marker, and that
// rejection by width, rejection at the line end and label inheritance from the
// row above all happened, and that group numbers saturate at 255 with the
// overflow flag in a frame of staggered dots.
module tb_bsd;
  import remoteeyes_pkg::*;

  localparam int W = 40;
  localparam int H = 16;
  localparam int FRAMES = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              enable = 1;
  logic [PIX_W-1:0]  threshold = 40;
  logic [SIZE_W-1:0] max_width = 8;
  logic frame_start = 0, line_end = 0, pix_valid = 0;
  logic [PIX_W-1:0] pix = 0;
  logic rec_valid, frame_done, label_ovf;
  spot_t rec;

  bsd #(.IMG_W(W), .IMG_H(H)) dut (.*);

  int checks = 0, failures = 0;
  int img [H][W];
  spot_t expq[$];
  bit ovf_exp = 0;
  int n_ovf = 0;
  int n_reject_wide = 0, n_reject_eol = 0, n_inherit = 0, n_records = 0;
  int n_le = 0, since_le = 0, row_idx = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- reference model ----------------
  task automatic model_frame(input int frame_no);
    int lab_prev [W];
    int lab_cur [W];
    int next_lab = 1;
    ovf_exp = 0;
    foreach (lab_prev[i]) lab_prev[i] = 0;
    for (int y = 0; y < H; y++) begin
      bit in_run = 0;
      int s = 0;
      foreach (lab_cur[i]) lab_cur[i] = 0;
      for (int x = 1; x < W; x++) begin
        bit up   = img[y][x] - img[y][x-1] > int'(threshold);
        bit down = img[y][x-1] - img[y][x] > int'(threshold);
        if (!in_run) begin
          if (up) begin in_run = 1; s = x; end
        end else if (down) begin
          int lab = 0;
          spot_t r;
          for (int k = s; k < x; k++) if (lab == 0 && lab_prev[k] != 0) lab = lab_prev[k];
          if (lab == 0) begin
            if (next_lab > 255) begin lab = 255; ovf_exp = 1; end   // numbers saturate
            else begin lab = next_lab; next_lab++; end
          end
          else n_inherit++;
          for (int k = s; k < x; k++) lab_cur[k] = lab;
          r.size = SIZE_W'(x - s); r.bpgin = ID_W'(lab); r.y = Y_W'(y); r.x = X_W'((s + x - 1) / 2);
          expq.push_back(r);
          in_run = 0;
        end else if (x - s + 1 > int'(max_width)) begin
          in_run = 0; n_reject_wide++;
        end
      end
      if (in_run) n_reject_eol++;
      lab_prev = lab_cur;
    end
    begin
      spot_t m;
      m = '0; m.x = X_W'(frame_no);
      expq.push_back(m);
    end
  endtask

  // ---------------- image generation ----------------
  task automatic put_diamond(input int cy, input int cx, input int r, input int v);
    for (int y = cy - r; y <= cy + r; y++)
      for (int x = cx - r; x <= cx + r; x++)
        if (y >= 0 && y < H && x >= 0 && x < W && ((y > cy ? y - cy : cy - y) + (x > cx ? x - cx : cx - x)) <= r)
          img[y][x] = v;
  endtask

  task automatic make_image(input int f);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = $urandom_range(0, 30);
    put_diamond(3, 6, 2, 220);
    put_diamond(4 + f % 3, 20, 3, 180 + f);
    // touching spot to the right of the first one: same group in the row above
    for (int x = 9; x < 12; x++) img[3][x] = 200;
    // a bar too wide to be a tag
    for (int x = 14; x < 30; x++) img[9][x] = 230;
    // a run still open at the line end
    for (int x = W - 4; x < W; x++) img[10][x] = 240;
    // a few random single-pixel glints
    repeat (4) img[$urandom_range(0, H-1)][$urandom_range(1, W-2)] = 250;
  endtask

  // ---------------- stimulus ----------------
  task automatic send_frame();
    @(posedge clk); frame_start <= 1; @(posedge clk); frame_start <= 0;
    repeat (3) @(posedge clk);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        while ($urandom_range(0, 3) == 0) begin pix_valid <= 0; @(posedge clk); end
        pix_valid <= 1; pix <= PIX_W'(img[y][x]);
        @(posedge clk);
      end
      pix_valid <= 0;
      repeat (2) @(posedge clk);
      line_end <= 1; @(posedge clk); line_end <= 0;
      repeat (3) @(posedge clk);
    end
    repeat (W) @(posedge clk);   // vertical blanking: room for the last row's read-out
  endtask

  // ---------------- monitor ----------------
  int n_done = 0;
  always @(posedge clk) begin
    since_le++;
    if (frame_start) n_le = 0;
    if (rec_valid) begin
      spot_t e;
      n_records++;
      if (expq.size() == 0) check(0, "unexpected record");
      else begin
        e = expq.pop_front();
        check(rec == e, $sformatf("record got %h (sz %0d id %0d y %0d x %0d) exp %h (sz %0d id %0d y %0d x %0d)",
              rec, rec.size, rec.bpgin, rec.y, rec.x, e, e.size, e.bpgin, e.y, e.x));
        // a row's records leave on consecutive clocks from the second clock after its line end
        if (rec.size != 0) check(rec.y == Y_W'(n_le - 1) && since_le == 2 + row_idx,
                                 $sformatf("record timing: row %0d after %0d line ends, %0d clocks", rec.y, n_le, since_le));
        row_idx++;
        check(frame_done == (rec.size == 0), "frame_done must mark the end-of-frame record");
      end
    end
    if (frame_done) n_done++;
    if (line_end) begin n_le++; since_le = 0; row_idx = 0; end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      if (f == 3) threshold = 80;
      if (f == 4) max_width = 3;
      make_image(f);
      if (f == 6) begin
        // staggered single-pixel dots: no dot touches one in the row above, so
        // every dot opens a new group and the numbers run out
        max_width = 8;
        for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
          img[y][x] = ((x + y) % 2 == 1 && x > 0) ? 200 : 10;
      end
      model_frame(f);
      send_frame();
      check(expq.size() == 0, $sformatf("frame %0d: %0d records missing", f, expq.size()));
      check(label_ovf == ovf_exp, $sformatf("frame %0d: label overflow flag %0d", f, label_ovf));
      if (label_ovf) n_ovf++;
      expq.delete();
    end
    // a disabled frame produces nothing
    enable = 0;
    make_image(0);
    begin
      int n_before;
      n_before = n_records;
      send_frame();
      check(n_records == n_before, "disabled detector must stay silent");
    end
    check(n_done == FRAMES, "one frame_done per frame");
    check(n_ovf == 1, "group-number saturation exercised once");
    check(n_reject_wide > 0, "width rejection never exercised");
    check(n_reject_eol > 0, "line-end rejection never exercised");
    check(n_inherit > 0, "label inheritance never exercised");
    $display("records=%0d wide_rejects=%0d eol_rejects=%0d inherits=%0d", n_records, n_reject_wide, n_reject_eol, n_inherit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
