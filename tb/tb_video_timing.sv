// tb_video_timing: runs two frames at the 640x480 defaults with ce high
// every other clock and measures line length, frame length, the number of
// display-enable pixels per line and per frame, and the sync pulse widths.
module tb_video_timing;
  logic clk = 0, rst = 1, ce = 0;
  logic [9:0] x, y;
  logic de, hsync, vsync, frame_start;
  int checks = 0, failures = 0;

  video_timing dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pix, de_frame, de_line, hs_run, vs_lines, lines, frames;
    int last_fs, hs_width_bad, de_line_bad;
    repeat (3) @(posedge clk);
    rst <= 0;
    pix = 0; de_frame = 0; de_line = 0; hs_run = 0; vs_lines = 0;
    lines = 0; frames = 0; last_fs = -1; hs_width_bad = 0; de_line_bad = 0;
    while (frames < 3) begin
      ce <= ~ce;
      @(posedge clk);
      #1;
      if (!ce) continue;   // the edge just taken had ce low
      // each counter state is sampled once, right after it is entered
      pix++;
      if (de) de_frame++;
      if (hsync) hs_run++;
      if (x == 0) begin
        lines++;
        if (vsync) vs_lines++;
        if (lines > 1 && de_line != 0 && de_line != 640) de_line_bad++;
        de_line = 0;
        if (hs_run != 0 && hs_run != 96) hs_width_bad++;
        hs_run = 0;
      end
      if (de) de_line++;
      if (frame_start) begin
        if (last_fs >= 0) begin
          check(pix - last_fs == 800 * 525, "frame length 800x525");
          check(de_frame == 640 * 480, "640x480 enabled pixels per frame");
          check(vs_lines == 2, "vsync 2 lines");
        end
        last_fs = pix; de_frame = 0; vs_lines = 0;
        frames++;
      end
    end
    check(de_line_bad == 0, "640 enabled pixels on visible lines");
    check(hs_width_bad == 0, "hsync 96 pixels wide");
    check(lines == 3 * 525, "line count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
