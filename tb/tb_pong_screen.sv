// tb_pong_screen: the screen side of the lo-res Pong demo program on the
// machine at its default parameters. The testbench stands in for the
// processor and the BASIC interpreter and makes the bus accesses the
// program's statements cause:
//   HOME           bottom four text rows filled with spaces (0xA0)
//   GR             TEXT off, MIXED on, PAGE2 off, HIRES off (by reads),
//                  top 40 lo-res rows cleared
//   COLOR=c/PLOT   read-modify-write of one nibble: lo-res pixel (x,y) is
//                  the low nibble (y even) or high nibble (y odd) of the
//                  byte at text row y/2, column x
//   VLIN / HLIN    runs of PLOTs
// It draws the play area (walls at x=7 and 32, top and bottom lines at y=0
// and 30), the paddle at (11,12)-(11,13) and the ball at (31,12), checks a
// whole frame, then plays one key press: PEEK(-16384) must read 139 (the
// key 0x0B with the strobe), the paddle moves up one pixel, PEEK(-16368)
// clears the strobe; the ball steps left. A second whole frame is checked,
// plus the paddle and ball pixels on the DVI output one by one. Text rows
// are blank because no character image is loaded at the defaults.
module tb_pong_screen;
  import tb_ref_pkg::*;
  logic        clk_sys = 0, clk_dvi = 0, rst = 1;
  logic        cpu_valid = 0, cpu_we = 0;
  logic [15:0] cpu_addr = 0;
  logic [7:0]  cpu_wdata = 0, cpu_rdata;
  logic        key_valid = 0, key_down = 0;
  logic [6:0]  key_code = 0;
  logic        spk;
  logic [11:0] dvi_d;
  logic        dvi_de, dvi_h, dvi_v, dvi_xclk, dvi_reset_b;

  apple2e dut (.*);

  always #160 clk_sys = ~clk_sys;
  always #5   clk_dvi = ~clk_dvi;

  int checks = 0, failures = 0;
  logic [7:0] main_mem [65536];
  logic [23:0] frame [480][640];
  int n_frames_checked = 0, n_key = 0;

  task automatic wr(logic [15:0] a, logic [7:0] d);
    cpu_valid <= 1; cpu_we <= 1; cpu_addr <= a; cpu_wdata <= d;
    @(posedge clk_sys);
    cpu_valid <= 0; cpu_we <= 0;
    #1;
    if (a < 16'hC000) main_mem[a] = d;
  endtask

  task automatic rd(logic [15:0] a, output logic [7:0] d);
    cpu_valid <= 1; cpu_we <= 0; cpu_addr <= a;
    @(posedge clk_sys);
    cpu_valid <= 0;
    #1 d = cpu_rdata;
  endtask

  function automatic logic [15:0] lores_addr(int x, int y);
    return 16'('h400 + row_base(y / 2) + x);
  endfunction

  task automatic plot(int x, int y, logic [3:0] c);
    logic [7:0] b;
    rd(lores_addr(x, y), b);
    if (y % 2 == 0) b[3:0] = c; else b[7:4] = c;
    wr(lores_addr(x, y), b);
  endtask

  task automatic vlin(int y1, int y2, int x, logic [3:0] c);
    for (int y = y1; y <= y2; y++) plot(x, y, c);
  endtask

  task automatic hlin(int x1, int x2, int y, logic [3:0] c);
    for (int x = x1; x <= x2; x++) plot(x, y, c);
  endtask

  // ---- DVI capture into a frame buffer ----------------------------------
  int   idx = 0, frames = 0;
  logic [11:0] lo;
  logic lo_de, lo_v, prev_v = 0, have_lo = 0;

  always @(posedge clk_dvi) begin
    #1;
    if (dvi_xclk) begin
      lo = dvi_d; lo_de = dvi_de; lo_v = dvi_v; have_lo = 1;
    end else if (have_lo) begin
      if (lo_v && !prev_v) begin frames++; idx = 0; end
      prev_v = lo_v;
      if (lo_de && idx < 640 * 480) begin
        frame[idx / 640][idx % 640] = {dvi_d, lo};
        idx++;
      end
    end
  end

  task automatic grab_frame();
    int f = frames;
    wait (frames == f + 2);   // let a whole frame be drawn after the change
    wait (frames == f + 3);
  endtask

  task automatic check_frame();
    int bad = 0;
    for (int y = 0; y < 480; y++)
      for (int x = 0; x < 640; x++) begin
        logic [3:0] c;
        c = 0;
        if (in_picture(x, y) && !is_text_row(y, 0, 1))
          c = pixel_color(x, y, main_mem[screen_addr(x, y, 0)], 0);
        checks++;
        if (frame[y][x] !== PAL[c]) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL (%0d,%0d) %06h expected %06h", x, y, frame[y][x], PAL[c]);
        end
      end
    n_frames_checked++;
  endtask

  // lo-res pixel (x,y) covers screen pixels x*8..+7, y*4..+3 of the picture
  task automatic check_lores(int x, int y, logic [3:0] c, string what);
    int sx = 160 + x * 8 + 3, sy = 144 + y * 4 + 1;
    checks++;
    if (frame[sy][sx] !== PAL[c]) begin
      failures++;
      $display("FAIL %s: lo-res (%0d,%0d) %06h expected %06h", what, x, y,
               frame[sy][sx], PAL[c]);
    end
  endtask

  initial begin
    #400ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    int y, z, xb;
    for (int a = 0; a < 65536; a++) main_mem[a] = 8'h00;
    repeat (4) @(posedge clk_sys);
    rst <= 0;
    @(posedge clk_sys); #1;
    // HOME: the whole text screen to spaces
    for (int r = 0; r < 24; r++)
      for (int c = 0; c < 40; c++) wr(16'('h400 + row_base(r) + c), 8'hA0);
    // GR
    rd(16'hC050, d); rd(16'hC053, d); rd(16'hC054, d); rd(16'hC056, d);
    for (int r = 0; r < 20; r++)
      for (int c = 0; c < 40; c++) wr(16'('h400 + row_base(r) + c), 8'h00);
    // 3100-3400: play area
    vlin(0, 30, 7, 4'd3);
    vlin(0, 30, 32, 4'd12);
    hlin(7, 32, 0, 4'd12);
    hlin(7, 32, 30, 4'd12);
    // 110-120: paddle and ball
    y = 12; z = 13; xb = 31;
    plot(11, y, 4'd9); plot(11, z, 4'd9); plot(xb, 12, 4'd13);
    grab_frame();
    check_frame();
    check_lores(7, 1, 4'd3, "left wall top");
    check_lores(7, 29, 4'd3, "left wall bottom");
    check_lores(7, 30, 4'd12, "bottom line over the wall");
    check_lores(20, 0, 4'd12, "top line");
    check_lores(11, 12, 4'd9, "paddle");
    check_lores(31, 12, 4'd13, "ball");
    // 135: T = PEEK(-16384) with the key pressed
    @(negedge clk_sys);
    key_valid = 1; key_code = 7'h0B;
    @(negedge clk_sys);
    key_valid = 0;
    rd(16'hC000, d);
    checks++;
    if (d !== 8'd139) begin failures++; $display("FAIL key read %0d", d); end
    else n_key++;
    // 300-330: paddle up, clear the strobe
    plot(11, y, 4'd0); plot(11, z, 4'd0);
    y--; z--;
    plot(11, y, 4'd9); plot(11, z, 4'd9);
    rd(16'hC010, d);
    rd(16'hC000, d);
    checks++;
    if (d[7] !== 1'b0) begin failures++; $display("FAIL strobe not cleared"); end
    // 2570-2580: ball one step left
    plot(xb, 12, 4'd0); xb--; plot(xb, 12, 4'd13);
    grab_frame();
    check_frame();
    check_lores(11, 11, 4'd9, "paddle moved up");
    check_lores(11, 13, 4'd0, "paddle old bottom erased");
    check_lores(30, 12, 4'd13, "ball moved");
    check_lores(31, 12, 4'd0, "ball old place erased");
    checks++;
    if (n_frames_checked != 2 || n_key != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
