// tb_video: the display subsystem on its DVI clock with a screen memory
// model on its read port and the sprite test image. For each display mode
// (graphics page 1, text page 2, mixed page 1, and PAGE2 with 80STORE,
// which must still show page 1) the mode is set, one frame is let pass
// for the synchronisers, and the next whole frame is rebuilt from the
// 12-bit DVI halves and compared pixel by pixel with the reference screen.
// Also checked: 640x480 DE pixels per frame, 800x525 pixel periods per
// frame, DVI reset held high.
module tb_video;
  import apple2_pkg::*;
  import tb_ref_pkg::*;
  logic        clk = 0, rst = 1;
  soft_sw_t    sw;
  logic        vram_en;
  logic [15:0] vram_addr;
  logic [7:0]  vram_data;
  logic [11:0] dvi_d;
  logic        dvi_de, dvi_h, dvi_v, dvi_xclk, dvi_reset_b;
  logic [7:0]  mem [65536];
  int checks = 0, failures = 0;

  video #(.CHAR_FILE("tb/char_test.hex")) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (vram_en) vram_data <= mem[vram_addr];

  // DVI capture
  bit   checking = 0;
  bit   exp_text, exp_mixed, exp_page2;
  int   idx = 0, periods = 0, frames = 0, bad = 0;
  logic [11:0] lo;
  logic lo_de, lo_v, prev_v = 0, have_lo = 0;

  always @(posedge clk) begin
    #1;
    if (dvi_xclk) begin
      lo = dvi_d; lo_de = dvi_de; lo_v = dvi_v; have_lo = 1;
    end else if (have_lo) begin
      logic [23:0] px;
      px = {dvi_d, lo};
      periods++;
      if (lo_v && !prev_v) begin
        if (checking) begin
          checks += 2;
          if (idx != 640 * 480) begin failures++; $display("DE pixels %0d", idx); end
          if (periods != 800 * 525) begin failures++; $display("periods %0d", periods); end
        end
        frames++; idx = 0; periods = 0; bad = 0;
      end
      prev_v = lo_v;
      if (lo_de) begin
        if (checking) begin
          int xx, yy;
          logic [3:0] c;
          xx = idx % 640; yy = idx / 640; c = 0;
          if (in_picture(xx, yy))
            c = pixel_color(xx, yy, mem[screen_addr(xx, yy, exp_page2)],
                            is_text_row(yy, exp_text, exp_mixed));
          checks++;
          if (px !== PAL[c]) begin
            bad++;
            failures++;
            if (bad < 5)
              $display("(%0d,%0d): %06h expected %06h", xx, yy, px, PAL[c]);
          end
        end
        idx++;
      end
    end
  end

  task automatic check_mode(bit t, bit m, bit p2, bit s80);
    int f;
    sw = '{text: t, mixed: m, page2: p2, store80: s80, default: 1'b0};
    exp_text = t; exp_mixed = m; exp_page2 = p2 && !s80;
    checking = 0;
    f = frames;
    wait (frames == f + 2);   // one settling frame
    checking = 1;
    wait (frames == f + 3);   // the checked frame ends at the next vsync
    checking = 0;
  endtask

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = 8'($urandom);
    sw = SOFT_SW_RESET;
    repeat (4) @(posedge clk);
    rst <= 0;
    check_mode(0, 0, 0, 0);
    check_mode(1, 0, 1, 0);
    check_mode(0, 1, 0, 0);
    check_mode(1, 0, 1, 1);
    checks++;
    if (dvi_reset_b !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
