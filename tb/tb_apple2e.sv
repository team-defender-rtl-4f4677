// tb_apple2e: end-to-end test of the machine without its processor. The
// testbench plays the 6502: it runs bus cycles on the 3.125 MHz bus clock
// while the video side runs on a 100 MHz DVI clock, types keys and
// watches the speaker and the DVI output.
// Steps: fill both text/lo-res pages through the bus; check whole frames
// rebuilt from the DVI halves in text, lo-res graphics, mixed and page 2
// modes (the mode switches are set by bus reads, as the firmware does);
// exercise aux memory (RAMRD/RAMWRT, ALTZP, 80STORE), the language card
// (read RAM/ROM, write enable by two odd reads, both 0xD000 banks), the
// ROM and internal slot ROM windows, the keyboard strobe and the speaker.
// ROM and sprite ROM hold test images (see tb_ref_pkg): the ROM image's
// 256 bytes sit at 0xE000. Every mechanism is counted and must occur.
module tb_apple2e;
  import tb_ref_pkg::*;
  localparam bit IMAGES = 1;

  logic        clk_sys = 0, clk_dvi = 0, rst = 1;
  logic        cpu_valid = 0, cpu_we = 0;
  logic [15:0] cpu_addr = 0;
  logic [7:0]  cpu_wdata = 0, cpu_rdata;
  logic        key_valid = 0, key_down = 0;
  logic [6:0]  key_code = 0;
  logic        spk;
  logic [11:0] dvi_d;
  logic        dvi_de, dvi_h, dvi_v, dvi_xclk, dvi_reset_b;

  apple2e #(.ROM_FILE("tb/rom_top.hex"), .CHAR_FILE("tb/char_test.hex")) dut (.*);

  always #160 clk_sys = ~clk_sys;   // 3.125 MHz
  always #5   clk_dvi = ~clk_dvi;   // 100 MHz

  int checks = 0, failures = 0;
  logic [7:0] main_mem [65536];

  // mechanism counters
  int n_text_fr = 0, n_gr_fr = 0, n_mixed_fr = 0, n_page2_fr = 0;
  int n_border = 0, n_aux = 0, n_altzp = 0, n_store80 = 0;
  int n_lc_b1 = 0, n_lc_b2 = 0, n_lc_prot = 0, n_rom = 0, n_cx = 0;
  int n_kbd = 0, n_spk = 0;

  function automatic logic [7:0] rom_at(logic [15:0] a);
    return (IMAGES && a >= 16'hE000) ? rom_img(int'(a) - 'hE000) : 8'h00;
  endfunction

  function automatic logic [3:0] ref_pixel(int x, int y, bit t, bit m, bit p2);
    logic [7:0] b;
    bit tr;
    if (!in_picture(x, y)) return 4'h0;
    b  = main_mem[screen_addr(x, y, p2)];
    tr = is_text_row(y, t, m);
    if (tr && !IMAGES) return 4'h0;
    return pixel_color(x, y, b, tr);
  endfunction

  // ---- bus cycles -------------------------------------------------------
  task automatic wr(logic [15:0] a, logic [7:0] d);
    cpu_valid <= 1; cpu_we <= 1; cpu_addr <= a; cpu_wdata <= d;
    @(posedge clk_sys);
    cpu_valid <= 0; cpu_we <= 0;
    #1;
  endtask

  task automatic rd(logic [15:0] a, output logic [7:0] d);
    cpu_valid <= 1; cpu_we <= 0; cpu_addr <= a;
    @(posedge clk_sys);
    cpu_valid <= 0;
    #1 d = cpu_rdata;
  endtask

  task automatic expect_rd(logic [15:0] a, logic [7:0] e, string what);
    logic [7:0] d;
    rd(a, d);
    checks++;
    if (d !== e) begin
      failures++;
      $display("FAIL %s: read %04h = %02h expected %02h", what, a, d, e);
    end
  endtask

  // ---- DVI capture ------------------------------------------------------
  bit   checking = 0, e_text, e_mixed, e_page2;
  int   idx = 0, periods = 0, frames = 0, bad = 0;
  logic [11:0] lo;
  logic lo_de, lo_v, prev_v = 0, have_lo = 0;

  always @(posedge clk_dvi) begin
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
          if (idx != 640 * 480) begin failures++; $display("FAIL DE pixels %0d", idx); end
          if (periods != 800 * 525) begin failures++; $display("FAIL periods %0d", periods); end
        end
        frames++; idx = 0; periods = 0; bad = 0;
      end
      prev_v = lo_v;
      if (lo_de) begin
        if (checking) begin
          int xx, yy;
          logic [3:0] c;
          xx = idx % 640; yy = idx / 640;
          c = ref_pixel(xx, yy, e_text, e_mixed, e_page2);
          if (!in_picture(xx, yy)) n_border++;
          checks++;
          if (px !== PAL[c]) begin
            failures++; bad++;
            if (bad < 5) $display("FAIL (%0d,%0d): %06h expected %06h", xx, yy, px, PAL[c]);
          end
        end
        idx++;
      end
    end
  end

  // set TEXT/MIXED/PAGE2 with bus reads, then check one whole frame
  task automatic frame_check(bit t, bit m, bit p2);
    logic [7:0] d;
    int f;
    rd(t ? 16'hC051 : 16'hC050, d);
    rd(m ? 16'hC053 : 16'hC052, d);
    rd(p2 ? 16'hC055 : 16'hC054, d);
    e_text = t; e_mixed = m; e_page2 = p2;
    f = frames;
    wait (frames == f + 2);
    checking = 1;
    wait (frames == f + 3);
    checking = 0;
    if (t) n_text_fr++; else if (m) n_mixed_fr++; else n_gr_fr++;
    if (p2) n_page2_fr++;
  endtask

  task automatic count_check(int n, string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    #400ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    bit s;
    repeat (4) @(posedge clk_sys);
    rst <= 0;
    @(posedge clk_sys); #1;
    // both screen pages
    for (int a = 'h400; a < 'hC00; a++) begin
      main_mem[a] = 8'($urandom);
      wr(16'(a), main_mem[a]);
    end
    frame_check(1, 0, 0);
    frame_check(0, 0, 0);
    frame_check(0, 1, 0);
    frame_check(0, 0, 1);

    // aux memory does not disturb the screen
    wr(16'hC005, 0);
    wr(16'h0400, ~main_mem['h400]);          n_aux++;
    expect_rd(16'h0400, main_mem['h400], "main read with RAMWRT");
    wr(16'hC003, 0);
    expect_rd(16'h0400, ~main_mem['h400], "aux read with RAMRD");
    wr(16'hC002, 0); wr(16'hC004, 0);
    // ALTZP
    wr(16'h0080, 8'h21); wr(16'hC009, 0); wr(16'h0080, 8'h42); n_altzp++;
    expect_rd(16'h0080, 8'h42, "ALTZP aux zero page");
    wr(16'hC008, 0);
    expect_rd(16'h0080, 8'h21, "main zero page");
    // 80STORE + PAGE2 -> text page writes go to aux
    wr(16'hC001, 0); rd(16'hC055, d);
    wr(16'h0401, 8'hE7);                      n_store80++;
    rd(16'hC054, d);
    expect_rd(16'h0401, main_mem['h401], "80STORE page 1 main");
    rd(16'hC055, d);
    expect_rd(16'h0401, 8'hE7, "80STORE page 2 aux");
    rd(16'hC054, d); wr(16'hC000, 0);
    // ROM and the internal slot ROM window
    expect_rd(16'hE005, rom_at(16'hE005), "ROM");  n_rom++;
    expect_rd(16'hC200, 8'h00, "empty slot");
    wr(16'hC007, 0);
    expect_rd(16'hC200, rom_at(16'hC200), "internal C200"); n_cx++;
    wr(16'hC006, 0);
    // language card
    rd(16'hC080, d);               // read RAM, writes still off
    rd(16'hD100, d);
    wr(16'hD100, ~d);
    expect_rd(16'hD100, d, "write protected after reset");
    rd(16'hC083, d); rd(16'hC083, d);
    wr(16'hD100, 8'hA2); expect_rd(16'hD100, 8'hA2, "bank 2 RAM"); n_lc_b2++;
    rd(16'hC08B, d); rd(16'hC08B, d);
    wr(16'hD100, 8'hB1); expect_rd(16'hD100, 8'hB1, "bank 1 RAM"); n_lc_b1++;
    rd(16'hC083, d);
    expect_rd(16'hD100, 8'hA2, "back to bank 2");
    rd(16'hC080, d);
    wr(16'hD100, 8'h55); expect_rd(16'hD100, 8'hA2, "write protected"); n_lc_prot++;
    rd(16'hC082, d);
    expect_rd(16'hE005, rom_at(16'hE005), "ROM again after C082");
    // keyboard
    @(negedge clk_sys);
    key_valid = 1; key_code = 7'h41; key_down = 1;
    @(negedge clk_sys);
    key_valid = 0;
    expect_rd(16'hC000, 8'hC1, "key with strobe");
    expect_rd(16'hC010, 8'hC1, "any key down, clears strobe"); n_kbd++;
    expect_rd(16'hC000, 8'h41, "strobe cleared");
    // speaker: toggles on each access
    s = spk;
    rd(16'hC030, d);
    checks++; if (spk === s) begin failures++; $display("FAIL speaker"); end
    else n_spk++;
    rd(16'hC030, d);
    checks++; if (spk !== s) begin failures++; $display("FAIL speaker back"); end

    count_check(n_text_fr, "text frame");
    count_check(n_gr_fr, "lo-res frame");
    count_check(n_mixed_fr, "mixed frame");
    count_check(n_page2_fr, "page 2 frame");
    count_check(n_border, "border pixels");
    count_check(n_aux, "aux memory");
    count_check(n_altzp, "ALTZP");
    count_check(n_store80, "80STORE");
    count_check(n_lc_b1, "high RAM bank 1");
    count_check(n_lc_b2, "high RAM bank 2");
    count_check(n_lc_prot, "high RAM write protect");
    count_check(n_rom, "ROM read");
    count_check(n_cx, "internal slot ROM");
    count_check(n_kbd, "keyboard strobe");
    count_check(n_spk, "speaker toggle");
    checks++; if (dvi_reset_b !== 1'b1) failures++;
    $display("frames: text %0d lo-res %0d mixed %0d page2 %0d; border pixels %0d",
             n_text_fr, n_gr_fr, n_mixed_fr, n_page2_fr, n_border);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
