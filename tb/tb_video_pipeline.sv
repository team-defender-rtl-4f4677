// tb_video_pipeline: drives the pipeline with its own 800x525 raster
// (640x480 visible) and a random clock-enable pattern, with screen memory
// filled with random bytes, in three modes: lo-res graphics on page 1, text
// on page 2 and mixed on page 1. Every output pixel is compared with the
// reference screen model on the fourth enabled clock edge after the one
// that captured its position;
// DE and syncs must come out with the same delay.
module tb_video_pipeline;
  import tb_ref_pkg::*;
  logic        clk = 0, rst = 1, ce = 0;
  logic [9:0]  x = 0, y = 0;
  logic        de = 0, hsync = 0, vsync = 0;
  logic        text = 0, mixed = 0, page2 = 0;
  logic        mem_en;
  logic [15:0] mem_addr;
  logic [7:0]  mem_data;
  logic [10:0] cr_addr;
  logic [7:0]  cr_data;
  logic [23:0] rgb;
  logic        de_o, hsync_o, vsync_o;
  logic [7:0]  mem [65536];
  int checks = 0, failures = 0;
  int n_oob = 0, n_text = 0, n_gr = 0;

  typedef struct { int x; int y; bit de; bit hs; bit vs; } pos_t;
  pos_t q [$];

  video_pipeline dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) if (mem_en) mem_data <= mem[mem_addr];
  assign cr_data = char_img(int'(cr_addr[10:3]), int'(cr_addr[2:0]));

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(bit t, bit m, bit p2);
    text = t; mixed = m; page2 = p2;
    for (int yy = 0; yy < 525; yy++)
      for (int xx = 0; xx < 800; xx++) begin
        // present the position, wait for an enabled clock
        x <= 10'(xx); y <= 10'(yy);
        de <= (xx < 640 && yy < 480);
        hsync <= (xx >= 656 && xx < 752);
        vsync <= (yy >= 490 && yy < 492);
        while ($urandom_range(0, 3) == 0) begin
          ce <= 0; @(posedge clk);
        end
        ce <= 1;
        @(posedge clk);
        q.push_back('{xx, yy, (xx < 640 && yy < 480), (xx >= 656 && xx < 752),
                      (yy >= 490 && yy < 492)});
        #1;
        if (q.size() == 4) begin
          pos_t p = q.pop_front();
          logic [3:0] c;
          bit tr;
          if (!p.de || !in_picture(p.x, p.y)) begin
            c = 0; n_oob++;
          end else begin
            tr = is_text_row(p.y, text, mixed);
            c = pixel_color(p.x, p.y, mem[screen_addr(p.x, p.y, page2)], tr);
            if (tr) n_text++; else n_gr++;
          end
          checks++;
          if (rgb !== PAL[c] || de_o !== p.de || hsync_o !== p.hs ||
              vsync_o !== p.vs) begin
            failures++;
            if (failures < 10)
              $display("(%0d,%0d) mode %0b%0b%0b: rgb %06h expected %06h de %0b/%0b",
                       p.x, p.y, t, m, p2, rgb, PAL[c], de_o, p.de);
          end
        end
      end
  endtask

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst <= 0;
    run_frame(0, 0, 0);
    run_frame(1, 0, 1);
    run_frame(0, 1, 0);
    checks++;
    if (n_oob == 0 || n_text == 0 || n_gr == 0) failures++;
    $display("border pixels %0d, text pixels %0d, graphics pixels %0d",
             n_oob, n_text, n_gr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
