// video: the display subsystem, on its own fast clock.
//
// clk is the DVI clock. A phase register divides it by two and the pixel
// side (raster timing, pixel pipeline) advances on every second clock
// (ce = phase), which is the pixel rate; dvi_out sends each pixel as two
// 12-bit halves on the full-rate clock. Screen bytes are read through the
// second, independently clocked port of the system RAM (vram_*: address out,
// byte back one clock later), so no synchronisation is needed for the
// screen data. The display-mode flags (TEXT, MIXED, PAGE2, 80STORE) come
// from the bus-clock domain; they are static for long periods and are
// passed through two-flop synchronisers. With 80STORE on, PAGE2 selects
// memory for the processor rather than the displayed page, so page 2 is
// shown only when PAGE2 is on and 80STORE off. HIRES, 80COL and ALTCHARSET
// are not used: only the 40-column text, lo-res graphics and mixed screens
// are drawn. The pixel rate being half the DVI clock, the dual-clock RAM
// and the supported modes follow the described design; running the pixel
// side on a clock enable (rather than a separate half-rate clock) and the
// synchronisers are this design's choices.
module video
  import apple2_pkg::*;
#(
  parameter string CHAR_FILE = ""
) (
  input  logic        clk,
  input  logic        rst,
  input  soft_sw_t    sw,
  output logic        vram_en,
  output logic [15:0] vram_addr,
  input  logic [7:0]  vram_data,
  output logic [11:0] dvi_d,
  output logic        dvi_de,
  output logic        dvi_h,
  output logic        dvi_v,
  output logic        dvi_xclk,
  output logic        dvi_reset_b
);

  logic       phase;
  logic [3:0] mode_s1, mode_s2;   // {text, mixed, page2, store80}
  logic [9:0] x, y;
  logic       de, hs, vs, frame_start;
  logic [10:0] cr_addr;
  logic [7:0]  cr_data;
  logic [23:0] rgb;
  logic        de_p, hs_p, vs_p;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase   <= 1'b0;
      mode_s1 <= 4'b1000;
      mode_s2 <= 4'b1000;
    end else begin
      phase   <= ~phase;
      mode_s1 <= {sw.text, sw.mixed, sw.page2, sw.store80};
      mode_s2 <= mode_s1;
    end
  end

  video_timing u_timing (
    .clk(clk), .rst(rst), .ce(phase),
    .x(x), .y(y), .de(de), .hsync(hs), .vsync(vs), .frame_start(frame_start)
  );

  video_pipeline u_pipe (
    .clk(clk), .rst(rst), .ce(phase),
    .x(x), .y(y), .de(de), .hsync(hs), .vsync(vs),
    .text(mode_s2[3]), .mixed(mode_s2[2]), .page2(mode_s2[1] && !mode_s2[0]),
    .mem_en(vram_en), .mem_addr(vram_addr), .mem_data(vram_data),
    .cr_addr(cr_addr), .cr_data(cr_data),
    .rgb(rgb), .de_o(de_p), .hsync_o(hs_p), .vsync_o(vs_p)
  );

  char_rom #(.INIT_FILE(CHAR_FILE)) u_chars (.addr(cr_addr), .dout(cr_data));

  dvi_out u_dvi (
    .clk(clk), .rst(rst), .phase(phase),
    .rgb(rgb), .de(de_p), .hsync(hs_p), .vsync(vs_p),
    .dvi_d(dvi_d), .dvi_de(dvi_de), .dvi_h(dvi_h), .dvi_v(dvi_v),
    .dvi_xclk(dvi_xclk), .dvi_reset_b(dvi_reset_b)
  );

endmodule
