// video_pipeline: four-stage pixel pipeline for the 40x24 text and lo-res
// graphics screens.
//
// The 320x192 picture (40 columns x 24 rows of 8x8-pixel cells; one byte of
// screen memory per cell) is drawn centred in the 640x480 frame, at
// (X0, Y0). The pipeline takes the raster position from video_timing and
// advances once per clock with ce high:
//   1. address: whether the pixel is in_pic the picture, the screen byte's
//      address and the pixel's offset (px, py) in its cell. Row r of a page
//      starting at BASE is at BASE + 128*(r mod 8) + 40*(r div 8), so each
//      128-byte block holds rows r, r+8 and r+16 and its last 8 bytes are
//      unused. Outside the picture the address is 0 and an out-of-bounds
//      flag is set.
//   2. fetch: the byte from screen memory (synchronous port, mem_* below),
//      or zero when out of bounds.
//   3. colour: in graphics the low nibble colours the top four pixel rows
//      of the cell and the high nibble the bottom four; in text the byte
//      and py address the sprite ROM (asynchronous, cr_* below) and bit
//      7-px of the row gives white (15) or black (0). Out-of-bounds zeros
//      are taken as graphics, giving a black border. The row is text when
//      TEXT is on, or when MIXED is on and the row is 20 or below it.
//   4. output: 24-bit RGB from the 16-colour palette.
// Latency: the enabled clock edge that captures x/y/de/hsync/vsync is the
// first of four; the pixel's rgb, with its de/hsync/vsync delayed alongside,
// is registered on the fourth. page2 picks the page at
// 0x0800 instead of 0x0400. The stage split, the interleaved row addressing,
// the 8-pixel cells and the black border follow the described design; the
// nibble order (low nibble on top) and the sprite bit order are this
// design's choices.
module video_pipeline
  import apple2_pkg::*;
#(
  parameter int unsigned X0 = 160,
  parameter int unsigned Y0 = 144
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  // raster position and timing
  input  logic [9:0]  x,
  input  logic [9:0]  y,
  input  logic        de,
  input  logic        hsync,
  input  logic        vsync,
  // display mode
  input  logic        text,
  input  logic        mixed,
  input  logic        page2,
  // screen memory, one clock read latency
  output logic        mem_en,
  output logic [15:0] mem_addr,
  input  logic [7:0]  mem_data,
  // sprite ROM, combinational read
  output logic [10:0] cr_addr,
  input  logic [7:0]  cr_data,
  // pixel out
  output logic [23:0] rgb,
  output logic        de_o,
  output logic        hsync_o,
  output logic        vsync_o
);

  typedef struct packed {
    logic [2:0] px;
    logic [2:0] py;
    logic       oob;
    logic       text_row;
    logic       de;
    logic       hs;
    logic       vs;
  } pix_t;

  localparam int unsigned W = COLS * 8;   // 320
  localparam int unsigned H = ROWS * 8;   // 192

  // ---- stage 1: address ------------------------------------------------
  logic [9:0]  sx, sy;
  logic [5:0]  col;
  logic [4:0]  row;
  logic        in_pic;
  logic [15:0] addr1;
  pix_t        p1_d, p1_q, p2_q;
  logic [15:0] addr1_q;

  assign sx     = x - 10'(X0);
  assign sy     = y - 10'(Y0);
  assign col    = sx[8:3];
  assign row    = sy[7:3];
  assign in_pic = de && (x >= 10'(X0)) && (x < 10'(X0 + W))
                     && (y >= 10'(Y0)) && (y < 10'(Y0 + H));

  always_comb begin
    addr1 = (page2 ? PAGE2_BASE : PAGE1_BASE)
          + {6'd0, row[2:0], 7'd0}
          + 16'(row[4:3]) * 16'(COLS)
          + 16'(col);
    if (!in_pic) addr1 = '0;
    p1_d = '{px: sx[2:0], py: sy[2:0], oob: !in_pic,
             text_row: text || (mixed && row >= 5'(MIXED_ROW)),
             de: de, hs: hsync, vs: vsync};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p1_q    <= '{oob: 1'b1, default: '0};
      addr1_q <= '0;
    end else if (ce) begin
      p1_q    <= p1_d;
      addr1_q <= addr1;
    end
  end

  // ---- stage 2: fetch (memory output register is this stage's) ---------
  assign mem_en   = ce;
  assign mem_addr = addr1_q;

  always_ff @(posedge clk) begin
    if (rst)     p2_q <= '{oob: 1'b1, default: '0};
    else if (ce) p2_q <= p1_q;
  end

  logic [7:0] byte2;
  assign byte2 = p2_q.oob ? 8'h00 : mem_data;

  // ---- stage 3: colour -------------------------------------------------
  logic [3:0] color3_d, color3_q;
  logic       de3, hs3, vs3;

  assign cr_addr = {byte2, p2_q.py};

  always_comb begin
    if (p2_q.text_row && !p2_q.oob)
      color3_d = cr_data[3'd7 - p2_q.px] ? 4'hF : 4'h0;
    else
      color3_d = p2_q.py[2] ? byte2[7:4] : byte2[3:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      color3_q <= '0;
      {de3, hs3, vs3} <= '0;
    end else if (ce) begin
      color3_q <= color3_d;
      {de3, hs3, vs3} <= {p2_q.de, p2_q.hs, p2_q.vs};
    end
  end

  // ---- stage 4: palette ------------------------------------------------
  logic [23:0] rgb4;

  lores_palette u_pal (.color(color3_q), .rgb(rgb4));

  always_ff @(posedge clk) begin
    if (rst) begin
      rgb <= '0;
      {de_o, hsync_o, vsync_o} <= '0;
    end else if (ce) begin
      rgb <= rgb4;
      {de_o, hsync_o, vsync_o} <= {de3, hs3, vs3};
    end
  end

endmodule
