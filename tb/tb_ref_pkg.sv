// tb_ref_pkg: reference models shared by the testbenches.
//
// The expected screen is worked out here from first principles (a table
// of row start addresses, explicit nibble and sprite-bit choice) rather
// than by reusing the RTL, and the expected colours are a separate copy of
// the 16-entry RGB table. The test images of the ROM testbenches follow
// simple formulas, repeated here so that checks need no file:
//   rom_test.hex   byte i        = (7*i + 3) mod 256, 256 bytes
//   char_test.hex  row r of code = code xor (37*r mod 256)
package tb_ref_pkg;

  localparam logic [23:0] PAL [16] = '{
    24'h000000, 24'h901740, 24'h402CA5, 24'hD043E5,
    24'h006940, 24'h808080, 24'h2F95E5, 24'hBFABFF,
    24'h405400, 24'hD06A1A, 24'h808080, 24'hFF96BF,
    24'h2FBC1A, 24'hBFD35A, 24'h6FE8BF, 24'hFFFFFF };

  function automatic logic [7:0] rom_img(int i);
    return (i < 256) ? 8'((7 * i + 3) & 255) : 8'h00;
  endfunction

  function automatic logic [7:0] char_img(int code, int row);
    return 8'((code ^ (37 * row)) & 255);
  endfunction

  // start address of text row r (0..23) within a page
  function automatic int row_base(int r);
    int bases [24];
    for (int k = 0; k < 3; k++)
      for (int j = 0; j < 8; j++)
        bases[k * 8 + j] = j * 128 + k * 40;
    return bases[r];
  endfunction

  // Visible-pixel reference: is (x,y) of the 640x480 frame inside the
  // 320x192 picture, and if so, which screen byte and cell offset.
  function automatic bit in_picture(int x, int y);
    return x >= 160 && x < 480 && y >= 144 && y < 336;
  endfunction

  function automatic int screen_addr(int x, int y, bit page2);
    int c = (x - 160) / 8;
    int r = (y - 144) / 8;
    return (page2 ? 'h800 : 'h400) + row_base(r) + c;
  endfunction

  function automatic bit is_text_row(int y, bit text, bit mixed);
    return text || (mixed && ((y - 144) / 8) >= 20);
  endfunction

  // colour index of a picture pixel given its screen byte
  function automatic logic [3:0] pixel_color(int x, int y, logic [7:0] b,
                                             bit text_row);
    int px = (x - 160) % 8;
    int py = (y - 144) % 8;
    logic [7:0] glyph;
    if (text_row) begin
      glyph = char_img(int'(b), py);
      return glyph[7 - px] ? 4'hF : 4'h0;
    end
    return (py < 4) ? b[3:0] : b[7:4];
  endfunction

endpackage
