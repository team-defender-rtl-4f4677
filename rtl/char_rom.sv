// char_rom: character sprite ROM for the text display.
//
// 256 characters of 8 rows, 8 pixels per row: the address is the character
// code concatenated with the row within the character cell ({code, row}),
// and the data is one row of the sprite with bit 7 the leftmost pixel and a
// 1 a lit pixel. The original glyphs are 7 pixels wide and stored 8 wide,
// so the cell is 8x8 without changing the image. Reading is asynchronous (a
// distributed ROM), so the pixel pipeline can look a character up in the
// same stage that receives it from memory. Contents come from INIT_FILE
// (one byte per line); with no file every row is blank. The glyph image is
// the original machine's character generator and is not part of this
// design.
module char_rom #(
  parameter string INIT_FILE = ""
) (
  input  logic [10:0] addr,
  output logic [7:0]  dout
);

  logic [7:0] mem [2048];

  initial begin
    for (int i = 0; i < 2048; i++) mem[i] = 8'h00;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign dout = mem[addr];

endmodule
