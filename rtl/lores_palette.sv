// lores_palette: 16-entry colour table, 4-bit lo-res colour to 24-bit RGB.
//
// Purely combinational: a case statement over the colour index, output
// {R[7:0], G[7:0], B[7:0]}. Index 0 is black, which the pixel pipeline also
// uses for the border around the picture, and index 15 is white, used for
// lit text pixels. The RGB values are the commonly published approximations
// of the original NTSC colours (the sixteen colours are the machine's; the
// exact RGB numbers are this design's choice).
module lores_palette (
  input  logic [3:0]  color,
  output logic [23:0] rgb
);

  always_comb begin
    unique case (color)
      4'h0: rgb = 24'h000000;  // black
      4'h1: rgb = 24'h901740;  // magenta
      4'h2: rgb = 24'h402CA5;  // dark blue
      4'h3: rgb = 24'hD043E5;  // purple
      4'h4: rgb = 24'h006940;  // dark green
      4'h5: rgb = 24'h808080;  // grey 1
      4'h6: rgb = 24'h2F95E5;  // medium blue
      4'h7: rgb = 24'hBFABFF;  // light blue
      4'h8: rgb = 24'h405400;  // brown
      4'h9: rgb = 24'hD06A1A;  // orange
      4'hA: rgb = 24'h808080;  // grey 2
      4'hB: rgb = 24'hFF96BF;  // pink
      4'hC: rgb = 24'h2FBC1A;  // green
      4'hD: rgb = 24'hBFD35A;  // yellow
      4'hE: rgb = 24'h6FE8BF;  // aqua
      4'hF: rgb = 24'hFFFFFF;  // white
    endcase
  end

endmodule
