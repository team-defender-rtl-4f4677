// dvi_out: interface to an external DVI transmitter chip taking 12-bit
// double-rate pixel data.
//
// Runs on the DVI clock, twice the pixel rate. phase is low in the first
// and high in the second DVI clock of each pixel period; the pixel
// pipeline updates rgb/de/hsync/vsync on the edge that ends a high phase.
// Each 24-bit pixel {R,G,B} is sent as two 12-bit halves: rgb[11:0]
// ({G[3:0], B}) while dvi_xclk is high, then rgb[23:12] ({R, G[7:4]})
// while it is low, so the pair arrives one DVI clock after the pixel
// pipeline produced it. dvi_de, dvi_h and dvi_v change with the first half.
// dvi_de is low outside the visible window (after every line). The chip's
// reset is simply held inactive (dvi_reset_b = 1): its serial configuration
// bus puts it into a known state. The two-halves-at-double-rate scheme, the
// low DE between lines and the held reset follow the described design; the
// half order and the forwarded clock are this design's choices.
module dvi_out (
  input  logic        clk,
  input  logic        rst,
  input  logic        phase,
  input  logic [23:0] rgb,
  input  logic        de,
  input  logic        hsync,
  input  logic        vsync,
  output logic [11:0] dvi_d,
  output logic        dvi_de,
  output logic        dvi_h,
  output logic        dvi_v,
  output logic        dvi_xclk,
  output logic        dvi_reset_b
);

  always_ff @(posedge clk) begin
    if (rst) begin
      dvi_d    <= '0;
      dvi_de   <= 1'b0;
      dvi_h    <= 1'b0;
      dvi_v    <= 1'b0;
      dvi_xclk <= 1'b0;
    end else if (!phase) begin
      dvi_d    <= rgb[11:0];
      dvi_de   <= de;
      dvi_h    <= hsync;
      dvi_v    <= vsync;
      dvi_xclk <= 1'b1;
    end else begin
      dvi_d    <= rgb[23:12];
      dvi_xclk <= 1'b0;
    end
  end

  assign dvi_reset_b = 1'b1;

endmodule
