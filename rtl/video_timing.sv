// video_timing: raster scan counters for the DVI output.
//
// Counts pixels (x) and lines (y) over the whole frame, visible area first,
// advancing once per clock with ce high. de is high only inside the visible
// H_ACTIVE x V_ACTIVE window, so the display-enable goes low after every
// visible line. hsync/vsync are high during the sync pulses (the polarity
// seen by the monitor is set in the DVI transmitter chip). The defaults are
// the standard 640x480 at 60 Hz timing (800 x 525 clocks per frame, for a
// 25.175 MHz pixel rate); the 640x480 size is the design's screen, the
// porch and sync widths are the usual standard ones.
// x and y are registers that step on the clock edge where ce is high; de,
// hsync, vsync and frame_start are decoded from them.
// Reset puts the counters at pixel (0,0).
module video_timing #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  output logic [9:0] x,
  output logic [9:0] y,
  output logic       de,
  output logic       hsync,
  output logic       vsync,
  output logic       frame_start
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0;
      y <= '0;
    end else if (ce) begin
      if (x == 10'(H_TOTAL - 1)) begin
        x <= '0;
        y <= (y == 10'(V_TOTAL - 1)) ? '0 : y + 10'd1;
      end else begin
        x <= x + 10'd1;
      end
    end
  end

  assign de    = (x < 10'(H_ACTIVE)) && (y < 10'(V_ACTIVE));
  assign hsync = (x >= 10'(H_ACTIVE + H_FP)) && (x < 10'(H_ACTIVE + H_FP + H_SYNC));
  assign vsync = (y >= 10'(V_ACTIVE + V_FP)) && (y < 10'(V_ACTIVE + V_FP + V_SYNC));
  assign frame_start = (x == '0) && (y == '0);

endmodule
