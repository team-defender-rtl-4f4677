// keyboard_latch: the Apple //e keyboard data register.
//
// A key press arrives as a one-clock key_valid pulse with its 7-bit ASCII
// code. The code is latched and the strobe (bit 7 of kbd_data) is set; a
// one-clock clear pulse from the bus decoder (an access to 0xC010) resets
// the strobe and leaves the code. key_down is the level "some key is held"
// and is passed through a register as any_key for the 0xC010 read.
// A press and a clear in the same clock: the press wins, so no key is lost.
// The register layout follows the original machine (programs read 0xC000
// and clear with 0xC010); how key codes reach this block from the physical
// keyboard is outside this design.
// Reset clears code and strobe.
module keyboard_latch (
  input  logic       clk,
  input  logic       rst,
  input  logic       key_valid,
  input  logic [6:0] key_code,
  input  logic       key_down,
  input  logic       clear,
  output logic [7:0] kbd_data,
  output logic       any_key
);

  logic       strobe;
  logic [6:0] code;

  always_ff @(posedge clk) begin
    if (rst) begin
      strobe  <= 1'b0;
      code    <= '0;
      any_key <= 1'b0;
    end else begin
      any_key <= key_down;
      if (key_valid) begin
        strobe <= 1'b1;
        code   <= key_code;
      end else if (clear) begin
        strobe <= 1'b0;
      end
    end
  end

  assign kbd_data = {strobe, code};

endmodule
