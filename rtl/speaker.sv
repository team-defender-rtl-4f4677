// speaker: the Apple //e 1-bit speaker driver.
//
// Each one-clock toggle pulse (an access to 0xC030-0xC03F, decoded by the
// MMU) inverts the speaker output, so software makes a square wave by
// touching the address at the wanted half-period. spk drives a piezo
// directly. Reset sets the output low.
module speaker (
  input  logic clk,
  input  logic rst,
  input  logic toggle,
  output logic spk
);

  always_ff @(posedge clk) begin
    if (rst)         spk <= 1'b0;
    else if (toggle) spk <= ~spk;
  end

endmodule
