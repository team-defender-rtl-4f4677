// dp_ram: true dual-clock block RAM, one read/write port and one read port.
//
// Port A runs on the bus clock and serves the processor; port B runs on the
// video clock and only reads. Both ports are synchronous: the data of the
// address presented with en high appears on dout one clock later. Port A is
// read-first (a write returns the old contents). Because each side has its
// own clock, the RAM itself separates the slow bus from the fast video
// logic and no other synchronisation is needed for screen data. The
// default 128 KiB holds main memory (bit 16 = 0) and auxiliary memory
// (bit 16 = 1); port B addresses main memory only (B_ADDR_W = 16).
// Contents are not initialised, as in a block RAM without an init file.
module dp_ram #(
  parameter int unsigned ADDR_W   = 17,
  parameter int unsigned B_ADDR_W = 16,
  parameter int unsigned DATA_W   = 8
) (
  input  logic                clk_a,
  input  logic                en_a,
  input  logic                we_a,
  input  logic [ADDR_W-1:0]   addr_a,
  input  logic [DATA_W-1:0]   din_a,
  output logic [DATA_W-1:0]   dout_a,
  input  logic                clk_b,
  input  logic                en_b,
  input  logic [B_ADDR_W-1:0] addr_b,
  output logic [DATA_W-1:0]   dout_b
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk_a) begin
    if (en_a) begin
      dout_a <= mem[addr_a];
      if (we_a) mem[addr_a] <= din_a;
    end
  end

  always_ff @(posedge clk_b) begin
    if (en_b) dout_b <= mem[ADDR_W'(addr_b)];
  end

endmodule
