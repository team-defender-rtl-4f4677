// sys_rom: the system ROM (monitor, BASIC and internal slot firmware).
//
// A synchronous ROM of 2**ADDR_W bytes, read one clock after the address is
// presented with en high. The default 16 KiB covers 0xC000-0xFFFF; the MMU
// passes the low 14 address bits. Contents come from INIT_FILE, a hex image
// with one byte per line; with no file the ROM reads as zeros. The ROM
// image itself is the original machine's and is not part of this design.
module sys_rom #(
  parameter int unsigned ADDR_W    = 14,
  parameter string       INIT_FILE = ""
) (
  input  logic              clk,
  input  logic              en,
  input  logic [ADDR_W-1:0] addr,
  output logic [7:0]        dout
);

  logic [7:0] mem [2**ADDR_W];

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = 8'h00;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (en) dout <= mem[addr];
  end

endmodule
