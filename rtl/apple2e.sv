// apple2e: an Apple //e built around its memory bus.
//
// The machine is a 6502 processor on a single memory bus; every device is
// memory-mapped and the MMU decides, per access, which one answers. This top
// holds everything except the processor, whose bus is brought out as the
// cpu_* ports (a synchronous 6502 core connects directly: it presents an
// address every bus clock and takes read data in the next one):
//   mmu             address decoder and soft switches (bank switching)
//   dp_ram          128 KiB main + auxiliary RAM, second port for video
//   sys_rom         16 KiB system ROM at 0xC000-0xFFFF (ROM_FILE)
//   keyboard_latch  key code register at 0xC000, strobe clear at 0xC010
//   speaker         1-bit speaker toggled at 0xC030
//   video           40x24 text / lo-res graphics on a 640x480 DVI output
// Clocks: clk_sys is the bus clock (3.125 MHz in the original build);
// clk_dvi is the DVI clock, twice the pixel rate. The two domains meet only
// in the dual-clock RAM and in the synchronisers for the display mode
// flags. rst is synchronous and active high in both domains; hold it for a
// few cycles of the slower clock. Key input is a one-clock key_valid pulse
// with a 7-bit ASCII code, plus a key_down level. No disk controller is
// present: the firmware finds the slots empty.
module apple2e
  import apple2_pkg::*;
#(
  parameter string ROM_FILE  = "",
  parameter string CHAR_FILE = ""
) (
  input  logic        clk_sys,
  input  logic        clk_dvi,
  input  logic        rst,
  // processor bus
  input  logic        cpu_valid,
  input  logic [15:0] cpu_addr,
  input  logic        cpu_we,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_rdata,
  // keyboard
  input  logic        key_valid,
  input  logic [6:0]  key_code,
  input  logic        key_down,
  // speaker
  output logic        spk,
  // DVI transmitter
  output logic [11:0] dvi_d,
  output logic        dvi_de,
  output logic        dvi_h,
  output logic        dvi_v,
  output logic        dvi_xclk,
  output logic        dvi_reset_b
);

  soft_sw_t    sw;
  logic        ram_en, ram_we;
  logic [16:0] ram_addr;
  logic [7:0]  ram_wdata, ram_rdata;
  logic        rom_en;
  logic [13:0] rom_addr;
  logic [7:0]  rom_rdata;
  logic [7:0]  kbd_data;
  logic        any_key, kbd_clear, spk_toggle;
  logic        vram_en;
  logic [15:0] vram_addr;
  logic [7:0]  vram_data;

  mmu u_mmu (
    .clk(clk_sys), .rst(rst),
    .cpu_valid(cpu_valid), .cpu_addr(cpu_addr), .cpu_we(cpu_we),
    .cpu_wdata(cpu_wdata), .cpu_rdata(cpu_rdata),
    .ram_en(ram_en), .ram_we(ram_we), .ram_addr(ram_addr),
    .ram_wdata(ram_wdata), .ram_rdata(ram_rdata),
    .rom_en(rom_en), .rom_addr(rom_addr), .rom_rdata(rom_rdata),
    .kbd_data(kbd_data), .any_key(any_key), .kbd_clear(kbd_clear),
    .spk_toggle(spk_toggle), .sw(sw)
  );

  dp_ram u_ram (
    .clk_a(clk_sys), .en_a(ram_en), .we_a(ram_we), .addr_a(ram_addr),
    .din_a(ram_wdata), .dout_a(ram_rdata),
    .clk_b(clk_dvi), .en_b(vram_en), .addr_b(vram_addr), .dout_b(vram_data)
  );

  sys_rom #(.INIT_FILE(ROM_FILE)) u_rom (
    .clk(clk_sys), .en(rom_en), .addr(rom_addr), .dout(rom_rdata)
  );

  keyboard_latch u_kbd (
    .clk(clk_sys), .rst(rst), .key_valid(key_valid), .key_code(key_code),
    .key_down(key_down), .clear(kbd_clear), .kbd_data(kbd_data),
    .any_key(any_key)
  );

  speaker u_spk (.clk(clk_sys), .rst(rst), .toggle(spk_toggle), .spk(spk));

  video #(.CHAR_FILE(CHAR_FILE)) u_video (
    .clk(clk_dvi), .rst(rst), .sw(sw),
    .vram_en(vram_en), .vram_addr(vram_addr), .vram_data(vram_data),
    .dvi_d(dvi_d), .dvi_de(dvi_de), .dvi_h(dvi_h), .dvi_v(dvi_v),
    .dvi_xclk(dvi_xclk), .dvi_reset_b(dvi_reset_b)
  );

endmodule
