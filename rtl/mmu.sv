// mmu: the Apple //e memory bus decoder.
//
// Every device of the machine is memory-mapped, so the MMU sits between the
// processor and everything else. For each access (cpu_valid high for one
// bus clock) it chooses the target from the address and the soft switches:
//   0x0000-0x01FF  RAM, auxiliary bank when ALTZP
//   0x0200-0xBFFF  RAM, auxiliary bank when RAMRD (reads) / RAMWRT (writes);
//                  with 80STORE, 0x0400-0x07FF (and 0x2000-0x3FFF when
//                  HIRES) follow PAGE2 instead
//   0xC000-0xC0FF  I/O: keyboard, switch status, speaker, soft switches
//   0xC100-0xCFFF  internal ROM when INTCXROM, and 0xC300-0xC3FF when
//                  SLOT3ROM is off; otherwise an empty slot that reads 0x00
//   0xD000-0xFFFF  reads ROM, or high RAM when HARAMRD; writes go to high RAM
//                  only when its write enable is set. High RAM takes the
//                  auxiliary bank when ALTZP. Its bank 1 at 0xD000-0xDFFF is
//                  stored at RAM 0xC000-0xCFFF, which the bus never reaches.
// I/O reads: 0xC000-0xC00F the keyboard register; 0xC010 any-key-down in
// bit 7; 0xC011-0xC01F a switch flag in bit 7 (BANK1, HARAMRD, RAMRD,
// RAMWRT, INTCXROM, ALTZP, SLOT3ROM, 80STORE, -, TEXT, MIXED, PAGE2, HIRES,
// ALTCHARSET, 80COL); bits 6:0 of all of these are the key code. Other I/O
// reads return 0x00. An access to 0xC010, or a write to 0xC010-0xC01F,
// clears the keyboard strobe; any access to 0xC030-0xC03F toggles the
// speaker.
// Timing: the RAM and ROM are synchronous, so read data appears on
// cpu_rdata in the clock after the address (the bus timing of a
// synchronous 6502 core). Status reads return the flags as they were
// before the access. Writes take effect at the end of the access clock.
// The switch table and status addresses follow the published switch list;
// the region map beyond it, the empty-slot value and the high RAM bank 1
// placement are this design's choices.
module mmu
  import apple2_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // processor side
  input  logic        cpu_valid,
  input  logic [15:0] cpu_addr,
  input  logic        cpu_we,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_rdata,
  // RAM port A
  output logic        ram_en,
  output logic        ram_we,
  output logic [16:0] ram_addr,
  output logic [7:0]  ram_wdata,
  input  logic [7:0]  ram_rdata,
  // ROM
  output logic        rom_en,
  output logic [13:0] rom_addr,
  input  logic [7:0]  rom_rdata,
  // keyboard and speaker
  input  logic [7:0]  kbd_data,
  input  logic        any_key,
  output logic        kbd_clear,
  output logic        spk_toggle,
  // soft switches, for the video subsystem
  output soft_sw_t    sw
);

  typedef enum logic [1:0] {SRC_RAM, SRC_ROM, SRC_IO} src_e;

  src_e       src_d, src_q;
  logic [7:0] io_d, io_q;
  logic       aux;
  logic       in_io, in_cx, in_hi, cx_rom;
  logic [15:0] a;

  soft_switches u_sw (
    .clk      (clk),
    .rst      (rst),
    .acc_valid(cpu_valid),
    .acc_addr (cpu_addr),
    .acc_we   (cpu_we),
    .sw       (sw)
  );

  assign a     = cpu_addr;
  assign in_io = (a[15:8] == 8'hC0);
  assign in_cx = (a[15:12] == 4'hC) && !in_io;
  assign in_hi = (a >= HIRAM_BASE);
  assign cx_rom = sw.intcxrom || (a[11:8] == 4'h3 && !sw.slot3rom);

  // main/auxiliary bank choice
  always_comb begin
    if (a <= ZP_END || in_hi)
      aux = sw.altzp;
    else if (sw.store80 && (a[15:10] == 6'b0000_01))
      aux = sw.page2;
    else if (sw.store80 && sw.hires && (a[15:13] == 3'b001))
      aux = sw.page2;
    else
      aux = cpu_we ? sw.ramwrt : sw.ramrd;
  end

  // RAM address: bank 1 of high RAM lives at 0xC000-0xCFFF
  always_comb begin
    ram_addr = {aux, a};
    if (a[15:12] == 4'hD && sw.bank1) ram_addr[12] = 1'b0;
  end

  assign ram_wdata = cpu_wdata;
  assign rom_addr  = a[13:0];

  always_comb begin
    ram_en = 1'b0;
    ram_we = 1'b0;
    rom_en = 1'b0;
    src_d  = SRC_IO;
    if (cpu_valid) begin
      if (in_hi) begin
        if (cpu_we) begin
          ram_en = sw.lcwen;
          ram_we = sw.lcwen;
        end else if (sw.haramrd) begin
          ram_en = 1'b1;
          src_d  = SRC_RAM;
        end else begin
          rom_en = 1'b1;
          src_d  = SRC_ROM;
        end
      end else if (in_cx) begin
        if (cx_rom && !cpu_we) begin
          rom_en = 1'b1;
          src_d  = SRC_ROM;
        end
      end else if (!in_io) begin
        ram_en = 1'b1;
        ram_we = cpu_we;
        src_d  = SRC_RAM;
      end
    end
  end

  // I/O read data and side-effect strobes
  always_comb begin
    logic flag;
    unique case (a[3:0])
      4'h1: flag = sw.bank1;
      4'h2: flag = sw.haramrd;
      4'h3: flag = sw.ramrd;
      4'h4: flag = sw.ramwrt;
      4'h5: flag = sw.intcxrom;
      4'h6: flag = sw.altzp;
      4'h7: flag = sw.slot3rom;
      4'h8: flag = sw.store80;
      4'hA: flag = sw.text;
      4'hB: flag = sw.mixed;
      4'hC: flag = sw.page2;
      4'hD: flag = sw.hires;
      4'hE: flag = sw.altcharset;
      4'hF: flag = sw.col80;
      4'h0: flag = any_key;
      default: flag = 1'b0;
    endcase
    io_d = 8'h00;
    if (a[15:4] == 12'hC00)      io_d = kbd_data;
    else if (a[15:4] == 12'hC01) io_d = {flag, kbd_data[6:0]};
  end

  assign kbd_clear  = cpu_valid && (a == 16'hC010 || (a[15:4] == 12'hC01 && cpu_we));
  assign spk_toggle = cpu_valid && (a[15:4] == 12'hC03);

  always_ff @(posedge clk) begin
    if (rst) begin
      src_q <= SRC_IO;
      io_q  <= 8'h00;
    end else if (cpu_valid) begin
      src_q <= src_d;
      io_q  <= io_d;
    end
  end

  always_comb begin
    unique case (src_q)
      SRC_RAM: cpu_rdata = ram_rdata;
      SRC_ROM: cpu_rdata = rom_rdata;
      default: cpu_rdata = io_q;
    endcase
  end

endmodule
