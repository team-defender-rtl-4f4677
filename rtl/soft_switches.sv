// soft_switches: the Apple //e bank-switching and display-mode flags.
//
// Every bus access is presented on acc_* for one clock with acc_valid high.
// Flags change on the clock edge that ends the access:
//   * writes to 0xC000-0xC00F: even address clears, odd address sets one of
//     80STORE, RAMRD, RAMWRT, INTCXROM, ALTZP, SLOT3ROM, 80COL, ALTCHARSET
//     (address bits 3:1 pick the flag);
//   * any access (read or write) to 0xC050-0xC057: TEXT, MIXED, PAGE2,
//     HIRES, even address clears, odd sets;
//   * any access to 0xC080-0xC08F (high RAM / language card control):
//       BANK1    <= A3
//       HARAMRD  <= A0 xnor A1      (0xC080 and 0xC083 read RAM)
//       PRE-WRITE cleared by A0' or a write, set by a read with A0
//       write enable cleared by A0', set by a read with A0 while PRE-WRITE
//     so two successive reads of an odd address enable writes to high RAM.
// The switch addresses and the high RAM equations follow the published
// switch table; that the display switches also react to reads, and the
// A0/A1 pair for HARAMRD, are choices made so that the stock monitor ROM
// (which reads these addresses) behaves as on the original machine.
// Reset (synchronous, active high) gives TEXT on and every other flag off.
module soft_switches
  import apple2_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        acc_valid,
  input  logic [15:0] acc_addr,
  input  logic        acc_we,
  output soft_sw_t    sw
);

  soft_sw_t sw_q, sw_d;

  always_comb begin
    sw_d = sw_q;
    if (acc_valid) begin
      // 0xC000-0xC00F, writes only
      if (acc_addr[15:4] == 12'hC00 && acc_we) begin
        unique case (acc_addr[3:1])
          3'd0: sw_d.store80    = acc_addr[0];
          3'd1: sw_d.ramrd      = acc_addr[0];
          3'd2: sw_d.ramwrt     = acc_addr[0];
          3'd3: sw_d.intcxrom   = acc_addr[0];
          3'd4: sw_d.altzp      = acc_addr[0];
          3'd5: sw_d.slot3rom   = acc_addr[0];
          3'd6: sw_d.col80      = acc_addr[0];
          3'd7: sw_d.altcharset = acc_addr[0];
        endcase
      end
      // 0xC050-0xC057, reads or writes
      if (acc_addr[15:3] == 13'h180A) begin
        unique case (acc_addr[2:1])
          2'd0: sw_d.text  = acc_addr[0];
          2'd1: sw_d.mixed = acc_addr[0];
          2'd2: sw_d.page2 = acc_addr[0];
          2'd3: sw_d.hires = acc_addr[0];
        endcase
      end
      // 0xC080-0xC08F, high RAM control
      if (acc_addr[15:4] == 12'hC08) begin
        sw_d.bank1   = acc_addr[3];
        sw_d.haramrd = ~(acc_addr[0] ^ acc_addr[1]);
        if (!acc_addr[0])
          sw_d.lcwen = 1'b0;
        else if (sw_q.prewrite && !acc_we)
          sw_d.lcwen = 1'b1;
        if (!acc_addr[0] || acc_we)
          sw_d.prewrite = 1'b0;
        else
          sw_d.prewrite = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) sw_q <= SOFT_SW_RESET;
    else     sw_q <= sw_d;
  end

  assign sw = sw_q;

endmodule
