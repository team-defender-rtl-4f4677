// apple2_pkg: types and constants shared by the Apple //e memory bus and
// video blocks.
//
// soft_sw_t collects the bank-switching and display flags that the soft
// switch block keeps and that the MMU and the video subsystem read. The
// address constants name the memory-mapped regions of the 64 KiB bus.
// Flag names follow the classic Apple //e soft switch names; the two
// language-card write flags (prewrite, lcwen) are this design's names for
// the PRE-WRITE and HARAMWRT rows of the switch table.
package apple2_pkg;

  typedef struct packed {
    logic store80;     // 80STORE: PAGE2 selects main/aux for the text page
    logic ramrd;       // RAMRD: reads of 0x0200-0xBFFF from aux memory
    logic ramwrt;      // RAMWRT: writes of 0x0200-0xBFFF to aux memory
    logic intcxrom;    // INTCXROM: internal ROM at 0xC100-0xCFFF
    logic altzp;       // ALTZP: zero page, stack and high RAM from aux
    logic slot3rom;    // SLOT3ROM: slot ROM (not internal) at 0xC300
    logic col80;       // 80COL
    logic altcharset;  // ALTCHARSET
    logic text;        // TEXT: text display (off = graphics)
    logic mixed;       // MIXED: bottom four text rows in graphics mode
    logic page2;       // PAGE2: display page 2 / aux with 80STORE
    logic hires;       // HIRES
    logic bank1;       // BANK1: high RAM 0xD000-0xDFFF bank 1
    logic haramrd;     // HARAMRD: reads of 0xD000-0xFFFF from RAM
    logic prewrite;    // PRE-WRITE: one odd read seen
    logic lcwen;       // high RAM write enable (HARAMWRT row)
  } soft_sw_t;

  localparam soft_sw_t SOFT_SW_RESET = '{text: 1'b1, default: 1'b0};

  // Address map of the 6502 bus.
  localparam logic [15:0] ZP_END    = 16'h01FF;  // last zero page/stack byte
  localparam logic [15:0] HIRAM_BASE = 16'hD000; // 0xD000-0xFFFF

  // Text / lo-res screen geometry.
  localparam int unsigned COLS      = 40;
  localparam int unsigned ROWS      = 24;
  localparam int unsigned MIXED_ROW = 20;        // first text row in MIXED
  localparam logic [15:0] PAGE1_BASE = 16'h0400;
  localparam logic [15:0] PAGE2_BASE = 16'h0800;

endpackage
