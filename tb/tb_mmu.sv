// tb_mmu: the bus decoder with reference RAM and ROM models around it.
// Directed sequences check main/aux banking (RAMRD, RAMWRT, ALTZP,
// 80STORE with PAGE2 and HIRES), the internal and slot ROM windows, the
// language card (read RAM/ROM, write enable after two odd reads, bank 1
// and 2), keyboard and status reads, the strobe clear and speaker pulses,
// and the one-clock read latency.
module tb_mmu;
  import apple2_pkg::*;
  logic        clk = 0, rst = 1;
  logic        cpu_valid = 0, cpu_we = 0;
  logic [15:0] cpu_addr = 0;
  logic [7:0]  cpu_wdata = 0, cpu_rdata;
  logic        ram_en, ram_we, rom_en;
  logic [16:0] ram_addr;
  logic [7:0]  ram_wdata, ram_rdata, rom_rdata;
  logic [13:0] rom_addr;
  logic [7:0]  kbd_data = 8'hC1;
  logic        any_key = 1;
  logic        kbd_clear, spk_toggle;
  soft_sw_t    sw;
  logic [7:0]  ram [2**17];
  int checks = 0, failures = 0;
  int n_clear = 0, n_toggle = 0;

  mmu dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] rom_byte(logic [13:0] a);
    return a[7:0] ^ {a[13:8], 2'b01};
  endfunction

  always_ff @(posedge clk) begin
    if (ram_en) begin
      ram_rdata <= ram[ram_addr];
      if (ram_we) ram[ram_addr] <= ram_wdata;
    end
    if (rom_en) rom_rdata <= rom_byte(rom_addr);
    if (kbd_clear) n_clear++;
    if (spk_toggle) n_toggle++;
  end

  task automatic wr(logic [15:0] a, logic [7:0] d);
    cpu_valid <= 1; cpu_we <= 1; cpu_addr <= a; cpu_wdata <= d;
    @(posedge clk);
    cpu_valid <= 0; cpu_we <= 0;
    #1;
  endtask

  task automatic rd(logic [15:0] a, output logic [7:0] d);
    cpu_valid <= 1; cpu_we <= 0; cpu_addr <= a;
    @(posedge clk);
    cpu_valid <= 0;
    #1 d = cpu_rdata;
  endtask

  task automatic expect_rd(logic [15:0] a, logic [7:0] e, string what);
    logic [7:0] d;
    rd(a, d);
    checks++;
    if (d !== e) begin
      failures++;
      $display("FAIL %s: read %04h = %02h expected %02h", what, a, d, e);
    end
  endtask

  task automatic expect_ram(logic [16:0] pa, logic [7:0] e, string what);
    checks++;
    if (ram[pa] !== e) begin
      failures++;
      $display("FAIL %s: ram[%05h] = %02h expected %02h", what, pa, ram[pa], e);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    for (int i = 0; i < 2**17; i++) ram[i] = 8'h00;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // main memory
    wr(16'h1234, 8'hAA);  expect_ram(17'h01234, 8'hAA, "main write");
    expect_rd(16'h1234, 8'hAA, "main read");
    // RAMWRT: writes to aux, reads still main
    wr(16'hC005, 0);      wr(16'h1234, 8'hBB);
    expect_ram(17'h11234, 8'hBB, "RAMWRT aux write");
    expect_rd(16'h1234, 8'hAA, "RAMRD off reads main");
    wr(16'hC003, 0);      expect_rd(16'h1234, 8'hBB, "RAMRD aux read");
    expect_rd(16'hC013, 8'hC1, "RAMRD status");
    expect_rd(16'hC014, 8'hC1, "RAMWRT status");
    wr(16'hC002, 0);      wr(16'hC004, 0);
    expect_rd(16'hC013, 8'h41, "RAMRD status off");
    // zero page follows ALTZP only
    wr(16'h0050, 8'h11);  wr(16'hC009, 0);  wr(16'h0050, 8'h22);
    expect_ram(17'h10050, 8'h22, "ALTZP write");
    expect_rd(16'h0050, 8'h22, "ALTZP read");
    wr(16'hC008, 0);      expect_rd(16'h0050, 8'h11, "ALTZP off");
    // 80STORE: PAGE2 selects aux for the text page
    wr(16'hC001, 0);      rd(16'hC055, d);  wr(16'h0400, 8'h33);
    expect_ram(17'h10400, 8'h33, "80STORE PAGE2 text page");
    wr(16'h2000, 8'h44);  expect_ram(17'h02000, 8'h44, "hires page without HIRES");
    rd(16'hC057, d);      wr(16'h2000, 8'h55);
    expect_ram(17'h12000, 8'h55, "80STORE PAGE2 HIRES");
    rd(16'hC054, d);      wr(16'h0400, 8'h66);
    expect_ram(17'h00400, 8'h66, "80STORE PAGE1 text page");
    expect_rd(16'hC018, 8'hC1, "80STORE status");
    expect_rd(16'hC01C, 8'h41, "PAGE2 status");
    expect_rd(16'hC01D, 8'hC1, "HIRES status");
    wr(16'hC000, 0);      rd(16'hC056, d);
    // ROM windows
    expect_rd(16'hE123, rom_byte(14'h2123), "ROM at E123");
    expect_rd(16'hC123, 8'h00, "empty slot 1");
    expect_rd(16'hC345, rom_byte(14'h0345), "internal slot 3 ROM");
    wr(16'hC00B, 0);      expect_rd(16'hC345, 8'h00, "SLOT3ROM on");
    wr(16'hC007, 0);      expect_rd(16'hC123, rom_byte(14'h0123), "INTCXROM");
    expect_rd(16'hC015, 8'hC1, "INTCXROM status");
    expect_rd(16'hC017, 8'hC1, "SLOT3ROM status");
    wr(16'hC006, 0);
    // language card: C083 twice = read RAM, write enabled, bank 2
    wr(16'hD000, 8'h99);  expect_ram(17'h0D000, 8'h00, "high RAM write protected");
    rd(16'hC083, d);      rd(16'hC083, d);
    wr(16'hD000, 8'h77);  expect_ram(17'h0D000, 8'h77, "bank 2 write");
    expect_rd(16'hD000, 8'h77, "bank 2 read");
    expect_rd(16'hC012, 8'hC1, "HARAMRD status");
    expect_rd(16'hC011, 8'h41, "BANK1 status off");
    // C08B twice: bank 1, stored at 0xC000
    rd(16'hC08B, d);      rd(16'hC08B, d);
    wr(16'hD000, 8'h88);  expect_ram(17'h0C000, 8'h88, "bank 1 write");
    expect_rd(16'hD000, 8'h88, "bank 1 read");
    expect_rd(16'hC011, 8'hC1, "BANK1 status");
    wr(16'hE000, 8'h5A);  expect_ram(17'h0E000, 8'h5A, "high RAM above D");
    // C080: read RAM bank 2, writes off
    rd(16'hC080, d);      expect_rd(16'hD000, 8'h77, "C080 bank 2 read");
    wr(16'hD000, 8'h12);  expect_ram(17'h0D000, 8'h77, "C080 write protected");
    // C082: ROM
    rd(16'hC082, d);      expect_rd(16'hD000, rom_byte(14'h1000), "C082 ROM");
    // C081 read then write does not enable writes
    rd(16'hC081, d);      wr(16'hC081, 0);  wr(16'hD000, 8'h13);
    expect_ram(17'h0D000, 8'h77, "C081 read+write no enable");
    // C081 twice: ROM read, RAM write; ALTZP puts it in aux
    rd(16'hC081, d);      rd(16'hC081, d);  wr(16'hC009, 0);
    wr(16'hD000, 8'h14);  expect_ram(17'h1D000, 8'h14, "ALTZP high RAM");
    expect_rd(16'hD000, rom_byte(14'h1000), "C081 reads ROM");
    wr(16'hC008, 0);
    // keyboard, strobe clear, speaker
    expect_rd(16'hC000, 8'hC1, "keyboard");
    expect_rd(16'hC00F, 8'hC1, "keyboard mirror");
    expect_rd(16'hC010, 8'hC1, "any key");
    checks++; if (n_clear != 1) begin failures++; $display("FAIL clear count %0d", n_clear); end
    wr(16'hC01F, 0);
    checks++; if (n_clear != 2) begin failures++; $display("FAIL write clear %0d", n_clear); end
    rd(16'hC011, d);
    checks++; if (n_clear != 2) begin failures++; $display("FAIL status read cleared"); end
    rd(16'hC030, d);      wr(16'hC03F, 0);
    checks++; if (n_toggle != 2) begin failures++; $display("FAIL toggles %0d", n_toggle); end
    expect_rd(16'hC01A, 8'hC1, "TEXT status");
    rd(16'hC050, d);  expect_rd(16'hC01A, 8'h41, "TEXT off status");
    expect_rd(16'hC070, 8'h00, "unused I/O");
    // read latency: data belongs to the previous clock's address
    cpu_valid <= 1; cpu_addr <= 16'h1234; cpu_we <= 0;
    @(posedge clk);
    cpu_addr <= 16'hE123;
    @(posedge clk);
    cpu_valid <= 0;
    #1;
    checks++;
    if (cpu_rdata !== rom_byte(14'h2123)) begin failures++; $display("FAIL back-to-back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
