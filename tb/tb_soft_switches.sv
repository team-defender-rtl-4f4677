// tb_soft_switches: directed language-card sequences, then random accesses
// checked against a reference model of the switch table written out flag
// by flag.
module tb_soft_switches;
  import apple2_pkg::*;
  logic        clk = 0, rst = 1;
  logic        acc_valid = 0, acc_we = 0;
  logic [15:0] acc_addr = 0;
  soft_sw_t    sw;
  logic [15:0] m;   // model, bit order as soft_sw_t
  int checks = 0, failures = 0;

  soft_switches dut (.*);

  always #5 clk = ~clk;

  // reference model; bits: 15 store80 14 ramrd 13 ramwrt 12 intcxrom
  // 11 altzp 10 slot3rom 9 col80 8 altcharset 7 text 6 mixed 5 page2
  // 4 hires 3 bank1 2 haramrd 1 prewrite 0 lcwen
  task automatic model_access(logic [15:0] a, bit we);
    bit pre = m[1];
    if (a >= 16'hC000 && a <= 16'hC00F && we) m[15 - int'(a[3:1])] = a[0];
    if (a >= 16'hC050 && a <= 16'hC057) m[7 - int'(a[2:1])] = a[0];
    if (a >= 16'hC080 && a <= 16'hC08F) begin
      m[3] = a[3];
      m[2] = (a[1:0] == 2'b00) || (a[1:0] == 2'b11);
      m[1] = a[0] && !we;
      if (!a[0]) m[0] = 0;
      else if (pre && !we) m[0] = 1;
    end
  endtask

  task automatic access(logic [15:0] a, bit we);
    acc_valid <= 1; acc_addr <= a; acc_we <= we;
    @(posedge clk);
    acc_valid <= 0;
    model_access(a, we);
    #1;
    checks++;
    if (sw !== soft_sw_t'(m)) begin
      failures++;
      $display("after %s %04h: sw=%04h expected %04h", we ? "W" : "R", a,
               16'(sw), m);
    end
  endtask

  function automatic logic [15:0] rand_addr();
    unique case ($urandom_range(0, 3))
      0: return 16'hC000 + 16'($urandom_range(0, 15));
      1: return 16'hC050 + 16'($urandom_range(0, 15));
      2: return 16'hC080 + 16'($urandom_range(0, 15));
      default: return 16'($urandom);
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = 16'h0080;   // reset: TEXT on
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    checks++; if (sw !== soft_sw_t'(m)) failures++;
    // two reads of 0xC083: read RAM, bank 2, write enabled
    access(16'hC083, 0); access(16'hC083, 0);
    checks++; if (!(sw.haramrd && sw.lcwen && !sw.bank1)) failures++;
    // 0xC08A: ROM read, bank 1, write disabled
    access(16'hC08A, 0);
    checks++; if (sw.haramrd || sw.lcwen || !sw.bank1) failures++;
    // read then write of 0xC081 does not enable writing
    access(16'hC081, 0); access(16'hC081, 1); access(16'hC081, 0);
    checks++; if (sw.lcwen) failures++;
    // write-only switches ignore reads
    access(16'hC003, 0);
    checks++; if (sw.ramrd) failures++;
    access(16'hC003, 1);
    checks++; if (!sw.ramrd) failures++;
    // display switches react to reads
    access(16'hC050, 0); access(16'hC053, 0); access(16'hC055, 0);
    checks++; if (sw.text || !sw.mixed || !sw.page2) failures++;
    for (int i = 0; i < 3000; i++) access(rand_addr(), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
