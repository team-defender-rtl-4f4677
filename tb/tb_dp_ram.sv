// tb_dp_ram: random traffic on both ports with unrelated clocks, checked
// against a reference memory. Port A reads are read-first; port B reads
// then see what port A wrote. Both have one clock of read latency.
module tb_dp_ram;
  localparam int AW = 10, BW = 9;
  logic clk_a = 0, clk_b = 0;
  logic en_a = 0, we_a = 0, en_b = 0;
  logic [AW-1:0] addr_a = 0;
  logic [BW-1:0] addr_b = 0;
  logic [7:0] din_a = 0, dout_a, dout_b;
  logic [7:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  dp_ram #(.ADDR_W(AW), .B_ADDR_W(BW)) dut (.*);

  always #5 clk_a = ~clk_a;
  always #3 clk_b = ~clk_b;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_a;
    // fill through port A
    for (int i = 0; i < 2**AW; i++) begin
      en_a <= 1; we_a <= 1; addr_a <= AW'(i); din_a <= 8'($urandom);
      @(posedge clk_a);
      ref_mem[i] = din_a;
    end
    // port A: random read/write mix
      for (int i = 0; i < 2000; i++) begin
        en_a <= 1; we_a <= 1'($urandom); addr_a <= AW'($urandom);
        din_a <= 8'($urandom);
        @(posedge clk_a);
        exp_a = ref_mem[addr_a];
        if (we_a) ref_mem[addr_a] = din_a;
        #1;
        checks++;
        if (dout_a !== exp_a) begin
          failures++;
          $display("A read %03h: %02h expected %02h", addr_a, dout_a, exp_a);
        end
      end
    en_a <= 0;
    // port B reads everything (port A idle)
    for (int i = 0; i < 2**BW; i++) begin
      en_b <= 1; addr_b <= BW'(i);
      @(posedge clk_b);
      #1;
      checks++;
      if (dout_b !== ref_mem[i]) begin
        failures++;
        $display("B read %03h: %02h expected %02h", i, dout_b, ref_mem[i]);
      end
    end
    // en low holds the output
    en_b <= 0; addr_b <= 0;
    begin
      logic [7:0] held;
      held = dout_b;
      repeat (3) @(posedge clk_b);
      #1;
      checks++; if (dout_b !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
