// tb_keyboard_latch: key presses set the strobe and code, clears reset only
// the strobe, a press in the same clock as a clear wins, any_key follows
// key_down one clock later.
module tb_keyboard_latch;
  logic       clk = 0, rst = 1;
  logic       key_valid = 0, key_down = 0, clear = 0;
  logic [6:0] key_code = 0;
  logic [7:0] kbd_data;
  logic       any_key;
  bit         m_strobe = 0;
  logic [6:0] m_code = 0;
  int checks = 0, failures = 0;

  keyboard_latch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      key_valid <= ($urandom_range(0, 3) == 0);
      key_code  <= 7'($urandom);
      clear     <= ($urandom_range(0, 3) == 0);
      key_down  <= 1'($urandom);
      @(posedge clk);
      if (key_valid) begin m_strobe = 1; m_code = key_code; end
      else if (clear) m_strobe = 0;
      #1;
      checks++;
      if (kbd_data !== {m_strobe, m_code} || any_key !== key_down) begin
        failures++;
        $display("cycle %0d: data=%02h expected %02h any=%0b", i, kbd_data,
                 {m_strobe, m_code}, any_key);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
