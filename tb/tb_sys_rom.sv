// tb_sys_rom: loads the 256-byte test image and reads the whole 16 KiB:
// image bytes where the file has them, zeros elsewhere, one clock late.
module tb_sys_rom;
  import tb_ref_pkg::*;
  logic clk = 0, en = 0;
  logic [13:0] addr = 0;
  logic [7:0]  dout;
  int checks = 0, failures = 0;

  sys_rom #(.INIT_FILE("tb/rom_test.hex")) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int i = 0; i < 2**14; i += ((i < 512) ? 1 : 7)) begin
      en <= 1; addr <= 14'(i);
      @(posedge clk);
      #1;
      checks++;
      if (dout !== rom_img(i)) begin
        failures++;
        $display("addr %04h: %02h expected %02h", i, dout, rom_img(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
