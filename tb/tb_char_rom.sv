// tb_char_rom: loads the sprite test image and checks every row of every
// character, read combinationally.
module tb_char_rom;
  import tb_ref_pkg::*;
  logic [10:0] addr;
  logic [7:0]  dout;
  int checks = 0, failures = 0;

  char_rom #(.INIT_FILE("tb/char_test.hex")) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++)
      for (int r = 0; r < 8; r++) begin
        addr = {8'(c), 3'(r)};
        #1;
        checks++;
        if (dout !== char_img(c, r)) begin
          failures++;
          $display("char %02h row %0d: %02h expected %02h", c, r, dout,
                   char_img(c, r));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
