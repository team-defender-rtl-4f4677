// tb_lores_palette: checks all 16 colour indices against the reference
// RGB table.
module tb_lores_palette;
  import tb_ref_pkg::*;
  logic [3:0]  color;
  logic [23:0] rgb;
  int checks = 0, failures = 0;

  lores_palette dut (.color(color), .rgb(rgb));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      color = 4'(i);
      #1;
      checks++;
      if (rgb !== PAL[i]) begin
        failures++;
        $display("colour %0d: got %06h expected %06h", i, rgb, PAL[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
