// tb_dvi_out: feeds random pixels at half the clock rate, as the pixel
// pipeline does, and checks that each appears as its low 12 bits with
// dvi_xclk high and then its high 12 bits with dvi_xclk low, with its
// DE/H/V, one clock after the pixel was produced; reset stays released.
module tb_dvi_out;
  logic clk = 0, rst = 1, phase = 0;
  logic [23:0] rgb = 0;
  logic de = 0, hsync = 0, vsync = 0;
  logic [11:0] dvi_d;
  logic dvi_de, dvi_h, dvi_v, dvi_xclk, dvi_reset_b;
  int checks = 0, failures = 0;

  dvi_out dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [26:0] px;
    repeat (3) @(posedge clk);
    rst <= 0;
    phase <= 0;
    @(posedge clk);
    for (int i = 0; i < 1000; i++) begin
      // edge with phase 1: the pipeline produces a new pixel
      px = 27'($urandom);
      rgb <= px[23:0]; {de, hsync, vsync} <= px[26:24];
      phase <= 0;
      @(posedge clk);
      // edge with phase 0: low half goes out
      #1;
      checks++;
      if (dvi_d !== px[11:0] || !dvi_xclk ||
          {dvi_de, dvi_h, dvi_v} !== px[26:24] || dvi_reset_b !== 1'b1) begin
        failures++;
        $display("pixel %0d low half: %03h expected %03h", i, dvi_d, px[11:0]);
      end
      // the next phase-1 edge sends the high half
      phase <= 1;
      @(posedge clk);
      #1;
      checks++;
      if (dvi_d !== px[23:12] || dvi_xclk || {dvi_de, dvi_h, dvi_v} !== px[26:24]) begin
        failures++;
        $display("pixel %0d high half: %03h expected %03h", i, dvi_d, px[23:12]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
