// tb_speaker: random toggle pulses; the output must equal the parity of the
// pulses seen since reset.
module tb_speaker;
  logic clk = 0, rst = 1, toggle = 0, spk;
  bit   model = 0;
  int   checks = 0, failures = 0;

  speaker dut (.clk(clk), .rst(rst), .toggle(toggle), .spk(spk));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    checks++; if (spk !== 1'b0) failures++;
    for (int i = 0; i < 500; i++) begin
      toggle <= 1'($urandom_range(0, 1));
      @(posedge clk);
      if (toggle) model = ~model;
      #1;
      checks++;
      if (spk !== model) begin
        failures++;
        $display("cycle %0d: spk=%0b expected %0b", i, spk, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
