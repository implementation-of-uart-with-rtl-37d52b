// tb_baud_gen: checks the baud rate divider at its default DIV = 208.
// After reset the first bclk pulse must come 208 clocks later, every pulse
// must be one clock wide, and pulses must be exactly 208 clocks apart, so
// that a 32 MHz clock gives 32e6 / 208 = 153.85 kHz, 16 x 9600 baud.
module tb_baud_gen;
  logic clk = 1'b0;
  logic rst;
  logic bclk;
  int checks = 0, failures = 0;

  localparam int DIV = 208;

  baud_gen dut (.clk(clk), .rst(rst), .bclk(bclk));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last, n;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    cyc = 0; last = 0; n = 0;
    while (n < 20) begin
      @(posedge clk); #1;
      cyc++;
      if (bclk) begin
        checks++;
        if (n == 0) begin
          if (cyc != DIV) begin failures++; $display("first pulse at %0d, want %0d", cyc, DIV); end
        end else if (cyc - last != DIV) begin
          failures++; $display("pulse spacing %0d, want %0d", cyc - last, DIV);
        end
        last = cyc;
        n++;
        @(posedge clk); #1; cyc++;
        checks++;
        if (bclk) begin failures++; $display("pulse wider than one clock"); end
      end
    end
    // rate check: 32 MHz / DIV should be 16 x 9600 within 0.5 %
    checks++;
    if ((32_000_000 / DIV) < 152_832 || (32_000_000 / DIV) > 154_368) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
