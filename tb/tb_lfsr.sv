// tb_lfsr: checks the 8-bit pattern generator. From the seed 1 it must visit
// all 255 non-zero bytes exactly once and then return to the seed (maximal
// length), hold its value when step is low, and return to the seed on load.
// The first steps are compared with values worked out by hand for the
// polynomial x^8 + x^6 + x^5 + x^4 + 1 (Galois mask 0xB8).
module tb_lfsr;
  logic clk = 1'b0;
  logic rst, load, step;
  logic [7:0] q;
  int checks = 0, failures = 0;
  bit seen [256];

  lfsr dut (.clk(clk), .rst(rst), .load(load), .step(step), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic [7:0] v);
    checks++;
    if (q !== v) begin failures++; $display("q=%02h want %02h", q, v); end
  endtask

  initial begin
    logic [7:0] first [5] = '{8'h01, 8'hB8, 8'h5C, 8'h2E, 8'h17};
    rst = 1'b1; load = 1'b0; step = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    foreach (first[i]) begin
      expect_q(first[i]);
      step = 1'b1; @(posedge clk); #1 step = 1'b0;
    end
    load = 1'b1; @(posedge clk); #1 load = 1'b0;
    expect_q(8'h01);
    repeat (3) @(posedge clk); #1;
    expect_q(8'h01);          // no step, no change
    for (int i = 0; i < 255; i++) begin
      checks++;
      if (q == 8'h00 || seen[q]) begin failures++; $display("repeat or zero at step %0d: %02h", i, q); end
      seen[q] = 1'b1;
      step = 1'b1; @(posedge clk); #1;
    end
    step = 1'b0;
    expect_q(8'h01);          // period is 255
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
