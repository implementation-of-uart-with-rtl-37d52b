// tb_cmd_pulse: checks that a transmit command of any width produces exactly
// one single-cycle pulse, three clock edges after the command rises.
module tb_cmd_pulse;
  logic clk = 1'b0;
  logic rst, xmit_cmd, xmit_cmd_p;
  int checks = 0, failures = 0;
  int pulses, rise_cyc, pulse_cyc, cyc;

  cmd_pulse dut (.clk(clk), .rst(rst), .xmit_cmd(xmit_cmd), .xmit_cmd_p(xmit_cmd_p));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (xmit_cmd_p) begin
      pulses++;
      pulse_cyc = cyc;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic command(input int width);
    pulses = 0;
    @(negedge clk); xmit_cmd = 1'b1; rise_cyc = cyc;
    repeat (width) @(negedge clk);
    xmit_cmd = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (pulses != 1) begin failures++; $display("width %0d: %0d pulses", width, pulses); end
    checks++;
    // high after the 3rd edge, so seen by the sampler at the 4th
    if (pulse_cyc - rise_cyc != 4) begin
      failures++; $display("width %0d: latency %0d", width, pulse_cyc - rise_cyc);
    end
  endtask

  initial begin
    cyc = 0; pulses = 0;
    rst = 1'b1; xmit_cmd = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    command(1);
    command(2);
    command(37);
    command(1000);
    // a level held high during reset release must not keep firing
    pulses = 0;
    repeat (50) @(negedge clk);
    checks++;
    if (pulses != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
