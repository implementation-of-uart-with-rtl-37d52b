// cmd_pulse: transmit command conditioner (XMIT_CMD -> XMIT_CMD_P).
//
// The transmit command comes from outside the chip and its width cannot be
// controlled; if it were used as a level it could still be high when a frame
// ends and would start a second, unwanted frame. This block synchronises the
// command with two flip-flops and emits a single-cycle pulse on its rising
// edge, so one command, however long, starts exactly one frame.
// Limiting the command to a short pulse follows the reference design; the
// synchroniser and edge detector are this design's way of doing it.
//
// Interface: xmit_cmd (asynchronous level), xmit_cmd_p (one clk cycle).
// Timing: the pulse appears 3 clk edges after the command rises; the command
// must go low for at least 2 cycles before it can start another pulse.
module cmd_pulse (
  input  logic clk,
  input  logic rst,
  input  logic xmit_cmd,
  output logic xmit_cmd_p
);

  logic [1:0] sync;
  logic       last;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sync       <= '0;
      last       <= 1'b0;
      xmit_cmd_p <= 1'b0;
    end else begin
      sync       <= {sync[0], xmit_cmd};
      last       <= sync[1];
      xmit_cmd_p <= sync[1] & ~last;
    end
  end

endmodule
