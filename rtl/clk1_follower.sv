// clk1_follower: a Clk2-domain register that tracks the phase of the system
// clock Clk1.
//
// Clk2 runs at exactly twice Clk1 with its rising edges aligned to those of
// Clk1, so every Clk1 cycle holds two Clk2 cycles. second_half is 0 during
// the first of them and 1 during the second. It drives the select of the
// operand multiplexers of the multi-pumped DSP block, in place of Clk1
// itself, so that no clock net is used as data (which risks hold-time
// violations).
//
// How it works: a toggle flip-flop in the Clk1 domain changes state at every
// Clk1 edge. A Clk2 register samples it. At a Clk2 edge that coincides with a
// Clk1 edge the sample already equals the toggle (it was taken half a cycle
// earlier), while at a mid-cycle Clk2 edge the toggle has just changed and
// the two differ; registering their XOR gives second_half for the Clk2 cycle
// that follows. Reset sets the sample opposite to the toggle so that the
// first mid-cycle edge after reset already reads "second half". The follower therefore re-aligns itself one Clk2 cycle after
// reset and never depends on a Clk2 counter staying in step.
//
// Timing: second_half is a plain Clk2 register output. The follower itself
// follows the published mpDSP architecture; building it from a toggle and a sampling register is
// this design's choice.
module clk1_follower (
  input  logic clk1,
  input  logic clk2,
  input  logic rst,          // synchronous, seen by both clock domains
  output logic second_half
);

  logic toggle1;   // Clk1 domain
  logic sample2;   // Clk2 domain copy of toggle1

  always_ff @(posedge clk1) begin
    if (rst) toggle1 <= 1'b0;
    else     toggle1 <= ~toggle1;
  end

  always_ff @(posedge clk2) begin
    if (rst) begin
      sample2     <= 1'b1;   // opposite of toggle1's reset value
      second_half <= 1'b0;
    end else begin
      sample2     <= toggle1;
      second_half <= toggle1 ^ sample2;
    end
  end

endmodule
