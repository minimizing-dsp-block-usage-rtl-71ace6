// mpdsp_out_demux: splits the double-rate result stream of a multi-pumped
// DSP block back into two system-rate outputs.
//
// The slice's P register holds the result for the first operand set (I1)
// during the first half of a Clk1 cycle and the result for the second set
// (I2) during the second half. A WIDTH-bit register, enabled when the Clk1
// follower says "first half", captures the I1 result at the mid-cycle Clk2
// edge and holds it for a full Clk1 cycle as o1. o2 is P itself: when the
// next Clk1 edge samples it, P still holds the I2 result. Both outputs can
// therefore be registered by system-clock logic at the same Clk1 edge.
// Using P directly for O2 instead of a second register is this design's
// choice; the published architecture only gives the two outputs.
module mpdsp_out_demux #(
  parameter int unsigned WIDTH = 48
) (
  input  logic             clk2,
  input  logic             rst,
  input  logic             second_half,  // Clk1 follower
  input  logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] o1,
  output logic [WIDTH-1:0] o2
);

  always_ff @(posedge clk2) begin
    if (rst)              o1 <= '0;
    else if (!second_half) o1 <= p;
  end

  assign o2 = p;

endmodule
