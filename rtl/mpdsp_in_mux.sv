// mpdsp_in_mux: the operand multiplexers in front of the DSP slice of a
// multi-pumped DSP block.
//
// Two operand sets, i1 = (A1, B1, C1, D1) and i2 = (A2, B2, C2, D2), are
// held by the system-clock logic for a whole Clk1 cycle. The Clk1 follower
// (sel) is 0 in the first half of that cycle and 1 in the second, so the
// slice's input registers capture i1 at the mid-cycle Clk2 edge and i2 at
// the Clk2 edge that ends the cycle. Purely combinational.
//
// USE_C and USE_D let a configuration that leaves the ALU or the pre-adder
// idle hold that operand at zero, as the published mpDSP does, so that no
// multiplexer is built for it.
module mpdsp_in_mux
  import mpdsp_pkg::*;
#(
  parameter bit USE_C = 1'b1,
  parameter bit USE_D = 1'b1
) (
  input  logic      sel,   // 0: i1, 1: i2
  input  operands_t i1,
  input  operands_t i2,
  output operands_t o
);

  always_comb begin
    o.a = sel ? i2.a : i1.a;
    o.b = sel ? i2.b : i1.b;
    o.c = USE_C ? (sel ? i2.c : i1.c) : '0;
    o.d = USE_D ? (sel ? i2.d : i1.d) : '0;
  end

endmodule
