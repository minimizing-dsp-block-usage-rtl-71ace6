// c_align: the balancing registers on the C operand of a multi-pumped DSP
// block.
//
// With all four pipeline stages of the slice enabled, the product reaches the
// ALU three Clk2 cycles after A, B and D enter, but the C port has only one
// register before the ALU. DEPTH (2) extra WIDTH-bit (48) registers, clocked
// by Clk2 after the operand multiplexer, delay C so that it meets its own
// product. Output q equals input d from DEPTH clk cycles earlier. Reset
// clears the registers.
module c_align #(
  parameter int unsigned WIDTH = 48,
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] stage [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[DEPTH-1];

endmodule
