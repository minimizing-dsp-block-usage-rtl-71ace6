// mpdsp_pkg: types and constants shared by the multi-pumped DSP block.
//
// The DSP slice has the port widths of a Xilinx DSP48E1: A is 30 bits,
// B 18 bits, C 48 bits and D 25 bits; the pre-adder is 25 bits wide, the
// multiplier 25 x 18 and the ALU 48 bits. An mpDSP is fixed at build time
// to one configuration of its sub-blocks: the multiplier is always used, the
// pre-adder and the ALU are optional. The functions below turn such a
// configuration into the INMODE, OPMODE and ALUMODE words the slice is
// driven with, following the DSP48E1 encoding of these control words.
// Whether the optional sub-blocks add or subtract is this design's choice
// of what to offer; the add forms are the defaults.
package mpdsp_pkg;

  localparam int unsigned A_W   = 30;
  localparam int unsigned B_W   = 18;
  localparam int unsigned C_W   = 48;
  localparam int unsigned D_W   = 25;
  localparam int unsigned P_W   = 48;
  localparam int unsigned AD_W  = 25;            // pre-adder and multiplier A-side width
  localparam int unsigned M_W   = AD_W + B_W;    // 43-bit full product

  // One set of DSP operands, delivered once per system clock.
  typedef struct packed {
    logic [A_W-1:0] a;
    logic [B_W-1:0] b;
    logic [C_W-1:0] c;
    logic [D_W-1:0] d;
  } operands_t;

  // Pre-adder use.
  typedef enum logic [1:0] {
    PRE_OFF = 2'd0,   // multiplier sees A
    PRE_ADD = 2'd1,   // multiplier sees D + A
    PRE_SUB = 2'd2    // multiplier sees D - A
  } pre_op_e;

  // ALU (post-adder) use.
  typedef enum logic [1:0] {
    ALU_OFF   = 2'd0, // P = M
    ALU_ADD   = 2'd1, // P = C + M
    ALU_SUB   = 2'd2, // P = C - M
    ALU_RSUB  = 2'd3  // P = M - C
  } alu_op_e;

  // INMODE[4]  B multiplexer (0: B2 register)        - always 0 here
  // INMODE[3]  pre-adder subtract (D - A)
  // INMODE[2]  D enabled into the pre-adder
  // INMODE[1]  A forced to zero into the pre-adder
  // INMODE[0]  A multiplexer (0: A2 register)        - always 0 here
  function automatic logic [4:0] inmode_of(pre_op_e op);
    unique case (op)
      PRE_ADD: return 5'b00100;
      PRE_SUB: return 5'b01100;
      default: return 5'b00000;
    endcase
  endfunction

  // OPMODE[6:4] Z mux: 000 zero, 010 P, 011 C
  // OPMODE[3:2] Y mux: 00 zero, 01 M, 10 all ones, 11 C
  // OPMODE[1:0] X mux: 00 zero, 01 M, 10 P, 11 A:B
  // The product needs X = Y = 01.
  function automatic logic [6:0] opmode_of(alu_op_e op);
    return (op == ALU_OFF) ? 7'b000_0101 : 7'b011_0101;
  endfunction

  // ALUMODE 0000: Z + X + Y + CIN
  //         0011: Z - (X + Y + CIN)
  //         0001: -Z + (X + Y + CIN) - 1   (used with CIN = 1 for M - C)
  function automatic logic [3:0] alumode_of(alu_op_e op);
    unique case (op)
      ALU_SUB:  return 4'b0011;
      ALU_RSUB: return 4'b0001;
      default:  return 4'b0000;
    endcase
  endfunction

  function automatic logic carryin_of(alu_op_e op);
    return op == ALU_RSUB;
  endfunction

endpackage
