// dsp48e1_core: synthesizable equivalent of the part of a DSP48E1 slice
// that the multi-pumped DSP block uses.
//
// The slice has three sub-blocks: a 25-bit pre-adder (D + A or D - A), a
// signed 25 x 18 multiplier and a 48-bit ALU that adds or subtracts its X,
// Y and Z multiplexer outputs. All four pipeline stages are enabled, which is
// what lets the slice reach its highest clock rate when the pre-adder is in
// use:
//   stage 1  A, D and B1 input registers      (C is registered at stage 3,
//   stage 2  AD (pre-adder) and B2 registers   so the C port must be fed two
//   stage 3  M (product) and C registers       cycles after A, B and D)
//   stage 4  P register (ALU output)
// A result therefore appears on p four clk cycles after its A, B and D were
// presented, and the slice accepts a new operation every cycle.
//
// Control words (held constant by the mpDSP, so not registered here):
//   inmode[3] pre-adder subtracts (D - A); inmode[2] D enabled;
//   inmode[1] A gated to zero; inmode[0], inmode[4] select A1/B1 in the real
//   slice and must be 0 here.
//   opmode[1:0] X: 00 zero, 01 M, 10 P    (11, A:B, is not modelled)
//   opmode[3:2] Y: 00 zero, 01 M, 10 all ones, 11 C
//   opmode[6:4] Z: 000 zero, 010 P, 011 C (others are not modelled)
//   alumode: 0000 Z+X+Y+CIN, 0001 -Z+(X+Y+CIN)-1, 0010 -(Z+X+Y+CIN)-1,
//            0011 Z-(X+Y+CIN)             (logic-unit modes are not modelled)
// The widths, the sub-blocks and the four stages are those of the DSP48E1;
// the encodings follow the primitive. Cascade ports, pattern detection,
// SIMD modes, clock enables and per-register resets are left out because
// the multi-pumped block does not use them. Unsupported control codes are
// flagged by assertions and give a zero operand. A keeps the primitive's
// 30-bit width, but only its low 25 bits reach the multiplier (the A:B
// concatenation that would use the rest is not modelled), so lint reports
// a[29:25] as unused.
module dsp48e1_core
  import mpdsp_pkg::*;
(
  input  logic           clk,
  input  logic           rst,      // synchronous, clears every pipeline register
  input  logic [A_W-1:0] a,
  input  logic [B_W-1:0] b,
  input  logic [C_W-1:0] c,
  input  logic [D_W-1:0] d,
  input  logic [4:0]     inmode,
  input  logic [6:0]     opmode,
  input  logic [3:0]     alumode,
  input  logic           carryin,
  output logic [P_W-1:0] p
);

  // stage 1
  logic [AD_W-1:0] a_r, d_r;
  logic [B_W-1:0]  b1_r;
  // stage 2
  logic [AD_W-1:0] ad_r;
  logic [B_W-1:0]  b2_r;
  // stage 3
  logic [M_W-1:0]  m_r;
  logic [C_W-1:0]  c_r;
  // stage 4
  logic [P_W-1:0]  p_r;

  logic [AD_W-1:0] pre_a, pre_d, ad;
  logic [M_W-1:0]  m;
  logic [P_W-1:0]  m_ext, x_mux, y_mux, z_mux, xy_sum, alu;

  // pre-adder
  always_comb begin
    pre_a = inmode[1] ? '0 : a_r;
    pre_d = inmode[2] ? d_r : '0;
    ad    = inmode[3] ? pre_d - pre_a : pre_d + pre_a;
  end

  // signed multiplier, 25 x 18 -> 43 bits
  assign m = M_W'($signed({{(M_W-AD_W){ad_r[AD_W-1]}}, ad_r}) *
                  $signed({{(M_W-B_W){b2_r[B_W-1]}}, b2_r}));

  assign m_ext = {{(P_W-M_W){m_r[M_W-1]}}, m_r};

  // X, Y, Z multiplexers and ALU
  always_comb begin
    unique case (opmode[1:0])
      2'b01:   x_mux = m_ext;
      2'b10:   x_mux = p_r;
      default: x_mux = '0;
    endcase
    unique case (opmode[3:2])
      2'b01:   y_mux = m_ext;
      2'b10:   y_mux = '1;
      2'b11:   y_mux = c_r;
      default: y_mux = '0;
    endcase
    unique case (opmode[6:4])
      3'b010:  z_mux = p_r;
      3'b011:  z_mux = c_r;
      default: z_mux = '0;
    endcase
    // The product reaches the ALU only through X and Y together.
    if (opmode[3:0] == 4'b0101) xy_sum = m_ext + P_W'(carryin);
    else                        xy_sum = x_mux + y_mux + P_W'(carryin);
    unique case (alumode)
      4'b0001: alu = ~z_mux + xy_sum;
      4'b0010: alu = ~(z_mux + xy_sum);
      4'b0011: alu = ~(~z_mux + xy_sum);
      default: alu = z_mux + xy_sum;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_r  <= '0;
      d_r  <= '0;
      b1_r <= '0;
      ad_r <= '0;
      b2_r <= '0;
      m_r  <= '0;
      c_r  <= '0;
      p_r  <= '0;
    end else begin
      a_r  <= a[AD_W-1:0];
      d_r  <= d;
      b1_r <= b;
      ad_r <= ad;
      b2_r <= b1_r;
      m_r  <= m;
      c_r  <= c;
      p_r  <= alu;
    end
  end

  assign p = p_r;

  // Only the control codes modelled above may be used.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (inmode[0] == 1'b0 && inmode[4] == 1'b0)
        else $error("dsp48e1_core: A1/B1 selection is not modelled");
      assert (opmode[1:0] != 2'b11)
        else $error("dsp48e1_core: X = A:B is not modelled");
      assert (opmode[6:4] inside {3'b000, 3'b010, 3'b011})
        else $error("dsp48e1_core: Z code %b is not modelled", opmode[6:4]);
      assert ((opmode[1:0] == 2'b01) == (opmode[3:2] == 2'b01))
        else $error("dsp48e1_core: X and Y must select M together");
      assert (alumode inside {4'b0000, 4'b0001, 4'b0010, 4'b0011})
        else $error("dsp48e1_core: logic-unit ALUMODE %b is not modelled", alumode);
    end
  end

endmodule
