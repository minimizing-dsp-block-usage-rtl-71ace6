// mpdsp: multi-pumped DSP block. One DSP slice, clocked at twice the system
// clock, performs two independent DSP operations per system cycle.
//
// Every rising edge of the system clock clk1 presents two operand sets,
// i1 = (A1, B1, C1, D1) and i2 = (A2, B2, C2, D2). The Clk1 follower steers
// the operand multiplexers so that the slice, clocked by clk2, takes i1 in
// the first half of the system cycle and i2 in the second half. Each
// operation computes
//     AD = D + A, D - A or A          (pre-adder, PRE_OP)
//     M  = AD * B                     (signed 25 x 18, always used)
//     P  = M, C + M, C - M or M - C   (ALU, ALU_OP)
// with the DSP48E1 widths: A 30 bits (low 25 used), B 18, C 48, D 25, P 48,
// all two's complement and wrapping at their widths. All four pipeline
// stages of the slice are enabled; when the ALU is used, C_ALIGN_STAGES (2)
// extra Clk2 registers delay the multiplexed C so it meets its product.
// The output demultiplexer returns the i1 result on o1 and the i2 result on
// o2.
//
// Timing: clk2 must have rising edges aligned with those of clk1 and exactly
// twice its frequency. Operands launched by clk1 logic at edge k (held for
// the whole cycle) give results that clk1 logic samples at edge k + 3, i.e.
// a latency of 3 system cycles, with a new pair of operations accepted every
// system cycle. rst is synchronous and active high and must be held for at
// least one clk1 cycle; results of operations started during reset are
// zero or meaningless.
//
// Configuration is fixed by parameters and turned into constant INMODE,
// OPMODE and ALUMODE words, as in the published mpDSP architecture. An unused pre-adder or ALU
// has its operand held at zero. The choice of add or subtract for each
// sub-block, the follower circuit and the use of the P register as O2 are
// this design's own.
module mpdsp
  import mpdsp_pkg::*;
#(
  parameter pre_op_e     PRE_OP         = PRE_ADD,
  parameter alu_op_e     ALU_OP         = ALU_ADD,
  parameter int unsigned C_ALIGN_STAGES = 2
) (
  input  logic           clk1,
  input  logic           clk2,
  input  logic           rst,
  input  operands_t      i1,
  input  operands_t      i2,
  output logic [P_W-1:0] o1,
  output logic [P_W-1:0] o2
);

  localparam bit USE_PRE = (PRE_OP != PRE_OFF);
  localparam bit USE_ALU = (ALU_OP != ALU_OFF);

  localparam logic [4:0] INMODE  = inmode_of(PRE_OP);
  localparam logic [6:0] OPMODE  = opmode_of(ALU_OP);
  localparam logic [3:0] ALUMODE = alumode_of(ALU_OP);
  localparam logic       CARRYIN = carryin_of(ALU_OP);

  logic           second_half;
  operands_t      sel_ops;
  logic [C_W-1:0] c_late;
  logic [P_W-1:0] p;

  clk1_follower u_follower (
    .clk1        (clk1),
    .clk2        (clk2),
    .rst         (rst),
    .second_half (second_half)
  );

  mpdsp_in_mux #(
    .USE_C (USE_ALU),
    .USE_D (USE_PRE)
  ) u_in_mux (
    .sel (second_half),
    .i1  (i1),
    .i2  (i2),
    .o   (sel_ops)
  );

  if (USE_ALU) begin : g_c_align
    c_align #(
      .WIDTH (C_W),
      .DEPTH (C_ALIGN_STAGES)
    ) u_c_align (
      .clk (clk2),
      .rst (rst),
      .d   (sel_ops.c),
      .q   (c_late)
    );
  end else begin : g_no_c
    assign c_late = '0;
  end

  dsp48e1_core u_dsp (
    .clk     (clk2),
    .rst     (rst),
    .a       (sel_ops.a),
    .b       (sel_ops.b),
    .c       (c_late),
    .d       (sel_ops.d),
    .inmode  (INMODE),
    .opmode  (OPMODE),
    .alumode (ALUMODE),
    .carryin (CARRYIN),
    .p       (p)
  );

  mpdsp_out_demux #(
    .WIDTH (P_W)
  ) u_out_demux (
    .clk2        (clk2),
    .rst         (rst),
    .second_half (second_half),
    .p           (p),
    .o1          (o1),
    .o2          (o2)
  );

  // The follower must alternate every Clk2 cycle once out of reset.
  logic second_half_q;
  always_ff @(posedge clk2) second_half_q <= second_half;
  always_ff @(posedge clk2) begin
    if (!rst) assert (second_half != second_half_q || $past(rst))
      else $error("mpdsp: Clk1 follower did not alternate");
  end

endmodule
