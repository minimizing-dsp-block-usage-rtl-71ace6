// tb_dsp48e1_core: checks the DSP slice against an independent cycle model.
//
// Random A, B, C, D are applied every cycle (C two cycles after the A, B, D
// it belongs with, as the slice's pipeline requires) while the control words
// step through a list of configurations: product only, with the pre-adder
// adding, subtracting or ignoring D, gated A, C + M, C - M, M - C, P
// accumulation, and Y = C / all-ones paths, across the four ALU modes. Each
// configuration is held for 40 cycles and results are checked once the
// pipeline holds only operations of that configuration. The result of the
// operands applied before clock edge k must appear on p after edge k + 3
// (four registers).
module tb_dsp48e1_core;
  import mpdsp_pkg::*;

  localparam int NCFG   = 14;
  localparam int HOLD   = 40;
  localparam int SETTLE = 6;

  logic clk = 1'b0, rst = 1'b1;
  logic [A_W-1:0] a;
  logic [B_W-1:0] b;
  logic [C_W-1:0] c;
  logic [D_W-1:0] d;
  logic [4:0] inmode;
  logic [6:0] opmode;
  logic [3:0] alumode;
  logic       carryin;
  logic [P_W-1:0] p;

  int checks = 0, failures = 0;

  dsp48e1_core dut (.*);

  always #5 clk = ~clk;

  typedef struct packed {
    logic [4:0] inmode;
    logic [6:0] opmode;
    logic [3:0] alumode;
    logic       carryin;
  } cfg_t;

  function automatic cfg_t cfg_at(int i);
    unique case (i)
      0:  return '{5'b00000, 7'b000_0101, 4'b0000, 1'b0};  // P = A*B
      1:  return '{5'b00100, 7'b000_0101, 4'b0000, 1'b0};  // P = (D+A)*B
      2:  return '{5'b01100, 7'b000_0101, 4'b0000, 1'b0};  // P = (D-A)*B
      3:  return '{5'b00110, 7'b000_0101, 4'b0000, 1'b0};  // P = D*B
      4:  return '{5'b00100, 7'b011_0101, 4'b0000, 1'b0};  // P = C+(D+A)*B
      5:  return '{5'b00000, 7'b011_0101, 4'b0011, 1'b0};  // P = C-A*B
      6:  return '{5'b00000, 7'b011_0101, 4'b0001, 1'b1};  // P = A*B-C
      7:  return '{5'b00000, 7'b010_0101, 4'b0000, 1'b0};  // P = P+A*B
      8:  return '{5'b00000, 7'b000_1100, 4'b0000, 1'b1};  // P = C+1
      9:  return '{5'b00000, 7'b011_1000, 4'b0000, 1'b0};  // P = C-1
      10: return '{5'b00100, 7'b011_0101, 4'b0010, 1'b0};  // P = -(C+M)-1
      11: return '{5'b00000, 7'b010_0101, 4'b0011, 1'b0};  // P = P-M
      12: return '{5'b01100, 7'b011_0101, 4'b0000, 1'b1};  // P = C+(D-A)*B+1
      default: return '{5'b00000, 7'b000_0010, 4'b0000, 1'b1}; // P = P+1 (X=P)
    endcase
  endfunction

  // independent model of one result
  function automatic logic [P_W-1:0] model(cfg_t k, logic [A_W-1:0] ai, logic [B_W-1:0] bi,
                                           logic [C_W-1:0] ci, logic [D_W-1:0] di,
                                           logic [P_W-1:0] pprev);
    longint signed av, dv, adv, bv, mv;
    logic [P_W-1:0] mm, x, y, z, s;
    av  = k.inmode[1] ? 0 : longint'($signed(ai[24:0]));
    dv  = k.inmode[2] ? longint'($signed(di)) : 0;
    adv = k.inmode[3] ? dv - av : dv + av;
    adv = longint'($signed(adv[24:0]));            // the pre-adder wraps at 25 bits
    bv  = longint'($signed(bi));
    mv  = adv * bv;
    mm  = mv[47:0];
    x = (k.opmode[1:0] == 2'b01) ? mm : (k.opmode[1:0] == 2'b10) ? pprev : '0;
    y = (k.opmode[3:2] == 2'b01) ? 48'd0 /* M counted once, in x */ :
        (k.opmode[3:2] == 2'b10) ? '1 : (k.opmode[3:2] == 2'b11) ? ci : '0;
    z = (k.opmode[6:4] == 3'b010) ? pprev : (k.opmode[6:4] == 3'b011) ? ci : '0;
    s = x + y + 48'(k.carryin);
    unique case (k.alumode)
      4'b0001: return s - z - 48'd1;
      4'b0010: return -(z + s) - 48'd1;
      4'b0011: return z - s;
      default: return z + s;
    endcase
  endfunction

  // operand history, indexed by the edge that captures it
  logic [A_W-1:0] ah [4];
  logic [B_W-1:0] bh [4];
  logic [D_W-1:0] dh [4];
  logic [C_W-1:0] ch [2];
  logic [P_W-1:0] pexp;
  cfg_t cur;

  initial begin
    int t;
    a = '0; b = '0; c = '0; d = '0;
    cur = cfg_at(0);
    {inmode, opmode, alumode, carryin} = cur;
    pexp = '0;
    for (int i = 0; i < 4; i++) begin ah[i] = '0; bh[i] = '0; dh[i] = '0; end
    ch[0] = '0; ch[1] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    t = 0;
    for (int ci = 0; ci < NCFG; ci++) begin
      cur = cfg_at(ci);
      {inmode, opmode, alumode, carryin} = cur;
      for (int n = 0; n < HOLD; n++) begin
        // new operands for the coming edge
        a = A_W'({$urandom, $urandom});
        b = B_W'($urandom);
        c = C_W'({$urandom, $urandom});
        d = D_W'($urandom);
        @(posedge clk);
        // the edge just captured a, b, d (stage 1) and c (for the A of two edges ago)
        for (int i = 3; i > 0; i--) begin ah[i] = ah[i-1]; bh[i] = bh[i-1]; dh[i] = dh[i-1]; end
        ah[0] = a; bh[0] = b; dh[0] = d;
        ch[1] = ch[0]; ch[0] = c;
        // p was just updated from the operands captured three edges earlier
        // and the C captured one edge earlier
        pexp = model(cur, ah[3], bh[3], ch[1], dh[3], pexp);
        @(negedge clk);
        if (n >= SETTLE) begin
          checks++;
          if (p !== pexp) begin
            failures++;
            if (failures < 10) $display("cfg %0d cycle %0d: p %h expected %h", ci, n, p, pexp);
          end
        end else begin
          pexp = p;   // start the model from the slice's state after a change
        end
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCFG * HOLD + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
