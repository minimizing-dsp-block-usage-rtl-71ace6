// mpdsp_tb_pkg: reference arithmetic of one multi-pumped DSP operation,
// written directly from the operation's definition (pre-adder, signed
// multiply, ALU) and used only by the testbenches to predict results.
package mpdsp_tb_pkg;
  import mpdsp_pkg::*;

  function automatic logic [P_W-1:0] mpdsp_ref(pre_op_e pre, alu_op_e alu, operands_t x);
    logic signed [AD_W-1:0] ad;
    logic signed [M_W-1:0]  ae, be, m;
    logic signed [P_W-1:0]  mx, cx;
    unique case (pre)
      PRE_ADD: ad = x.d + x.a[AD_W-1:0];
      PRE_SUB: ad = x.d - x.a[AD_W-1:0];
      default: ad = x.a[AD_W-1:0];
    endcase
    ae = M_W'(ad);           // sign-extend both factors to 43 bits
    be = M_W'($signed(x.b));
    m  = ae * be;
    mx = P_W'(m);
    cx = x.c;
    unique case (alu)
      ALU_ADD:  return cx + mx;
      ALU_SUB:  return cx - mx;
      ALU_RSUB: return mx - cx;
      default:  return mx;
    endcase
  endfunction

endpackage
