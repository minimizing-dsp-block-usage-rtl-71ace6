// tb_mpdsp_in_mux: checks the operand multiplexer in its four build
// variants (C and D used or held at zero) with random operand pairs and
// both select values.
module tb_mpdsp_in_mux;
  import mpdsp_pkg::*;

  logic sel;
  operands_t i1, i2;
  operands_t o11, o10, o01, o00;
  int checks = 0, failures = 0;

  mpdsp_in_mux                                u11 (.sel, .i1, .i2, .o(o11));
  mpdsp_in_mux #(.USE_C(1'b1), .USE_D(1'b0)) u10 (.sel, .i1, .i2, .o(o10));
  mpdsp_in_mux #(.USE_C(1'b0), .USE_D(1'b1)) u01 (.sel, .i1, .i2, .o(o01));
  mpdsp_in_mux #(.USE_C(1'b0), .USE_D(1'b0)) u00 (.sel, .i1, .i2, .o(o00));

  task automatic expect_ops(string tag, operands_t got, operands_t src, bit use_c, bit use_d);
    checks++;
    if (got.a !== src.a || got.b !== src.b ||
        got.c !== (use_c ? src.c : '0) || got.d !== (use_d ? src.d : '0)) begin
      failures++;
      $display("%s sel=%b: got %h from %h", tag, sel, got, src);
    end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      i1 = operands_t'({$urandom, $urandom, $urandom, $urandom});
      i2 = operands_t'({$urandom, $urandom, $urandom, $urandom});
      sel = n[0];
      #1;
      expect_ops("CD", o11, sel ? i2 : i1, 1, 1);
      expect_ops("C ", o10, sel ? i2 : i1, 1, 0);
      expect_ops(" D", o01, sel ? i2 : i1, 0, 1);
      expect_ops("  ", o00, sel ? i2 : i1, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
