// tb_mpdsp_configs: runs the multi-pumped DSP block in every combination of
// sub-blocks listed for it (multiplier only, pre-adder + multiplier,
// multiplier + ALU, pre-adder + multiplier + ALU) and in the subtracting
// forms of the pre-adder and ALU, side by side on the same clocks and the
// same random operand stream. Each instance's o1/o2 are checked against the
// reference result of the operands launched 3 system cycles earlier.
module tb_mpdsp_configs;
  import mpdsp_pkg::*;
  import mpdsp_tb_pkg::*;

  localparam int NINST = 7;
  localparam int LAT   = 3;
  localparam int NCYC  = 600;

  localparam pre_op_e PRE [NINST] = '{PRE_OFF, PRE_ADD, PRE_OFF, PRE_ADD, PRE_SUB, PRE_SUB, PRE_OFF};
  localparam alu_op_e ALU [NINST] = '{ALU_OFF, ALU_OFF, ALU_ADD, ALU_ADD, ALU_OFF, ALU_SUB, ALU_RSUB};

  logic clk1 = 1'b0, clk2 = 1'b0, rst = 1'b1;
  operands_t i1, i2;
  logic [P_W-1:0] o1 [NINST], o2 [NINST];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NINST; g++) begin : g_dut
    mpdsp #(.PRE_OP(PRE[g]), .ALU_OP(ALU[g])) dut (
      .clk1(clk1), .clk2(clk2), .rst(rst), .i1(i1), .i2(i2), .o1(o1[g]), .o2(o2[g]));
  end

  initial forever begin
    #5 clk1 = 1'b1; clk2 = 1'b1;
    #5 clk2 = 1'b0;
    #5 clk1 = 1'b0; clk2 = 1'b1;
    #5 clk2 = 1'b0;
  end

  function automatic operands_t rand_ops();
    operands_t x;
    x.a = A_W'({$urandom, $urandom});
    x.b = B_W'($urandom);
    x.c = C_W'({$urandom, $urandom});
    x.d = D_W'($urandom);
    return x;
  endfunction

  operands_t h1 [LAT], h2 [LAT];   // operands launched 1..LAT edges ago
  int cyc = 0;

  always @(posedge clk1) begin
    operands_t n1, n2;
    cyc <= cyc + 1;
    if (cyc >= 3 + LAT) begin
      for (int g = 0; g < NINST; g++) begin
        logic [P_W-1:0] e1, e2;
        e1 = mpdsp_ref(PRE[g], ALU[g], h1[LAT-1]);
        e2 = mpdsp_ref(PRE[g], ALU[g], h2[LAT-1]);
        checks += 2;
        if (o1[g] !== e1) begin failures++; if (failures < 10) $display("inst %0d cyc %0d o1 %h exp %h", g, cyc, o1[g], e1); end
        if (o2[g] !== e2) begin failures++; if (failures < 10) $display("inst %0d cyc %0d o2 %h exp %h", g, cyc, o2[g], e2); end
      end
    end
    n1 = rand_ops();
    n2 = rand_ops();
    for (int k = LAT - 1; k > 0; k--) begin h1[k] <= h1[k-1]; h2[k] <= h2[k-1]; end
    h1[0] <= n1;
    h2[0] <= n2;
    i1 <= n1;
    i2 <= n2;
    rst <= (cyc < 2);
    if (cyc == NCYC) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (NCYC + 50) @(posedge clk1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
