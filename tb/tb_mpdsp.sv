// tb_mpdsp: end-to-end test of the multi-pumped DSP block at its default
// configuration (pre-adder, multiplier and ALU all in use: O = C + (D + A) * B).
//
// The testbench plays the system-clock logic around the block: at every clk1
// edge it launches two fresh random operand sets (full rate, one pair per
// system cycle) and samples o1/o2, comparing them with the reference result
// of the operands launched exactly 3 system cycles earlier. A mid-run reset
// checks that the block (and its Clk1 follower) comes back in step. It counts
// how often each mechanism was exercised: both halves of the multi-pumped
// cycle, pre-adder carrying a non-zero D, ALU carrying a non-zero C,
// negative results, back-to-back full-rate cycles and reset recovery.
module tb_mpdsp;
  import mpdsp_pkg::*;
  import mpdsp_tb_pkg::*;

  localparam int unsigned LAT    = 3;      // system cycles
  localparam int unsigned NCYC   = 2000;
  localparam int unsigned RST_AT = 700;    // mid-run reset

  logic clk1 = 1'b0, clk2 = 1'b0, rst = 1'b1;
  operands_t i1, i2;
  logic [P_W-1:0] o1, o2;

  int checks = 0, failures = 0;
  int n_o1 = 0, n_o2 = 0, n_pre = 0, n_alu = 0, n_neg = 0, n_b2b = 0, n_rstrec = 0;

  mpdsp dut (.clk1(clk1), .clk2(clk2), .rst(rst), .i1(i1), .i2(i2), .o1(o1), .o2(o2));

  // clk2 at twice clk1, rising edges aligned, both driven from one process
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
    // occasionally extreme values
    if ($urandom_range(0, 15) == 0) x.b = {1'b1, {(B_W-1){1'b0}}};
    if ($urandom_range(0, 15) == 0) x.d = {1'b0, {(D_W-1){1'b1}}};
    return x;
  endfunction

  logic [P_W-1:0] exp1 [LAT], exp2 [LAT];
  logic           vld  [LAT];
  int cyc = 0;
  int last_valid_cyc = -10;

  always @(posedge clk1) begin
    operands_t n1, n2;
    logic      rst_next;
    cyc <= cyc + 1;
    // compare what the block presents at this edge
    if (vld[LAT-1]) begin
      checks += 2;
      if (o1 !== exp1[LAT-1]) begin
        failures++;
        if (failures < 10) $display("cycle %0d: o1 %h expected %h", cyc, o1, exp1[LAT-1]);
      end else n_o1++;
      if (o2 !== exp2[LAT-1]) begin
        failures++;
        if (failures < 10) $display("cycle %0d: o2 %h expected %h", cyc, o2, exp2[LAT-1]);
      end else n_o2++;
      if (o1[P_W-1] || o2[P_W-1]) n_neg++;
      if (last_valid_cyc == cyc - 1) n_b2b++;
      if (cyc == RST_AT + 2 + LAT) n_rstrec++;   // first result after the mid-run reset
      last_valid_cyc = cyc;
    end
    rst_next = (cyc < 3) || (cyc >= RST_AT && cyc < RST_AT + 2);
    n1 = rand_ops();
    n2 = rand_ops();
    if (n1.d != 0 && n2.d != 0) n_pre++;
    if (n1.c != 0 && n2.c != 0) n_alu++;
    for (int k = LAT - 1; k > 0; k--) begin
      exp1[k] <= exp1[k-1];
      exp2[k] <= exp2[k-1];
      // operations already in flight are lost when reset is applied
      vld[k]  <= vld[k-1] && !rst_next;
    end
    exp1[0] <= mpdsp_ref(PRE_ADD, ALU_ADD, n1);
    exp2[0] <= mpdsp_ref(PRE_ADD, ALU_ADD, n2);
    vld[0]  <= !rst_next;
    i1  <= n1;
    i2  <= n2;
    rst <= rst_next;
    if (cyc == NCYC) begin
      if (n_o1 == 0)     begin failures++; $display("never checked an O1 (first-half) result"); end
      if (n_o2 == 0)     begin failures++; $display("never checked an O2 (second-half) result"); end
      if (n_pre == 0)    begin failures++; $display("pre-adder never used"); end
      if (n_alu == 0)    begin failures++; $display("ALU never used"); end
      if (n_neg == 0)    begin failures++; $display("no negative result"); end
      if (n_b2b == 0)    begin failures++; $display("no back-to-back cycles"); end
      if (n_rstrec == 0) begin failures++; $display("no result checked right after reset"); end
      $display("mechanisms: o1=%0d o2=%0d preadd=%0d alu=%0d negative=%0d back_to_back=%0d reset_recovery=%0d",
               n_o1, n_o2, n_pre, n_alu, n_neg, n_b2b, n_rstrec);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int k = 0; k < LAT; k++) vld[k] = 1'b0;
  end

  // watchdog
  initial begin
    repeat (NCYC + 100) @(posedge clk1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
