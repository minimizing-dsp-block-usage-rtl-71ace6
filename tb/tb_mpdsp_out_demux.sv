// tb_mpdsp_out_demux: feeds the output demultiplexer a stream that changes
// every Clk2 cycle, with a first-half/second-half flag generated here as a
// Clk2 register, and checks at every Clk1 edge (as Clk1 logic would sample)
// that o1 holds the value of the first half of the cycle just ended and o2
// the value of its second half.
module tb_mpdsp_out_demux;

  logic clk1 = 1'b0, clk2 = 1'b0, rst = 1'b1;
  logic second_half;
  logic [47:0] p, o1, o2;
  logic [47:0] first_val, second_val;
  int checks = 0, failures = 0;
  int cyc = 0;

  mpdsp_out_demux dut (.clk2, .rst, .second_half, .p, .o1, .o2);

  initial forever begin
    #5 clk1 = 1'b1; clk2 = 1'b1;
    #5 clk2 = 1'b0;
    #5 clk1 = 1'b0; clk2 = 1'b1;
    #5 clk2 = 1'b0;
  end

  // phase flag and data stream, both Clk2 registers; the phase is known
  // from clk1, which is high during the first half
  always @(posedge clk2) begin
    second_half <= ~clk1;           // clk1 has already taken its new level
    p           <= 48'({$urandom, $urandom});
  end

  // what was on p in each half of the running Clk1 cycle
  always @(negedge clk2) begin
    if (second_half) second_val = p;
    else             first_val  = p;
  end

  always @(posedge clk1) begin
    cyc <= cyc + 1;
    if (cyc > 3) begin
      checks += 2;
      if (o1 !== first_val)  begin failures++; $display("cyc %0d o1 %h expected %h", cyc, o1, first_val); end
      if (o2 !== second_val) begin failures++; $display("cyc %0d o2 %h expected %h", cyc, o2, second_val); end
    end
    if (cyc == 2) rst <= 1'b0;
    if (cyc == 300) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (400) @(posedge clk1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
