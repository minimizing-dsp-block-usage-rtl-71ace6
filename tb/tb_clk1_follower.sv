// tb_clk1_follower: checks that the follower is 0 in the first Clk2 cycle of
// every Clk1 cycle and 1 in the second, i.e. that it equals the inverse of
// Clk1 (which is high in the first half), one Clk2 cycle after reset and
// after a reset applied in mid-run. It is sampled 1 ns after every Clk2
// edge, away from the edges themselves.
module tb_clk1_follower;

  logic clk1 = 1'b0, clk2 = 1'b0, rst = 1'b1;
  logic second_half;
  int checks = 0, failures = 0;
  int edges = 0;

  clk1_follower dut (.*);

  initial forever begin
    #5 clk1 = 1'b1; clk2 = 1'b1;
    #5 clk2 = 1'b0;
    #5 clk1 = 1'b0; clk2 = 1'b1;
    #5 clk2 = 1'b0;
  end

  // reset is driven like any Clk1-domain signal
  initial begin
    repeat (3) @(posedge clk1);
    rst <= 1'b0;
    repeat (50) @(posedge clk1);
    rst <= 1'b1;
    repeat (2) @(posedge clk1);
    rst <= 1'b0;
    repeat (50) @(posedge clk1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst_seen;   // rst as the Clk2 registers saw it at the last edge
  always @(posedge clk2) begin
    rst_seen = rst;
    edges++;
    #1;
    if (!rst_seen) begin
      checks++;
      if (second_half !== ~clk1) begin
        failures++;
        $display("t=%0t: second_half=%b clk1=%b", $time, second_half, clk1);
      end
    end
  end

  initial begin
    repeat (200) @(posedge clk1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
