// tb_c_align: checks that the C balancing registers delay their input by
// exactly DEPTH clock cycles, for the default depth of 2 and for depth 3,
// and that reset clears them.
module tb_c_align;

  logic clk = 1'b0, rst = 1'b1;
  logic [47:0] d, q2;
  logic [47:0] q3;
  logic [47:0] hist [4];
  int checks = 0, failures = 0;

  c_align                         u2 (.clk, .rst, .d, .q(q2));
  c_align #(.WIDTH(48), .DEPTH(3)) u3 (.clk, .rst, .d, .q(q3));

  always #5 clk = ~clk;

  initial begin
    d = '0;
    for (int i = 0; i < 4; i++) hist[i] = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (q2 !== '0 || q3 !== '0) begin failures++; $display("reset did not clear"); end
    rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      d = 48'({$urandom, $urandom});
      @(posedge clk);
      for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = d;
      @(negedge clk);
      // hist[k] was captured k+1 edges ago counting this one as the first
      checks += 2;
      if (q2 !== hist[1]) begin failures++; $display("n=%0d depth2 %h expected %h", n, q2, hist[1]); end
      if (q3 !== hist[2]) begin failures++; $display("n=%0d depth3 %h expected %h", n, q3, hist[2]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
