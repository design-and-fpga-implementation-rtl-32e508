// tb_rgb_out_reg: checks that the output register takes its input at the
// falling clock edge and holds it through the rising edge.
module tb_rgb_out_reg;
  logic clk = 0;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;
  logic [2:0] d, q;
  rgb_out_reg #(.W(3)) dut (.clk, .d, .q);
  initial begin
    d = 0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 50; i++) begin
      logic [2:0] v, old;
      @(posedge clk);
      old = q;
      v = 3'($urandom);
      d = v;
      #5;
      checks++;
      if (q != old) begin failures++; $display("FAIL q changed before falling edge"); end
      @(negedge clk); #1;
      checks++;
      if (q != v) begin failures++; $display("FAIL q %b exp %b", q, v); end
      @(posedge clk); d = ~v; #1;
      checks++;
      if (q != v) begin failures++; $display("FAIL q not held over rising edge"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
