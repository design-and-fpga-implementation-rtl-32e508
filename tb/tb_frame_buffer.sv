// tb_frame_buffer: checks the initial colour, one-clock read latency on
// both read ports, read enables holding data, and random writes read back
// against a reference array at full size (320x240).
module tb_frame_buffer;
  logic clk = 0;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 320 * 240;
  logic we, re_a, re_b;
  logic [16:0] waddr, raddr_a, raddr_b;
  logic [2:0] wdata, rdata_a, rdata_b;
  frame_buffer dut (.clk, .we, .waddr, .wdata, .re_a, .raddr_a, .rdata_a, .re_b, .raddr_b, .rdata_b);

  logic [2:0] ref_mem [DEPTH];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    we = 0; re_a = 1; re_b = 1; waddr = 0; wdata = 0; raddr_a = 0; raddr_b = 0;
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = 3'b100;
    @(posedge clk);
    // initial contents
    for (int i = 0; i < 50; i++) begin
      raddr_a <= 17'($urandom % DEPTH); raddr_b <= 17'(DEPTH - 1 - i);
      @(posedge clk); #1;
      check(rdata_a == 3'b100 && rdata_b == 3'b100, "initial colour");
    end
    // random writes, reads on both ports one clock later
    for (int i = 0; i < 3000; i++) begin
      int a, b2;
      a = $urandom % DEPTH;
      @(negedge clk);
      we = 1; waddr = 17'(a); wdata = 3'($urandom);
      ref_mem[a] = wdata;
      raddr_a = 17'(a); raddr_b = 17'($urandom % DEPTH); b2 = raddr_b;
      @(posedge clk); #1;
      // same-address read returns the old word
      @(negedge clk);
      we = 0;
      @(posedge clk); #1;
      check(rdata_a == ref_mem[a], $sformatf("port A addr %0d", a));
      check(rdata_b == ref_mem[b2], $sformatf("port B addr %0d", b2));
    end
    // read enable low holds the output
    @(negedge clk);
    raddr_a = 0; raddr_b = 1; re_a = 1; re_b = 1;
    @(posedge clk); #1;
    begin
      logic [2:0] ha, hb;
      ha = rdata_a; hb = rdata_b;
      @(negedge clk); re_a = 0; re_b = 0; raddr_a = 5; raddr_b = 6;
      we = 1; waddr = 0; wdata = ~ha;
      @(posedge clk); #1;
      @(negedge clk); we = 0;
      @(posedge clk); #1;
      check(rdata_a == ha && rdata_b == hb, "outputs held while read disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
