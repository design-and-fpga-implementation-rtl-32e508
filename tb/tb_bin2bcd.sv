// tb_bin2bcd: exhaustive check of the binary to BCD converter for 10-bit
// values and four digits, against digits taken with / and %.
module tb_bin2bcd;
  int checks = 0, failures = 0;
  logic [9:0] bin;
  logic [15:0] bcd;
  bin2bcd #(.W(10), .DIGITS(4)) dut (.bin, .bcd);
  initial begin
    for (int v = 0; v < 1024; v++) begin
      logic [15:0] e;
      bin = 10'(v); #1;
      e = {4'(v / 1000), 4'((v / 100) % 10), 4'((v / 10) % 10), 4'(v % 10)};
      checks++;
      if (bcd != e) begin failures++; $display("FAIL %0d -> %h", v, bcd); end
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
