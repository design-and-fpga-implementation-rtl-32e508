// tb_ps2_rx: self-checking test of the PS/2 frame receiver.
// Sends frames with random bytes from the mouse model, plus frames with a
// wrong parity bit, and checks the byte and the error flag of each.
module tb_ps2_rx;
  logic clk = 0, not_reset = 0;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;

  logic dev_clk, dev_dat, rx_done, rx_err;
  logic [7:0] rx_byte;

  ps2_mouse_model #(.HALF(40)) mouse (.clk, .line_clk(dev_clk), .line_dat(dev_dat), .dev_clk, .dev_dat);
  ps2_rx #(.FILTER_LEN(8)) dut (.clk, .not_reset, .en(1'b1), .ps2_clk(dev_clk), .ps2_dat(dev_dat),
                               .rx_done, .rx_byte, .rx_err);

  logic [7:0] exp_q[$];
  logic       exp_err_q[$];
  always @(posedge clk) if (rx_done) begin
    logic [7:0] e; logic ee;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected frame"); end
    else begin
      e = exp_q.pop_front(); ee = exp_err_q.pop_front();
      if (rx_err !== ee || (!ee && rx_byte !== e)) begin
        failures++;
        $display("FAIL byte %h err %b, expected %h err %b", rx_byte, rx_err, e, ee);
      end
    end
  end

  initial begin
    repeat (20) @(posedge clk);
    not_reset = 1;
    repeat (20) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      logic [7:0] b; bit bad;
      b = 8'($urandom);
      bad = (i % 7 == 3);
      exp_q.push_back(b); exp_err_q.push_back(bad);
      mouse.send_byte(b, bad);
    end
    repeat (100) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d frames not received", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
