// tb_ps2_tx: self-checking test of the host-to-device transmitter.
// The mouse model decodes what the host sends; the test checks the byte,
// its parity, the acknowledge and that the clock was held low for the
// inhibit time before the request to send.
module tb_ps2_tx;
  logic clk = 0, not_reset = 0;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int INHIBIT = 300;
  logic dev_clk, dev_dat, host_clk, host_dat, busy, tx_done, ack_ok, start;
  logic [7:0] tx_byte;
  wire line_clk = dev_clk & host_clk;
  wire line_dat = dev_dat & host_dat;

  ps2_mouse_model #(.HALF(40)) mouse (.clk, .line_clk, .line_dat, .dev_clk, .dev_dat);
  ps2_tx #(.INHIBIT_CYCLES(INHIBIT), .FILTER_LEN(8)) dut (
    .clk, .not_reset, .start, .tx_byte, .ps2_clk(line_clk), .ps2_dat(line_dat),
    .ps2_clk_out(host_clk), .ps2_dat_out(host_dat), .busy, .tx_done, .ack_ok);

  int low_run, max_low_run;
  always @(posedge clk) begin
    if (!host_clk) low_run++; else low_run = 0;
    if (low_run > max_low_run) max_low_run = low_run;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    start = 0; tx_byte = 0; low_run = 0; max_low_run = 0;
    repeat (10) @(posedge clk);
    not_reset = 1;
    repeat (10) @(posedge clk);
    for (int i = 0; i < 6; i++) begin
      logic [7:0] b;
      int n0;
      b = (i == 0) ? 8'hF4 : 8'($urandom);
      n0 = mouse.n_cmds;
      max_low_run = 0;
      tx_byte = b; start = 1;
      @(posedge clk); start = 0; tx_byte = 8'h00;
      check(busy, "busy after start");
      wait (tx_done);
      @(posedge clk);
      check(ack_ok, "acknowledge seen");
      wait (mouse.n_cmds == n0 + 1);
      check(mouse.last_cmd == b, $sformatf("mouse got %h expected %h", mouse.last_cmd, b));
      check(mouse.cmd_parity_ok, "parity and stop bit");
      check(max_low_run >= INHIBIT && max_low_run < INHIBIT + 50, $sformatf("inhibit %0d", max_low_run));
      wait (!mouse.busy);
      repeat (200) @(posedge clk);
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
