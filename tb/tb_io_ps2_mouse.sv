// tb_io_ps2_mouse: self-checking test of the PS/2 mouse host interface.
// The mouse model answers the enable command; the test then sends packets
// with random buttons and offsets (positive and negative), a packet broken
// by a parity error and a byte that is out of step, and checks the decoded
// outputs and the number of trigger pulses.
module tb_io_ps2_mouse;
  logic clk = 0, not_reset = 0;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;

  logic dev_clk, dev_dat, host_clk, host_dat;
  wire line_clk = dev_clk & host_clk;
  wire line_dat = dev_dat & host_dat;
  logic [8:0] deltaX, deltaY, deltaZ;
  logic leftButton, middleButton, rightButton, mousePresent, trigger;

  ps2_mouse_model #(.HALF(40)) mouse (.clk, .line_clk, .line_dat, .dev_clk, .dev_dat);
  io_ps2_mouse #(.INHIBIT_CYCLES(300)) dut (
    .clk, .not_reset, .ps2_clk_in(line_clk), .ps2_dat_in(line_dat),
    .ps2_clk_out(host_clk), .ps2_dat_out(host_dat),
    .deltaX, .deltaY, .deltaZ, .leftButton, .middleButton, .rightButton, .mousePresent, .trigger);

  int n_trig = 0;
  always @(posedge clk) if (trigger) n_trig++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (10) @(posedge clk);
    check(!mousePresent, "no mouse before reset ends");
    not_reset = 1;
    wait (mousePresent);
    check(mouse.last_cmd == 8'hF4, "enable command sent");
    check(mouse.cmd_parity_ok, "enable command parity");
    wait (!mouse.busy);
    for (int i = 0; i < 20; i++) begin
      logic [2:0] bt; logic signed [8:0] dx, dy; int n0;
      bt = 3'($urandom); dx = 9'($urandom); dy = 9'($urandom);
      n0 = n_trig;
      mouse.send_packet(bt, dx, dy);
      repeat (30) @(posedge clk);
      check(n_trig == n0 + 1, "one trigger per packet");
      check({middleButton, rightButton, leftButton} == bt, $sformatf("buttons %b exp %b", {middleButton, rightButton, leftButton}, bt));
      check(deltaX == dx && deltaY == dy, $sformatf("delta %0d,%0d exp %0d,%0d", $signed(deltaX), $signed(deltaY), dx, dy));
      check(deltaZ == 0, "deltaZ");
    end
    // a packet whose second byte has a parity error is dropped
    begin
      int n0; n0 = n_trig;
      mouse.send_byte(8'b0000_1001);
      mouse.send_byte(8'h05, 1'b1);
      mouse.send_byte(8'h07);
      repeat (30) @(posedge clk);
      check(n_trig == n0, "packet with parity error dropped");
      // out-of-step byte (bit 3 clear) is skipped, then a good packet
      mouse.send_byte(8'h00);
      mouse.send_packet(3'b100, 9'sd12, -9'sd3);
      repeat (30) @(posedge clk);
      check(n_trig == n0 + 1, "resynchronised after bad bytes");
      check(middleButton && !leftButton && !rightButton && $signed(deltaX) == 12 && $signed(deltaY) == -3,
            "packet after resync decoded");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
