// tb_space_shoot_full: the whole game at its default size, one complete
// operation from the mouse to the score.
//
// The mouse model runs at a real PS/2 clock (about 12.5 kHz). After the
// start-up handshake the test checks the first picture, steers the ship
// under an alien of the lowest row with mouse packets, fires with the
// middle button just after the formation has stepped, and checks that the
// alien is destroyed, the score is 2 and the picture shows the gap.
module tb_space_shoot_full;
  import space_shoot_pkg::*;
  logic clk = 0, not_reset = 0;
  always #10 clk = ~clk;

  // the defaults of space_shoot_main, for the shared tasks
  localparam int unsigned P_N_ALIENS = 8, P_MOVE_FRAMES = 30, P_SHIP_STEP = 4;
  localparam int unsigned P_MISSILE_STEP = 8, P_MISSILE_H = 8, P_ALIEN_X0 = 192;

  logic dev_clk, dev_dat, host_clk, host_dat;
  wire ps_clk = dev_clk & host_clk;
  wire ps_dat = dev_dat & host_dat;
  logic write, read;
  logic [FB_AW-1:0] wr_addr, rd_addr;
  rgb_t wr_data, rd_data, rgb;
  logic hsync, vsync;

  ps2_mouse_model #(.HALF(2000)) mouse (.clk, .line_clk(ps_clk), .line_dat(ps_dat), .dev_clk, .dev_dat);

  space_shoot_main dut (
    .clk, .not_reset, .ps3_clk_in(ps_clk), .ps3_dat_in(ps_dat), .ps3_clk_out(host_clk), .ps3_dat_out(host_dat),
    .write, .wr_addr, .wr_data, .read, .rd_addr, .rd_data, .hsync, .vsync, .rgb);

  `include "space_shoot_tb_common.svh"

  initial begin
    bit h;
    int shots;
    write = 0; read = 0; wr_addr = 0; wr_data = 0; rd_addr = 0; shots = 0; h = 0;
    repeat (5) @(negedge clk);
    not_reset = 1;
    wait (dut.u_mouse.mousePresent);
    check(mouse.last_cmd == 8'hF4 && mouse.cmd_parity_ok, "mouse enabled with 0xF4");
    check_picture("first frame");
    check(dut.u_graphics.u_motion.master_x == 10'd192 && dut.u_graphics.u_motion.master_y == 10'd98,
          "formation at its start position");
    move_ship_to(280);
    check(n_left == 6 && n_right == 0, $sformatf("ship moved left %0d steps", n_left));
    while (!h && shots < 4) begin
      aim_and_fire(h);
      shots++;
    end
    check(h, "an alien was destroyed");
    check(dut.u_graphics.score == 10'd2, $sformatf("score %0d", dut.u_graphics.score));
    check(dut.u_graphics.level == 8'd0, "level unchanged");
    check(n_launch == 1, $sformatf("%0d missiles launched", n_launch));
    check_picture("after the hit");
    $display("frames %0d packets %0d left %0d right %0d steps %0d launches %0d hits %0d",
             n_frames, n_trigger, n_left, n_right, n_steps, n_launch, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (150 * 840000) @(posedge clk);
    failures++;
    $display("watchdog: frames %0d hits %0d", n_frames, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
