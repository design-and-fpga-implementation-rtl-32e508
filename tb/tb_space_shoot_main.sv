// tb_space_shoot_main: end-to-end test of the whole game at a reduced size.
//
// Two aliens per row, a formation that starts near the right edge, a faster
// missile and ship, so that one run sees every mechanism: mouse start-up
// (enable command, acknowledge), packets, ship moves both ways, the
// formation's step and its turn at the screen edge, missile launch, misses
// and hits, a row defeated, the wave restart with level increment, the
// frame buffer written and read through its ports and shown on screen, and
// blanking. The picture at the rgb pins is captured and checked.
module tb_space_shoot_main;
  import space_shoot_pkg::*;
  logic clk = 0, not_reset = 0;
  always #10 clk = ~clk;

  localparam int unsigned P_N_ALIENS = 2, P_MOVE_FRAMES = 10, P_SHIP_STEP = 16;
  localparam int unsigned P_MISSILE_STEP = 48, P_MISSILE_H = 48, P_ALIEN_X0 = 528;

  logic dev_clk, dev_dat, host_clk, host_dat;
  wire ps_clk = dev_clk & host_clk;
  wire ps_dat = dev_dat & host_dat;
  logic write, read;
  logic [FB_AW-1:0] wr_addr, rd_addr;
  rgb_t wr_data, rd_data, rgb;
  logic hsync, vsync;

  ps2_mouse_model #(.HALF(100)) mouse (.clk, .line_clk(ps_clk), .line_dat(ps_dat), .dev_clk, .dev_dat);

  space_shoot_main #(
    .N_ALIENS(P_N_ALIENS), .MOVE_FRAMES(P_MOVE_FRAMES), .SHIP_STEP(P_SHIP_STEP),
    .MISSILE_STEP(P_MISSILE_STEP), .MISSILE_H(P_MISSILE_H), .ALIEN_X0(P_ALIEN_X0), .INHIBIT_CYCLES(500)
  ) dut (
    .clk, .not_reset, .ps3_clk_in(ps_clk), .ps3_dat_in(ps_dat), .ps3_clk_out(host_clk), .ps3_dat_out(host_dat),
    .write, .wr_addr, .wr_data, .read, .rd_addr, .rd_data, .hsync, .vsync, .rgb);

  `include "space_shoot_tb_common.svh"

  initial begin
    bit h;
    int shots, fb_seen;
    write = 0; read = 0; wr_addr = 0; wr_data = 0; rd_addr = 0; shots = 0; fb_seen = 0;
    repeat (5) @(negedge clk);
    not_reset = 1;
    wait (dut.u_mouse.mousePresent);
    check(mouse.last_cmd == 8'hF4, "mouse enabled with 0xF4");
    // paint a 2x2 block of the frame buffer blue and read one word back
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      write = 1; wr_addr = FB_AW'((100 + k / 2) * 320 + 100 + k % 2); wr_data = 3'b001;
    end
    @(negedge clk); write = 0; read = 1; rd_addr = FB_AW'(101 * 320 + 101);
    @(negedge clk); read = 0;
    check(rd_data == 3'b001, "frame buffer read port");
    wait_frames(1);
    check_picture("first frame");
    fb_seen = (scr[200][200] == 3'b001 && scr[203][203] == 3'b001 && scr[204][204] == 3'b100);
    check(fb_seen == 1, "frame buffer block on screen");
    // ship left and right
    buttons(3'b001); wait_frames(3); buttons(3'b000);
    buttons(3'b010); wait_frames(2); buttons(3'b000);
    check_picture("after moving");
    // fire at every alien until the wave restarts
    while (n_restart == 0 && shots < 40) begin
      aim_and_fire(h);
      shots++;
    end
    // one shot that misses: formation restarted at the right, ship at the far left
    move_ship_to(0);
    buttons(3'b100); while (!dut.u_graphics.u_missile.active) @(posedge clk); buttons(3'b000);
    while (dut.u_graphics.u_missile.active) @(posedge clk);
    check_picture("after restart");
    check(dut.u_graphics.score == 10'(2 * 3 * P_N_ALIENS), $sformatf("score %0d", dut.u_graphics.score));
    check(dut.u_graphics.level == 8'd1, $sformatf("level %0d", dut.u_graphics.level));
    check(n_hit == 3 * P_N_ALIENS, $sformatf("hits %0d", n_hit));
    // every mechanism happened
    check(n_trigger > 0, "mouse packets");
    check(n_left > 0, "ship moved left");
    check(n_right > 0, "ship moved right");
    check(n_steps > 0, "formation stepped");
    check(n_turn > 0, "formation turned at an edge");
    check(n_launch > 0, "missile launched");
    check(n_miss > 0, "missile left the screen");
    check(n_restart == 1, "wave restarted");
    $display("frames %0d packets %0d left %0d right %0d steps %0d turns %0d launches %0d hits %0d misses %0d restarts %0d",
             n_frames, n_trigger, n_left, n_right, n_steps, n_turn, n_launch, n_hit, n_miss, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (250 * 840000) @(posedge clk);
    failures++;
    $display("watchdog: frames %0d hits %0d", n_frames, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
