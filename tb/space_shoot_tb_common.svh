// space_shoot_tb_common.svh: shared body of the whole-game testbenches.
//
// Included inside a testbench module that declares clk, not_reset, the
// top-level signals, the top as `dut`, a ps2_mouse_model as `mouse`, and
// the localparams P_N_ALIENS, P_MOVE_FRAMES, P_SHIP_STEP, P_MISSILE_STEP,
// P_MISSILE_H and P_ALIEN_X0 that the top was built with. It provides:
//  * a screen capture of the rgb pins (after the output flip-flop), one
//    colour per pixel, and a count of non-black pixels during blanking;
//  * counters of the game's mechanisms, read from inside the design;
//  * tasks to check the captured picture, to steer the ship with mouse
//    packets and to aim and fire at an alien.

int checks = 0, failures = 0;
int bad_alien = 0, bad_ship = 0, bad_bg = 0;

task automatic check(input bit ok, input string msg);
  checks++;
  if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", msg); end
endtask

// ---------------------------------------------------------------- capture
// Enabled only while check_picture records a frame.
logic [2:0] scr [480][640];
int         blank_nonblack = 0;
logic       pend = 0, pend_vis = 0;
logic [9:0] pend_x = 0, pend_y = 0;

// rgb changes at the falling edge (output flip-flop), so read it just after
logic       cap_en = 0;
always @(negedge clk) if (cap_en) begin
  #1;
  if (pend) begin
    if (pend_vis) scr[pend_y][pend_x] = rgb;
    else if (rgb != 3'b000) blank_nonblack++;
  end
  pend     = not_reset && dut.p_tick;
  pend_vis = dut.video_on;
  pend_x   = dut.px_x;
  pend_y   = dut.px_y;
end

// ---------------------------------------------------------------- mechanism counters
int n_frames = 0, n_trigger = 0, n_left = 0, n_right = 0, n_launch = 0, n_hit = 0;
int n_turn = 0, n_restart = 0, n_steps = 0, n_miss = 0;
logic [9:0] ship_q = 0;
logic       act_q = 0, hit_q = 0;

always @(posedge clk) if (!not_reset) begin
  ship_q = dut.u_graphics.u_ship.ship_x;
end else begin
  if (dut.u_graphics.frame_tick) n_frames++;
  if (dut.u_mouse.trigger) n_trigger++;
  if (dut.u_graphics.u_missile.launched) n_launch++;
  if (dut.u_graphics.destruction) n_hit++;
  if (dut.u_graphics.u_motion.turned) n_turn++;
  if (dut.u_graphics.restart) n_restart++;
  if (dut.u_graphics.move_step) n_steps++;
  if (dut.u_graphics.u_ship.ship_x < ship_q) n_left++;
  if (dut.u_graphics.u_ship.ship_x > ship_q) n_right++;
  if (act_q && !dut.u_graphics.u_missile.active && !hit_q) n_miss++;
  hit_q = dut.u_graphics.destruction;
  ship_q = dut.u_graphics.u_ship.ship_x;
  act_q  = dut.u_graphics.u_missile.active;
end

function automatic bit alive_of(input int g, input int i);
  case (g)
    0: return dut.u_graphics.g_row[0].alive[i];
    1: return dut.u_graphics.g_row[1].alive[i];
    default: return dut.u_graphics.g_row[2].alive[i];
  endcase
endfunction

task automatic wait_frames(input int n);
  repeat (n) begin
    @(posedge clk);
    while (!dut.u_graphics.frame_tick) @(posedge clk);
  end
endtask

// ---------------------------------------------------------------- picture check
// Captures the next whole frame and checks it
// against the positions the design held while drawing it.
task automatic check_picture(input string tag);
  int mx, my, sx;
  wait_frames(1);
  blank_nonblack = 0;
  pend = 0;
  cap_en = 1;
  wait_frames(1);
  cap_en = 0;
  mx = dut.u_graphics.u_motion.master_x;
  my = dut.u_graphics.u_motion.master_y;
  sx = dut.u_graphics.u_ship.ship_x;
  bad_alien = 0; bad_ship = 0; bad_bg = 0;
  // alien 0 of each live row: centre of the full-width row 5 of the pattern
  for (int g = 0; g < 3; g++) begin
    if (alive_of(g, 0)) begin
      if (scr[my + 48 * g + 16][mx + 16] != 3'b110) bad_alien++;
      if (scr[my + 48 * g + 1][mx + 1] != 3'b100) bad_bg++;
    end else begin
      if (scr[my + 48 * g + 16][mx + 16] == 3'b110) bad_alien++;
    end
  end
  // ship: tip at row 0, full base at row 15
  if (scr[440][sx + 16] != 3'b010 || scr[455][sx] != 3'b010 || scr[455][sx + 31] != 3'b010) bad_ship++;
  if (scr[440][sx] == 3'b010) bad_ship++;
  check(bad_alien == 0, $sformatf("%s: aliens not drawn as expected", tag));
  check(bad_ship == 0, $sformatf("%s: ship not drawn as expected", tag));
  check(bad_bg == 0, $sformatf("%s: background around aliens", tag));
  // text: top row of 'S' (glyph row 0 = 3C) at x 12..19, y 8..9
  check(scr[8][12] == 3'b111 && scr[9][19] == 3'b111 && scr[8][10] != 3'b111, $sformatf("%s: text", tag));
  check(blank_nonblack == 0, $sformatf("%s: %0d coloured pixels in blanking", tag, blank_nonblack));
endtask

// ---------------------------------------------------------------- steering
task automatic buttons(input logic [2:0] mrl);
  // random motion offsets: the game uses only the buttons
  mouse.send_packet(mrl, 9'($urandom), 9'($urandom));
endtask

task automatic move_ship_to(input int target);
  if (dut.u_graphics.u_ship.ship_x == 10'(target)) return;
  buttons(dut.u_graphics.u_ship.ship_x < 10'(target) ? 3'b010 : 3'b001);
  while (dut.u_graphics.u_ship.ship_x != 10'(target)) @(posedge clk);
  buttons(3'b000);
endtask

// Where the formation's left edge will be after its next step.
function automatic int next_master_x();
  int mx, aw;
  mx = dut.u_graphics.u_motion.master_x;
  aw = 48 * int'(P_N_ALIENS) - 16;
  if (dut.u_graphics.u_motion.moving_right) return (mx + aw >= 640) ? mx : mx + 16;
  else return (mx < 16) ? mx : mx - 16;
endfunction

// Aim at the nearest live alien of the lowest row that still has one, at
// the place it will take after the formation's next step; move the ship
// there, fire just after that step, so the formation stays put while the
// missile flies, and wait for the missile to end. Returns 1 on a hit.
task automatic aim_and_fire(output bit got_hit);
  int g, best, best_d, mx, target, h0, sx;
  got_hit = 0;
  mx = next_master_x();
  g = -1;
  for (int r = 2; r >= 0 && g < 0; r--)
    if (!dut.u_graphics.defeated_g[r]) g = r;
  if (g < 0) return;
  best = -1; best_d = 100000;
  sx = dut.u_graphics.u_ship.ship_x;
  for (int i = 0; i < int'(P_N_ALIENS); i++) begin
    int t;
    t = mx + 48 * i;
    if (alive_of(g, i) && t <= 608 && (t > sx ? t - sx : sx - t) < best_d) begin
      best = i;
      best_d = (t > sx) ? t - sx : sx - t;
    end
  end
  if (best < 0) return;
  target = mx + 48 * best;
  move_ship_to(target);
  @(posedge clk);
  while (!dut.u_graphics.move_step) @(posedge clk);
  @(posedge clk);
  // a step during the move makes the prediction stale: try again
  if (int'(dut.u_graphics.u_motion.master_x) != mx) return;
  h0 = n_hit;
  buttons(3'b100);
  while (!dut.u_graphics.u_missile.active) @(posedge clk);
  buttons(3'b000);
  while (dut.u_graphics.u_missile.active) @(posedge clk);
  repeat (2) @(posedge clk);
  got_hit = (n_hit == h0 + 1);
endtask
