// tb_vga_sync: self-checking test of the 640x480 VGA timing.
// Over two frames it measures, in 50 MHz clocks, the line and frame
// periods, the sync pulse widths and positions, the p_tick rate and the
// visible area, and checks the pixel coordinates against its own counters.
module tb_vga_sync;
  logic clk = 0, not_reset = 0;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0] pixel_x, pixel_y;
  logic hsync, vsync, p_tick, video_on;
  vga_sync dut (.clk, .not_reset, .pixel_x, .pixel_y, .hsync, .vsync, .p_tick, .video_on);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  int cyc, last_hfall, last_vfall, hfall_n, vfall_n, hlow, vlow, vis_in_frame, ticks;
  int ex, ey;
  logic hs_q, vs_q;
  initial begin
    cyc = 0; last_hfall = -1; last_vfall = -1; hfall_n = 0; vfall_n = 0; hlow = 0; vlow = 0;
    vis_in_frame = 0; ticks = 0; ex = 0; ey = 0; hs_q = 1; vs_q = 1;
    repeat (4) @(negedge clk);
    not_reset = 1;
    @(posedge clk);
    while (vfall_n < 3) begin
      @(negedge clk);
      cyc++;
      // reference pixel counter, advanced after each p_tick clock
      if (pixel_x != 10'(ex) || pixel_y != 10'(ey)) check(0, $sformatf("coord %0d,%0d exp %0d,%0d", pixel_x, pixel_y, ex, ey));
      if (video_on != (ex < 640 && ey < 480)) check(0, "video_on");
      if (video_on && p_tick) vis_in_frame++;
      if (p_tick) begin
        ticks++;
        ex = ex + 1;
        if (ex == 800) begin ex = 0; ey = (ey + 1) % 525; end
      end
      if (!hsync) hlow++;
      if (!vsync) vlow++;
      if (hs_q && !hsync) begin
        if (last_hfall >= 0) check(cyc - last_hfall == 1600, $sformatf("line period %0d", cyc - last_hfall));
        last_hfall = cyc; hfall_n++;
      end
      if (!hs_q && hsync) begin check(hlow == 192, $sformatf("hsync width %0d", hlow)); hlow = 0; end
      if (vs_q && !vsync) begin
        if (last_vfall >= 0) begin
          check(cyc - last_vfall == 840000, $sformatf("frame period %0d", cyc - last_vfall));
          check(vis_in_frame == 640 * 480, $sformatf("visible pixels %0d", vis_in_frame));
        end
        vis_in_frame = 0;
        last_vfall = cyc; vfall_n++;
      end
      if (!vs_q && vsync) begin check(vlow == 2 * 1600, $sformatf("vsync width %0d", vlow)); vlow = 0; end
      hs_q = hsync; vs_q = vsync;
    end
    check(ticks * 2 >= cyc - 2 && ticks * 2 <= cyc + 2, "p_tick every second clock");
    check(hfall_n > 1000, "lines counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
