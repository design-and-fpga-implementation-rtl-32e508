// vga_sync: 640x480 VGA timing generator.
//
// The 50 MHz clock is divided by two to give p_tick, a one-clock enable
// every second clock (25 MHz pixel rate). The horizontal counter runs over
// the 640 visible pixels, front porch, sync pulse and back porch (800 in
// all), the vertical counter over 480 visible lines and 45 blanking lines
// (525). hsync and vsync are active-low pulses, registered so they are free
// of glitches; video_on is high inside the visible area. pixel_x and
// pixel_y hold each pixel for two clocks and advance at the end of the clock
// in which p_tick is high. A line lasts 32 us with a 25.6 us picture; the
// porch and pulse widths are the usual 640x480 at 60 Hz values.
module vga_sync #(
  parameter int unsigned H_DISPLAY = 640,
  parameter int unsigned H_FRONT   = 16,
  parameter int unsigned H_SYNC    = 96,
  parameter int unsigned H_BACK    = 48,
  parameter int unsigned V_DISPLAY = 480,
  parameter int unsigned V_FRONT   = 10,
  parameter int unsigned V_SYNC    = 2,
  parameter int unsigned V_BACK    = 33
) (
  input  logic       clk,
  input  logic       not_reset,
  output logic [9:0] pixel_x,
  output logic [9:0] pixel_y,
  output logic       hsync,
  output logic       vsync,
  output logic       p_tick,
  output logic       video_on
);

  localparam int unsigned H_TOTAL = H_DISPLAY + H_FRONT + H_SYNC + H_BACK;
  localparam int unsigned V_TOTAL = V_DISPLAY + V_FRONT + V_SYNC + V_BACK;

  logic       phase;
  logic [9:0] h_cnt, v_cnt, h_next, v_next;

  assign p_tick = phase;

  always_comb begin
    h_next = h_cnt;
    v_next = v_cnt;
    if (p_tick) begin
      if (h_cnt == 10'(H_TOTAL - 1)) begin
        h_next = '0;
        v_next = (v_cnt == 10'(V_TOTAL - 1)) ? '0 : v_cnt + 10'd1;
      end else begin
        h_next = h_cnt + 10'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!not_reset) begin
      phase <= 1'b0;
      h_cnt <= '0;
      v_cnt <= '0;
      hsync <= 1'b1;
      vsync <= 1'b1;
    end else begin
      phase <= ~phase;
      h_cnt <= h_next;
      v_cnt <= v_next;
      hsync <= !(h_next >= 10'(H_DISPLAY + H_FRONT) && h_next < 10'(H_DISPLAY + H_FRONT + H_SYNC));
      vsync <= !(v_next >= 10'(V_DISPLAY + V_FRONT) && v_next < 10'(V_DISPLAY + V_FRONT + V_SYNC));
    end
  end

  assign pixel_x  = h_cnt;
  assign pixel_y  = v_cnt;
  assign video_on = (h_cnt < 10'(H_DISPLAY)) && (v_cnt < 10'(V_DISPLAY));

endmodule
