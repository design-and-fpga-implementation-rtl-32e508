// frame_buffer: the memory unit, a block-RAM frame buffer.
//
// FB_W x FB_H pixels (320x240) of COLOR_W bits (3 bits, eight colours),
// 28,800 bytes in all, with one write port and two read ports, all
// synchronous to clk: a write lands at the clock edge, a read returns the
// word addressed at the previous edge (one clock of latency) and holds it
// while its enable is low. The game scans it through port A as the
// background layer of the picture; port B and the write port are free for
// whatever draws the background. Every word starts as INIT_COLOR. Reading
// and writing one address in the same clock returns the old word. The size
// and the port count follow the original design; what the buffer holds in
// this game is this design's choice.
module frame_buffer #(
  parameter int unsigned FB_W       = 320,
  parameter int unsigned FB_H       = 240,
  parameter int unsigned COLOR_W    = 3,
  parameter logic [COLOR_W-1:0] INIT_COLOR = COLOR_W'(space_shoot_pkg::COL_BG),
  localparam int unsigned DEPTH = FB_W * FB_H,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  logic [COLOR_W-1:0] wdata,
  input  logic               re_a,
  input  logic [AW-1:0]      raddr_a,
  output logic [COLOR_W-1:0] rdata_a,
  input  logic               re_b,
  input  logic [AW-1:0]      raddr_b,
  output logic [COLOR_W-1:0] rdata_b
);

  logic [COLOR_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = INIT_COLOR;
  end

  always_ff @(posedge clk) begin
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re_a) rdata_a <= (raddr_a < AW'(DEPTH)) ? mem[raddr_a] : '0;
  end

  always_ff @(posedge clk) begin
    if (re_b) rdata_b <= (raddr_b < AW'(DEPTH)) ? mem[raddr_b] : '0;
  end

endmodule
