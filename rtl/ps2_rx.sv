// ps2_rx: receiver for one PS/2 device-to-host frame.
//
// A frame is 11 bits: a start bit (0), eight data bits least significant
// first, an odd parity bit and a stop bit (1). The device drives both lines
// and changes data while the clock is high, so data is sampled on each
// falling edge of the PS/2 clock. That clock is first passed through a
// filter that changes its output only after FILTER_LEN equal samples, to
// reject glitches on the cable; the filter is a choice of this design. After the
// eleventh bit the frame is checked: rx_done pulses for one clock with the
// data byte in rx_byte, and rx_err tells whether start, parity or stop was
// wrong. While en is low the receiver is held idle.
//
// Timing: rx_done comes FILTER_LEN+2 clocks after the eleventh falling edge.
module ps2_rx #(
  parameter int unsigned FILTER_LEN = 8
) (
  input  logic       clk,
  input  logic       not_reset,
  input  logic       en,
  input  logic       ps2_clk,
  input  logic       ps2_dat,
  output logic       rx_done,
  output logic [7:0] rx_byte,
  output logic       rx_err
);

  logic [1:0] clk_sync, dat_sync;
  logic [FILTER_LEN-1:0] hist;
  logic clk_f, clk_f_q;
  logic [3:0]  nbits;
  logic [10:0] shreg;

  always_ff @(posedge clk) begin
    clk_sync <= {clk_sync[0], ps2_clk};
    dat_sync <= {dat_sync[0], ps2_dat};
    if (!not_reset) begin
      hist    <= '1;
      clk_f   <= 1'b1;
      clk_f_q <= 1'b1;
    end else begin
      hist    <= {hist[FILTER_LEN-2:0], clk_sync[1]};
      if (&hist) clk_f <= 1'b1;
      else if (~|hist) clk_f <= 1'b0;
      clk_f_q <= clk_f;
    end
  end

  wire fall = clk_f_q & ~clk_f;

  always_ff @(posedge clk) begin
    rx_done <= 1'b0;
    if (!not_reset || !en) begin
      nbits  <= '0;
      shreg  <= '0;
      rx_byte <= '0;
      rx_err <= 1'b0;
    end else if (fall) begin
      // shift in from the top so the first bit ends at bit 0
      shreg <= {dat_sync[1], shreg[10:1]};
      if (nbits == 4'd10) begin
        nbits   <= '0;
        rx_done <= 1'b1;
        rx_byte <= shreg[9:2];
        // frame: shreg[1] start, shreg[9:2] data, shreg[10] parity, new bit stop
        rx_err  <= shreg[1] | ~dat_sync[1] | ~(^shreg[10:2]);
      end else begin
        nbits <= nbits + 4'd1;
      end
    end
  end

endmodule
