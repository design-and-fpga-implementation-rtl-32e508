// ps2_tx: host-to-device byte transmitter for a PS/2 port.
//
// The lines are open drain: ps2_clk_out / ps2_dat_out equal to 0 pull the
// line low, 1 releases it, and ps2_clk / ps2_dat are the lines as seen at
// the pins. A transfer starts with the request to send: the host holds the
// clock low for INHIBIT_CYCLES (100 us at 50 MHz), pulls data low as the
// start bit and releases the clock. The device then clocks the frame; on
// each falling edge of its clock the host presents the next bit: eight data
// bits least significant first, odd parity, then releases data as the stop
// bit. On the eleventh falling edge the device holds data low as its
// acknowledge; tx_done then pulses for one clock. The procedure is the
// usual PS/2 one; the clock filter matches ps2_rx.
module ps2_tx #(
  parameter int unsigned INHIBIT_CYCLES = 5000,
  parameter int unsigned FILTER_LEN     = 8
) (
  input  logic       clk,
  input  logic       not_reset,
  input  logic       start,
  input  logic [7:0] tx_byte,
  input  logic       ps2_clk,
  input  logic       ps2_dat,
  output logic       ps2_clk_out,
  output logic       ps2_dat_out,
  output logic       busy,
  output logic       tx_done,
  output logic       ack_ok
);

  typedef enum logic [1:0] {TX_IDLE, TX_INHIBIT, TX_RTS, TX_SEND} tx_state_t;
  localparam int unsigned CW = $clog2(INHIBIT_CYCLES + 1);

  tx_state_t state;
  logic [CW-1:0] cnt;
  logic [9:0]  shreg;   // {stop, parity, d7..d0}
  logic [3:0]  nfall;
  logic [1:0]  clk_sync, dat_sync;
  logic [FILTER_LEN-1:0] hist;
  logic clk_f, clk_f_q;

  always_ff @(posedge clk) begin
    clk_sync <= {clk_sync[0], ps2_clk};
    dat_sync <= {dat_sync[0], ps2_dat};
    if (!not_reset) begin
      hist    <= '1;
      clk_f   <= 1'b1;
      clk_f_q <= 1'b1;
    end else begin
      hist <= {hist[FILTER_LEN-2:0], clk_sync[1]};
      if (&hist) clk_f <= 1'b1;
      else if (~|hist) clk_f <= 1'b0;
      clk_f_q <= clk_f;
    end
  end

  wire fall = clk_f_q & ~clk_f;

  assign busy = (state != TX_IDLE);

  always_ff @(posedge clk) begin
    tx_done <= 1'b0;
    if (!not_reset) begin
      state       <= TX_IDLE;
      cnt         <= '0;
      shreg       <= '1;
      nfall       <= '0;
      ps2_clk_out <= 1'b1;
      ps2_dat_out <= 1'b1;
      ack_ok      <= 1'b0;
    end else begin
      unique case (state)
        TX_IDLE: begin
          ps2_clk_out <= 1'b1;
          ps2_dat_out <= 1'b1;
          if (start) begin
            shreg       <= {1'b1, ~(^tx_byte), tx_byte};
            cnt         <= '0;
            nfall       <= '0;
            ps2_clk_out <= 1'b0;          // inhibit the device
            state       <= TX_INHIBIT;
          end
        end
        TX_INHIBIT: begin
          if (cnt == CW'(INHIBIT_CYCLES - 1)) begin
            ps2_dat_out <= 1'b0;          // start bit
            cnt         <= '0;
            state       <= TX_RTS;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        TX_RTS: begin
          // keep data low a few clocks before releasing the clock line
          if (cnt == CW'(FILTER_LEN)) begin
            ps2_clk_out <= 1'b1;
            state       <= TX_SEND;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        TX_SEND: begin
          if (fall) begin
            nfall <= nfall + 4'd1;
            if (nfall < 4'd10) begin
              ps2_dat_out <= shreg[0];
              shreg       <= {1'b1, shreg[9:1]};
            end else begin
              // eleventh falling edge: the device's acknowledge bit
              ack_ok  <= ~dat_sync[1];
              tx_done <= 1'b1;
              state   <= TX_IDLE;
            end
          end
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

endmodule
