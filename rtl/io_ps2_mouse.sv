// io_ps2_mouse: PS/2 mouse host interface.
//
// After reset the host sends the enable-data-reporting command (0xF4)
// through ps2_tx and waits for the mouse to answer with 0xFA; mousePresent
// is then set. From then on the mouse streams a three-byte packet each time
// it moves or a button changes. Each byte arrives in its own 11-bit frame
// (ps2_rx). Byte 1 holds the button bits (bit 0 left, bit 1 right, bit 2
// middle), an always-one bit 3, the X and Y sign bits (bits 4 and 5) and
// the overflow bits; bytes 2 and 3 are the low eight bits of the X and Y
// offsets. deltaX and deltaY are the 9-bit two's complement offsets formed
// from the sign bit and those bytes. When the third byte is in, the button
// outputs and offsets are updated together and trigger pulses for one clock.
//
// A frame with a bad start, parity or stop bit, or a first byte whose bit 3
// is clear, drops the packet being collected so the host falls back into
// step. A standard three-byte mouse has no wheel, so deltaZ stays 0.
// The command sequence and the resynchronisation rule are this design's
// choices; the frame and packet formats are the standard PS/2 ones.
module io_ps2_mouse
  import space_shoot_pkg::*;
#(
  parameter int unsigned INHIBIT_CYCLES = 5000,
  parameter int unsigned FILTER_LEN     = 8
) (
  input  logic       clk,
  input  logic       not_reset,
  input  logic       ps2_clk_in,
  input  logic       ps2_dat_in,
  output logic       ps2_clk_out,
  output logic       ps2_dat_out,
  output logic [8:0] deltaX,
  output logic [8:0] deltaY,
  output logic [8:0] deltaZ,
  output logic       leftButton,
  output logic       middleButton,
  output logic       rightButton,
  output logic       mousePresent,
  output logic       trigger
);

  typedef enum logic [1:0] {M_SEND, M_WAIT_TX, M_WAIT_ACK, M_STREAM} mouse_state_t;

  mouse_state_t state;
  logic       tx_start, tx_busy, tx_done, tx_ack_ok;
  logic       rx_en, rx_done, rx_err;
  logic [7:0] rx_byte;
  logic [1:0] byte_idx;
  logic [7:0] b1, b2;

  ps2_tx #(.INHIBIT_CYCLES(INHIBIT_CYCLES), .FILTER_LEN(FILTER_LEN)) u_tx (
    .clk, .not_reset,
    .start      (tx_start),
    .tx_byte    (PS2_CMD_ENABLE),
    .ps2_clk    (ps2_clk_in),
    .ps2_dat    (ps2_dat_in),
    .ps2_clk_out,
    .ps2_dat_out,
    .busy       (tx_busy),
    .tx_done    (tx_done),
    .ack_ok     (tx_ack_ok)
  );

  assign rx_en = (state == M_WAIT_ACK) || (state == M_STREAM);

  ps2_rx #(.FILTER_LEN(FILTER_LEN)) u_rx (
    .clk, .not_reset,
    .en      (rx_en),
    .ps2_clk (ps2_clk_in),
    .ps2_dat (ps2_dat_in),
    .rx_done (rx_done),
    .rx_byte (rx_byte),
    .rx_err  (rx_err)
  );

  assign tx_start = (state == M_SEND);
  assign deltaZ   = '0;

  always_ff @(posedge clk) begin
    trigger <= 1'b0;
    if (!not_reset) begin
      state        <= M_SEND;
      byte_idx     <= '0;
      b1           <= '0;
      b2           <= '0;
      deltaX       <= '0;
      deltaY       <= '0;
      leftButton   <= 1'b0;
      middleButton <= 1'b0;
      rightButton  <= 1'b0;
      mousePresent <= 1'b0;
    end else begin
      unique case (state)
        M_SEND:     state <= M_WAIT_TX;
        M_WAIT_TX:  if (tx_done) state <= tx_ack_ok ? M_WAIT_ACK : M_SEND;
        M_WAIT_ACK: if (rx_done && !rx_err && rx_byte == PS2_ACK) begin
                      mousePresent <= 1'b1;
                      byte_idx     <= '0;
                      state        <= M_STREAM;
                    end
        M_STREAM: if (rx_done) begin
          if (rx_err) begin
            byte_idx <= '0;
          end else begin
            unique case (byte_idx)
              2'd0: if (rx_byte[3]) begin b1 <= rx_byte; byte_idx <= 2'd1; end
              2'd1: begin b2 <= rx_byte; byte_idx <= 2'd2; end
              default: begin
                byte_idx     <= '0;
                leftButton   <= b1[0];
                rightButton  <= b1[1];
                middleButton <= b1[2];
                deltaX       <= {b1[4], b2};
                deltaY       <= {b1[5], rx_byte};
                trigger      <= 1'b1;
              end
            endcase
          end
        end
        default: state <= M_SEND;
      endcase
    end
  end

  // The packet counter never reaches 3.
  a_idx: assert property (@(posedge clk) disable iff (!not_reset) byte_idx != 2'd3);

endmodule
