// alien_motion: moves the master coordinate of the alien formation.
//
// Two small state machines run on each step pulse. The horizontal one is
// in state right or left: moving right it adds X_STEP (16) to master_x
// until the formation's right edge, master_x + A_WIDTH, reaches the screen
// width; moving left it subtracts X_STEP until master_x is 0. On reaching an
// edge it only turns round, so the formation stays put for that step. The
// vertical one alternates between up (master_y - Y_STEP) and down
// (master_y + Y_STEP), so the aliens bob by 4 pixels each step. restart
// returns to the start position (X0, Y0), moving right and up. Both the
// step rules and the start position follow the original design; A_WIDTH
// is the width of the formation built here (8 aliens at a 48-pixel pitch).
// The edge tests are written as >= and < X_STEP rather than as equalities,
// which behaves the same when X0 and A_WIDTH are multiples of X_STEP and
// cannot run off the screen when they are not.
// Timing: master_x and master_y change on the clock edge after step.
module alien_motion #(
  parameter int unsigned A_WIDTH  = 368,
  parameter int unsigned X_STEP   = 16,
  parameter int unsigned Y_STEP   = 4,
  parameter int unsigned SCREEN_W = 640,
  parameter int unsigned X0       = 192,
  parameter int unsigned Y0       = 98
) (
  input  logic       clk,
  input  logic       not_reset,
  input  logic       step,
  input  logic       restart,
  output logic [9:0] master_x,
  output logic [9:0] master_y,
  output logic       moving_right,
  output logic       turned
);

  typedef enum logic {H_RIGHT, H_LEFT} h_state_t;
  typedef enum logic {V_UP, V_DOWN} v_state_t;

  h_state_t state;
  v_state_t state_v;

  assign moving_right = (state == H_RIGHT);

  always_ff @(posedge clk) begin
    turned <= 1'b0;
    if (!not_reset || restart) begin
      state    <= H_RIGHT;
      state_v  <= V_UP;
      master_x <= 10'(X0);
      master_y <= 10'(Y0);
    end else if (step) begin
      unique case (state_v)
        V_UP:   begin state_v <= V_DOWN; master_y <= master_y - 10'(Y_STEP); end
        V_DOWN: begin state_v <= V_UP;   master_y <= master_y + 10'(Y_STEP); end
      endcase
      unique case (state)
        H_RIGHT:
          if (11'(master_x) + 11'(A_WIDTH) >= 11'(SCREEN_W)) begin
            state  <= H_LEFT;
            turned <= 1'b1;
          end else begin
            master_x <= master_x + 10'(X_STEP);
          end
        H_LEFT:
          if (master_x < 10'(X_STEP)) begin
            state  <= H_RIGHT;
            turned <= 1'b1;
          end else begin
            master_x <= master_x - 10'(X_STEP);
          end
      endcase
    end
  end

endmodule
