// ps2_mouse_model: behavioural model of a PS/2 mouse for simulation.
//
// The model drives its own open-drain outputs dev_clk / dev_dat (0 pulls the
// line low); the testbench forms each line as the AND of the model's and the
// host's drive. HALF is half a PS/2 clock period in system clocks.
//  * Host-to-device: when the host has held the clock low and then releases
//    it with data low, the model clocks in ten bits (8 data, parity, stop),
//    sampling on its rising clock edges, drives the acknowledge bit and, for
//    the enable command 0xF4, answers with 0xFA. The received byte, its
//    parity check and the count of commands are kept in last_cmd,
//    cmd_parity_ok and n_cmds.
//  * Device-to-host: send_byte sends one 11-bit frame, send_packet the three
//    bytes of a movement packet. bad_parity flips the parity bit.
module ps2_mouse_model #(
  parameter int unsigned HALF = 40
) (
  input  logic clk,
  input  logic line_clk,
  input  logic line_dat,
  output logic dev_clk,
  output logic dev_dat
);

  logic [7:0] last_cmd;
  logic       cmd_parity_ok;
  int         n_cmds;
  logic       busy;

  initial begin
    dev_clk = 1'b1;
    dev_dat = 1'b1;
    last_cmd = '0;
    cmd_parity_ok = 1'b0;
    n_cmds = 0;
    busy = 1'b0;
  end

  task automatic wait_clks(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic send_byte(input logic [7:0] b, input bit bad_parity = 1'b0);
    logic [10:0] frame;
    wait (!busy);
    busy = 1'b1;
    frame = {1'b1, (~^b) ^ bad_parity, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      dev_dat = frame[i];
      wait_clks(HALF / 2);
      dev_clk = 1'b0;
      wait_clks(HALF);
      dev_clk = 1'b1;
      wait_clks(HALF / 2);
    end
    dev_dat = 1'b1;
    wait_clks(HALF);
    busy = 1'b0;
  endtask

  // buttons = {middle, right, left}
  task automatic send_packet(input logic [2:0] buttons, input logic signed [8:0] dx,
                             input logic signed [8:0] dy);
    send_byte({2'b00, dy[8], dx[8], 1'b1, buttons});
    send_byte(dx[7:0]);
    send_byte(dy[7:0]);
  endtask

  // Host request to send: clock held low, then released with data low.
  initial begin : host_cmd
    int low_cnt;
    logic [9:0] bits;
    low_cnt = 0;
    forever begin
      @(posedge clk);
      if (!line_clk && dev_clk) low_cnt++;
      else if (line_clk && low_cnt > 0) begin
        if (!line_dat && low_cnt > 20) begin
          busy = 1'b1;
          wait_clks(HALF);
          for (int i = 0; i < 10; i++) begin
            dev_clk = 1'b0;
            wait_clks(HALF);
            dev_clk = 1'b1;
            wait_clks(HALF / 2);
            bits[i] = line_dat;
            wait_clks(HALF / 2);
          end
          // acknowledge
          dev_dat = 1'b0;
          wait_clks(HALF / 2);
          dev_clk = 1'b0;
          wait_clks(HALF);
          dev_clk = 1'b1;
          wait_clks(HALF / 2);
          dev_dat = 1'b1;
          last_cmd = bits[7:0];
          cmd_parity_ok = (^bits[8:0]) && bits[9];
          n_cmds++;
          wait_clks(4 * HALF);
          busy = 1'b0;
          if (bits[7:0] == 8'hF4) send_byte(8'hFA);
        end
        low_cnt = 0;
      end
    end
  end

endmodule
