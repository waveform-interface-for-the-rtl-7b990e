// DDR controller: a one-word-at-a-time front end for the Xilinx MIG native user interface.
//
// The rest of the design asks for a DDR operation by raising `start` with `cmd` (0 = write,
// 1 = read), `addr` and, for a write, `wdata`. The controller drives the MIG command, write
// and read paths with the timing MIG demands, returns the read word on `rdata`, and drops
// `ready` while busy. The state machine follows the source design:
//   INIT        wait for init_calib_complete
//   IDLE        ready = 1, wait for start
//   REQ_WRITE   app_en = 1, app_cmd = 000 until app_rdy (command accepted that edge)
//   WRITE_DATA  app_wdf_wren = app_wdf_end = 1 until app_wdf_rdy (data accepted that edge)
//   WAIT_WRITE  wait for app_rdy
//   REQ_READ    app_en = 1, app_cmd = 001 until app_rdy
//   WAIT_READ   wait for app_rd_data_valid, capture app_rd_data
//   FINISH      hold the result until start is dropped, then back to IDLE
// Write data follows the accepted command by one clock, inside MIG's two-clock allowance.
// The MIG outputs are decoded from the state (Moore), so a command is held, unchanged,
// until MIG takes it. Back-to-back writes are not used. app_wdf_mask is tied to "write all
// bytes" (own choice; the source does not use byte masking). One command is in flight at a
// time, so read data cannot return out of order.
module ddr_controller
  import wfi_pkg::*;
#(
  parameter int unsigned WORD_W = DDR_WORD_W,
  parameter int unsigned ADDR_W = DDR_ADDR_W
) (
  input  logic              clk,
  input  logic              rst,
  // user side
  input  logic              start,
  input  logic              cmd,        // 0 = write, 1 = read
  input  logic [ADDR_W-1:0] addr,
  input  logic [WORD_W-1:0] wdata,
  output logic              ready,
  output logic [WORD_W-1:0] rdata,
  // MIG native user interface
  input  logic              init_calib_complete,
  output logic [ADDR_W-1:0] app_addr,
  output logic [2:0]        app_cmd,
  output logic              app_en,
  input  logic              app_rdy,
  output logic [WORD_W-1:0] app_wdf_data,
  output logic              app_wdf_end,
  output logic              app_wdf_wren,
  output logic [WORD_W/8-1:0] app_wdf_mask,
  input  logic              app_wdf_rdy,
  input  logic [WORD_W-1:0] app_rd_data,
  input  logic              app_rd_data_valid
);

  typedef enum logic [2:0] {
    S_INIT, S_IDLE, S_REQ_WRITE, S_WRITE_DATA, S_WAIT_WRITE, S_REQ_READ, S_WAIT_READ, S_FINISH
  } state_e;

  state_e state, state_nx;
  logic [ADDR_W-1:0] addr_q;
  logic [WORD_W-1:0] wdata_q;

  always_comb begin
    state_nx = state;
    unique case (state)
      S_INIT:       if (init_calib_complete) state_nx = S_IDLE;
      S_IDLE:       if (start) state_nx = cmd ? S_REQ_READ : S_REQ_WRITE;
      S_REQ_WRITE:  if (app_rdy) state_nx = S_WRITE_DATA;
      S_WRITE_DATA: if (app_wdf_rdy) state_nx = S_WAIT_WRITE;
      S_WAIT_WRITE: if (app_rdy) state_nx = S_FINISH;
      S_REQ_READ:   if (app_rdy) state_nx = S_WAIT_READ;
      S_WAIT_READ:  if (app_rd_data_valid) state_nx = S_FINISH;
      S_FINISH:     if (!start) state_nx = S_IDLE;
      default:      state_nx = S_INIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_INIT;
      addr_q  <= '0;
      wdata_q <= '0;
      rdata   <= '0;
    end else begin
      state <= state_nx;
      if (state == S_IDLE && start) begin
        addr_q  <= addr;
        wdata_q <= wdata;
      end
      if (state == S_WAIT_READ && app_rd_data_valid) rdata <= app_rd_data;
    end
  end

  assign ready        = (state == S_IDLE);
  assign app_en       = (state == S_REQ_WRITE) || (state == S_REQ_READ);
  assign app_cmd      = (state == S_REQ_READ) ? MIG_CMD_READ : MIG_CMD_WRITE;
  assign app_addr     = addr_q;
  assign app_wdf_data = wdata_q;
  assign app_wdf_wren = (state == S_WRITE_DATA);
  assign app_wdf_end  = (state == S_WRITE_DATA);
  assign app_wdf_mask = '0;

  // MIG rule: a command and its address stay unchanged until app_rdy accepts them
  a_cmd_held: assert property (@(posedge clk) disable iff (rst)
    (app_en && !app_rdy) |=> (app_en && $stable(app_addr) && $stable(app_cmd)));
  // MIG rule: write data stays presented until app_wdf_rdy accepts it
  a_wdf_held: assert property (@(posedge clk) disable iff (rst)
    (app_wdf_wren && !app_wdf_rdy) |=> (app_wdf_wren && $stable(app_wdf_data)));

endmodule
