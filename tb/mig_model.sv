// Behavioural model of the MIG native user interface with the DDR3 memory behind it.
// Testbench use only: it is not synthesizable and does not model DDR timing.
//
// After CALIB_CYCLES clocks it raises init_calib_complete. app_rdy and app_wdf_rdy drop
// at random (about one clock in STALL_ONE_IN) to exercise the hold rules. A write command
// is paired with the next write-data beat, whichever comes first (the data may precede
// the command or follow it). A read returns its word READ_LATENCY clocks after the
// command was accepted, in order. Memory is sparse: one 512-bit word per 8 addresses;
// words never written read as zero. load_word/peek_word give tests backdoor access, and
// the model counts accepted commands and stall clocks.
module mig_model #(
  parameter int unsigned WORD_W       = 512,
  parameter int unsigned ADDR_W       = 28,
  parameter int unsigned CALIB_CYCLES = 20,
  parameter int unsigned READ_LATENCY = 12,
  parameter int unsigned STALL_ONE_IN = 4
) (
  input  logic              clk,
  input  logic              rst,
  output logic              init_calib_complete,
  input  logic [ADDR_W-1:0] app_addr,
  input  logic [2:0]        app_cmd,
  input  logic              app_en,
  output logic              app_rdy,
  input  logic [WORD_W-1:0] app_wdf_data,
  input  logic              app_wdf_end,
  input  logic              app_wdf_wren,
  input  logic [WORD_W/8-1:0] app_wdf_mask,
  output logic              app_wdf_rdy,
  output logic [WORD_W-1:0] app_rd_data,
  output logic              app_rd_data_valid
);

  logic [WORD_W-1:0] mem [longint unsigned];
  longint unsigned   wr_addr_q[$];
  logic [WORD_W-1:0] wr_data_q[$];
  logic [WORD_W-1:0] rd_pipe_data [READ_LATENCY];
  logic              rd_pipe_vld  [READ_LATENCY];
  int unsigned       calib_cnt;
  int unsigned       n_writes, n_reads, n_cmd_stalls, n_wdf_stalls;

  function automatic longint unsigned widx(input logic [ADDR_W-1:0] a);
    return longint'(a) >> 3;
  endfunction

  function automatic void load_word(input longint unsigned idx, input logic [WORD_W-1:0] d);
    mem[idx] = d;
  endfunction

  function automatic logic [WORD_W-1:0] peek_word(input longint unsigned idx);
    if (mem.exists(idx)) return mem[idx];
    return '0;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      calib_cnt           <= 0;
      init_calib_complete <= 1'b0;
      app_rdy             <= 1'b0;
      app_wdf_rdy         <= 1'b0;
      app_rd_data_valid   <= 1'b0;
      app_rd_data         <= '0;
      for (int i = 0; i < int'(READ_LATENCY); i++) rd_pipe_vld[i] <= 1'b0;
      n_writes <= 0; n_reads <= 0; n_cmd_stalls <= 0; n_wdf_stalls <= 0;
    end else begin
      if (calib_cnt < CALIB_CYCLES) calib_cnt <= calib_cnt + 1;
      else init_calib_complete <= 1'b1;
      app_rdy     <= init_calib_complete && ($urandom_range(STALL_ONE_IN - 1) != 0);
      app_wdf_rdy <= init_calib_complete && ($urandom_range(STALL_ONE_IN - 1) != 0);
      if (app_en && !app_rdy) n_cmd_stalls <= n_cmd_stalls + 1;
      if (app_wdf_wren && !app_wdf_rdy) n_wdf_stalls <= n_wdf_stalls + 1;

      // read pipeline
      for (int i = int'(READ_LATENCY) - 1; i > 0; i--) begin
        rd_pipe_vld[i]  <= rd_pipe_vld[i-1];
        rd_pipe_data[i] <= rd_pipe_data[i-1];
      end
      rd_pipe_vld[0] <= 1'b0;
      app_rd_data_valid <= rd_pipe_vld[READ_LATENCY-1];
      app_rd_data       <= rd_pipe_data[READ_LATENCY-1];

      if (app_en && app_rdy) begin
        if (app_cmd == 3'b001) begin
          rd_pipe_vld[0]  <= 1'b1;
          rd_pipe_data[0] <= peek_word(widx(app_addr));
          n_reads <= n_reads + 1;
        end else if (app_cmd == 3'b000) begin
          wr_addr_q.push_back(widx(app_addr));
          n_writes <= n_writes + 1;
        end
      end
      if (app_wdf_wren && app_wdf_rdy) wr_data_q.push_back(app_wdf_data);
    end
  end

  // Pair write commands with write data once both have arrived
  always @(negedge clk) begin
    while (wr_addr_q.size() > 0 && wr_data_q.size() > 0)
      mem[wr_addr_q.pop_front()] = wr_data_q.pop_front();
  end

endmodule
