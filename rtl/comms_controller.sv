// Communications controller: the PC's command interpreter.
//
// Bytes arrive from the UART receiver (rx_valid/rx_data) and replies leave through the
// UART transmitter (tx_send/tx_data, one byte each time tx_busy is low). Commands:
//   0x00            reset: `test_reset` pulses for one clock, restarting the DSP test
//   0x01            store results: `store_results` pulses, snapshotting the results memory
//   0x02 a          get results: replies with the results-memory byte at address a
//   0x03 a v        set parameters: writes v to parameter address a
//   0xD1            write data: asks the memory manager for MM_WRITE_DATA; replies 0xD0
//                   when it is ready; then, per DDR word, takes 64 bytes (least significant
//                   byte first), hands the word over (mm_next) and replies 0xD0 when it is
//                   written, or 0xDF when the manager reports the memory full (mm_op_done)
//   0xD2 / 0xD3     read results / dump data: asks the manager for MM_READ_RESULTS /
//                   MM_DUMP_DATA; per word, sends the 64 bytes (least significant first),
//                   waits for the PC's 0xD0 and asks for the next word (mm_next) until the
//                   manager reports the last one sent (mm_op_done)
//   0x04            empty recorder: streams the recorded result section over the UART,
//                   word 0 first, like 0xD2 but without waiting for the PC's 0xD0
// Any other byte in the idle state is ignored. `mm_start` is held until the manager
// first raises `mm_ready`.
// The command codes and both word handshakes follow the source design. Own choices: byte
// order within a word, ignoring unknown bytes, and serving 0x04 (empty recorder) from the
// DDR result section, since the recorder here writes its window into DDR.
module comms_controller
  import wfi_pkg::*;
#(
  parameter int unsigned WORD_W = DDR_WORD_W
) (
  input  logic              clk,
  input  logic              rst,
  // UART
  input  logic              rx_valid,
  input  logic [7:0]        rx_data,
  output logic              tx_send,
  output logic [7:0]        tx_data,
  input  logic              tx_busy,
  // test control and the two small memories
  output logic              test_reset,
  output logic              store_results,
  output logic [7:0]        res_addr,
  input  logic [7:0]        res_rdata,
  output logic              param_we,
  output logic [7:0]        param_addr,
  output logic [7:0]        param_wdata,
  // memory manager
  output logic              mm_start,
  output mm_cmd_e           mm_cmd,
  output logic              mm_next,
  output logic [WORD_W-1:0] mm_wdata,
  input  logic              mm_ready,
  input  logic [WORD_W-1:0] mm_rdata,
  input  logic              mm_op_done
);

  localparam int unsigned NBYTES = WORD_W / 8;
  localparam int unsigned BW = $clog2(NBYTES);

  typedef enum logic [3:0] {
    C_IDLE, C_GET_ADDR, C_GET_WAIT, C_GET_LATCH, C_SET_ADDR, C_SET_DATA, C_TX,
    C_W_WAIT_MGR, C_W_RECV, C_W_WAIT_WRITE,
    C_R_WAIT_MGR, C_R_SEND, C_R_WAIT_ACK, C_R_NEXT
  } state_e;

  state_e            state, tx_return;
  logic [7:0]        tx_byte;
  logic [WORD_W-1:0] word;
  logic [BW-1:0]     byte_cnt;
  logic              stream;    // 0x04: send the words back to back, no 0xD0 from the PC

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= C_IDLE;
      tx_return     <= C_IDLE;
      tx_byte       <= '0;
      word          <= '0;
      byte_cnt      <= '0;
      stream        <= 1'b0;
      mm_start      <= 1'b0;
      mm_cmd        <= MM_WRITE_DATA;
      mm_next       <= 1'b0;
      test_reset    <= 1'b0;
      store_results <= 1'b0;
      res_addr      <= '0;
      param_we      <= 1'b0;
      param_addr    <= '0;
      param_wdata   <= '0;
      tx_send       <= 1'b0;
      tx_data       <= '0;
    end else begin
      mm_next       <= 1'b0;
      test_reset    <= 1'b0;
      store_results <= 1'b0;
      param_we      <= 1'b0;
      tx_send       <= 1'b0;
      unique case (state)
        C_IDLE: if (rx_valid) begin
          unique case (rx_data)
            UART_RESET:         test_reset <= 1'b1;
            UART_STORE_RESULTS: store_results <= 1'b1;
            UART_GET_RESULTS:   state <= C_GET_ADDR;
            UART_SET_PARAM:     state <= C_SET_ADDR;
            UART_WRITE_DATA: begin
              mm_start <= 1'b1;
              mm_cmd   <= MM_WRITE_DATA;
              state    <= C_W_WAIT_MGR;
            end
            UART_READ_RESULTS, UART_DUMP_DATA: begin
              mm_start <= 1'b1;
              mm_cmd   <= (rx_data == UART_READ_RESULTS) ? MM_READ_RESULTS : MM_DUMP_DATA;
              stream   <= 1'b0;
              state    <= C_R_WAIT_MGR;
            end
            UART_EMPTY_REC: begin
              mm_start <= 1'b1;
              mm_cmd   <= MM_READ_RESULTS;
              stream   <= 1'b1;
              state    <= C_R_WAIT_MGR;
            end
            default: ;
          endcase
        end

        // ----- get results / set parameters -----
        C_GET_ADDR: if (rx_valid) begin
          res_addr <= rx_data;
          state    <= C_GET_WAIT;
        end
        C_GET_WAIT: state <= C_GET_LATCH;   // registered results read
        C_GET_LATCH: begin
          tx_byte   <= res_rdata;
          tx_return <= C_IDLE;
          state     <= C_TX;
        end
        C_SET_ADDR: if (rx_valid) begin
          param_addr <= rx_data;
          state      <= C_SET_DATA;
        end
        C_SET_DATA: if (rx_valid) begin
          param_wdata <= rx_data;
          param_we    <= 1'b1;
          state       <= C_IDLE;
        end

        // ----- send one byte, then continue in tx_return -----
        C_TX: if (!tx_busy && !tx_send) begin
          tx_send <= 1'b1;
          tx_data <= tx_byte;
          state   <= tx_return;
        end

        // ----- write data (0xD1) -----
        C_W_WAIT_MGR: if (mm_ready) begin
          mm_start  <= 1'b0;
          tx_byte   <= UART_ACK;
          tx_return <= C_W_RECV;
          byte_cnt  <= '0;
          state     <= C_TX;
        end
        C_W_RECV: if (rx_valid) begin
          word     <= {rx_data, word[WORD_W-1:8]};
          byte_cnt <= byte_cnt + 1'b1;
          if (byte_cnt == BW'(NBYTES - 1)) begin
            mm_next <= 1'b1;
            state   <= C_W_WAIT_WRITE;
          end
        end
        C_W_WAIT_WRITE: if (!mm_next) begin
          if (mm_op_done) begin
            tx_byte   <= UART_DONE;
            tx_return <= C_IDLE;
            state     <= C_TX;
          end else if (mm_ready) begin
            tx_byte   <= UART_ACK;
            tx_return <= C_W_RECV;
            byte_cnt  <= '0;
            state     <= C_TX;
          end
        end

        // ----- read results (0xD2) / dump data (0xD3) / empty recorder (0x04) -----
        C_R_WAIT_MGR: if (mm_ready && !mm_next) begin
          mm_start <= 1'b0;
          word     <= mm_rdata;
          byte_cnt <= '0;
          state    <= C_R_SEND;
        end
        C_R_SEND: if (!tx_busy && !tx_send) begin
          tx_send  <= 1'b1;
          tx_data  <= word[7:0];
          word     <= word >> 8;
          byte_cnt <= byte_cnt + 1'b1;
          if (byte_cnt == BW'(NBYTES - 1)) begin
            if (stream) begin
              mm_next <= 1'b1;
              state   <= C_R_NEXT;
            end else begin
              state   <= C_R_WAIT_ACK;
            end
          end
        end
        C_R_WAIT_ACK: if (rx_valid && rx_data == UART_ACK) begin
          mm_next <= 1'b1;
          state   <= C_R_NEXT;
        end
        C_R_NEXT: state <= mm_op_done ? C_IDLE : C_R_WAIT_MGR;   // mm_next is high here

        default: state <= C_IDLE;
      endcase
    end
  end

  assign mm_wdata = word;

endmodule
