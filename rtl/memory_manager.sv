// Memory manager: the single owner of the DDR controller.
//
// DDR memory is split into three circular buffers, one after the other: the signal
// section (SIGNAL_WORDS words of samples), the reference section (REFERENCE_WORDS words
// of symbols) and the result section (RESULT_WORDS words of recorded DSP output). The
// manager serves two kinds of request, one at a time, comms operations first:
//  * comms operations (from the comms controller), a word at a time with a handshake:
//      MM_WRITE_DATA   fills signal then reference section (DATA_LIMIT words):
//                      WAIT_RECEIVE (ready) -> comms_next -> WRITE -> WAIT_WRITE
//      MM_DUMP_DATA    reads the same DATA_LIMIT words back,
//      MM_READ_RESULTS reads the RESULT_WORDS words of the result section:
//                      READ -> WAIT_READ -> WAIT_SEND (ready, rdata valid) -> comms_next
//    `op_done` pulses when the last word has been written ("memory full") or sent.
//  * runtime operations: read the next signal word or reference word for the runtime
//    controller (mem_busy while serving, mem_done with mem_data), and write a recorded
//    word from the recorder (res_valid/res_data, taken with res_pop). Each runtime
//    section has its own wrapping word pointer, which turns it into a circular buffer.
// Every operation ends in WAIT_MEM, which waits for the DDR controller to be ready again.
// A DDR operation is started by holding ddr_start until ddr_ready falls and is complete
// when ddr_ready rises again.
// The comms states and their order follow the source design. Own choices: the runtime
// states, the section layout and default sizes (the 55,552-sample use-case recording:
// 1,736 signal words, 434 reference words, and a result window of the same 1,736 words),
// and checking the last word of a read after it has been sent rather than before.
module memory_manager
  import wfi_pkg::*;
#(
  parameter int unsigned WORD_W          = DDR_WORD_W,
  parameter int unsigned ADDR_W          = DDR_ADDR_W,
  parameter int unsigned SIGNAL_WORDS    = 1736,
  parameter int unsigned REFERENCE_WORDS = 434,
  parameter int unsigned RESULT_WORDS    = 1736
) (
  input  logic              clk,
  input  logic              rst,
  // comms controller
  input  logic              start,
  input  mm_cmd_e           cmd,
  input  logic              comms_next,
  input  logic [WORD_W-1:0] comms_wdata,
  output logic              ready,
  output logic [WORD_W-1:0] rdata,
  output logic              op_done,
  // runtime controller
  input  logic              signal_req,
  input  logic              reference_req,
  output logic              mem_busy,
  output logic              mem_done,
  output logic [WORD_W-1:0] mem_data,
  // recorder
  input  logic              res_valid,
  input  logic [WORD_W-1:0] res_data,
  output logic              res_pop,
  // DDR controller
  output logic              ddr_start,
  output logic              ddr_cmd,
  output logic [ADDR_W-1:0] ddr_addr,
  output logic [WORD_W-1:0] ddr_wdata,
  input  logic              ddr_ready,
  input  logic [WORD_W-1:0] ddr_rdata
);

  localparam int unsigned DATA_LIMIT     = SIGNAL_WORDS + REFERENCE_WORDS;
  localparam int unsigned SIGNAL_BASE    = 0;
  localparam int unsigned REFERENCE_BASE = SIGNAL_WORDS;
  localparam int unsigned RESULT_BASE    = SIGNAL_WORDS + REFERENCE_WORDS;
  localparam int unsigned CW = $clog2(DATA_LIMIT + RESULT_WORDS + 1);

  typedef enum logic [3:0] {
    S_WAIT_MEM, S_IDLE,
    S_WAIT_RECEIVE, S_WRITE, S_WAIT_WRITE,
    S_READ, S_WAIT_READ, S_WAIT_SEND,
    S_RT_READ, S_RT_WAIT_READ, S_RT_WRITE, S_RT_WAIT_WRITE
  } state_e;

  state_e state;

  logic [CW-1:0]     word_count, limit, base;
  logic [CW-1:0]     sig_ptr, ref_ptr, res_ptr;
  logic              rt_is_ref;
  logic [WORD_W-1:0] wbuf;
  logic [CW-1:0]     word_index;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_WAIT_MEM;
      word_count <= '0;
      limit      <= '0;
      base       <= '0;
      sig_ptr    <= '0;
      ref_ptr    <= '0;
      res_ptr    <= '0;
      rt_is_ref  <= 1'b0;
      wbuf       <= '0;
    end else begin
      unique case (state)
        S_WAIT_MEM: if (ddr_ready) state <= S_IDLE;

        S_IDLE: begin
          word_count <= '0;
          if (start) begin
            unique case (cmd)
              MM_WRITE_DATA: begin
                base  <= CW'(SIGNAL_BASE);
                limit <= CW'(DATA_LIMIT);
                state <= S_WAIT_RECEIVE;
              end
              MM_READ_RESULTS: begin
                base  <= CW'(RESULT_BASE);
                limit <= CW'(RESULT_WORDS);
                state <= S_READ;
              end
              default: begin
                base  <= CW'(SIGNAL_BASE);
                limit <= CW'(DATA_LIMIT);
                state <= S_READ;
              end
            endcase
          end else if (signal_req) begin
            rt_is_ref <= 1'b0;
            state     <= S_RT_READ;
          end else if (reference_req) begin
            rt_is_ref <= 1'b1;
            state     <= S_RT_READ;
          end else if (res_valid) begin
            wbuf  <= res_data;
            state <= S_RT_WRITE;
          end
        end

        // ----- comms: write data -----
        S_WAIT_RECEIVE: if (comms_next) begin
          wbuf  <= comms_wdata;
          state <= S_WRITE;
        end
        S_WRITE: if (!ddr_ready) begin
          word_count <= word_count + 1'b1;
          state      <= S_WAIT_WRITE;
        end
        S_WAIT_WRITE: if (ddr_ready) state <= (word_count == limit) ? S_WAIT_MEM : S_WAIT_RECEIVE;

        // ----- comms: read results / dump data -----
        S_READ: if (!ddr_ready) begin
          word_count <= word_count + 1'b1;
          state      <= S_WAIT_READ;
        end
        S_WAIT_READ: if (ddr_ready) state <= S_WAIT_SEND;
        S_WAIT_SEND: if (comms_next) state <= (word_count == limit) ? S_WAIT_MEM : S_READ;

        // ----- runtime: read samples / read symbols -----
        S_RT_READ: if (!ddr_ready) begin
          if (rt_is_ref) ref_ptr <= (ref_ptr == CW'(REFERENCE_WORDS - 1)) ? '0 : ref_ptr + 1'b1;
          else           sig_ptr <= (sig_ptr == CW'(SIGNAL_WORDS - 1)) ? '0 : sig_ptr + 1'b1;
          state <= S_RT_WAIT_READ;
        end
        S_RT_WAIT_READ: if (ddr_ready) state <= S_WAIT_MEM;

        // ----- runtime: write results -----
        S_RT_WRITE: if (!ddr_ready) begin
          res_ptr <= (res_ptr == CW'(RESULT_WORDS - 1)) ? '0 : res_ptr + 1'b1;
          state   <= S_RT_WAIT_WRITE;
        end
        S_RT_WAIT_WRITE: if (ddr_ready) state <= S_WAIT_MEM;

        default: state <= S_WAIT_MEM;
      endcase
    end
  end

  // Word index of the DDR access being started
  always_comb begin
    unique case (state)
      S_RT_READ:  word_index = rt_is_ref ? CW'(REFERENCE_BASE) + ref_ptr : CW'(SIGNAL_BASE) + sig_ptr;
      S_RT_WRITE: word_index = CW'(RESULT_BASE) + res_ptr;
      default:    word_index = base + word_count;
    endcase
  end

  assign ddr_start = (state == S_WRITE) || (state == S_READ) ||
                     (state == S_RT_READ) || (state == S_RT_WRITE);
  assign ddr_cmd   = (state == S_READ) || (state == S_RT_READ);
  assign ddr_addr  = ADDR_W'(word_index) * ADDR_W'(DDR_ADDR_STEP);
  assign ddr_wdata = wbuf;

  assign ready   = (state == S_WAIT_RECEIVE) || (state == S_WAIT_SEND);
  assign rdata   = ddr_rdata;
  assign op_done = ((state == S_WAIT_WRITE) && ddr_ready && (word_count == limit)) ||
                   ((state == S_WAIT_SEND) && comms_next && (word_count == limit));

  assign mem_busy = (state == S_RT_READ) || (state == S_RT_WAIT_READ);
  assign mem_done = (state == S_RT_WAIT_READ) && ddr_ready;
  assign mem_data = ddr_rdata;
  // The recorder word is latched into wbuf on leaving IDLE; release it there.
  assign res_pop  = (state == S_IDLE) && !start && !signal_req && !reference_req && res_valid;

endmodule
