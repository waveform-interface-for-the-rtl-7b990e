// Runtime (testbench) controller: feeds the waveform cache from DDR words.
//
// Two state machines run side by side on the memory clock.
//  * The memory side keeps one 512-bit signal word and one 512-bit reference word with a
//    slice index each. When a word has been used up (index = range) and the memory
//    manager is not busy, it requests the next word (signal first), waits for the manager
//    to take the request (mem_busy) and to deliver it (mem_done), stores it and restarts
//    the index at 0. States: IDLE, REQ_SIGNAL, WAIT_SIGNAL, REQ_REFERENCE, WAIT_REFERENCE.
//  * The cache side, once `start` is high, loads the cache one sample and one symbol per
//    clock while the cache is not full and both words still hold data, moving to
//    WAIT_MEMORY when a word runs out. When the cache is full it enters RUN_SIMULATION and
//    raises `run`, letting the testbench region drain the cache into the DSP; when the
//    cache reads empty again it reloads (LOAD_CACHE if the memory side is idle, otherwise
//    WAIT_MEMORY). Dropping `start` returns it to IDLE.
// With 16-bit samples a word holds SIGNAL_RANGE = 32 samples and, with 4-bit symbols,
// REFERENCE_RANGE = 128 symbols; slice k is bits [k*W +: W] (own choice of bit order).
// The states, their conditions and the index/range names follow the source design; the
// order of the two requests and gating the loads on both words follow this design.
module runtime_control
  import wfi_pkg::*;
#(
  parameter int unsigned WORD_W = DDR_WORD_W,
  parameter int unsigned S_W    = SAMPLE_W,
  parameter int unsigned R_W    = REF_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  // memory manager, runtime port
  output logic              signal_req,
  output logic              reference_req,
  input  logic              mem_busy,
  input  logic              mem_done,
  input  logic [WORD_W-1:0] mem_data,
  // waveform cache, write side
  output logic              cache_write_en,
  output logic [S_W-1:0]    cache_signal_in,
  output logic [R_W-1:0]    cache_reference_in,
  input  logic              cache_full,
  input  logic              cache_empty,
  output logic              run
);

  localparam int unsigned SIGNAL_RANGE    = WORD_W / S_W;
  localparam int unsigned REFERENCE_RANGE = WORD_W / R_W;
  localparam int unsigned SIW = $clog2(SIGNAL_RANGE + 1);
  localparam int unsigned RIW = $clog2(REFERENCE_RANGE + 1);

  typedef enum logic [2:0] {
    M_IDLE, M_REQ_SIGNAL, M_WAIT_SIGNAL, M_REQ_REFERENCE, M_WAIT_REFERENCE
  } mem_state_e;

  typedef enum logic [1:0] {
    C_IDLE, C_WAIT_MEMORY, C_LOAD_CACHE, C_RUN_SIMULATION
  } cache_state_e;

  mem_state_e   mstate;
  cache_state_e cstate;

  logic [WORD_W-1:0] signal_word, reference_word;
  logic [SIW-1:0]    signal_index;
  logic [RIW-1:0]    ref_index;

  logic signal_avail, ref_avail, mem_idle;
  assign signal_avail = (signal_index < SIW'(SIGNAL_RANGE));
  assign ref_avail    = (ref_index < RIW'(REFERENCE_RANGE));
  assign mem_idle     = (mstate == M_IDLE);

  assign signal_req    = (mstate == M_REQ_SIGNAL);
  assign reference_req = (mstate == M_REQ_REFERENCE);

  assign cache_write_en     = (cstate == C_LOAD_CACHE) && signal_avail && ref_avail && !cache_full;
  assign cache_signal_in    = signal_word[signal_index[SIW-2:0]*S_W +: S_W];
  assign cache_reference_in = reference_word[ref_index[RIW-2:0]*R_W +: R_W];
  assign run                = (cstate == C_RUN_SIMULATION);

  // ---------------- memory-side state machine ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      mstate         <= M_IDLE;
      signal_word    <= '0;
      reference_word <= '0;
    end else begin
      unique case (mstate)
        M_IDLE:
          if (start && !mem_busy) begin
            if (!signal_avail)   mstate <= M_REQ_SIGNAL;
            else if (!ref_avail) mstate <= M_REQ_REFERENCE;
          end
        M_REQ_SIGNAL:    if (mem_busy) mstate <= M_WAIT_SIGNAL;
        M_WAIT_SIGNAL:   if (mem_done) begin
                           signal_word <= mem_data;
                           mstate      <= M_IDLE;
                         end
        M_REQ_REFERENCE: if (mem_busy) mstate <= M_WAIT_REFERENCE;
        M_WAIT_REFERENCE: if (mem_done) begin
                           reference_word <= mem_data;
                           mstate         <= M_IDLE;
                         end
        default: mstate <= M_IDLE;
      endcase
    end
  end

  // Slice indices: restarted by a delivered word, advanced by each cache write.
  always_ff @(posedge clk) begin
    if (rst) begin
      signal_index <= SIW'(SIGNAL_RANGE);
      ref_index    <= RIW'(REFERENCE_RANGE);
    end else begin
      if (mstate == M_WAIT_SIGNAL && mem_done) signal_index <= '0;
      else if (cache_write_en)                 signal_index <= signal_index + 1'b1;
      if (mstate == M_WAIT_REFERENCE && mem_done) ref_index <= '0;
      else if (cache_write_en)                    ref_index <= ref_index + 1'b1;
    end
  end

  // ---------------- cache-side state machine ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      cstate <= C_IDLE;
    end else if (!start) begin
      cstate <= C_IDLE;
    end else begin
      unique case (cstate)
        C_IDLE: cstate <= C_WAIT_MEMORY;
        C_WAIT_MEMORY:
          if (cache_full) cstate <= C_RUN_SIMULATION;
          else if (signal_avail && ref_avail && mem_idle) cstate <= C_LOAD_CACHE;
        C_LOAD_CACHE:
          if (cache_full) cstate <= C_RUN_SIMULATION;
          else if (cache_write_en &&
                   ((signal_index == SIW'(SIGNAL_RANGE - 1)) ||
                    (ref_index == RIW'(REFERENCE_RANGE - 1))))
            cstate <= C_WAIT_MEMORY;
        C_RUN_SIMULATION:
          if (cache_empty) cstate <= mem_idle ? C_LOAD_CACHE : C_WAIT_MEMORY;
        default: cstate <= C_IDLE;
      endcase
    end
  end

endmodule
