// Testbench for runtime_control. The memory manager is a testbench model that answers a
// signal request with the next word of a numbered sample stream (sample n = n) and a
// reference request with the next word of a symbol stream (symbol n = n ^ n>>5 ^ n>>7,
// low 4 bits), after a random delay, raising mem_busy while it serves. The cache is a model of
// DEPTH = 32 entries: it reads "full" at 32 and, while `run` is high, empties after a
// delay. Checks: every cache write carries sample n with symbol n, in order;
// loading happens only while run is low and stops exactly at full; run rises only with
// a full cache; signal words are requested 4 times as often as reference words.
module tb_runtime_control;
  import wfi_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  always #2.5 clk = ~clk;
  logic signal_req, reference_req, mem_busy, mem_done, cache_write_en, cache_full, cache_empty, run;
  logic [DDR_WORD_W-1:0] mem_data;
  logic [SAMPLE_W-1:0] cache_signal_in;
  logic [REF_W-1:0] cache_reference_in;
  int checks = 0, failures = 0, n_written = 0, n_sig_words = 0, n_ref_words = 0;
  int fill = 0, n_runs = 0;

  // symbol n of the reference stream: not a simple function of n mod 32
  function automatic logic [REF_W-1:0] symbol_of(input int n);
    return REF_W'(n ^ (n >> 5) ^ (n >> 7));
  endfunction

  runtime_control dut (.*);

  // memory manager model
  typedef enum {M_IDLE, M_SERVE, M_DONE} m_e;
  m_e ms = M_IDLE;
  int delay, is_ref;
  always_ff @(posedge clk) begin
    if (rst) ms <= M_IDLE;
    else case (ms)
      M_IDLE: if (signal_req || reference_req) begin
                is_ref <= reference_req ? 1 : 0;
                delay  <= $urandom_range(30, 5);
                ms     <= M_SERVE;
              end
      M_SERVE: if (delay == 0) ms <= M_DONE; else delay <= delay - 1;
      M_DONE:  ms <= M_IDLE;
    endcase
  end
  assign mem_busy = (ms != M_IDLE);
  assign mem_done = (ms == M_DONE);
  always_comb begin
    mem_data = '0;
    if (is_ref == 1)
      for (int i = 0; i < 128; i++) mem_data[i*4 +: 4] = symbol_of(n_ref_words * 128 + i);
    else
      for (int i = 0; i < 32; i++) mem_data[i*16 +: 16] = SAMPLE_W'(n_sig_words * 32 + i);
  end
  always @(posedge clk) if (mem_done) begin
    if (is_ref == 1) n_ref_words++; else n_sig_words++;
  end

  // cache model
  int drain_delay = 0;
  assign cache_full  = (fill == 32);
  assign cache_empty = (fill == 0);
  always @(posedge clk) if (!rst) begin
    if (cache_write_en) begin
      checks++;
      if (cache_signal_in !== SAMPLE_W'(n_written) || cache_reference_in !== symbol_of(n_written)) begin
        failures++;
        $display("FAIL write %0d: sample %0d symbol %0d", n_written, cache_signal_in, cache_reference_in);
      end
      checks++;
      if (run || fill >= 32) begin failures++; $display("FAIL write while running or full"); end
      n_written++;
      fill <= fill + 1;
    end
    if (run && $rose(run)) begin
      n_runs++;
      checks++; if (fill != 32) begin failures++; $display("FAIL run with %0d entries", fill); end
      drain_delay <= $urandom_range(80, 40);
    end else if (run && fill > 0) begin
      if (drain_delay == 0) fill <= 0; else drain_delay <= drain_delay - 1;
    end
  end

  initial begin
    repeat (4) @(posedge clk); rst <= 0; repeat (2) @(posedge clk);
    checks++; if (signal_req || reference_req || cache_write_en) begin
      failures++; $display("FAIL activity before start"); end
    start <= 1;
    wait (n_written >= 32 * 50);
    checks++;
    if (n_sig_words < 4 * (n_ref_words - 1) || n_sig_words > 4 * n_ref_words) begin
      failures++; $display("FAIL %0d signal words vs %0d reference words", n_sig_words, n_ref_words);
    end
    checks++; if (n_runs < 49) begin failures++; $display("FAIL only %0d runs", n_runs); end
    $display("%0d samples, %0d runs, %0d signal words, %0d reference words",
             n_written, n_runs, n_sig_words, n_ref_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
