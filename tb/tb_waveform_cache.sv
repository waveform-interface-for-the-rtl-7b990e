// Testbench for waveform_cache with a 5 ns memory clock and a 10 ns simulation clock
// (the reference 2:1 ratio). The testbench plays the runtime controller: it loads the
// cache with numbered samples (symbol = sample mod 16) whenever it is empty, and holds
// `run` high once it is full until it reads empty again. Checks: samples reach the DSP
// side in order with their matching symbols; nothing is read before the cache is full
// (every drained batch is exactly DEPTH samples long and gap-free); the DSP is stalled
// between batches; the sustained rate is about 2 samples every 3 simulation clocks.
module tb_waveform_cache;
  import wfi_pkg::*;
  localparam int unsigned DEPTH = 32;
  logic mem_clk = 0, sim_clk = 0, mem_rst = 1, sim_rst = 1;
  always #2.5 mem_clk = ~mem_clk;
  always #5   sim_clk = ~sim_clk;
  logic cache_write_en, run = 0, cache_full, cache_empty;
  logic [SAMPLE_W-1:0] cache_signal_in, dsp_sample;
  logic [REF_W-1:0] cache_reference_in, ref_symbol;
  logic dsp_valid, dsp_stall;
  int checks = 0, failures = 0;
  int next_in = 0, next_out = 0, run_len = 0, n_batches = 0, n_stall = 0;
  int sim_cycles = 0, start_cycle = -1;

  waveform_cache dut (.*);

  // runtime-controller stand-in
  typedef enum {LOAD, RUN} st_e;
  st_e st = LOAD;
  assign cache_write_en     = !mem_rst && (st == LOAD) && !cache_full;
  assign cache_signal_in    = SAMPLE_W'(next_in);
  assign cache_reference_in = REF_W'(next_in);
  always @(posedge mem_clk) if (!mem_rst) begin
    if (cache_write_en) next_in <= next_in + 1;
    case (st)
      LOAD: if (cache_full) begin st <= RUN; run <= 1; end
      RUN:  if (cache_empty) begin st <= LOAD; run <= 0; end
    endcase
  end

  // DSP-side monitor
  always @(posedge sim_clk) if (!sim_rst) begin
    sim_cycles++;
    if (dsp_valid) begin
      if (start_cycle < 0) start_cycle = sim_cycles;
      if (run_len == 0) begin
        // a batch may only start from a completely loaded cache
        checks++;
        if (next_in - next_out != DEPTH) begin
          failures++; $display("FAIL batch started with %0d samples loaded", next_in - next_out);
        end
      end
      checks++;
      if (dsp_sample !== SAMPLE_W'(next_out) || ref_symbol !== REF_W'(next_out)) begin
        failures++;
        $display("FAIL sample %0d: got %0d/%0d", next_out, dsp_sample, ref_symbol);
      end
      next_out++;
      run_len++;
    end else if (run_len != 0) begin
      checks++;
      if (run_len != DEPTH) begin failures++; $display("FAIL batch of %0d", run_len); end
      n_batches++;
      run_len = 0;
    end
    if (dsp_stall) n_stall++;
  end

  initial begin
    real rate;
    repeat (4) @(posedge sim_clk); mem_rst <= 0; sim_rst <= 0;
    wait (next_out >= 32 * 40);
    rate = real'(next_out) / real'(sim_cycles - start_cycle + 1);
    checks++;
    if (rate < 0.55 || rate > 0.70) begin failures++; $display("FAIL rate %f", rate); end
    $display("rate %f samples per simulation clock, %0d batches, %0d stall clocks",
             rate, n_batches, n_stall);
    checks++; if (n_stall == 0) begin failures++; $display("FAIL DSP never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge sim_clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
