// Testbench for recorder: a numbered DSP output stream (with random gaps) on a 10 ns
// simulation clock; the memory side (5 ns) pops words after random delays. Every popped
// word must hold the next 32 outputs, first one in the low bits. A second phase stops
// popping so that the FIFO fills: overflow must pulse, and the words that do arrive
// afterwards must still be whole, consecutive groups of 32.
module tb_recorder;
  import wfi_pkg::*;
  logic sim_clk = 0, mem_clk = 0, sim_rst = 1, mem_rst = 1;
  always #5   sim_clk = ~sim_clk;
  always #2.5 mem_clk = ~mem_clk;
  logic enable = 1, dsp_out_valid = 0, overflow, res_valid, res_pop;
  logic [SAMPLE_W-1:0] dsp_out = '0;
  logic [DDR_WORD_W-1:0] res_data;
  int checks = 0, failures = 0, produced = 0, expect_first = 0, n_overflow = 0, n_words = 0;
  logic popping = 1;

  recorder dut (.*);

  always @(posedge sim_clk) if (!sim_rst) begin
    logic v;
    v = ($urandom_range(3) != 0);
    dsp_out_valid <= v;
    dsp_out       <= SAMPLE_W'(produced);
    if (v) produced++;
    if (overflow) n_overflow++;
  end

  assign res_pop = res_valid && popping && pop_now;
  logic pop_now;
  always @(posedge mem_clk) pop_now <= ($urandom_range(3) == 0);

  always @(posedge mem_clk) if (!mem_rst && res_pop) begin
    int first;
    first = int'(res_data[SAMPLE_W-1:0]);
    checks++;
    if (n_overflow == 0 && first != expect_first) begin
      failures++; $display("FAIL word starts at %0d expected %0d", first, expect_first);
    end
    for (int i = 1; i < 32; i++) begin
      if (res_data[i*SAMPLE_W +: SAMPLE_W] !== SAMPLE_W'(first + i)) begin
        failures++; $display("FAIL word from %0d slot %0d", first, i); break;
      end
    end
    checks++;
    if (first % 32 != 0) begin failures++; $display("FAIL word not aligned: %0d", first); end
    expect_first = first + 32;
    n_words++;
  end

  initial begin
    repeat (4) @(posedge sim_clk); sim_rst <= 0; mem_rst <= 0;
    repeat (3000) @(posedge sim_clk);
    checks++; if (n_words < 40) begin failures++; $display("FAIL only %0d words", n_words); end
    popping = 0;
    repeat (600) @(posedge sim_clk);
    popping = 1;
    repeat (600) @(posedge sim_clk);
    checks++; if (n_overflow == 0) begin failures++; $display("FAIL no overflow seen"); end
    $display("%0d words, %0d overflows", n_words, n_overflow);
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
