// Full-size testbench: wfi_top with every parameter at its default (1,736 signal words,
// 434 reference words, i.e. the 55,552-sample recording; 115200 baud from a 200 MHz
// memory clock; 100 MHz simulation clock). The recording is placed in the DDR model
// directly (loading 139 kB over the UART would take seconds of simulated time). The test
// then replays one complete pass of the recording plus one batch past the loop-back
// point, checking every sample and the delayed reference, and checks the rate. It then
// checks the recorder's window in the DDR result section (every one of the 1,736 words,
// no overflow) and finally performs one UART exchange at the real bit rate (set a
// parameter, store and get results).
module tb_wfi_full;
  import wfi_pkg::*;
  localparam int unsigned SW = 1736, RW = 434, XW = 1736, NSAMP = SW * 32, DLY = 8, CPB = 1736;

  logic mem_clk = 0, sim_clk = 0, mem_rst = 1, sim_rst = 1;
  always #2.5 mem_clk = ~mem_clk;
  always #5   sim_clk = ~sim_clk;

  logic uart_rxd = 1, uart_txd, test_start = 0, test_reset;
  logic [7:0] params [256];
  logic [7:0] analysis_results [256];
  logic init_calib_complete, app_en, app_rdy, app_wdf_end, app_wdf_wren, app_wdf_rdy, app_rd_data_valid;
  logic [DDR_ADDR_W-1:0] app_addr;
  logic [2:0] app_cmd;
  logic [DDR_WORD_W-1:0] app_wdf_data, app_rd_data;
  logic [DDR_WORD_W/8-1:0] app_wdf_mask;
  logic dsp_in_valid, dsp_stall, dsp_out_valid, rec_overflow;
  logic [SAMPLE_W-1:0] dsp_in_sample, dsp_out;
  logic [REF_W-1:0] ref_delayed;

  wfi_top dut (.*);
  mig_model mig (.clk(mem_clk), .rst(mem_rst), .*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // the recording, generated from the sample index
  function automatic logic [SAMPLE_W-1:0] samp(input int n);
    logic [31:0] h;
    h = 32'(n) * 32'h9E3779B1;
    return h[31:16];
  endfunction
  function automatic logic [REF_W-1:0] sym(input int n);
    logic [31:0] h;
    h = 32'(n) * 32'h85EBCA6B + 32'h1234;
    return h[27:24];
  endfunction

  // the DSP under test is a plain wire here: its output returns its input
  assign dsp_out_valid = dsp_in_valid;
  assign dsp_out       = dsp_in_sample;

  int n_in = 0, n_stall = 0, n_bad = 0, n_ref_bad = 0, sim_cycles = 0, first_cycle = -1;
  logic prev_valid = 0;
  int n_ovf = 0;
  always @(posedge sim_clk) if (!sim_rst && rec_overflow) n_ovf++;
  always @(posedge sim_clk) if (!sim_rst) begin
    sim_cycles++;
    if (dsp_stall) n_stall++;
    // one clock after a valid sample k the delayed reference is the symbol of k-DLY+1
    if (prev_valid && n_in >= int'(DLY) && ref_delayed !== sym((n_in - int'(DLY)) % NSAMP)) n_ref_bad++;
    prev_valid <= dsp_in_valid;
    if (dsp_in_valid) begin
      if (first_cycle < 0) first_cycle = sim_cycles;
      if (dsp_in_sample !== samp(n_in % NSAMP)) begin
        n_bad++;
        if (n_bad < 5) $display("FAIL sample %0d: %h expected %h", n_in, dsp_in_sample, samp(n_in % NSAMP));
      end
      n_in++;
    end
  end

  // UART at the real bit rate
  logic [7:0] rxq[$];
  task automatic pc_send(input logic [7:0] b);
    uart_rxd <= 0; repeat (CPB) @(posedge mem_clk);
    for (int i = 0; i < 8; i++) begin uart_rxd <= b[i]; repeat (CPB) @(posedge mem_clk); end
    uart_rxd <= 1; repeat (CPB) @(posedge mem_clk);
  endtask
  initial begin : pc_receiver
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (CPB / 2) @(posedge mem_clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge mem_clk); b[i] = uart_txd; end
      repeat (CPB) @(posedge mem_clk);
      if (!mem_rst) rxq.push_back(b);
    end
  end

  initial begin
    real rate;
    for (int i = 0; i < 256; i++) analysis_results[i] = 8'(255 - i);
    // place the recording in DDR: signal words, then reference words
    for (int w = 0; w < int'(SW); w++) begin
      logic [DDR_WORD_W-1:0] d;
      for (int i = 0; i < 32; i++) d[i*16 +: 16] = samp(w * 32 + i);
      mig.load_word(longint'(w), d);
    end
    for (int w = 0; w < int'(RW); w++) begin
      logic [DDR_WORD_W-1:0] d;
      for (int i = 0; i < 128; i++) d[i*4 +: 4] = sym(w * 128 + i);
      mig.load_word(longint'(SW + w), d);
    end
    repeat (5) @(posedge mem_clk); mem_rst <= 0; sim_rst <= 0;
    repeat (40) @(posedge mem_clk);

    test_start <= 1;
    wait (n_in >= int'(NSAMP) + 32);
    rate = real'(n_in) / real'(sim_cycles - first_cycle + 1);
    $display("%0d samples replayed, rate %f per simulation clock, %0d stall clocks", n_in, rate, n_stall);
    check(n_bad == 0, $sformatf("%0d wrong samples", n_bad));
    check(n_ref_bad == 0, $sformatf("%0d misaligned reference symbols", n_ref_bad));
    check(rate > 0.45 && rate < 0.70, $sformatf("throughput %f", rate));
    check(n_stall > 0, "DSP never stalled");
    test_start <= 0;

    // the recorder's window in the DDR result section: word k holds outputs 32k..32k+31
    // (the DSP is a wire, so these are samples of the recording; the one word past the
    // end of the window wraps onto word 0, which then holds the same samples again)
    repeat (400) @(posedge mem_clk);
    check(n_ovf == 0, $sformatf("%0d recorder overflows", n_ovf));
    begin
      int n_words, n_wrong;
      n_words = n_in / 32;
      n_wrong = 0;
      for (int k = 0; k < int'(XW) && k < n_words; k++) begin
        logic [DDR_WORD_W-1:0] w;
        w = mig.peek_word(longint'(SW + RW + k));
        for (int i = 0; i < 32; i++) if (w[i*16 +: 16] !== samp((k * 32 + i) % int'(NSAMP))) n_wrong++;
      end
      check(n_words >= int'(XW), $sformatf("only %0d result words recorded", n_words));
      check(n_wrong == 0, $sformatf("%0d wrong outputs in the recorded window", n_wrong));
    end

    pc_send(UART_SET_PARAM); pc_send(8'h07); pc_send(8'h5C);
    repeat (4) @(posedge mem_clk);
    check(params[7] == 8'h5C, "parameter write at full baud rate");
    pc_send(UART_STORE_RESULTS);
    pc_send(UART_GET_RESULTS); pc_send(8'h10);
    begin
      int t;
      t = 0;
      while (rxq.size() == 0 && t < 40000) begin @(posedge mem_clk); t++; end
      check(rxq.size() == 1 && rxq[0] == 8'(255 - 16), "get results at full baud rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge mem_clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
