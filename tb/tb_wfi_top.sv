// End-to-end testbench for wfi_top at reduced size: 8 clocks per UART bit, 4 signal
// words (128 samples), 1 reference word (128 symbols), 3 result words, reference delay
// 3. Memory clock 5 ns, simulation clock 10 ns (the reference 2:1 ratio). The PC is
// modelled by a UART driver and a UART decoder, the MIG by mig_model, and the DSP under
// test by a 3-sample pipeline that returns its input. The test:
//   1. sets a parameter (0x03) and checks the parameter output;
//   2. loads the recording over the UART (0xD1) and checks the 0xD0 / 0xDF replies and
//      the DDR contents; dumps it back (0xD3) and compares every byte;
//   3. runs the DSP test for several passes of the recording: every sample reaching the
//      DSP must be the next one of the circular recording, the delayed reference must
//      be the symbol of the sample the DSP is emitting, and the rate must be close to
//      the cache's 2-samples-per-3-clocks bound;
//   4. stops the test and reads the recorded window (0xD2): every result word must be
//      32 consecutive DSP outputs;
//   5. empties the recorder (0x04): the same window streamed with no acknowledgements;
//   6. stores and reads back results (0x01, 0x02) and issues a reset (0x00).
// It counts how often each mechanism happened (DSP stall, cache batch, loop-back of the
// circular buffer, MIG command and write-data stalls, result-buffer wrap, each UART
// command) and counts a failure for any that never happened.
module tb_wfi_top;
  import wfi_pkg::*;
  localparam int unsigned CPB = 8, SW = 4, RW = 1, XW = 3, DLY = 3;
  localparam int unsigned NSAMP = SW * 32;

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

  wfi_top #(.CLKS_PER_BIT(CPB), .SIGNAL_WORDS(SW), .REFERENCE_WORDS(RW), .RESULT_WORDS(XW),
            .REF_DELAY(DLY)) dut (.*);

  mig_model mig (.clk(mem_clk), .rst(mem_rst), .*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- recording: samples and symbols ----------------
  logic [SAMPLE_W-1:0] samp [NSAMP];
  logic [REF_W-1:0]    sym  [NSAMP];
  logic [DDR_WORD_W-1:0] words [SW + RW];
  initial begin
    for (int n = 0; n < int'(NSAMP); n++) begin
      samp[n] = SAMPLE_W'($urandom);
      sym[n]  = REF_W'($urandom);
    end
    for (int w = 0; w < int'(SW); w++)
      for (int i = 0; i < 32; i++) words[w][i*16 +: 16] = samp[w*32 + i];
    for (int i = 0; i < 128; i++) words[SW][i*4 +: 4] = sym[i];
    for (int i = 0; i < 256; i++) analysis_results[i] = 8'(i) ^ 8'h33;
  end

  // ---------------- PC side of the UART ----------------
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
  task automatic pc_expect(input logic [7:0] b, input string what);
    int t = 0;
    while (rxq.size() == 0 && t < 20000) begin @(posedge mem_clk); t++; end
    if (rxq.size() == 0) check(0, {what, ": no reply"});
    else begin
      logic [7:0] g;
      g = rxq.pop_front();
      check(g === b, $sformatf("%s: got %02x expected %02x", what, g, b));
    end
  endtask

  // ---------------- DSP model: DLY-sample pipeline returning its input ----------------
  logic [SAMPLE_W-1:0] pipe [DLY];
  int n_in = 0, dsp_fill = 0;
  always @(posedge sim_clk) begin
    dsp_out_valid <= 1'b0;
    if (!sim_rst && dsp_in_valid) begin
      pipe[0] <= dsp_in_sample;
      for (int i = 1; i < int'(DLY); i++) pipe[i] <= pipe[i-1];
      dsp_out_valid <= (dsp_fill >= int'(DLY));
      dsp_out       <= pipe[DLY-1];
      dsp_fill      <= dsp_fill + 1;
    end
  end

  // ---------------- monitors and mechanism counters ----------------
  int n_stall = 0, n_batch = 0, n_loop = 0, n_out = 0, sim_cycles = 0, first_cycle = -1;
  int n_reset = 0, n_ref_bad = 0;
  logic [SAMPLE_W-1:0] outs[$];
  logic prev_valid = 0;
  always @(posedge sim_clk) if (!sim_rst) begin
    sim_cycles++;
    if (dsp_stall) n_stall++;
    // one clock after a valid sample k the delayed reference is the symbol of k-DLY+1
    if (prev_valid && n_in >= int'(DLY)) begin
      checks++;
      if (ref_delayed !== sym[(n_in - int'(DLY)) % NSAMP]) n_ref_bad++;
    end
    if (dsp_in_valid && !prev_valid) n_batch++;
    prev_valid <= dsp_in_valid;
    if (dsp_in_valid) begin
      if (first_cycle < 0) first_cycle = sim_cycles;
      checks++;
      if (dsp_in_sample !== samp[n_in % NSAMP]) begin
        failures++; $display("FAIL DSP input %0d: %h expected %h", n_in, dsp_in_sample, samp[n_in % NSAMP]);
      end
      if (n_in % NSAMP == 0 && n_in != 0) n_loop++;
      n_in++;
    end
    if (dsp_out_valid) begin
      outs.push_back(dsp_out);
      n_out++;
    end
  end
  always @(posedge mem_clk) if (!mem_rst && test_reset) n_reset++;

  initial begin
    real rate;
    int n_res_wrap;
    repeat (5) @(posedge mem_clk); mem_rst <= 0; sim_rst <= 0;
    repeat (40) @(posedge mem_clk);

    // 1. parameters
    pc_send(UART_SET_PARAM); pc_send(8'h05); pc_send(8'hAB);
    repeat (4) @(posedge mem_clk);
    check(params[5] == 8'hAB, "parameter 5 written");

    // 2. load and verify the recording
    pc_send(UART_WRITE_DATA);
    pc_expect(UART_ACK, "write data start");
    for (int w = 0; w < int'(SW + RW); w++) begin
      for (int b = 0; b < 64; b++) pc_send(words[w][b*8 +: 8]);
      pc_expect((w == int'(SW + RW) - 1) ? UART_DONE : UART_ACK, $sformatf("write word %0d", w));
    end
    repeat (20) @(posedge mem_clk);
    for (int w = 0; w < int'(SW + RW); w++)
      check(mig.peek_word(longint'(w)) === words[w], $sformatf("DDR word %0d", w));
    pc_send(UART_DUMP_DATA);
    for (int w = 0; w < int'(SW + RW); w++) begin
      for (int b = 0; b < 64; b++) pc_expect(words[w][b*8 +: 8], $sformatf("dump word %0d byte %0d", w, b));
      pc_send(UART_ACK);
    end

    // 3. run the test for several passes of the recording
    test_start <= 1;
    wait (n_in >= int'(NSAMP) * 6);
    rate = real'(n_in) / real'(sim_cycles - first_cycle + 1);
    $display("rate %f samples per simulation clock over %0d samples", rate, n_in);
    check(rate > 0.45 && rate < 0.70, $sformatf("throughput %f", rate));
    check(n_ref_bad == 0, $sformatf("%0d misaligned reference symbols", n_ref_bad));
    test_start <= 0;
    repeat (400) @(posedge mem_clk);

    // 4. read back the recorded window
    n_res_wrap = (n_out / 32) / int'(XW);
    pc_send(UART_READ_RESULTS);
    for (int w = 0; w < int'(XW); w++) begin
      logic [DDR_WORD_W-1:0] got;
      int first, j;
      for (int b = 0; b < 64; b++) begin
        int t;
        t = 0;
        while (rxq.size() == 0 && t < 20000) begin @(posedge mem_clk); t++; end
        got[b*8 +: 8] = rxq.size() ? rxq.pop_front() : 8'h00;
      end
      pc_send(UART_ACK);
      // find the 32-output group this word holds; its index must map to this slot
      j = -1;
      for (int g = w; g * 32 + 31 < outs.size(); g += int'(XW)) begin
        bit same;
        same = 1;
        for (int i = 0; i < 32; i++) if (got[i*16 +: 16] !== outs[g*32 + i]) same = 0;
        if (same) j = g;
      end
      check(j >= 0, $sformatf("result word %0d is a group of DSP outputs", w));
      check(got === mig.peek_word(longint'(SW + RW + w)), $sformatf("result word %0d matches DDR", w));
    end

    // 5. empty recorder: the result section again, streamed without 0xD0 from the PC
    repeat (50) @(posedge mem_clk);
    pc_send(UART_EMPTY_REC);
    for (int w = 0; w < int'(XW); w++) begin
      logic [DDR_WORD_W-1:0] exp_w;
      exp_w = mig.peek_word(longint'(SW + RW + w));
      for (int b = 0; b < 64; b++) pc_expect(exp_w[b*8 +: 8], $sformatf("recorder word %0d byte %0d", w, b));
    end

    // 6. results memory and reset
    pc_send(UART_STORE_RESULTS);
    pc_send(UART_GET_RESULTS); pc_send(8'h42);
    pc_expect(8'h42 ^ 8'h33, "get results");
    pc_send(UART_RESET);
    repeat (4) @(posedge mem_clk);

    // mechanisms
    $display("stalls %0d, batches %0d, loop-backs %0d, MIG cmd stalls %0d, MIG wdf stalls %0d, result wraps %0d, resets %0d",
             n_stall, n_batch, n_loop, mig.n_cmd_stalls, mig.n_wdf_stalls, n_res_wrap, n_reset);
    check(n_stall > 0, "DSP stall never happened");
    check(n_batch > 1, "cache reload never happened");
    check(n_loop > 0, "circular-buffer loop-back never happened");
    check(mig.n_cmd_stalls > 0, "MIG command stall never happened");
    check(mig.n_wdf_stalls > 0, "MIG write-data stall never happened");
    check(n_res_wrap > 0, "result buffer never wrapped");
    check(n_reset == 1, "reset command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge mem_clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
