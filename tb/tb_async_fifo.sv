// Testbench for async_fifo: write clock 5 ns, read clock 7 ns, random enables on both
// sides. A queue in the testbench holds every accepted word; each word read must match
// its head. Also checks that full is reached and refuses writes, that empty refuses
// reads, and that wr_empty / rd_full eventually report the settled state.
module tb_async_fifo;
  localparam int unsigned W = 16, D = 8;
  logic wr_clk = 0, rd_clk = 0, wr_rst = 1, rd_rst = 1;
  always #2.5 wr_clk = ~wr_clk;
  always #3.5 rd_clk = ~rd_clk;
  logic wr_en = 0, rd_en = 0, wr_full, wr_empty, rd_empty, rd_full;
  logic [W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0, n_full = 0, n_words = 0;
  logic [W-1:0] q[$];
  logic rd_pending = 0;
  logic wr_phase_on = 1, rd_phase_on = 0;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always @(posedge wr_clk) if (!wr_rst) begin
    if (wr_en && !wr_full) q.push_back(wr_data);
    if (wr_full) n_full++;
    wr_en   <= wr_phase_on && ($urandom_range(3) != 0);
    wr_data <= W'($urandom);
  end

  always @(posedge rd_clk) if (!rd_rst) begin
    if (rd_pending) begin
      checks++;
      if (q.size() == 0 || rd_data !== q[0]) begin
        failures++; $display("FAIL read %h expected %h", rd_data, q.size() ? q[0] : 'x);
      end
      if (q.size()) void'(q.pop_front());
      n_words++;
    end
    rd_pending <= rd_en && !rd_empty;
    rd_en <= rd_phase_on && ($urandom_range(2) != 0);
  end

  initial begin
    repeat (4) @(posedge wr_clk); wr_rst <= 0; rd_rst <= 0;
    // fill until full with no reads
    repeat (60) @(posedge wr_clk);
    checks++; if (!wr_full) begin failures++; $display("FAIL never full"); end
    @(posedge rd_clk);
    checks++; if (!rd_full) begin failures++; $display("FAIL rd_full not seen"); end
    // mixed traffic
    rd_phase_on = 1;
    repeat (2000) @(posedge wr_clk);
    // drain
    wr_phase_on = 0;
    repeat (200) @(posedge rd_clk);
    checks++; if (!rd_empty || q.size() != 0) begin failures++; $display("FAIL not drained"); end
    @(posedge wr_clk);
    checks++; if (!wr_empty) begin failures++; $display("FAIL wr_empty not seen"); end
    checks++; if (n_words < 500) begin failures++; $display("FAIL only %0d words", n_words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wr_clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
