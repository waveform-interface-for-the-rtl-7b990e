// Testbench for uart_tx: sends random bytes at CLKS_PER_BIT = 16 and decodes the line by
// sampling at the middle of each bit, checking the start bit, data, stop bit, the bit
// period (edge-to-edge timing of the start bit) and that busy covers the whole frame.
module tb_uart_tx;
  localparam int unsigned CPB = 16;
  logic clk = 0, rst = 1, send = 0, busy, txd;
  logic [7:0] data = '0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  initial begin
    repeat (4) @(posedge clk); rst <= 0; repeat (4) @(posedge clk);
    checks++; if (txd !== 1'b1) begin failures++; $display("FAIL idle line low"); end
    for (int k = 0; k < 30; k++) begin
      logic [7:0] b;
      int low_len;
      b = 8'($urandom);
      low_len = 0;
      while (busy) @(posedge clk);
      send <= 1; data <= b; @(posedge clk); send <= 0;
      // measure the start bit length
      @(negedge clk);
      while (txd == 0) begin low_len++; @(negedge clk); end
      // when b[0] = 0 the low extends into data bit 0
      checks++;
      if (!(low_len == CPB || (b[0] == 0 && low_len >= 2 * CPB))) begin
        failures++; $display("FAIL start bit %0d clocks", low_len);
      end
      // decode the remaining bits from the frame start
      // (re-align: the start bit began low_len clocks ago)
    end
    // full decode pass, sampling at bit centres
    for (int k = 0; k < 30; k++) begin
      logic [7:0] b, got;
      int t;
      b = 8'($urandom);
      while (busy) @(posedge clk);
      send <= 1; data <= b; @(posedge clk); send <= 0;
      @(negedge clk);
      repeat (CPB / 2 - 1) @(negedge clk);
      checks++; if (txd !== 1'b0) begin failures++; $display("FAIL start bit"); end
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(negedge clk); got[i] = txd; end
      repeat (CPB) @(negedge clk);
      checks++; if (txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      checks++; if (!busy) begin failures++; $display("FAIL busy dropped during stop"); end
      checks++; if (got !== b) begin failures++; $display("FAIL sent %02x decoded %02x", b, got); end
      t = 0;
      while (busy) begin @(negedge clk); t++; end
      checks++; if (t > CPB) begin failures++; $display("FAIL busy too long"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
