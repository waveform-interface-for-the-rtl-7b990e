// Testbench for uart_rx: serialises random bytes at CLKS_PER_BIT = 16 and checks each
// received byte, that exactly one valid pulse appears per frame, and that a frame with
// a low stop bit is dropped.
module tb_uart_rx;
  localparam int unsigned CPB = 16;
  logic clk = 0, rst = 1, rxd = 1, valid;
  logic [7:0] data;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_valid = 0;
  logic [7:0] last;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always @(posedge clk) if (valid) begin n_valid++; last = data; end

  task automatic send_byte(input logic [7:0] b, input logic stop);
    rxd <= 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd <= b[i]; repeat (CPB) @(posedge clk); end
    rxd <= stop; repeat (CPB) @(posedge clk);
    rxd <= 1; repeat (CPB) @(posedge clk);
  endtask

  initial begin
    repeat (4) @(posedge clk); rst <= 0; repeat (4) @(posedge clk);
    for (int k = 0; k < 30; k++) begin
      logic [7:0] b;
      int n0;
      b = 8'($urandom);
      n0 = n_valid;
      send_byte(b, 1'b1);
      checks++;
      if (n_valid != n0 + 1 || last !== b) begin
        failures++; $display("FAIL byte %02x got %02x (%0d pulses)", b, last, n_valid - n0);
      end
    end
    begin
      int n0;
      n0 = n_valid;
      send_byte(8'h5A, 1'b0);
      checks++;
      if (n_valid != n0) begin failures++; $display("FAIL framing error accepted"); end
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
