// Testbench for results_ram: the inputs change every clock; after a `store` pulse every
// address must read (one clock later) the value the inputs had at the store, even while
// the inputs keep changing.
module tb_results_ram;
  localparam int unsigned N = 256;
  logic clk = 0, rst = 1, store = 0;
  logic [7:0] results_in [N];
  logic [7:0] snap [N];
  logic [7:0] raddr = '0, rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  results_ram #(.N_RESULTS(N)) dut (.*);

  // inputs keep changing, like live counters
  always @(posedge clk) for (int i = 0; i < int'(N); i++) results_in[i] <= 8'($urandom);

  initial begin
    for (int i = 0; i < int'(N); i++) results_in[i] = '0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int round = 0; round < 3; round++) begin
      repeat (5) @(posedge clk);
      store <= 1;
      @(negedge clk);
      for (int i = 0; i < int'(N); i++) snap[i] = results_in[i];
      @(posedge clk); store <= 0;
      for (int i = 0; i < int'(N); i++) begin
        raddr <= 8'(i);
        @(posedge clk); @(negedge clk);
        checks++;
        if (rdata !== snap[i]) begin
          failures++; $display("FAIL round %0d addr %0d: %02x vs %02x", round, i, rdata, snap[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
