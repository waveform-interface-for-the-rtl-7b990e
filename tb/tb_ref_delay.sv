// Testbench for ref_delay with DELAY = 5: symbols are offered with random gaps in
// in_valid; after each valid symbol the output must be the symbol offered DELAY valid
// symbols before (the testbench keeps the history), and it must not move on gaps.
module tb_ref_delay;
  localparam int unsigned D = 5;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [3:0] in_sym = '0, out_sym;
  int checks = 0, failures = 0;
  logic [3:0] hist[$];
  always #5 clk = ~clk;

  ref_delay #(.W(4), .DELAY(D)) dut (.clk, .rst, .in_valid, .in_sym, .out_sym);

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < int'(D); i++) hist.push_back(4'd0);
    for (int k = 0; k < 300; k++) begin
      logic v;
      logic [3:0] s;
      v = ($urandom_range(2) != 0);
      s = 4'($urandom);
      in_valid <= v; in_sym <= s;
      @(posedge clk);
      if (v) hist.push_back(s);
      @(negedge clk);
      checks++;
      if (out_sym !== hist[hist.size() - D]) begin
        failures++; $display("FAIL step %0d: %0d expected %0d", k, out_sym, hist[hist.size() - D]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
