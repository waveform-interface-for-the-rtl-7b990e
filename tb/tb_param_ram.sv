// Testbench for param_ram: random writes against a reference array; all 256 entries are
// compared after every write, and reset must clear them.
module tb_param_ram;
  localparam int unsigned N = 256;
  logic clk = 0, rst = 1, we = 0;
  logic [7:0] addr = '0, wdata = '0;
  logic [7:0] params [N];
  logic [7:0] ref_mem [N];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  param_ram #(.N_PARAMS(N)) dut (.*);

  task automatic compare_all(input string what);
    int bad = 0;
    for (int i = 0; i < int'(N); i++) if (params[i] !== ref_mem[i]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d entries differ", what, bad); end
  endtask

  initial begin
    for (int i = 0; i < int'(N); i++) ref_mem[i] = '0;
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    compare_all("after reset");
    for (int k = 0; k < 200; k++) begin
      logic [7:0] a, d;
      a = 8'($urandom); d = 8'($urandom);
      we <= 1; addr <= a; wdata <= d; @(posedge clk);
      we <= 0; ref_mem[a] = d; @(posedge clk);
      compare_all("after write");
    end
    // writes with we low must do nothing
    addr <= 8'h10; wdata <= ~ref_mem[16]; repeat (2) @(posedge clk);
    compare_all("with we low");
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
