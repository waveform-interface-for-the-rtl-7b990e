// Testbench for ddr_controller: random writes and reads through a MIG model that stalls
// app_rdy and app_wdf_rdy at random. Every word read back is compared with a copy kept
// by the testbench; the model's backing store is also checked directly after writes,
// and the read latency (start to ready) is checked to be at least the model's latency.
module tb_ddr_controller;
  import wfi_pkg::*;

  logic clk = 0, rst = 1;
  always #2.5 clk = ~clk;

  logic start = 0, cmd = 0, ready;
  logic [DDR_ADDR_W-1:0] addr = '0;
  logic [DDR_WORD_W-1:0] wdata = '0, rdata;
  logic init_calib_complete, app_en, app_rdy, app_wdf_end, app_wdf_wren, app_wdf_rdy;
  logic app_rd_data_valid;
  logic [DDR_ADDR_W-1:0] app_addr;
  logic [2:0] app_cmd;
  logic [DDR_WORD_W-1:0] app_wdf_data, app_rd_data;
  logic [DDR_WORD_W/8-1:0] app_wdf_mask;

  int checks = 0, failures = 0;
  logic [DDR_WORD_W-1:0] shadow [16];

  ddr_controller dut (.*);
  mig_model #(.READ_LATENCY(10)) mig (.*);

  function automatic logic [DDR_WORD_W-1:0] rand_word();
    logic [DDR_WORD_W-1:0] w;
    for (int i = 0; i < DDR_WORD_W / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  task automatic do_op(input logic is_read, input int idx, input logic [DDR_WORD_W-1:0] d,
                       output int cycles);
    cycles = 0;
    while (!ready) @(posedge clk);
    start <= 1; cmd <= is_read; addr <= DDR_ADDR_W'(idx * 8); wdata <= d;
    @(posedge clk);
    while (ready) @(posedge clk);
    while (!ready) begin
      // drop start once the controller reaches its finish state
      if (dut.state == dut.S_FINISH) start <= 0;
      @(posedge clk);
      cycles++;
    end
  endtask

  initial begin
    int cyc;
    logic [DDR_WORD_W-1:0] w;
    repeat (5) @(posedge clk);
    rst <= 0;
    // after reset the controller must wait for calibration
    @(posedge clk);
    checks++; if (ready) begin failures++; $display("FAIL ready before calibration"); end
    for (int i = 0; i < 16; i++) begin
      w = rand_word();
      shadow[i] = w;
      do_op(1'b0, i, w, cyc);
    end
    repeat (4) @(posedge clk);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (mig.peek_word(longint'(i)) !== shadow[i]) begin
        failures++; $display("FAIL backing store word %0d", i);
      end
    end
    for (int r = 0; r < 40; r++) begin
      int i;
      i = $urandom_range(15);
      if ($urandom_range(2) == 0) begin
        w = rand_word(); shadow[i] = w; do_op(1'b0, i, w, cyc);
      end else begin
        do_op(1'b1, i, '0, cyc);
        checks++;
        if (rdata !== shadow[i]) begin failures++; $display("FAIL read word %0d", i); end
        checks++;
        if (cyc < 10) begin failures++; $display("FAIL read done after %0d cycles", cyc); end
      end
    end
    checks++;
    if (mig.n_cmd_stalls == 0 || mig.n_wdf_stalls == 0) begin
      failures++; $display("FAIL MIG stalls never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
