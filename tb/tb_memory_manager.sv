// Testbench for memory_manager, connected to the real ddr_controller and a MIG model
// that stalls at random. Sections are shrunk to 4 signal, 2 reference and 3 result
// words. Checks, against values computed here:
//  * write data: 6 words go to DDR word addresses 0..5, op_done only with the 6th;
//  * dump data: the 6 words come back in order, op_done only with the last;
//  * runtime reads: signal words cycle 0,1,2,3,0,... and reference words 4,5,4,...
//    (circular buffers), each with mem_busy before mem_done;
//  * recorder writes: 5 words land in result words 6,7,8,6,7 (wrap-around);
//  * read results: returns the result section 6,7,8 in order;
//  * a comms request and a runtime request raised together: comms is served first.
module tb_memory_manager;
  import wfi_pkg::*;
  localparam int unsigned SW = 4, RW = 2, XW = 3;
  logic clk = 0, rst = 1;
  always #2.5 clk = ~clk;

  logic start = 0, comms_next = 0, ready, op_done;
  mm_cmd_e cmd = MM_WRITE_DATA;
  logic [DDR_WORD_W-1:0] comms_wdata = '0, rdata, mem_data, res_data = '0, ddr_wdata, ddr_rdata;
  logic signal_req = 0, reference_req = 0, mem_busy, mem_done, res_valid = 0, res_pop;
  logic ddr_start, ddr_cmd, ddr_ready;
  logic [DDR_ADDR_W-1:0] ddr_addr;
  logic init_calib_complete, app_en, app_rdy, app_wdf_end, app_wdf_wren, app_wdf_rdy, app_rd_data_valid;
  logic [DDR_ADDR_W-1:0] app_addr;
  logic [2:0] app_cmd;
  logic [DDR_WORD_W-1:0] app_wdf_data, app_rd_data;
  logic [DDR_WORD_W/8-1:0] app_wdf_mask;
  int checks = 0, failures = 0;
  logic [DDR_WORD_W-1:0] data_words [SW + RW];
  logic [DDR_WORD_W-1:0] res_words [5];

  memory_manager #(.SIGNAL_WORDS(SW), .REFERENCE_WORDS(RW), .RESULT_WORDS(XW)) dut (.*);
  ddr_controller u_ddr (.clk, .rst, .start(ddr_start), .cmd(ddr_cmd), .addr(ddr_addr),
    .wdata(ddr_wdata), .ready(ddr_ready), .rdata(ddr_rdata), .*);
  mig_model mig (.*);

  function automatic logic [DDR_WORD_W-1:0] rand_word();
    logic [DDR_WORD_W-1:0] w;
    for (int i = 0; i < DDR_WORD_W / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic pulse_next();
    comms_next <= 1; @(posedge clk); comms_next <= 0; @(posedge clk);
  endtask

  task automatic runtime_read(input bit is_ref, output logic [DDR_WORD_W-1:0] w);
    bit saw_busy = 0;
    if (is_ref) reference_req <= 1; else signal_req <= 1;
    @(posedge clk);
    while (!mem_busy) @(posedge clk);
    saw_busy = 1;
    reference_req <= 0; signal_req <= 0;
    while (!mem_done) @(posedge clk);
    w = mem_data;
    @(posedge clk);
  endtask

  initial begin
    logic [DDR_WORD_W-1:0] w;
    bit done_early;
    repeat (5) @(posedge clk); rst <= 0;

    // ---- write data ----
    for (int i = 0; i < int'(SW + RW); i++) data_words[i] = rand_word();
    start <= 1; cmd <= MM_WRITE_DATA;
    done_early = 0;
    for (int i = 0; i < int'(SW + RW); i++) begin
      while (!ready) begin if (op_done) done_early = 1; @(posedge clk); end
      start <= 0;
      comms_wdata <= data_words[i];
      comms_next <= 1; @(posedge clk); comms_next <= 0;
      if (i < int'(SW + RW) - 1) begin
        @(posedge clk);
      end else begin
        int t = 0;
        while (!op_done && t < 500) begin @(posedge clk); t++; end
        check(op_done, "write data: no op_done after the last word");
      end
    end
    check(!done_early, "write data: op_done before the last word");
    repeat (5) @(posedge clk);
    for (int i = 0; i < int'(SW + RW); i++)
      check(mig.peek_word(longint'(i)) === data_words[i], $sformatf("write data word %0d in DDR", i));

    // ---- dump data ----
    start <= 1; cmd <= MM_DUMP_DATA;
    for (int i = 0; i < int'(SW + RW); i++) begin
      while (!ready) @(posedge clk);
      start <= 0;
      check(rdata === data_words[i], $sformatf("dump data word %0d", i));
      comms_next <= 1;
      #0.1;
      check(op_done == (i == int'(SW + RW) - 1), $sformatf("dump op_done at word %0d", i));
      @(posedge clk); comms_next <= 0; @(posedge clk);
    end

    // ---- runtime reads, circular ----
    for (int k = 0; k < 10; k++) begin
      runtime_read(0, w);
      check(w === data_words[k % SW], $sformatf("signal read %0d", k));
    end
    for (int k = 0; k < 5; k++) begin
      runtime_read(1, w);
      check(w === data_words[SW + k % RW], $sformatf("reference read %0d", k));
    end

    // ---- recorder writes, circular ----
    for (int k = 0; k < 5; k++) begin
      res_words[k] = rand_word();
      res_data <= res_words[k]; res_valid <= 1;
      @(posedge clk);
      while (!res_pop) @(posedge clk);
      res_valid <= 0;
      @(posedge clk);
    end
    repeat (60) @(posedge clk);
    check(mig.peek_word(6) === res_words[3], "result word 6 after wrap");
    check(mig.peek_word(7) === res_words[4], "result word 7 after wrap");
    check(mig.peek_word(8) === res_words[2], "result word 8");

    // ---- read results ----
    start <= 1; cmd <= MM_READ_RESULTS;
    for (int i = 0; i < int'(XW); i++) begin
      while (!ready) @(posedge clk);
      start <= 0;
      check(rdata === mig.peek_word(longint'(6 + i)), $sformatf("read results word %0d", i));
      pulse_next();
    end

    // ---- priority: comms before runtime ----
    repeat (10) @(posedge clk);
    @(posedge clk);
    start <= 1; cmd <= MM_DUMP_DATA; signal_req <= 1;
    @(posedge clk);
    while (!ready && !mem_busy) @(posedge clk);
    check(ready && !mem_busy, "comms request served before runtime request");
    start <= 0;
    // finish the dump, then the runtime request is served
    for (int i = 0; i < int'(SW + RW); i++) begin
      while (!ready) @(posedge clk);
      pulse_next();
    end
    while (!mem_done) @(posedge clk);
    signal_req <= 0;
    check(mem_data === data_words[10 % SW], "runtime read after comms operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
