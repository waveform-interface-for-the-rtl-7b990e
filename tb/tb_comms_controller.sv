// Testbench for comms_controller. UART bytes are driven straight onto rx_valid/rx_data
// and replies are taken from tx_send/tx_data, with tx_busy modelled as a 12-clock byte
// time. Behind the controller sit the real memory manager (sections shrunk to 4 signal,
// 2 reference and 3 result words), DDR controller and a MIG model; the results memory
// is modelled (byte at address a reads as a ^ 8'h5A, one clock late). Checks:
// set parameters (0x03), reset (0x00) and store results (0x01) pulses; get results
// (0x02); an unknown byte gets no reply; write data (0xD1) with its 0xD0 / 0xDF replies
// and the words landing in DDR; dump data (0xD3) and read results (0xD2) returning the
// DDR words byte by byte, least significant first, paced by the PC's 0xD0; empty
// recorder (0x04) streaming the result section with no 0xD0 from the PC.
module tb_comms_controller;
  import wfi_pkg::*;
  localparam int unsigned SW = 4, RW = 2, XW = 3;
  logic clk = 0, rst = 1;
  always #2.5 clk = ~clk;

  logic rx_valid = 0, tx_send, tx_busy, test_reset, store_results, param_we;
  logic [7:0] rx_data = '0, tx_data, res_addr, res_rdata, param_addr, param_wdata;
  logic mm_start, mm_next, mm_ready, mm_op_done;
  mm_cmd_e mm_cmd;
  logic [DDR_WORD_W-1:0] mm_wdata, mm_rdata, mem_data, ddr_wdata, ddr_rdata;
  logic mem_busy, mem_done, res_pop, ddr_start, ddr_cmd, ddr_ready;
  logic [DDR_ADDR_W-1:0] ddr_addr;
  logic init_calib_complete, app_en, app_rdy, app_wdf_end, app_wdf_wren, app_wdf_rdy, app_rd_data_valid;
  logic [DDR_ADDR_W-1:0] app_addr;
  logic [2:0] app_cmd;
  logic [DDR_WORD_W-1:0] app_wdf_data, app_rd_data;
  logic [DDR_WORD_W/8-1:0] app_wdf_mask;
  int checks = 0, failures = 0;
  int n_reset = 0, n_store = 0, n_pwe = 0;
  logic [7:0] last_pa, last_pv;
  logic [7:0] txq[$];
  int busy_cnt = 0;

  comms_controller dut (.*);
  memory_manager #(.SIGNAL_WORDS(SW), .REFERENCE_WORDS(RW), .RESULT_WORDS(XW)) u_mm (
    .clk, .rst, .start(mm_start), .cmd(mm_cmd), .comms_next(mm_next), .comms_wdata(mm_wdata),
    .ready(mm_ready), .rdata(mm_rdata), .op_done(mm_op_done),
    .signal_req(1'b0), .reference_req(1'b0), .mem_busy, .mem_done, .mem_data,
    .res_valid(1'b0), .res_data('0), .res_pop, .ddr_start, .ddr_cmd, .ddr_addr, .ddr_wdata,
    .ddr_ready, .ddr_rdata);
  ddr_controller u_ddr (.clk, .rst, .start(ddr_start), .cmd(ddr_cmd), .addr(ddr_addr),
    .wdata(ddr_wdata), .ready(ddr_ready), .rdata(ddr_rdata), .*);
  mig_model mig (.*);

  // results memory model and UART transmitter model
  always_ff @(posedge clk) res_rdata <= res_addr ^ 8'h5A;
  assign tx_busy = (busy_cnt != 0);
  always @(posedge clk) begin
    if (tx_send && !tx_busy) begin txq.push_back(tx_data); busy_cnt <= 12; end
    else if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
    if (!rst && test_reset) n_reset <= n_reset + 1;
    if (!rst && store_results) n_store <= n_store + 1;
    if (!rst && param_we) begin n_pwe <= n_pwe + 1; last_pa <= param_addr; last_pv <= param_wdata; end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic send(input logic [7:0] b);
    rx_valid <= 1; rx_data <= b; @(posedge clk); rx_valid <= 0;
    repeat (3) @(posedge clk);
  endtask

  task automatic expect_byte(input logic [7:0] b, input string what);
    int t = 0;
    while (txq.size() == 0 && t < 3000) begin @(posedge clk); t++; end
    if (txq.size() == 0) check(0, {what, ": no reply"});
    else begin
      logic [7:0] g;
      g = txq.pop_front();
      check(g === b, $sformatf("%s: got %02x expected %02x", what, g, b));
    end
  endtask

  function automatic logic [DDR_WORD_W-1:0] rand_word();
    logic [DDR_WORD_W-1:0] w;
    for (int i = 0; i < DDR_WORD_W / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    logic [DDR_WORD_W-1:0] words [SW + RW];
    repeat (5) @(posedge clk); rst <= 0; repeat (30) @(posedge clk);

    send(UART_SET_PARAM); send(8'h21); send(8'hC4);
    check(n_pwe == 1 && last_pa == 8'h21 && last_pv == 8'hC4, $sformatf("set parameters %0d %h %h", n_pwe, last_pa, last_pv));
    send(UART_RESET);
    check(n_reset == 1, $sformatf("reset pulse %0d", n_reset));
    send(UART_STORE_RESULTS);
    check(n_store == 1, "store results pulse");
    send(UART_GET_RESULTS); send(8'h37);
    expect_byte(8'h37 ^ 8'h5A, "get results");
    send(8'h77);
    repeat (100) @(posedge clk);
    check(txq.size() == 0, "unknown byte ignored");

    // write data
    for (int i = 0; i < int'(SW + RW); i++) words[i] = rand_word();
    send(UART_WRITE_DATA);
    expect_byte(UART_ACK, "write data: manager ready");
    for (int i = 0; i < int'(SW + RW); i++) begin
      for (int b = 0; b < 64; b++) send(words[i][b*8 +: 8]);
      expect_byte((i == int'(SW + RW) - 1) ? UART_DONE : UART_ACK, $sformatf("write word %0d reply", i));
    end
    repeat (20) @(posedge clk);
    for (int i = 0; i < int'(SW + RW); i++)
      check(mig.peek_word(longint'(i)) === words[i], $sformatf("DDR word %0d", i));

    // dump data
    send(UART_DUMP_DATA);
    for (int i = 0; i < int'(SW + RW); i++) begin
      for (int b = 0; b < 64; b++) expect_byte(words[i][b*8 +: 8], $sformatf("dump word %0d byte %0d", i, b));
      send(UART_ACK);
    end
    repeat (200) @(posedge clk);
    check(txq.size() == 0, "nothing sent after the last dump word");

    // read results: preload the result section (words 6..8)
    for (int i = 0; i < int'(XW); i++) mig.load_word(longint'(SW + RW + i), rand_word());
    send(UART_READ_RESULTS);
    for (int i = 0; i < int'(XW); i++) begin
      logic [DDR_WORD_W-1:0] w;
      w = mig.peek_word(longint'(SW + RW + i));
      for (int b = 0; b < 64; b++) expect_byte(w[b*8 +: 8], $sformatf("result word %0d byte %0d", i, b));
      send(UART_ACK);
    end
    repeat (200) @(posedge clk);
    check(txq.size() == 0, "nothing sent after the last result word");
    // empty recorder: the same words, streamed without acknowledgements
    send(UART_EMPTY_REC);
    for (int i = 0; i < int'(XW); i++) begin
      logic [DDR_WORD_W-1:0] w;
      w = mig.peek_word(longint'(SW + RW + i));
      for (int b = 0; b < 64; b++) expect_byte(w[b*8 +: 8], $sformatf("recorder word %0d byte %0d", i, b));
    end
    repeat (200) @(posedge clk);
    check(txq.size() == 0, "nothing sent after the last recorder word");
    // the controller is idle again and answers a new command
    send(UART_GET_RESULTS); send(8'h02);
    expect_byte(8'h02 ^ 8'h5A, "get results after read results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
