// Waveform interface, memory mode: replays a stored transmission into a DSP under test.
//
// Two clock regions. The memory region (mem_clk, 200 MHz in the reference system, the
// MIG user clock) holds the UART, the comms controller with its parameter and results
// memories, the memory manager, the DDR controller and the runtime controller. The
// simulation region (sim_clk, free to choose; 100 MHz in the reference system) holds the
// read side of the waveform cache, the reference delay and the recorder. The two meet in
// the dual-clock FIFOs of the waveform cache and of the recorder.
//
// Data path: the PC loads the signal and reference sections of DDR over the UART (0xD1).
// With test_start high, the runtime controller streams DDR words, slices them into 16-bit
// samples and 4-bit symbols and fills the 32-entry cache; the full cache is drained into
// the DSP one sample per sim_clk (dsp_in_valid), the DSP stalling while the next batch
// loads. The DDR sections are circular, so the stored recording repeats endlessly. The
// DSP output comes back on dsp_out/dsp_out_valid and is recorded into the DDR result
// section, readable over the UART (0xD2); the reference stream, delayed by REF_DELAY
// valid samples, goes to the demodulator/analysis on ref_delayed.
//
// Outside this module, and so brought out as ports: the MIG IP with its DDR3 memory
// (native user interface, app_*), the DSP under test (dsp_*), the demodulator and
// analysis blocks (ref_*, test_reset, analysis_results) and the parameter memory's
// contents (params). All resets are synchronous, active high, one per clock region.
// CACHE_DEPTH (a power of two) sets the cache size; the default, one DDR word of samples
// (32), is the size the source design recommends for full throughput.
// The block structure follows the source design; the sizes and any detail named as such
// in the modules' own headers are this design's choices.
module wfi_top
  import wfi_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT    = 1736,
  parameter int unsigned SIGNAL_WORDS    = 1736,
  parameter int unsigned REFERENCE_WORDS = 434,
  parameter int unsigned RESULT_WORDS    = 1736,
  parameter int unsigned REF_DELAY       = 8,
  parameter int unsigned CACHE_DEPTH     = DDR_WORD_W / SAMPLE_W,
  parameter int unsigned N_PARAMS        = 256,
  parameter int unsigned N_RESULTS       = 256
) (
  input  logic                     mem_clk,
  input  logic                     mem_rst,
  input  logic                     sim_clk,
  input  logic                     sim_rst,
  // PC link
  input  logic                     uart_rxd,
  output logic                     uart_txd,
  // test control
  input  logic                     test_start,
  output logic                     test_reset,
  output logic [7:0]               params [N_PARAMS],
  input  logic [7:0]               analysis_results [N_RESULTS],
  // MIG native user interface
  input  logic                     init_calib_complete,
  output logic [DDR_ADDR_W-1:0]    app_addr,
  output logic [2:0]               app_cmd,
  output logic                     app_en,
  input  logic                     app_rdy,
  output logic [DDR_WORD_W-1:0]    app_wdf_data,
  output logic                     app_wdf_end,
  output logic                     app_wdf_wren,
  output logic [DDR_WORD_W/8-1:0]  app_wdf_mask,
  input  logic                     app_wdf_rdy,
  input  logic [DDR_WORD_W-1:0]    app_rd_data,
  input  logic                     app_rd_data_valid,
  // DSP under test (simulation clock)
  output logic                     dsp_in_valid,
  output logic [SAMPLE_W-1:0]      dsp_in_sample,
  output logic                     dsp_stall,
  input  logic                     dsp_out_valid,
  input  logic [SAMPLE_W-1:0]      dsp_out,
  // demodulator / analysis (simulation clock)
  output logic [REF_W-1:0]         ref_delayed,
  output logic                     rec_overflow
);

  // UART
  logic       rx_valid, tx_send, tx_busy;
  logic [7:0] rx_data, tx_data;
  // comms <-> memories
  logic       store_results, param_we;
  logic [7:0] res_addr, res_rdata, param_addr, param_wdata;
  // comms <-> memory manager
  logic                  mm_start, mm_next, mm_ready, mm_op_done;
  mm_cmd_e               mm_cmd;
  logic [DDR_WORD_W-1:0] mm_wdata, mm_rdata;
  // runtime <-> memory manager
  logic                  signal_req, reference_req, mem_busy, mem_done;
  logic [DDR_WORD_W-1:0] mem_data;
  // recorder <-> memory manager
  logic                  res_valid, res_pop;
  logic [DDR_WORD_W-1:0] res_data;
  // memory manager <-> DDR controller
  logic                  ddr_start, ddr_cmd, ddr_ready;
  logic [DDR_ADDR_W-1:0] ddr_addr;
  logic [DDR_WORD_W-1:0] ddr_wdata, ddr_rdata;
  // runtime <-> cache
  logic                  cache_write_en, cache_full, cache_empty, run;
  logic [SAMPLE_W-1:0]   cache_signal_in;
  logic [REF_W-1:0]      cache_reference_in, ref_symbol;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_rx (
    .clk(mem_clk), .rst(mem_rst), .rxd(uart_rxd), .valid(rx_valid), .data(rx_data));

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_tx (
    .clk(mem_clk), .rst(mem_rst), .send(tx_send), .data(tx_data), .busy(tx_busy),
    .txd(uart_txd));

  comms_controller u_comms (
    .clk(mem_clk), .rst(mem_rst),
    .rx_valid, .rx_data, .tx_send, .tx_data, .tx_busy,
    .test_reset, .store_results, .res_addr, .res_rdata,
    .param_we, .param_addr, .param_wdata,
    .mm_start, .mm_cmd, .mm_next, .mm_wdata, .mm_ready, .mm_rdata, .mm_op_done);

  param_ram #(.N_PARAMS(N_PARAMS)) u_params (
    .clk(mem_clk), .rst(mem_rst), .we(param_we),
    .addr(param_addr[$clog2(N_PARAMS)-1:0]), .wdata(param_wdata), .params);

  results_ram #(.N_RESULTS(N_RESULTS)) u_results (
    .clk(mem_clk), .rst(mem_rst), .store(store_results), .results_in(analysis_results),
    .raddr(res_addr[$clog2(N_RESULTS)-1:0]), .rdata(res_rdata));

  memory_manager #(
    .SIGNAL_WORDS(SIGNAL_WORDS), .REFERENCE_WORDS(REFERENCE_WORDS),
    .RESULT_WORDS(RESULT_WORDS)
  ) u_memory_manager (
    .clk(mem_clk), .rst(mem_rst),
    .start(mm_start), .cmd(mm_cmd), .comms_next(mm_next), .comms_wdata(mm_wdata),
    .ready(mm_ready), .rdata(mm_rdata), .op_done(mm_op_done),
    .signal_req, .reference_req, .mem_busy, .mem_done, .mem_data,
    .res_valid, .res_data, .res_pop,
    .ddr_start, .ddr_cmd, .ddr_addr, .ddr_wdata, .ddr_ready, .ddr_rdata);

  ddr_controller u_ddr_controller (
    .clk(mem_clk), .rst(mem_rst),
    .start(ddr_start), .cmd(ddr_cmd), .addr(ddr_addr), .wdata(ddr_wdata),
    .ready(ddr_ready), .rdata(ddr_rdata),
    .init_calib_complete, .app_addr, .app_cmd, .app_en, .app_rdy,
    .app_wdf_data, .app_wdf_end, .app_wdf_wren, .app_wdf_mask, .app_wdf_rdy,
    .app_rd_data, .app_rd_data_valid);

  runtime_control u_runtime_control (
    .clk(mem_clk), .rst(mem_rst), .start(test_start),
    .signal_req, .reference_req, .mem_busy, .mem_done, .mem_data,
    .cache_write_en, .cache_signal_in, .cache_reference_in, .cache_full, .cache_empty, .run);

  waveform_cache #(.DEPTH(CACHE_DEPTH)) u_cache (
    .mem_clk, .mem_rst, .cache_write_en, .cache_signal_in, .cache_reference_in,
    .cache_full, .cache_empty, .run,
    .sim_clk, .sim_rst, .dsp_valid(dsp_in_valid), .dsp_sample(dsp_in_sample),
    .ref_symbol, .dsp_stall);

  ref_delay #(.DELAY(REF_DELAY)) u_ref_delay (
    .clk(sim_clk), .rst(sim_rst), .in_valid(dsp_in_valid), .in_sym(ref_symbol),
    .out_sym(ref_delayed));

  recorder u_recorder (
    .sim_clk, .sim_rst, .enable(1'b1), .dsp_out_valid, .dsp_out, .overflow(rec_overflow),
    .mem_clk, .mem_rst, .res_valid, .res_data, .res_pop);

endmodule
