// Waveform cache: the small dual-clock buffer between DDR memory and the DSP under test.
//
// Two FIFOs, one for signal samples and one for reference symbols, share their write
// enable and their read enable, so entry k of one always belongs with entry k of the
// other. The write side runs on the memory clock and is filled by the runtime controller
// one sample/symbol per clock; the read side runs on the simulation clock and feeds the
// DSP one sample per clock. The cache works in whole batches: it is loaded only when
// empty, and drained only when full. The read side starts draining when the test is
// running (`run`, synchronised here) and the cache reads full, reads every clock until it
// is empty, and then waits for the next full load; during loading `dsp_valid` is low and
// the DSP is stalled (`dsp_stall`). `dsp_sample`/`ref_symbol` are valid one simulation
// clock after the read, i.e. together with `dsp_valid`.
// From the source design: two FIFOs with shared enables, one entry per sample or symbol,
// a depth matching one 512-bit DDR word of 16-bit samples (32). Own choices: the
// batch-drain rule on the read side and the `run` synchroniser.
module waveform_cache
  import wfi_pkg::*;
#(
  parameter int unsigned S_W   = SAMPLE_W,
  parameter int unsigned R_W   = REF_W,
  parameter int unsigned DEPTH = DDR_WORD_W / SAMPLE_W
) (
  // memory clock region
  input  logic           mem_clk,
  input  logic           mem_rst,
  input  logic           cache_write_en,
  input  logic [S_W-1:0] cache_signal_in,
  input  logic [R_W-1:0] cache_reference_in,
  output logic           cache_full,
  output logic           cache_empty,
  input  logic           run,
  // simulation clock region
  input  logic           sim_clk,
  input  logic           sim_rst,
  output logic           dsp_valid,
  output logic [S_W-1:0] dsp_sample,
  output logic [R_W-1:0] ref_symbol,
  output logic           dsp_stall
);

  logic cache_read_en;
  logic s_rd_empty, s_rd_full, r_rd_empty, r_rd_full;
  logic r_wr_full, r_wr_empty;
  logic [1:0] run_sync;
  logic draining;

  async_fifo #(.WIDTH(S_W), .DEPTH(DEPTH)) u_signal_fifo (
    .wr_clk(mem_clk), .wr_rst(mem_rst), .wr_en(cache_write_en), .wr_data(cache_signal_in),
    .wr_full(cache_full), .wr_empty(cache_empty),
    .rd_clk(sim_clk), .rd_rst(sim_rst), .rd_en(cache_read_en), .rd_data(dsp_sample),
    .rd_empty(s_rd_empty), .rd_full(s_rd_full)
  );

  async_fifo #(.WIDTH(R_W), .DEPTH(DEPTH)) u_reference_fifo (
    .wr_clk(mem_clk), .wr_rst(mem_rst), .wr_en(cache_write_en), .wr_data(cache_reference_in),
    .wr_full(r_wr_full), .wr_empty(r_wr_empty),
    .rd_clk(sim_clk), .rd_rst(sim_rst), .rd_en(cache_read_en), .rd_data(ref_symbol),
    .rd_empty(r_rd_empty), .rd_full(r_rd_full)
  );

  // Both FIFOs see identical enables, so their flags agree; the signal FIFO's are used.
  assign cache_read_en = draining && !s_rd_empty;

  always_ff @(posedge sim_clk) begin
    if (sim_rst) begin
      run_sync  <= '0;
      draining  <= 1'b0;
      dsp_valid <= 1'b0;
    end else begin
      run_sync  <= {run_sync[0], run};
      dsp_valid <= cache_read_en;
      if (!draining && run_sync[1] && s_rd_full) draining <= 1'b1;
      else if (draining && s_rd_empty) draining <= 1'b0;
    end
  end

  assign dsp_stall = run_sync[1] && !dsp_valid;

  a_fifos_agree_wr: assert property (@(posedge mem_clk) disable iff (mem_rst)
    (cache_full == r_wr_full) && (cache_empty == r_wr_empty));
  a_fifos_agree_rd: assert property (@(posedge sim_clk) disable iff (sim_rst)
    (s_rd_empty == r_rd_empty) && (s_rd_full == r_rd_full));
  a_no_overflow: assert property (@(posedge mem_clk) disable iff (mem_rst)
    cache_write_en |-> !cache_full);

endmodule
