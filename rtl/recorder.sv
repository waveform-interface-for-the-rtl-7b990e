// Output recorder: captures the DSP output stream into the DDR result section.
//
// On the simulation clock, every valid DSP output (OUT_W bits) is packed into a DDR word,
// first output in the lowest bits. A completed word goes into a small dual-clock FIFO to
// the memory clock region, where it is presented to the memory manager first-word-fall-
// through (res_valid/res_data, removed with res_pop). The manager writes the words to a
// circular result section, so DDR always holds the most recent window of DSP output. If
// the manager falls behind and the FIFO is full, the finished word is dropped and
// `overflow` pulses for one simulation clock; recording carries on with the next word.
// From the source design: a recorder that captures a rolling window of DSP output and
// hands it to the memory manager for DDR. Own choices: output width (one 16-bit sample),
// the packing order, the FIFO depth and the drop-on-overflow policy.
module recorder
  import wfi_pkg::*;
#(
  parameter int unsigned WORD_W     = DDR_WORD_W,
  parameter int unsigned OUT_W      = SAMPLE_W,
  parameter int unsigned FIFO_DEPTH = 4
) (
  // simulation clock region
  input  logic              sim_clk,
  input  logic              sim_rst,
  input  logic              enable,
  input  logic              dsp_out_valid,
  input  logic [OUT_W-1:0]  dsp_out,
  output logic              overflow,
  // memory clock region
  input  logic              mem_clk,
  input  logic              mem_rst,
  output logic              res_valid,
  output logic [WORD_W-1:0] res_data,
  input  logic              res_pop
);

  localparam int unsigned PER_WORD = WORD_W / OUT_W;
  localparam int unsigned PW = $clog2(PER_WORD);

  logic [WORD_W-1:0] pack;
  logic [PW-1:0]     slot;
  logic              push;
  logic [WORD_W-1:0] push_word;
  logic              wr_full, wr_empty_unused, rd_full_unused;
  logic              rd_empty, rd_en, hold_pending;
  logic [WORD_W-1:0] fifo_q;

  // ---------------- packing (simulation clock) ----------------
  always_ff @(posedge sim_clk) begin
    if (sim_rst) begin
      pack      <= '0;
      slot      <= '0;
      push      <= 1'b0;
      push_word <= '0;
      overflow  <= 1'b0;
    end else begin
      push     <= 1'b0;
      overflow <= 1'b0;
      if (enable && dsp_out_valid) begin
        pack[slot*OUT_W +: OUT_W] <= dsp_out;
        slot <= slot + 1'b1;
        if (slot == PW'(PER_WORD - 1)) begin
          push_word <= pack;
          push_word[slot*OUT_W +: OUT_W] <= dsp_out;
          push      <= 1'b1;
        end
      end
      if (push && wr_full) overflow <= 1'b1;
    end
  end

  async_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_word_fifo (
    .wr_clk(sim_clk), .wr_rst(sim_rst), .wr_en(push), .wr_data(push_word),
    .wr_full(wr_full), .wr_empty(wr_empty_unused),
    .rd_clk(mem_clk), .rd_rst(mem_rst), .rd_en(rd_en), .rd_data(fifo_q),
    .rd_empty(rd_empty), .rd_full(rd_full_unused)
  );

  // ---------------- first-word-fall-through (memory clock) ----------------
  assign rd_en = !rd_empty && (!res_valid || res_pop) && !hold_pending;

  always_ff @(posedge mem_clk) begin
    if (mem_rst) begin
      res_valid    <= 1'b0;
      hold_pending <= 1'b0;
    end else begin
      hold_pending <= rd_en;
      if (hold_pending) res_valid <= 1'b1;
      else if (res_pop) res_valid <= 1'b0;
    end
  end

  assign res_data = fifo_q;

  a_pop_valid: assert property (@(posedge mem_clk) disable iff (mem_rst) res_pop |-> res_valid);

endmodule
