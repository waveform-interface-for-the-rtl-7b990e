// Reference delay: lines the reference symbols up with the DSP output.
//
// The DSP under test has a pipeline latency, so the reference symbol that belongs to a
// DSP output left the cache DELAY samples earlier. This module is a shift register of
// DELAY stages that advances only on a valid sample (`in_valid`), so stalls of the
// waveform cache do not disturb the alignment: `out_sym` is the symbol presented DELAY
// valid samples ago, updated on each valid sample. DELAY = 0 is not allowed.
// The source design only names a delay block between the cache and the demodulator; the
// sample-counted delay and the default of 8 samples are this design's own choices, the
// real value being the latency of the DSP placed in the testbench region.
module ref_delay
  import wfi_pkg::*;
#(
  parameter int unsigned W     = REF_W,
  parameter int unsigned DELAY = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] in_sym,
  output logic [W-1:0] out_sym
);

  logic [W-1:0] line [DELAY];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DELAY); i++) line[i] <= '0;
    end else if (in_valid) begin
      line[0] <= in_sym;
      for (int i = 1; i < int'(DELAY); i++) line[i] <= line[i-1];
    end
  end

  assign out_sym = line[DELAY-1];

endmodule
