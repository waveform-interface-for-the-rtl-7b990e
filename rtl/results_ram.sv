// Results memory: a snapshot of the test results for the PC to read.
//
// The analysis block presents its counters and timers as N_RESULTS bytes on
// `results_in`. The "store results" UART command (0x01) pulses `store`, which copies the
// whole set into this memory in one clock, so the PC then reads a consistent snapshot
// byte by byte ("get results", 0x02 + address) while the test keeps running. `rdata`
// is the byte at `raddr`, registered (one clock of read latency).
// From the source design: capture on command, read by a one-byte address. Own choices:
// the parallel capture of all bytes and the registered read.
module results_ram #(
  parameter int unsigned N_RESULTS = 256
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         store,
  input  logic [7:0]                   results_in [N_RESULTS],
  input  logic [$clog2(N_RESULTS)-1:0] raddr,
  output logic [7:0]                   rdata
);

  logic [7:0] mem [N_RESULTS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N_RESULTS); i++) mem[i] <= '0;
      rdata <= '0;
    end else begin
      if (store) mem <= results_in;
      rdata <= mem[raddr];
    end
  end

endmodule
