// Dual-clock FIFO with Gray-coded pointers.
//
// Write and read sides run on independent clocks. Each side keeps a binary and a Gray
// pointer one bit wider than the address; the Gray pointer crosses to the other side
// through two flip-flops. `wr_full` (write clock) and `rd_empty` (read clock) are exact
// for their own side and conservative for the other, so the FIFO never overflows or
// underflows. `wr_empty` gives the write side a (late) view of "everything read", and
// `rd_full` the read side a (late) view of "completely written"; the waveform cache uses
// them to load only an empty cache and to start draining only a full one. Read data is
// registered: `rd_data` shows the word taken by the `rd_en` of the previous clock.
// DEPTH must be a power of two. The structure is a standard one chosen for this design;
// the source design only says that the cache FIFOs have their write and read interfaces
// on different clocks.
module async_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 32
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_full,
  output logic             wr_empty,
  input  logic             rd_clk,
  input  logic             rd_rst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_empty,
  output logic             rd_full
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_s1, wgray_s2;   // write pointer in read domain
  logic [AW:0] rgray_s1, rgray_s2;   // read pointer in write domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] rbin_w;
  assign rbin_w   = gray2bin(rgray_s2);
  assign wr_full  = (wbin[AW] != rbin_w[AW]) && (wbin[AW-1:0] == rbin_w[AW-1:0]);
  assign wr_empty = (wbin == rbin_w);

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
    end else begin
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
      if (wr_en && !wr_full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  // ---------------- read side ----------------
  logic [AW:0] wbin_r;
  assign wbin_r   = gray2bin(wgray_s2);
  assign rd_empty = (rbin == wbin_r);
  assign rd_full  = (wbin_r[AW] != rbin[AW]) && (wbin_r[AW-1:0] == rbin[AW-1:0]);

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
      rd_data  <= '0;
    end else begin
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
      if (rd_en && !rd_empty) begin
        rd_data <= mem[rbin[AW-1:0]];
        rbin    <= rbin + 1'b1;
        rgray   <= bin2gray(rbin + 1'b1);
      end
    end
  end

endmodule
