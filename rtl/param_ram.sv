// Parameter memory: byte-wide settings written from the PC.
//
// The "set parameters" UART command (0x03, address, value) stores one byte at one of
// N_PARAMS addresses. All entries are visible at once on `params`, so the blocks of the
// testbench region can use them as static settings. Writes take effect on the next
// clock; reset clears every entry. An 8-bit address, hence 256 entries, follows the
// one-byte address of the UART command; reset to zero is this design's own choice.
module param_ram #(
  parameter int unsigned N_PARAMS = 256
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        we,
  input  logic [$clog2(N_PARAMS)-1:0] addr,
  input  logic [7:0]                  wdata,
  output logic [7:0]                  params [N_PARAMS]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N_PARAMS); i++) params[i] <= '0;
    end else if (we) begin
      params[addr] <= wdata;
    end
  end

endmodule
