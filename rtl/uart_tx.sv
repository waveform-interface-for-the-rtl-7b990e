// UART transmitter, 8 data bits, no parity, one stop bit, LSB first.
//
// A byte offered on `data` with `send` high is taken when `busy` is low; the line then
// carries a start bit, the eight data bits and a stop bit, each CLKS_PER_BIT clocks long,
// and `busy` stays high until the stop bit has ended. The idle line is high. Frame format
// and default rate (115200 baud from 200 MHz) are this design's own choices: the source
// design only names the UART.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 1736
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       send,
  input  logic [7:0] data,
  output logic       busy,
  output logic       txd
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [8:0]    frame;   // stop, data[7:0]; shifted out LSB first after the start bit
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;

  assign busy = (bits_left != 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      frame     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      txd       <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (send) begin
        frame     <= {1'b1, data};
        bits_left <= 4'd10;
        cnt       <= '0;
        txd       <= 1'b0;
      end
    end else begin
      if (cnt == CW'(CLKS_PER_BIT - 1)) begin
        cnt       <= '0;
        bits_left <= bits_left - 1'b1;
        frame     <= {1'b1, frame[8:1]};
        txd       <= (bits_left == 4'd1) ? 1'b1 : frame[0];
      end else cnt <= cnt + 1'b1;
    end
  end

endmodule
