// UART receiver, 8 data bits, no parity, one stop bit, LSB first.
//
// The PC reaches the board through a USB-to-UART bridge; this receives its bytes. The
// serial input is synchronised with two flip-flops, a start bit is confirmed at its middle,
// and each data bit is sampled CLKS_PER_BIT clocks after the previous one. `valid` pulses
// for one clock with the byte in `data` once the stop bit has been sampled high; a low
// stop bit drops the byte. The frame format and the default rate (115200 baud from a
// 200 MHz clock) are this design's own choices: the source design only names the UART.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 1736
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  state_e         state;
  logic [1:0]     sync;
  logic [CW-1:0]  cnt;
  logic [2:0]     bit_idx;
  logic [7:0]     shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync    <= 2'b11;
      state   <= S_IDLE;
      cnt     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      valid   <= 1'b0;
      data    <= '0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (!sync[1]) state <= S_START;
        end
        S_START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= sync[1] ? S_IDLE : S_DATA;
          end else cnt <= cnt + 1'b1;
        end
        S_DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {sync[1], shreg[7:1]};
            if (bit_idx == 3'd7) state <= S_STOP;
            bit_idx <= bit_idx + 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        S_STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            state <= S_IDLE;
            if (sync[1]) begin
              valid <= 1'b1;
              data  <= shreg;
            end
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
