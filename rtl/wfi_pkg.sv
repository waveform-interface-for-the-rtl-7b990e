// Shared constants and types of the waveform interface.
//
// The waveform interface stores recorded (or externally generated) transmissions in
// external DDR3 memory and replays them, through a small dual-clock cache, into a DSP
// under test. This package holds what several modules agree on: the DDR word size, the
// sample and reference-symbol widths, the UART command codes and the command encodings
// between the comms controller, the memory manager and the DDR controller.
//
// From the source design: 512-bit DDR words, 16-bit dual-polarisation IQ samples, 4-bit
// reference symbols (16-QAM), MIG command codes 000 (write) / 001 (read), the UART codes
// 0x00-0x04 and 0xD0-0xD3, 0xDF. Own choices: the 3-bit memory-manager command values
// for read results / dump data and the 28-bit MIG address width (the KC705 MIG default).
package wfi_pkg;

  // DDR user-interface word and address
  localparam int unsigned DDR_WORD_W = 512;
  localparam int unsigned DDR_ADDR_W = 28;
  // One 512-bit user word spans 8 column addresses (burst of 8 on a 64-bit DQ bus)
  localparam int unsigned DDR_ADDR_STEP = 8;

  // Experimental data format
  localparam int unsigned SAMPLE_W = 16;  // one DP-IQ sample
  localparam int unsigned REF_W    = 4;   // one 16-QAM reference symbol

  // MIG native interface commands
  localparam logic [2:0] MIG_CMD_WRITE = 3'b000;
  localparam logic [2:0] MIG_CMD_READ  = 3'b001;

  // Memory-manager commands issued by the comms controller
  typedef enum logic [2:0] {
    MM_WRITE_DATA   = 3'b000,
    MM_DUMP_DATA    = 3'b001,
    MM_READ_RESULTS = 3'b010
  } mm_cmd_e;

  // UART command and reply bytes
  localparam logic [7:0] UART_RESET         = 8'h00;
  localparam logic [7:0] UART_STORE_RESULTS = 8'h01;
  localparam logic [7:0] UART_GET_RESULTS   = 8'h02;
  localparam logic [7:0] UART_SET_PARAM     = 8'h03;
  localparam logic [7:0] UART_EMPTY_REC     = 8'h04;
  localparam logic [7:0] UART_ACK           = 8'hD0;
  localparam logic [7:0] UART_WRITE_DATA    = 8'hD1;
  localparam logic [7:0] UART_READ_RESULTS  = 8'hD2;
  localparam logic [7:0] UART_DUMP_DATA     = 8'hD3;
  localparam logic [7:0] UART_DONE          = 8'hDF;

endpackage
