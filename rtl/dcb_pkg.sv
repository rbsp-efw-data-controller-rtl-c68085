// dcb_pkg: constants and types shared by the Data Controller Board FPGA.
// It holds the system clock rate (SCLK = 2^24 Hz, the 16.78 MHz oscillator),
// the linear memory-map bases, the baud-rate divisors and the bundle used by
// every DMA client to ask for a memory access. The clock and map numbers are
// the specification's; the request bundle is this design's own choice.
package dcb_pkg;
  localparam int unsigned SCLK_HZ = 16_777_216;

  // Linear memory map (29-bit byte address)
  localparam logic [28:0] BASE_SRAM   = 29'h000_0000;
  localparam logic [28:0] BASE_EEPROM = 29'h002_0000;
  localparam logic [28:0] BASE_ADC    = 29'h004_0000;
  localparam logic [28:0] BASE_ROM    = 29'h008_0000;
  localparam logic [28:0] BASE_FLASH  = 29'h00C_0000;
  localparam logic [28:0] BASE_SDRAM  = 29'h1000_0000;

  // Clocks per bit at SCLK for the UART rates used on the board
  localparam logic [11:0] DIV_38400  = 12'd437;
  localparam logic [11:0] DIV_57600  = 12'd291;
  localparam logic [11:0] DIV_115200 = 12'd146;
  localparam logic [11:0] DIV_230400 = 12'd73;

  // One memory access requested by a DMA client. size4 = 1 moves a longword
  // (bytes at addr..addr+3, byte 0 in wdata[31:24]), size4 = 0 one byte in wdata[7:0].
  typedef struct packed {
    logic        req;
    logic        we;
    logic        size4;
    logic [28:0] addr;
    logic [31:0] wdata;
  } mem_req_t;

  // Memory response: ack pulses for one cycle when the access is complete.
  typedef struct packed {
    logic        ack;
    logic        err;    // null cycle (no device / SDRAM inactive / protected)
    logic [31:0] rdata;
  } mem_rsp_t;
endpackage
