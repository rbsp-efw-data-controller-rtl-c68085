// cpu_mem_map: translates a Z80 memory address into the DCB's 29-bit linear
// memory map and decodes the chip selects (combinational).
//   CPU 0x0000-0x7FFF : boot ROM while ROMON = 1, otherwise SRAM
//   CPU 0x8000-0xDFFF : SRAM (same linear address)
//   CPU 0xE000-0xEFFF : page 0 window, linear {PgReg0[16:0], addr[11:0]}
//   CPU 0xF000-0xFFFF : page 1 window, linear {PgReg1[16:0], addr[11:0]}
// Linear map: 0x0000000 SRAM 128K, 0x0020000 EEPROM 128K, 0x0040000 ADC data
// (aliased, byte 0 low / byte 1 high), 0x0080000 ROM 32K (aliased),
// 0x00C0000 FLASH CPU mode, 0x0100000-0xFFFFFFF unused, bit 28 set: SDRAM.
// Unused areas and SDRAM while not active give a null cycle (no chip select).
// The low-half write protect blocks CPU writes to linear SRAM below 0x8000
// (through either window) and reports lh_err; EEPROM writes need eeprom_we.
// wait_states is 3 for ROM and EEPROM (per the specification) and, by this
// design's choice, for ADC and FLASH too; SRAM and null cycles take none.
module cpu_mem_map (
  input  logic [15:0] cpu_addr,
  input  logic        mreq,
  input  logic        wr,
  input  logic        romon,
  input  logic        lh_wd,
  input  logic        eeprom_we,
  input  logic [16:0] pg0,
  input  logic [16:0] pg1,
  input  logic        sdram_active,
  output logic [28:0] lin_addr,
  output logic        cs_sram,
  output logic        cs_eeprom,
  output logic        cs_rom,
  output logic        cs_adc,
  output logic        cs_flash,
  output logic        cs_sdram,
  output logic        null_cyc,
  output logic        sdram_null,
  output logic        lh_err,
  output logic [1:0]  wait_states
);
  import dcb_pkg::*;
  logic blocked;

  always_comb begin
    if (cpu_addr[15:13] == 3'b111)
      lin_addr = {(cpu_addr[12] ? pg1 : pg0), cpu_addr[11:0]};
    else if (romon && !cpu_addr[15])
      lin_addr = BASE_ROM | {14'b0, cpu_addr[14:0]};
    else
      lin_addr = {13'b0, cpu_addr};

    cs_sram = 1'b0; cs_eeprom = 1'b0; cs_rom = 1'b0; cs_adc = 1'b0;
    cs_flash = 1'b0; cs_sdram = 1'b0; null_cyc = 1'b0; sdram_null = 1'b0;
    lh_err = 1'b0; wait_states = 2'd0; blocked = 1'b0;
    if (mreq) begin
      if (lin_addr[28]) begin
        if (sdram_active) cs_sdram = 1'b1;
        else begin null_cyc = 1'b1; sdram_null = 1'b1; end
      end else if (lin_addr[27:20] != '0) null_cyc = 1'b1;
      else begin
        case (lin_addr[19:17])
          3'b000: begin
            blocked = wr && lh_wd && (lin_addr[16:15] == 2'b00);
            lh_err  = blocked;
            cs_sram = !blocked;
          end
          3'b001: begin cs_eeprom = !(wr && !eeprom_we); wait_states = 2'd3; end
          3'b010, 3'b011: begin cs_adc = 1'b1; wait_states = 2'd3; end
          3'b100, 3'b101: begin cs_rom = !wr; wait_states = 2'd3; end
          default: begin cs_flash = 1'b1; wait_states = 2'd3; end
        endcase
      end
    end
  end
endmodule
