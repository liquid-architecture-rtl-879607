// ahb_decoder: address decoding of the LEON AHB bus.
//
// Two slaves: the boot ROM (HADDR bits 31:28 = ROM_NIBBLE) and main memory
// (bits 31:28 = RAM_NIBBLE). Any other address goes to a built-in default
// slave that answers at once with OKAY and zero read data. The select
// outputs follow HADDR combinationally during the address phase; the
// response multiplexer uses the select of the transfer in its data phase,
// registered when the bus HREADY is high, and drives the bus HREADY that
// every slave and the master see. The memory map (boot ROM at 0, RAM at
// 0x4000_0000) follows the LEON map the design description uses; the
// default slave is this design's choice.
module ahb_decoder
  import liquid_pkg::*;
#(
  parameter logic [3:0] ROM_NIBBLE = 4'h0,
  parameter logic [3:0] RAM_NIBBLE = 4'h4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] haddr,
  output logic        hsel_rom,
  output logic        hsel_ram,
  input  ahb_s2m_t    rom_s,
  input  ahb_s2m_t    ram_s,
  output ahb_s2m_t    bus_s       // to the master; bus_s.hready is HREADY
);

  typedef enum logic [1:0] {SEL_NONE, SEL_ROM, SEL_RAM} sel_e;
  sel_e dsel;   // slave of the data phase

  assign hsel_rom = (haddr[31:28] == ROM_NIBBLE);
  assign hsel_ram = (haddr[31:28] == RAM_NIBBLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            dsel <= SEL_NONE;
    else if (bus_s.hready) dsel <= hsel_rom ? SEL_ROM : (hsel_ram ? SEL_RAM : SEL_NONE);
  end

  always_comb begin
    unique case (dsel)
      SEL_ROM: bus_s = rom_s;
      SEL_RAM: bus_s = ram_s;
      default: bus_s = '{hready: 1'b1, hresp: HRESP_OKAY, hrdata: 32'd0};
    endcase
  end

endmodule
