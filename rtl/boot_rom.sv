// boot_rom: LEON boot ROM, an AHB slave with no wait states.
//
// Instead of waiting for a UART event, the boot code polls the start-flag
// word FLAG_ADDR in main memory and, once it reads a non-zero value, jumps
// to the address held in that word. leon_ctrl writes the user program's
// entry address there to start it. The code (SPARC V8, big-endian):
//   0x00  sethi %hi(FLAG_ADDR), %g1
//   0x04  ld    [%g1 + %lo(FLAG_ADDR)], %g2
//   0x08  subcc %g2, 0, %g0          ! cmp %g2, 0
//   0x0c  be    0x04                 ! back to the load while zero
//   0x10  nop                        ! delay slot
//   0x14  jmpl  %g2 + 0, %g0         ! jump to the entry address
//   0x18  nop                        ! delay slot
// Every other word reads as nop. The instruction words are assembled below
// from the SPARC V8 field layouts. The code runs before any cache is
// enabled (LEON leaves reset with its caches off), so each load reaches
// memory. Polling a main-memory word follows the design description; the
// code itself, the jump through the flag value and the ROM size are this
// design's choices.
// Interface: AHB slave (hsel, bus signals, hready_in); reads return the
// word addressed in the previous address phase; writes are ignored.
module boot_rom
  import liquid_pkg::*;
#(
  parameter logic [31:0] FLAG_ADDR = 32'h4000_0000,
  parameter int unsigned AW        = 5    // ROM size: 2**AW words
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     hsel,
  input  ahb_m2s_t ahb_m,
  input  logic     hready_in,
  output ahb_s2m_t ahb_s
);

  localparam logic [31:0] NOP = 32'h0100_0000;   // sethi 0, %g0

  // SPARC V8 formats
  function automatic logic [31:0] sethi(input logic [4:0] rd, input logic [21:0] imm22);
    return {2'b00, rd, 3'b100, imm22};
  endfunction
  function automatic logic [31:0] bicc(input logic [3:0] cond, input logic [21:0] disp22);
    return {2'b00, 1'b0, cond, 3'b010, disp22};
  endfunction
  // format 3 with an immediate operand; op = 2'b10 (arith) or 2'b11 (memory)
  function automatic logic [31:0] fmt3i(input logic [1:0] op, input logic [4:0] rd,
                                        input logic [5:0] op3, input logic [4:0] rs1,
                                        input logic [12:0] simm13);
    return {op, rd, op3, rs1, 1'b1, simm13};
  endfunction

  localparam logic [4:0] G0 = 5'd0, G1 = 5'd1, G2 = 5'd2;
  localparam logic [5:0] OP3_LD = 6'h00, OP3_SUBCC = 6'h14, OP3_JMPL = 6'h38;
  localparam logic [3:0] COND_BE = 4'h1;

  function automatic logic [31:0] rom_word(input logic [AW-1:0] idx);
    unique case (idx)
      AW'(0):  return sethi(G1, FLAG_ADDR[31:10]);
      AW'(1):  return fmt3i(2'b11, G2, OP3_LD, G1, {3'b000, FLAG_ADDR[9:0]});
      AW'(2):  return fmt3i(2'b10, G0, OP3_SUBCC, G2, 13'd0);
      AW'(3):  return bicc(COND_BE, 22'h3F_FFFE);   // -2 words
      AW'(5):  return fmt3i(2'b10, G0, OP3_JMPL, G2, 13'd0);
      default: return NOP;
    endcase
  endfunction

  logic [AW-1:0] idx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  idx_q <= '0;
    else if (hsel && hready_in && ahb_m.htrans[1]) idx_q <= ahb_m.haddr[AW+1:2];
  end

  assign ahb_s.hready = 1'b1;
  assign ahb_s.hresp  = HRESP_OKAY;
  assign ahb_s.hrdata = rom_word(idx_q);

endmodule
