// mem_word_port: one 32-bit access to main memory through an FPX SDRAM
// controller client port.
//
// Main memory is 64 bits wide and the SDRAM controller writes whole 64-bit
// words, so a 32-bit write is a read-modify-write: a one-word read burst,
// the new word merged into the proper half, and a one-word write burst.
// A read is a single one-word read burst and returns the addressed half.
// Address bit 2 selects the half; big-endian, so bit 2 = 0 is bits 63:32.
// Bits 31..SD_AW+3 of the byte address are ignored.
//
// Interface: pulse start for one cycle while busy is low; done pulses when
// the access has finished, with rdata valid in that cycle for a read.
// Timing: one SDRAM handshake for a read, two for a write, plus the
// controller's latency. The read-modify-write follows the design
// description; the start/done handshake is this design's choice.
module mem_word_port
  import liquid_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic        busy,
  output logic        done,
  output logic [31:0] rdata,
  output sd_req_t     sd_req,
  input  sd_rsp_t     sd_rsp
);

  typedef enum logic [2:0] {S_IDLE, S_RREQ, S_RDATA, S_WREQ, S_WACK} state_e;
  state_e      state;
  logic        we_q;
  logic [31:0] addr_q, wdata_q;
  logic [63:0] word_q;

  assign busy = (state != S_IDLE);

  always_comb begin
    sd_req       = '0;
    sd_req.addr  = addr_q[SD_AW+2:3];
    sd_req.len   = SD_LW'(1);
    sd_req.wdata = word_q;
    sd_req.req   = (state == S_RREQ) || (state == S_WREQ);
    sd_req.we    = (state == S_WREQ);
  end

  assign rdata = addr_q[2] ? word_q[31:0] : word_q[63:32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      we_q    <= 1'b0;
      addr_q  <= '0;
      wdata_q <= '0;
      word_q  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          we_q    <= we;
          addr_q  <= addr;
          wdata_q <= wdata;
          state   <= S_RREQ;
        end
        S_RREQ: if (sd_rsp.gnt) state <= S_RDATA;
        S_RDATA: if (sd_rsp.rvalid) begin
          if (we_q) begin
            word_q <= addr_q[2] ? {sd_rsp.rdata[63:32], wdata_q}
                                : {wdata_q, sd_rsp.rdata[31:0]};
            state  <= S_WREQ;
          end else begin
            word_q <= sd_rsp.rdata;
            done   <= 1'b1;
            state  <= S_IDLE;
          end
        end
        S_WREQ: if (sd_rsp.gnt) state <= S_WACK;
        S_WACK: if (sd_rsp.wack) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
