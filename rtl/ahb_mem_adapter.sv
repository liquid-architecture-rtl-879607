// ahb_mem_adapter: LEON main-memory controller, an AHB slave in front of a
// client port of the FPX SDRAM controller.
//
// The AHB side is 32 bits wide, the memory 64 bits. The adapter relies on
// the subset of AHB that LEON uses: single and incrementing transfers, sizes
// up to 32 bits, no split or retry. Wait states (hready_out low) cover all
// memory latency; HRESP is always OKAY.
//
// Reads. A NONSEQ read, or a SEQ read outside what is buffered, starts one
// SDRAM read burst that covers the addressed 32-bit word and the three
// after it: 2 64-bit words when the address is 8-byte aligned, 3 when it is
// not. The words land in a 3-entry line buffer. Following SEQ beats that
// fall in the buffer are answered from it with no wait state, so an
// incrementing burst of up to 4 words costs one handshake and a longer one
// a further handshake per 4 words. The buffer is dropped on every NONSEQ
// transfer and every write, so data written through another port is seen
// by the next burst.
// Writes. There are no write bursts: each write beat is a read-modify-write
// of its 64-bit word (a 1-word read burst, the addressed bytes merged,
// a 1-word write burst), two handshakes per beat.
// Byte order is big-endian: byte address bits 2:0 = 0 is bits 63:56.
//
// The 32-from-64 word selection, the read-modify-write, the short
// read burst of up to four words and the absence of write bursts follow the
// design description; the 3-word buffer and the drop-on-NONSEQ rule are this
// design's choices.
module ahb_mem_adapter
  import liquid_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     hsel,
  input  ahb_m2s_t ahb_m,
  input  logic     hready_in,    // bus HREADY
  output ahb_s2m_t ahb_s,
  output sd_req_t  sd_req,
  input  sd_rsp_t  sd_rsp,
  output logic [15:0] n_handshakes,  // SDRAM requests granted
  output logic [15:0] n_buf_hits     // read beats served from the buffer
);

  typedef enum logic [3:0] {
    S_IDLE, S_HIT, S_RD_REQ, S_RD_DATA, S_RD_DONE,
    S_WR_CAP, S_RMW_RREQ, S_RMW_RDATA, S_RMW_WREQ, S_RMW_WACK, S_WR_DONE
  } state_e;

  state_e state;

  // data-phase transfer
  logic [31:0] a_addr;
  logic [2:0]  a_size;
  logic [31:0] wdata_q;
  logic [63:0] merged;

  // line buffer
  logic [63:0]      lbuf [3];
  logic [SD_AW-1:0] lbuf_base;
  logic [1:0]       lbuf_len;
  logic             lbuf_valid;
  logic [1:0]       beat;

  wire [SD_AW-1:0] a_word = a_addr[SD_AW+2:3];

  // Data phase can end this cycle.
  wire phase_end = (state == S_IDLE) || (state == S_HIT) ||
                   (state == S_RD_DONE) || (state == S_WR_DONE);
  wire new_xfer  = hsel && hready_in && ahb_m.htrans[1];

  // Hit test for the transfer now in its address phase.
  logic [SD_AW-1:0] n_word, n_off;
  logic             n_hit;
  always_comb begin
    n_word = ahb_m.haddr[SD_AW+2:3];
    n_off  = n_word - lbuf_base;
    n_hit  = lbuf_valid && (ahb_m.htrans == HTRANS_SEQ) && !ahb_m.hwrite &&
             (n_off < SD_AW'(lbuf_len));
  end

  // Read data of the current data phase, from the buffer.
  logic [SD_AW-1:0] a_off;
  logic [63:0]      a_line;
  always_comb begin
    a_off  = a_word - lbuf_base;
    a_line = lbuf[(a_off[1:0] == 2'd3) ? 2'd0 : a_off[1:0]];
  end

  // Old 64-bit word with the written bytes replaced.
  logic [31:0] wmask, old32, new32;
  logic [63:0] rmw_word;
  always_comb begin
    wmask    = be_mask(a_size, a_addr[1:0]);
    old32    = a_addr[2] ? sd_rsp.rdata[31:0] : sd_rsp.rdata[63:32];
    new32    = (old32 & ~wmask) | (wdata_q & wmask);
    rmw_word = a_addr[2] ? {sd_rsp.rdata[63:32], new32} : {new32, sd_rsp.rdata[31:0]};
  end

  assign ahb_s.hready = phase_end;
  assign ahb_s.hresp  = HRESP_OKAY;
  assign ahb_s.hrdata = a_addr[2] ? a_line[31:0] : a_line[63:32];

  always_comb begin
    sd_req       = '0;
    sd_req.addr  = a_word;
    sd_req.wdata = merged;
    unique case (state)
      S_RD_REQ: begin
        sd_req.req = 1'b1;
        sd_req.len = a_addr[2] ? SD_LW'(3) : SD_LW'(2);
      end
      S_RMW_RREQ: begin
        sd_req.req = 1'b1;
        sd_req.len = SD_LW'(1);
      end
      S_RMW_WREQ: begin
        sd_req.req = 1'b1;
        sd_req.we  = 1'b1;
        sd_req.len = SD_LW'(1);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      a_addr       <= '0;
      a_size       <= '0;
      wdata_q      <= '0;
      merged       <= '0;
      lbuf         <= '{default: '0};
      lbuf_base    <= '0;
      lbuf_len     <= '0;
      lbuf_valid   <= 1'b0;
      beat         <= '0;
      n_handshakes <= '0;
      n_buf_hits   <= '0;
    end else begin
      if (sd_rsp.gnt) n_handshakes <= n_handshakes + 16'd1;
      if (phase_end) begin
        if (new_xfer) begin
          a_addr <= ahb_m.haddr;
          a_size <= ahb_m.hsize;
          if (ahb_m.hwrite) begin
            lbuf_valid <= 1'b0;
            state      <= S_WR_CAP;
          end else if (n_hit) begin
            n_buf_hits <= n_buf_hits + 16'd1;
            state      <= S_HIT;
          end else begin
            lbuf_valid <= 1'b0;
            state      <= S_RD_REQ;
          end
        end else begin
          state <= S_IDLE;
        end
      end else begin
        unique case (state)
          S_RD_REQ: if (sd_rsp.gnt) begin
            lbuf_base <= a_word;
            lbuf_len  <= a_addr[2] ? 2'd3 : 2'd2;
            beat      <= '0;
            state     <= S_RD_DATA;
          end
          S_RD_DATA: if (sd_rsp.rvalid) begin
            lbuf[beat] <= sd_rsp.rdata;
            beat       <= beat + 2'd1;
            if (beat + 2'd1 == lbuf_len) begin
              lbuf_valid <= 1'b1;
              state      <= S_RD_DONE;
            end
          end
          S_WR_CAP: begin
            wdata_q <= ahb_m.hwdata;
            state   <= S_RMW_RREQ;
          end
          S_RMW_RREQ: if (sd_rsp.gnt) state <= S_RMW_RDATA;
          S_RMW_RDATA: if (sd_rsp.rvalid) begin
            merged <= rmw_word;
            state  <= S_RMW_WREQ;
          end
          S_RMW_WREQ: if (sd_rsp.gnt) state <= S_RMW_WACK;
          S_RMW_WACK: if (sd_rsp.wack) state <= S_WR_DONE;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // LEON issues no write bursts and no transfers wider than 32 bits.
  assert property (@(posedge clk) disable iff (!rst_n)
                   new_xfer |-> ahb_m.hsize <= HSIZE_WORD);

endmodule
