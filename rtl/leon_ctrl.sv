// leon_ctrl: supervisory state machine of the Liquid processor system.
//
// It executes the control commands that the control packet processor
// extracts from UDP packets, owns the LEON reset, and is the "user" client
// of main memory (one FPX SDRAM controller port, through mem_word_port).
//
//   LEON status   reply RSP_STATUS: aux = {started, running, done} flags,
//                 words = cycle count, program words loaded, last sequence.
//   Load program  write the program words to consecutive word addresses
//                 from the packet's address; no reply.
//   Start LEON    hold LEON in reset, write ENTRY into the start-flag word
//                 FLAG_ADDR that the boot ROM polls, release reset and start
//                 the cycle counter; no reply.
//   Read memory   reply RSP_READ with words = address, memory word.
//   anything else, a short packet, or an address outside main memory
//   (bits 31:28 not RAM_NIBBLE, or not word aligned) gives an RSP_ERROR
//   reply with the error code in aux[7:0].
// After system reset it holds LEON in reset, clears the start flag, then
// releases reset so that LEON sits in the boot ROM's polling loop.
//
// Interface: cmd_*/dat_* from cpp, msg_* to msg_gen (valid/ready),
// leon_rst_n to LEON, cnt_* to and from cycle_counter, sd_* to the SDRAM
// controller. Timing: each program word costs one read-modify-write in
// memory; a reply is offered once the command has finished.
// The commands, the reset control and the polled start flag follow the
// design description; the reply contents, codes and the order of the start
// sequence are this design's choices.
module leon_ctrl
  import liquid_pkg::*;
#(
  parameter logic [31:0] FLAG_ADDR  = 32'h4000_0000,
  parameter logic [31:0] ENTRY      = 32'h4000_0100,
  parameter logic [3:0]  RAM_NIBBLE = 4'h4,
  parameter int unsigned RST_CYCLES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // from cpp
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  cmd_t        cmd,
  input  logic        dat_valid,
  output logic        dat_ready,
  input  logic [31:0] dat,
  input  logic        dat_last,
  // to msg_gen
  output logic        msg_valid,
  input  logic        msg_ready,
  output msg_t        msg,
  // LEON control
  output logic        leon_rst_n,
  output logic        cnt_start,
  input  logic [31:0] cnt_cycles,
  input  logic        cnt_running,
  input  logic        cnt_done,
  // main memory
  output sd_req_t     sd_req,
  input  sd_rsp_t     sd_rsp,
  // statistics
  output logic [15:0] n_errors,
  output logic [15:0] n_starts
);

  typedef enum logic [3:0] {
    S_BOOT_CLR, S_RST_HOLD, S_IDLE, S_LOAD_WAIT, S_LOAD_WR,
    S_START_WR, S_READ, S_DRAIN, S_MSG
  } state_e;

  state_e      state;
  cmd_t        c;             // command being executed
  logic [31:0] waddr;         // next load address
  logic [31:0] wdat;
  logic        wlast;
  logic [15:0] words_loaded;
  logic [15:0] last_seq;
  logic [$clog2(RST_CYCLES+1)-1:0] rst_cnt;
  logic        m_issued;      // memory access of this state under way

  // memory port
  logic        m_start, m_we, m_busy, m_done;
  logic [31:0] m_addr, m_wdata, m_rdata;

  mem_word_port u_mem (
    .clk, .rst_n,
    .start (m_start), .we (m_we), .addr (m_addr), .wdata (m_wdata),
    .busy  (m_busy),  .done (m_done), .rdata (m_rdata),
    .sd_req, .sd_rsp
  );

  function automatic logic addr_ok(input logic [31:0] a);
    return (a[31:28] == RAM_NIBBLE) && (a[1:0] == 2'b00);
  endfunction

  assign cmd_ready = (state == S_IDLE);
  assign dat_ready = (state == S_LOAD_WAIT) || (state == S_DRAIN);
  assign msg_valid = (state == S_MSG);

  always_comb begin
    m_start = 1'b0;
    m_we    = 1'b1;
    m_addr  = waddr;
    m_wdata = wdat;
    unique case (state)
      S_BOOT_CLR: begin m_start = !m_issued; m_addr = FLAG_ADDR; m_wdata = '0;    end
      S_START_WR: begin m_start = !m_issued; m_addr = FLAG_ADDR; m_wdata = ENTRY; end
      S_LOAD_WR:  m_start = !m_issued;
      S_READ:     begin m_start = !m_issued; m_we = 1'b0; m_addr = c.addr;        end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_BOOT_CLR;
      c            <= '0;
      waddr        <= '0;
      wdat         <= '0;
      wlast        <= 1'b0;
      words_loaded <= '0;
      last_seq     <= '0;
      rst_cnt      <= '0;
      m_issued     <= 1'b0;
      leon_rst_n   <= 1'b0;
      cnt_start    <= 1'b0;
      msg          <= '0;
      n_errors     <= '0;
      n_starts     <= '0;
    end else begin
      cnt_start <= 1'b0;
      if (m_start) m_issued <= 1'b1;
      if (m_done)  m_issued <= 1'b0;
      unique case (state)
        // ---------------------------------------------- power-up sequence
        S_BOOT_CLR: if (m_done) begin
          rst_cnt <= '0;
          state   <= S_RST_HOLD;
        end
        S_RST_HOLD: begin
          rst_cnt <= rst_cnt + 1'b1;
          if (rst_cnt == RST_CYCLES[$bits(rst_cnt)-1:0]) begin
            leon_rst_n <= 1'b1;
            if (c.code == CMD_START) begin
              cnt_start <= 1'b1;
              n_starts  <= n_starts + 16'd1;
            end
            state <= S_IDLE;
          end
        end
        // ---------------------------------------------- command dispatch
        S_IDLE: if (cmd_valid) begin
          c               <= cmd;
          msg             <= '0;
          msg.peer_ip     <= cmd.peer_ip;
          msg.local_ip    <= cmd.local_ip;
          msg.peer_port   <= cmd.peer_port;
          unique case (cmd.code)
            CMD_STATUS: begin
              msg.code     <= RSP_STATUS;
              msg.aux      <= {21'd0, leon_rst_n, cnt_running, cnt_done};
              msg.nwords   <= 2'd3;
              msg.words[0] <= cnt_cycles;
              msg.words[1] <= {16'd0, words_loaded};
              msg.words[2] <= {16'd0, last_seq};
              state        <= S_MSG;
            end
            CMD_START: begin
              leon_rst_n <= 1'b0;
              state      <= S_START_WR;
            end
            CMD_LOAD: begin
              if (!cmd.short_pkt) last_seq <= cmd.seq;
              waddr <= cmd.addr;
              if (cmd.short_pkt || !addr_ok(cmd.addr))
                state <= (cmd.ndata != 8'd0) ? S_DRAIN : S_MSG;
              else
                state <= (cmd.ndata != 8'd0) ? S_LOAD_WAIT : S_IDLE;
              if (cmd.short_pkt || !addr_ok(cmd.addr)) begin
                msg.code <= RSP_ERROR;
                msg.aux  <= {16'd0, (cmd.short_pkt ? ERR_SHORT_PKT : ERR_BAD_ADDR)};
                n_errors <= n_errors + 16'd1;
              end
            end
            CMD_READ: begin
              if (cmd.short_pkt || !addr_ok(cmd.addr)) begin
                msg.code <= RSP_ERROR;
                msg.aux  <= {16'd0, (cmd.short_pkt ? ERR_SHORT_PKT : ERR_BAD_ADDR)};
                n_errors <= n_errors + 16'd1;
                state    <= S_MSG;
              end else begin
                state <= S_READ;
              end
            end
            default: begin
              msg.code <= RSP_ERROR;
              msg.aux  <= {16'd0, ERR_BAD_CMD};
              n_errors <= n_errors + 16'd1;
              state    <= (cmd.ndata != 8'd0) ? S_DRAIN : S_MSG;
            end
          endcase
        end
        // ---------------------------------------------- Load program
        S_LOAD_WAIT: if (dat_valid) begin
          wdat  <= dat;
          wlast <= dat_last;
          state <= S_LOAD_WR;
        end
        S_LOAD_WR: if (m_done) begin
          waddr        <= waddr + 32'd4;
          words_loaded <= words_loaded + 16'd1;
          state        <= wlast ? S_IDLE : S_LOAD_WAIT;
        end
        S_DRAIN: if (dat_valid && dat_last) state <= S_MSG;
        // ---------------------------------------------- Start LEON
        S_START_WR: if (m_done) begin
          rst_cnt <= '0;
          state   <= S_RST_HOLD;
        end
        // ---------------------------------------------- Read memory
        S_READ: if (m_done) begin
          msg.code     <= RSP_READ;
          msg.nwords   <= 2'd2;
          msg.words[0] <= c.addr;
          msg.words[1] <= m_rdata;
          state        <= S_MSG;
        end
        S_MSG: if (msg_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A memory access is only started when the port is free.
  assert property (@(posedge clk) disable iff (!rst_n) m_start |-> !m_busy);

endmodule
