// cpp: control packet processor.
//
// Sits between the IP protocol wrappers and leon_ctrl. It parses every
// incoming IPv4 packet word by word, and keeps only UDP packets whose
// destination port is LEON_PORT: those carry LEON control commands. Any
// other packet is consumed and dropped. For a control packet it issues one
// command record (cmd_t) and, for Load program, streams the program words
// that follow.
//
// Control payload layout (big-endian words after the UDP header):
//   word 0: command code (8) | total data length in words (8) | sequence (16)
//   word 1: memory address (32)
//   word 2..: program words (Load program only)
// The data length bounds how many program words are forwarded; words past
// it are ignored, as are words the UDP length says are missing. A payload
// that ends before word 1 raises short_pkt, which leon_ctrl turns into an
// error reply for commands that need an address.
//
// Interface: in_* is a valid/ready stream of pkt_word_t; cmd_* and dat_*
// are valid/ready streams to leon_ctrl. The input stalls while a command
// waits for cmd_ready and while a data word waits for dat_ready, so one
// word is accepted per cycle at most and there is no buffering.
// The command fields follow the design description; the code byte in front
// of them, the word units of the length and the dropping of foreign traffic
// are this design's choices.
module cpp
  import liquid_pkg::*;
#(
  parameter logic [15:0] LEON_PORT = 16'd5000
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the protocol wrappers
  input  logic        in_valid,
  output logic        in_ready,
  input  pkt_word_t   in_word,
  // command to leon_ctrl
  output logic        cmd_valid,
  input  logic        cmd_ready,
  output cmd_t        cmd,
  // program words to leon_ctrl
  output logic        dat_valid,
  input  logic        dat_ready,
  output logic [31:0] dat,
  output logic        dat_last,
  // statistics
  output logic [15:0] n_ctrl_pkts,
  output logic [15:0] n_dropped_pkts
);

  typedef enum logic [3:0] {
    S_IP, S_UDP0, S_UDP1, S_PW0, S_PW1, S_CMD, S_DATA, S_DROP
  } state_e;

  state_e      state, after_cmd;
  logic [3:0]  ip_idx;        // word index inside the IP header
  logic [3:0]  ihl;
  logic        ip_ok;         // IPv4, IHL >= 5, protocol UDP
  logic [15:0] udp_len;
  logic [7:0]  dcnt;          // program words forwarded so far

  wire take = in_valid && in_ready;
  wire [31:0] w = in_word.data;

  // Program words the UDP length says are present after words 0 and 1.
  logic [13:0] avail_words;
  always_comb begin
    logic [13:0] pw;
    pw = (udp_len >= 16'd8) ? 14'((udp_len - 16'd8) >> 2) : 14'd0;
    avail_words = (pw >= 14'd2) ? pw - 14'd2 : 14'd0;
  end

  always_comb begin
    unique case (state)
      S_CMD:   in_ready = 1'b0;
      S_DATA:  in_ready = dat_ready;
      default: in_ready = 1'b1;
    endcase
  end

  assign cmd_valid = (state == S_CMD);
  assign dat_valid = (state == S_DATA) && in_valid;
  assign dat       = w;
  assign dat_last  = in_word.eof || (dcnt + 8'd1 == cmd.ndata);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IP;
      after_cmd      <= S_IP;
      ip_idx         <= '0;
      ihl            <= '0;
      ip_ok          <= 1'b0;
      udp_len        <= '0;
      dcnt           <= '0;
      cmd            <= '0;
      n_ctrl_pkts    <= '0;
      n_dropped_pkts <= '0;
    end else begin
      unique case (state)
        S_IP: if (take) begin
          if (ip_idx == 4'd0) begin
            ihl   <= w[27:24];
            ip_ok <= (w[31:28] == 4'd4) && (w[27:24] >= 4'd5);
            if (!in_word.sof) state <= in_word.eof ? S_IP : S_DROP;
          end
          if (ip_idx == 4'd2 && w[23:16] != IP_PROTO_UDP) ip_ok <= 1'b0;
          if (ip_idx == 4'd3) cmd.peer_ip  <= w;
          if (ip_idx == 4'd4) cmd.local_ip <= w;
          ip_idx <= ip_idx + 4'd1;
          if (ip_idx != 4'd0 && ip_idx == ihl - 4'd1) begin
            ip_idx <= '0;
            state  <= S_UDP0;
          end
          if (in_word.eof) begin
            ip_idx <= '0;
            state  <= S_IP;
            n_dropped_pkts <= n_dropped_pkts + 16'd1;
          end
        end
        S_UDP0: if (take) begin
          cmd.peer_port <= w[31:16];
          if (!ip_ok || w[15:0] != LEON_PORT) begin
            state <= in_word.eof ? S_IP : S_DROP;
            n_dropped_pkts <= n_dropped_pkts + 16'd1;
          end else if (in_word.eof) begin
            state <= S_IP;
            n_dropped_pkts <= n_dropped_pkts + 16'd1;
          end else begin
            state <= S_UDP1;
          end
        end
        S_UDP1: if (take) begin
          udp_len <= w[31:16];
          if (in_word.eof) begin
            state <= S_IP;
            n_dropped_pkts <= n_dropped_pkts + 16'd1;
          end else begin
            state <= S_PW0;
          end
        end
        S_PW0: if (take) begin
          cmd.code      <= w[31:24];
          cmd.len       <= w[23:16];
          cmd.seq       <= w[15:0];
          cmd.addr      <= '0;
          cmd.ndata     <= '0;
          cmd.short_pkt <= in_word.eof;
          n_ctrl_pkts   <= n_ctrl_pkts + 16'd1;
          if (in_word.eof) begin
            state     <= S_CMD;
            after_cmd <= S_IP;
          end else begin
            state <= S_PW1;
          end
        end
        S_PW1: if (take) begin
          cmd.addr <= w;
          if (cmd.code == CMD_LOAD && !in_word.eof)
            cmd.ndata <= (14'(cmd.len) < avail_words) ? cmd.len : avail_words[7:0];
          state <= S_CMD;
          if (in_word.eof)
            after_cmd <= S_IP;
          else if (cmd.code == CMD_LOAD && cmd.len != 8'd0 && avail_words != 14'd0)
            after_cmd <= S_DATA;
          else
            after_cmd <= S_DROP;
        end
        S_CMD: if (cmd_ready) begin
          state <= after_cmd;
          dcnt  <= '0;
        end
        S_DATA: if (take) begin
          dcnt <= dcnt + 8'd1;
          if (in_word.eof)   state <= S_IP;
          else if (dat_last) state <= S_DROP;
        end
        S_DROP: begin
          ip_idx <= '0;
          if (take && in_word.eof) state <= S_IP;
        end
        default: state <= S_IP;
      endcase
    end
  end

  // A command record stays stable while it is offered.
  property p_cmd_stable;
    @(posedge clk) disable iff (!rst_n) cmd_valid && !cmd_ready |=> $stable(cmd);
  endproperty
  assert property (p_cmd_stable);

endmodule
