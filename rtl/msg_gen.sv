// msg_gen: message generator, builds the IP/UDP reply packets.
//
// leon_ctrl hands over one reply (msg_t) at a time. The generator latches
// it and sends an IPv4 packet of 7 + 1 + nwords 32-bit words:
//   5 words IPv4 header: version 4, IHL 5, TOS 0, total length, a running
//     identification number, no fragmentation, TTL TTL, protocol UDP,
//     header checksum, source = the address the request was sent to,
//     destination = the requester,
//   2 words UDP header: source port LEON_PORT, destination port = the
//     requester's port, UDP length, checksum 0 (not computed, allowed
//     for UDP over IPv4),
//   payload: {reply code, aux} then the nwords data words.
// The header checksum is the ones'-complement of the ones'-complement sum
// of the header's 16-bit halves, worked out combinationally from the
// latched reply.
// Interface: msg_valid/msg_ready in, out_valid/out_ready word stream out
// with sof on the first and eof on the last word. Timing: msg_ready is high
// only while idle; a packet leaves at one word per cycle when out_ready is
// held high. Sending replies as IP packets follows the design description;
// the packet fields above are this design's choice.
module msg_gen
  import liquid_pkg::*;
#(
  parameter logic [15:0] LEON_PORT = 16'd5000,
  parameter logic [7:0]  TTL       = 8'd64
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      msg_valid,
  output logic      msg_ready,
  input  msg_t      msg,
  output logic      out_valid,
  input  logic      out_ready,
  output pkt_word_t out_word,
  output logic [15:0] n_sent
);

  msg_t        m;
  logic        busy;
  logic [3:0]  idx;         // word being sent
  logic [15:0] ip_id;

  logic [3:0]  last_idx;
  logic [15:0] udp_len, ip_len, csum;
  logic [31:0] hdr [5];

  assign last_idx = 4'd7 + 4'(m.nwords);
  assign udp_len  = 16'd12 + 16'(m.nwords) * 16'd4;
  assign ip_len   = udp_len + 16'd20;

  always_comb begin
    logic [19:0] sum;
    hdr[0] = {4'd4, 4'd5, 8'd0, ip_len};
    hdr[1] = {ip_id, 16'd0};
    hdr[2] = {TTL, IP_PROTO_UDP, 16'd0};
    hdr[3] = m.local_ip;
    hdr[4] = m.peer_ip;
    sum = '0;
    for (int i = 0; i < 5; i++)
      sum = sum + 20'(hdr[i][31:16]) + 20'(hdr[i][15:0]);
    sum  = 20'(sum[15:0]) + 20'(sum[19:16]);
    sum  = 20'(sum[15:0]) + 20'(sum[19:16]);
    csum = ~sum[15:0];
  end

  always_comb begin
    unique case (idx)
      4'd0, 4'd1, 4'd3, 4'd4: out_word.data = hdr[idx[2:0]];
      4'd2:    out_word.data = {TTL, IP_PROTO_UDP, csum};
      4'd5:    out_word.data = {LEON_PORT, m.peer_port};
      4'd6:    out_word.data = {udp_len, 16'd0};
      4'd7:    out_word.data = {m.code, m.aux};
      4'd8:    out_word.data = m.words[0];
      4'd9:    out_word.data = m.words[1];
      default: out_word.data = m.words[2];
    endcase
    out_word.sof = (idx == 4'd0);
    out_word.eof = (idx == last_idx);
  end

  assign out_valid = busy;
  assign msg_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m      <= '0;
      busy   <= 1'b0;
      idx    <= '0;
      ip_id  <= '0;
      n_sent <= '0;
    end else if (!busy) begin
      if (msg_valid) begin
        m    <= msg;
        busy <= 1'b1;
        idx  <= '0;
      end
    end else if (out_ready) begin
      if (idx == last_idx) begin
        busy   <= 1'b0;
        ip_id  <= ip_id + 16'd1;
        n_sent <= n_sent + 16'd1;
      end
      idx <= idx + 4'd1;
    end
  end

endmodule
