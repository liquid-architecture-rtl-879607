// tb_net.svh: helpers for testbenches that build and check IPv4/UDP
// packets as queues of 32-bit big-endian words.
`ifndef TB_NET_SVH
`define TB_NET_SVH

typedef logic [31:0] word_q_t [$];

// Ones'-complement checksum over the first nwords words of q.
function automatic logic [15:0] tbn_csum(word_q_t q, int nwords);
  logic [31:0] s;
  s = 0;
  for (int i = 0; i < nwords; i++) s += q[i][31:16] + q[i][15:0];
  while (s[31:16] != 0) s = s[15:0] + s[31:16];
  return ~s[15:0];
endfunction

// IPv4 packet (IHL 5 + nopt option words) carrying a UDP datagram.
function automatic word_q_t tbn_udp(logic [31:0] src_ip, logic [31:0] dst_ip,
                                    logic [15:0] sport, logic [15:0] dport,
                                    logic [7:0] proto, word_q_t payload,
                                    int nopt = 0);
  word_q_t q;
  int ihl, udp_len, ip_len;
  logic [15:0] c;
  ihl     = 5 + nopt;
  udp_len = 8 + 4 * payload.size();
  ip_len  = 4 * ihl + udp_len;
  q.push_back({4'd4, 4'(ihl), 8'd0, 16'(ip_len)});
  q.push_back(32'h1234_0000);
  q.push_back({8'd32, proto, 16'd0});
  q.push_back(src_ip);
  q.push_back(dst_ip);
  for (int i = 0; i < nopt; i++) q.push_back(32'h0101_0101);
  c = tbn_csum(q, ihl);
  q[2][15:0] = c;
  q.push_back({sport, dport});
  q.push_back({16'(udp_len), 16'd0});
  foreach (payload[i]) q.push_back(payload[i]);
  return q;
endfunction

`endif
