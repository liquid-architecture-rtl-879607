// tb_msg_gen: self-checking test of the message generator.
// Random replies with 0 to 3 data words are sent with random out_ready.
// Every output packet is compared word by word with one built by the
// testbench, its IPv4 header checksum is verified by summing the header,
// and the identification field must count up by one per packet. With
// out_ready held high a packet must take exactly one cycle per word.
module tb_msg_gen;
  import liquid_pkg::*;
  `include "tb_net.svh"

  localparam logic [15:0] PORT = 16'd6000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      msg_valid, msg_ready, out_valid, out_ready;
  msg_t      msg;
  pkt_word_t out_word;
  logic [15:0] n_sent;

  msg_gen #(.LEON_PORT(PORT), .TTL(8'd64)) dut (.clk, .rst_n, .msg_valid, .msg_ready, .msg,
    .out_valid, .out_ready, .out_word, .n_sent);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit always_ready = 0;
  always @(negedge clk) out_ready = always_ready || ($urandom % 3 != 0);

  // collect one packet; returns words and cycles from first to last word
  task automatic receive(output word_q_t q, output int cyc);
    bit done;
    q = {};
    cyc = 0;
    done = 0;
    while (!done) begin
      @(posedge clk);
      if (q.size() > 0) cyc++;
      if (out_valid && out_ready) begin
        check(out_word.sof == (q.size() == 0), "sof placement");
        q.push_back(out_word.data);
        done = out_word.eof;
      end
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_valid = 0;
    msg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      msg_t    m;
      word_q_t got, want;
      int      cyc, n;
      if (t >= 35) always_ready = 1;
      m = '0;
      m.code = 8'($urandom); m.aux = 24'($urandom); m.nwords = 2'($urandom % 4);
      for (int i = 0; i < 3; i++) m.words[i] = $urandom;
      m.peer_ip = $urandom; m.local_ip = $urandom; m.peer_port = 16'($urandom);
      n = int'(m.nwords);
      @(negedge clk);
      msg_valid = 1;
      msg = m;
      @(posedge clk);
      while (!msg_ready) @(posedge clk);
      @(negedge clk);
      msg_valid = 0;
      receive(got, cyc);
      want = {};
      want.push_back({8'h45, 8'h00, 16'(28 + 4 * (1 + n))});
      want.push_back({16'(t), 16'h0000});
      want.push_back({8'd64, 8'd17, 16'h0000});
      want.push_back(m.local_ip);
      want.push_back(m.peer_ip);
      want.push_back({PORT, m.peer_port});
      want.push_back({16'(8 + 4 * (1 + n)), 16'h0000});
      want.push_back({m.code, m.aux});
      for (int i = 0; i < n; i++) want.push_back(m.words[i]);
      check(got.size() == want.size(), $sformatf("packet %0d: %0d words, expected %0d", t, got.size(), want.size()));
      check(tbn_csum(got, 5) == 16'h0000, $sformatf("packet %0d: header checksum", t));
      got[2][15:0] = 16'h0000;
      check(got == want, $sformatf("packet %0d contents", t));
      if (always_ready)
        check(cyc == want.size() - 1, $sformatf("packet %0d took %0d cycles", t, cyc + 1));
    end
    repeat (2) @(posedge clk);
    check(n_sent == 16'd40, "sent count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
