// tb_cpp: self-checking test of the control packet processor.
// Sends control packets (status, load with surplus and with missing program
// words, read, short payload, IP options) mixed with packets for other UDP
// ports and non-UDP packets, with random gaps on the input and random
// back-pressure on both outputs. Expected command records and program
// words are worked out from the packets the testbench built.
module tb_cpp;
  import liquid_pkg::*;
  `include "tb_net.svh"

  localparam logic [15:0] PORT = 16'd4242;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, in_ready;
  pkt_word_t   in_word;
  logic        cmd_valid, cmd_ready, dat_valid, dat_ready, dat_last;
  cmd_t        cmd;
  logic [31:0] dat;
  logic [15:0] n_ctrl, n_drop;

  cpp #(.LEON_PORT(PORT)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_word,
    .cmd_valid, .cmd_ready, .cmd, .dat_valid, .dat_ready, .dat, .dat_last,
    .n_ctrl_pkts(n_ctrl), .n_dropped_pkts(n_drop));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected results
  cmd_t        exp_cmd [$];
  logic [31:0] exp_dat [$];
  logic        exp_last [$];

  task automatic send(word_q_t q);
    foreach (q[i]) begin
      @(negedge clk);
      while ($urandom % 4 == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid     = 1;
      in_word.data = q[i];
      in_word.sof  = (i == 0);
      in_word.eof  = (i == q.size() - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  // control packet: header words, program words (nprog in the packet)
  task automatic ctrl(logic [7:0] code, logic [7:0] len, logic [15:0] seq,
                      logic [31:0] addr, int nprog, bit with_addr = 1, int nopt = 0);
    word_q_t pl;
    cmd_t c;
    int nd;
    pl.push_back({code, len, seq});
    if (with_addr) pl.push_back(addr);
    for (int i = 0; i < nprog; i++) pl.push_back($urandom);
    c = '0;
    c.code = code; c.len = len; c.seq = seq;
    c.addr = with_addr ? addr : 32'd0;
    c.short_pkt = !with_addr;
    c.peer_ip = 32'h0A00_0001; c.local_ip = 32'h0A00_0063; c.peer_port = 16'd7777;
    nd = (code == CMD_LOAD && with_addr) ? ((int'(len) < nprog) ? int'(len) : nprog) : 0;
    c.ndata = 8'(nd);
    exp_cmd.push_back(c);
    for (int i = 0; i < nd; i++) begin
      exp_dat.push_back(pl[2 + i]);
      exp_last.push_back(i == nd - 1);
    end
    send(tbn_udp(32'h0A00_0001, 32'h0A00_0063, 16'd7777, PORT, IP_PROTO_UDP, pl, nopt));
  endtask

  // sinks with random back-pressure
  always @(negedge clk) begin
    cmd_ready = ($urandom % 3 != 0);
    dat_ready = ($urandom % 3 != 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (cmd_valid && cmd_ready) begin
      if (exp_cmd.size() == 0) check(0, "unexpected command");
      else begin
        cmd_t e;
        e = exp_cmd.pop_front();
        check(cmd == e, $sformatf("command %p, expected %p", cmd, e));
      end
    end
    if (dat_valid && dat_ready) begin
      if (exp_dat.size() == 0) check(0, "unexpected data word");
      else begin
        logic [31:0] e;
        logic l;
        e = exp_dat.pop_front();
        l = exp_last.pop_front();
        check(dat == e && dat_last == l, $sformatf("data %h/%b, expected %h/%b", dat, dat_last, e, l));
      end
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_q_t pl;
    in_valid = 0;
    in_word  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ctrl(CMD_STATUS, 8'd0, 16'd0, 32'd0, 0, 0);                  // status, 1 payload word
    ctrl(CMD_LOAD, 8'd5, 16'd1, 32'h4000_0100, 8);               // surplus words ignored
    ctrl(CMD_LOAD, 8'd9, 16'd2, 32'h4000_0200, 4);               // fewer than announced
    pl = {32'h0200_0300, 32'h4000_0000, 32'h1};                  // other UDP port
    send(tbn_udp(32'h0A00_0001, 32'h0A00_0063, 16'd7777, PORT + 1, IP_PROTO_UDP, pl));
    send(tbn_udp(32'h0A00_0001, 32'h0A00_0063, 16'd7777, PORT, 8'd6, pl)); // TCP
    ctrl(CMD_READ, 8'd0, 16'd0, 32'h4000_0104, 0);
    ctrl(CMD_LOAD, 8'd3, 16'd3, 32'h4000_0300, 3, 1, 2);         // IP options
    ctrl(CMD_START, 8'd0, 16'd0, 32'd0, 0);
    ctrl(CMD_LOAD, 8'd0, 16'd4, 32'h4000_0400, 2);               // zero length
    for (int t = 0; t < 10; t++)
      ctrl(CMD_LOAD, 8'($urandom % 20), 16'(10 + t), 32'h4000_1000 + 32'(t * 64), $urandom % 20);
    repeat (50) @(posedge clk);
    check(exp_cmd.size() == 0, $sformatf("%0d commands missing", exp_cmd.size()));
    check(exp_dat.size() == 0, $sformatf("%0d data words missing", exp_dat.size()));
    check(n_ctrl == 16'd17, $sformatf("control packet count %0d", n_ctrl));
    check(n_drop == 16'd2, $sformatf("dropped packet count %0d", n_drop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
