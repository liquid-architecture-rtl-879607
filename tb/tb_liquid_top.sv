// tb_liquid_top: end-to-end test of the Liquid processor system at its
// default parameters.
//
// The network side sends real IPv4/UDP control packets and checks every
// reply packet (addresses, ports, header checksum, contents). LEON is a
// scripted AHB master that behaves like the core running the boot ROM and
// a small user program: it fetches the boot code, polls the start flag,
// jumps to the address found there, fetches two 8-word lines of user code,
// reads eight data words with single, aligned and unaligned bursts, stores
// their sum, patches a byte and a halfword, and stores the end-of-program
// marker. Main memory is the behavioural FPX SDRAM controller with three
// client ports. The test covers: foreign packets dropped, a program loaded
// in two packets sent out of order, surplus words beyond the length field
// ignored, error replies (unknown code, short packet), Read memory, LEON
// status, two Start LEON commands (restart), boot-flag polling, buffered
// burst beats, the extra handshake of 8-word bursts, read-modify-write byte
// and halfword stores, SDRAM arbitration conflicts between LEON and
// leon_ctrl, back-pressure on both network streams, and the cycle count,
// which must equal the cycles from LEON's reset release to its marker store.
module tb_liquid_top;
  import liquid_pkg::*;
  `include "tb_net.svh"

  localparam logic [15:0] PORT   = 16'd5000;
  localparam logic [31:0] FLAG   = 32'h4000_0000;
  localparam logic [31:0] DONE   = 32'h4000_0004;
  localparam logic [31:0] ENTRY  = 32'h4000_0100;
  localparam logic [31:0] DATA   = 32'h4000_0400;
  localparam logic [31:0] RESULT = 32'h4000_0800;
  localparam logic [31:0] HOST   = 32'h0A00_0005;
  localparam logic [31:0] FPX    = 32'h0A00_00C8;
  localparam logic [15:0] HPORT  = 16'd40000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        net_in_valid, net_in_ready, net_out_valid, net_out_ready;
  pkt_word_t   net_in_word, net_out_word;
  logic        leon_rst_n;
  ahb_m2s_t    m;
  ahb_s2m_t    s;
  sd_req_t     sreq [3];
  sd_rsp_t     srsp [3];
  logic [31:0] prog_cycles;
  logic        prog_done;
  logic [15:0] n_ctrl, n_drop, n_repl, n_err, n_starts, n_hs, n_hits;

  liquid_top dut (
    .clk, .rst_n,
    .net_in_valid, .net_in_ready, .net_in_word,
    .net_out_valid, .net_out_ready, .net_out_word,
    .leon_rst_n, .leon_ahb_m(m), .leon_ahb_s(s),
    .sd_leon_req(sreq[0]), .sd_leon_rsp(srsp[0]),
    .sd_user_req(sreq[1]), .sd_user_rsp(srsp[1]),
    .prog_cycles, .prog_done,
    .n_ctrl_pkts(n_ctrl), .n_dropped_pkts(n_drop), .n_replies(n_repl),
    .n_errors(n_err), .n_starts, .n_mem_handshakes(n_hs), .n_buf_hits(n_hits));

  assign sreq[2] = '0;
  fpx_sdram_model #(.NPORT(3), .MEM_AW(14)) mdl (.clk, .rst_n, .req(sreq), .rsp(srsp));
  ahb_master_bfm bfm (.clk, .m, .s);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ program
  logic [31:0] code_w [16];
  logic [31:0] data_w [12];
  logic [31:0] exp_sum;
  localparam logic [31:0] ROM_W [8] = '{32'h0310_0000, 32'hC400_6000, 32'h80A0_A000,
      32'h02BF_FFFE, 32'h0100_0000, 32'h81C0_A000, 32'h0100_0000, 32'h0100_0000};

  // ------------------------------------------------------------ monitors
  int cyc = 0, rise_seen = 0, done_seen = 0, in_stalls = 0, out_stalls = 0, both_req = 0;
  logic prev_rst = 0;
  always @(posedge clk) begin
    cyc++;
    if (leon_rst_n && !prev_rst) rise_seen = cyc;
    prev_rst = leon_rst_n;
    if (m.htrans[1] && m.hwrite && m.haddr == DONE && s.hready) done_seen = cyc;
    if (net_in_valid && !net_in_ready) in_stalls++;
    if (net_out_valid && !net_out_ready) out_stalls++;
    if (sreq[0].req && sreq[1].req) both_req++;
  end

  // ------------------------------------------------------------ LEON
  int boots = 0, polls = 0, runs = 0, long_bursts = 0, rmw_stores = 0;

  task automatic leon_run();
    logic [31:0] entry, sum, d [8];
    int hs0;
    bfm.xfer(32'h0, 8, 1'b0, HSIZE_WORD);
    boots++;
    for (int i = 0; i < 8; i++) check(bfm.rd_buf[i] == ROM_W[i], $sformatf("boot word %0d", i));
    entry = 0;
    while (entry == 0) begin
      if (!leon_rst_n) return;
      bfm.xfer(FLAG, 1, 1'b0, HSIZE_WORD);
      if (!leon_rst_n) return;
      polls++;
      entry = bfm.rd_buf[0];
      if (entry == 0) bfm.xfer(32'h4, 4, 1'b0, HSIZE_WORD);
    end
    check(entry == ENTRY, $sformatf("entry address %h", entry));
    for (int l = 0; l < 2; l++) begin
      hs0 = int'(n_hs);
      bfm.xfer(entry + 32'(32 * l), 8, 1'b0, HSIZE_WORD);
      @(negedge clk);
      check(int'(n_hs) - hs0 == 2, $sformatf("8-word line fill took %0d handshakes", int'(n_hs) - hs0));
      long_bursts++;
      for (int i = 0; i < 8; i++)
        check(bfm.rd_buf[i] == code_w[8 * l + i], $sformatf("code word %0d", 8 * l + i));
    end
    bfm.xfer(DATA, 1, 1'b0, HSIZE_WORD);
    d[0] = bfm.rd_buf[0];
    bfm.xfer(DATA + 4, 4, 1'b0, HSIZE_WORD);
    for (int i = 0; i < 4; i++) d[1 + i] = bfm.rd_buf[i];
    bfm.xfer(DATA + 20, 3, 1'b0, HSIZE_WORD);
    for (int i = 0; i < 3; i++) d[5 + i] = bfm.rd_buf[i];
    sum = 0;
    for (int i = 0; i < 8; i++) sum += d[i];
    bfm.wr_buf[0] = sum;
    bfm.xfer(RESULT, 1, 1'b1, HSIZE_WORD);
    bfm.wr_buf[0] = 32'h00A5_0000;                 // byte lane of offset 1
    bfm.xfer(RESULT + 5, 1, 1'b1, HSIZE_BYTE);
    bfm.wr_buf[0] = 32'h0000_BEEF;                 // half lane of offset 2
    bfm.xfer(RESULT + 6, 1, 1'b1, HSIZE_HALF);
    rmw_stores += 2;
    bfm.wr_buf[0] = 32'h1;
    bfm.xfer(DONE, 1, 1'b1, HSIZE_WORD);
    runs++;
    while (leon_rst_n) @(negedge clk);
  endtask

  initial forever begin
    @(negedge clk);
    if (leon_rst_n) leon_run();
  end

  // ------------------------------------------------------------ network
  task automatic send(word_q_t q);
    foreach (q[i]) begin
      @(negedge clk);
      while ($urandom % 5 == 0) begin
        net_in_valid = 0;
        @(negedge clk);
      end
      net_in_valid     = 1;
      net_in_word.data = q[i];
      net_in_word.sof  = (i == 0);
      net_in_word.eof  = (i == q.size() - 1);
      @(posedge clk);
      while (!net_in_ready) @(posedge clk);
    end
    @(negedge clk);
    net_in_valid = 0;
  endtask

  task automatic ctrl(logic [7:0] code, logic [7:0] len, logic [15:0] seq,
                      logic [31:0] addr, word_q_t words);
    word_q_t pl;
    pl = {};
    pl.push_back({code, len, seq});
    pl.push_back(addr);
    foreach (words[i]) pl.push_back(words[i]);
    send(tbn_udp(HOST, FPX, HPORT, PORT, IP_PROTO_UDP, pl));
  endtask

  // receive one reply; check its headers; return its payload
  task automatic reply(output word_q_t pl);
    word_q_t q;
    bit done;
    q = {};
    done = 0;
    while (!done) begin
      @(negedge clk);
      net_out_ready = ($urandom % 3 != 0);
      @(posedge clk);
      if (net_out_valid && net_out_ready) begin
        q.push_back(net_out_word.data);
        done = net_out_word.eof;
      end
    end
    @(negedge clk);
    net_out_ready = 0;
    check(q.size() >= 8, "reply length");
    check(tbn_csum(q, 5) == 16'h0000, "reply IP checksum");
    check(q[0][15:0] == 16'(4 * q.size()), "reply IP length");
    check(q[3] == FPX && q[4] == HOST, "reply IP addresses");
    check(q[5] == {PORT, HPORT}, "reply UDP ports");
    pl = q[7:$];
  endtask

  task automatic status(output logic [2:0] flags, output logic [31:0] cycles);
    word_q_t pl;
    ctrl(CMD_STATUS, 8'd0, 16'd0, 32'd0, pl);
    reply(pl);
    check(pl.size() == 4 && pl[0][31:24] == RSP_STATUS, "status reply");
    flags  = pl[0][2:0];
    cycles = pl[1];
  endtask

  task automatic read_mem(logic [31:0] a, output logic [31:0] v);
    word_q_t pl;
    pl = {};
    ctrl(CMD_READ, 8'd0, 16'd0, a, pl);
    reply(pl);
    check(pl.size() == 3 && pl[0][31:24] == RSP_READ && pl[1] == a, $sformatf("read reply for %h", a));
    v = pl[2];
  endtask

  task automatic run_program(int k);
    logic [2:0]  fl;
    logic [31:0] cy, v;
    word_q_t     none;
    none = {};
    ctrl(CMD_START, 8'd0, 16'd0, 32'd0, none);
    fl = 0;
    while (!fl[0]) begin
      repeat (200) @(posedge clk);
      status(fl, cy);
    end
    check(runs == k, $sformatf("program run %0d completed", k));
    check(fl == 3'b101, $sformatf("status flags %b after run", fl));
    check(cy == 32'(done_seen - rise_seen),
          $sformatf("cycle count %0d, expected %0d", cy, done_seen - rise_seen));
    check(cy == prog_cycles && prog_done, "cycle count port");
    read_mem(RESULT, v);
    check(v == exp_sum, $sformatf("stored sum %h, expected %h", v, exp_sum));
    read_mem(RESULT + 4, v);
    check(v == 32'h11A5_BEEF, $sformatf("patched word %h", v));
    $display("run %0d: %0d cycles", k, cy);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_q_t     w, pl;
    logic [2:0]  fl;
    logic [31:0] cy, v;
    net_in_valid = 0; net_in_word = '0; net_out_ready = 0;
    for (int i = 0; i < 16; i++) code_w[i] = $urandom;
    for (int i = 0; i < 12; i++) data_w[i] = $urandom;
    exp_sum = 0;
    for (int i = 0; i < 8; i++) exp_sum += data_w[i];
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);

    // traffic for others
    w = {32'h0200_0000, 32'h4000_0000};
    send(tbn_udp(HOST, FPX, HPORT, PORT + 16'd1, IP_PROTO_UDP, w));
    send(tbn_udp(HOST, FPX, HPORT, PORT, 8'd6, w));

    status(fl, cy);
    check(fl == 3'b100, $sformatf("status after power-up %b", fl));

    // data packet (sequence 1) before code packet (sequence 0); length 10
    // of 12 words: the last two are not written
    w = {};
    for (int i = 0; i < 12; i++) w.push_back(data_w[i]);
    ctrl(CMD_LOAD, 8'd10, 16'd1, DATA, w);
    w = {};
    for (int i = 0; i < 16; i++) w.push_back(code_w[i]);
    ctrl(CMD_LOAD, 8'd16, 16'd0, ENTRY, w);
    w = {32'h1122_3344};
    ctrl(CMD_LOAD, 8'd1, 16'd2, RESULT + 4, w);

    // errors
    w = {};
    ctrl(8'h55, 8'd0, 16'd0, 32'd0, w);
    reply(pl);
    check(pl[0][31:24] == RSP_ERROR && pl[0][7:0] == ERR_BAD_CMD, "unknown command reply");
    send(tbn_udp(HOST, FPX, HPORT, PORT, IP_PROTO_UDP, '{{CMD_READ, 24'd0}}));
    reply(pl);
    check(pl[0][31:24] == RSP_ERROR && pl[0][7:0] == ERR_SHORT_PKT, "short packet reply");

    read_mem(DATA + 4, v);
    check(v == data_w[1], "read memory after load");
    read_mem(DATA + 40, v);
    check(v == 32'd0, "words beyond the length field ignored");
    read_mem(ENTRY + 60, v);
    check(v == code_w[15], "last code word");
    status(fl, cy);
    check(fl == 3'b100 && pl.size() >= 1, "status before start");

    run_program(1);
    check(polls > 1, $sformatf("boot ROM polled %0d times before start", polls));
    run_program(2);

    // mechanism coverage
    check(n_drop >= 16'd2, $sformatf("foreign packets dropped: %0d", n_drop));
    check(n_err == 16'd2, $sformatf("error replies: %0d", n_err));
    check(n_starts == 16'd2 && boots == 3, $sformatf("starts %0d boots %0d", n_starts, boots));
    check(n_hits > 0, $sformatf("buffered burst beats: %0d", n_hits));
    check(long_bursts == 4, "8-word bursts with a second handshake");
    check(rmw_stores == 4, "sub-word read-modify-write stores");
    check(mdl.n_conflicts == both_req && both_req > 0, $sformatf("SDRAM arbitration conflicts: %0d", mdl.n_conflicts));
    check(in_stalls > 0, $sformatf("input stalls: %0d", in_stalls));
    check(out_stalls > 0, $sformatf("output stalls: %0d", out_stalls));
    $display("dropped=%0d errors=%0d starts=%0d polls=%0d hits=%0d conflicts=%0d in_stalls=%0d out_stalls=%0d replies=%0d",
             n_drop, n_err, n_starts, polls, n_hits, mdl.n_conflicts, in_stalls, out_stalls, n_repl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
