// tb_leon_ctrl: self-checking test of the supervisory state machine.
// Commands are driven straight onto its command and data inputs; main
// memory is the behavioural SDRAM controller model. Checked: the power-up
// sequence (start flag cleared, LEON reset released), Load program (words
// land in the right 32-bit halves, two handshakes per word), Read memory,
// LEON status contents, Start LEON (reset asserted, entry address written to
// the flag, reset held RST_CYCLES, counter started once at release) and
// error replies for an unknown code, a bad address and a short packet.
module tb_leon_ctrl;
  import liquid_pkg::*;

  localparam logic [31:0] FLAG  = 32'h4000_0000;
  localparam logic [31:0] ENTRY = 32'h4000_0100;
  localparam int          RSTC  = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cmd_valid, cmd_ready, dat_valid, dat_ready, dat_last;
  cmd_t        cmd;
  logic [31:0] dat;
  logic        msg_valid, msg_ready;
  msg_t        msg;
  logic        leon_rst_n, cnt_start;
  logic [31:0] cnt_cycles = 32'd12345;
  logic        cnt_running = 1'b0, cnt_done = 1'b1;
  sd_req_t     sreq [1];
  sd_rsp_t     srsp [1];
  logic [15:0] n_errors, n_starts;

  leon_ctrl #(.FLAG_ADDR(FLAG), .ENTRY(ENTRY), .RST_CYCLES(RSTC)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .dat_valid, .dat_ready, .dat, .dat_last,
    .msg_valid, .msg_ready, .msg, .leon_rst_n, .cnt_start, .cnt_cycles, .cnt_running,
    .cnt_done, .sd_req(sreq[0]), .sd_rsp(srsp[0]), .n_errors, .n_starts);
  fpx_sdram_model #(.NPORT(1), .MEM_AW(10)) mdl (.clk, .rst_n, .req(sreq), .rsp(srsp));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] mem32(logic [31:0] a);
    logic [63:0] w;
    w = mdl.mem[a[12:3]];
    return a[2] ? w[31:0] : w[63:32];
  endfunction

  // monitors
  int n_cnt_start = 0, rst_low_cycles = 0, rel_cycle = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && cnt_start) n_cnt_start++;
    if (rst_n && !leon_rst_n) rst_low_cycles++;
  end

  task automatic send_cmd(logic [7:0] code, logic [31:0] addr, logic [31:0] words [$],
                          bit short_pkt = 0, logic [15:0] seq = 0);
    @(negedge clk);
    cmd = '0;
    cmd.code = code; cmd.addr = addr; cmd.seq = seq; cmd.short_pkt = short_pkt;
    cmd.len = 8'(words.size()); cmd.ndata = 8'(words.size());
    cmd.peer_ip = 32'hC0A8_0001; cmd.local_ip = 32'hC0A8_0002; cmd.peer_port = 16'd999;
    cmd_valid = 1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
    foreach (words[i]) begin
      dat_valid = 1;
      dat = words[i];
      dat_last = (i == words.size() - 1);
      @(posedge clk);
      while (!dat_ready) @(posedge clk);
      @(negedge clk);
      dat_valid = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
  endtask

  task automatic get_msg(output msg_t m);
    @(negedge clk);
    msg_ready = 1;
    @(posedge clk);
    while (!msg_valid) @(posedge clk);
    m = msg;
    @(negedge clk);
    msg_ready = 0;
  endtask

  task automatic wait_idle();
    repeat (2) @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t m;
    logic [31:0] prog [$];
    logic [31:0] none [$];
    logic [31:0] three [$];
    int hs0, t0;
    cmd_valid = 0; dat_valid = 0; dat = 0; dat_last = 0; cmd = '0; msg_ready = 0;
    mdl.mem[0] = 64'hFFFF_FFFF_0BAD_0BAD;    // stale flag and done word
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(!leon_rst_n, "LEON held in reset after power-up");
    wait_idle();
    check(leon_rst_n, "LEON released after power-up");
    check(mem32(FLAG) == 0, "start flag cleared");
    check(mem32(FLAG + 4) == 32'h0BAD_0BAD, "neighbour word kept by read-modify-write");
    check(n_cnt_start == 0, "no counter start at power-up");

    // status
    send_cmd(CMD_STATUS, 0, none, 1);
    get_msg(m);
    check(m.code == RSP_STATUS && m.aux[2:0] == 3'b101 && m.nwords == 2'd3 &&
          m.words[0] == 32'd12345 && m.words[1] == 0, $sformatf("status reply %p", m));
    check(m.peer_ip == 32'hC0A8_0001 && m.local_ip == 32'hC0A8_0002 && m.peer_port == 16'd999,
          "reply addressed to requester");

    // load 7 words from an odd word address
    prog = {};
    for (int i = 0; i < 7; i++) prog.push_back($urandom);
    hs0 = mdl.n_grants[0];
    send_cmd(CMD_LOAD, 32'h4000_0204, prog, 0, 16'd33);
    wait_idle();
    for (int i = 0; i < 7; i++)
      check(mem32(32'h4000_0204 + 32'(4 * i)) == prog[i], $sformatf("loaded word %0d", i));
    check(mdl.n_grants[0] - hs0 == 14, $sformatf("%0d handshakes for 7 words", mdl.n_grants[0] - hs0));
    check(mem32(32'h4000_0200) == 0 && mem32(32'h4000_0220) == 0, "neighbours untouched");

    // read back
    for (int i = 0; i < 7; i++) begin
      send_cmd(CMD_READ, 32'h4000_0204 + 32'(4 * i), none);
      get_msg(m);
      check(m.code == RSP_READ && m.nwords == 2'd2 && m.words[0] == 32'h4000_0204 + 32'(4 * i) &&
            m.words[1] == prog[i], $sformatf("read reply %0d", i));
    end
    send_cmd(CMD_STATUS, 0, none);
    get_msg(m);
    check(m.words[1] == 32'd7 && m.words[2] == 32'd33, "status counts loaded words and sequence");

    // start
    rst_low_cycles = 0;
    send_cmd(CMD_START, 0, none);
    wait_idle();
    check(mem32(FLAG) == ENTRY, "entry address written to start flag");
    check(n_cnt_start == 1 && n_starts == 16'd1, "counter started once");
    check(rst_low_cycles >= RSTC, $sformatf("LEON reset held %0d cycles", rst_low_cycles));
    check(leon_rst_n, "LEON running after start");

    // errors
    send_cmd(8'h7F, 0, none);
    get_msg(m);
    check(m.code == RSP_ERROR && m.aux[7:0] == ERR_BAD_CMD, "unknown command error");
    three = {32'h1, 32'h2, 32'h3};
    send_cmd(CMD_LOAD, 32'h8000_0000, three);
    get_msg(m);
    check(m.code == RSP_ERROR && m.aux[7:0] == ERR_BAD_ADDR, "bad load address error");
    send_cmd(CMD_READ, 32'h4000_0002, none);
    get_msg(m);
    check(m.code == RSP_ERROR && m.aux[7:0] == ERR_BAD_ADDR, "unaligned read error");
    send_cmd(CMD_READ, 0, none, 1);
    get_msg(m);
    check(m.code == RSP_ERROR && m.aux[7:0] == ERR_SHORT_PKT, "short packet error");
    check(n_errors == 16'd4, "error count");
    send_cmd(CMD_READ, 32'h4000_0204, none);
    get_msg(m);
    check(m.code == RSP_READ && m.words[1] == prog[0], "still working after errors");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
