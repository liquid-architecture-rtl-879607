// tb_ahb_mem_adapter: self-checking test of the AHB main-memory adapter.
// A behavioural AHB master runs single reads, incrementing read bursts from
// aligned and unaligned addresses, byte/half/word writes and a write burst
// against the adapter and a behavioural SDRAM controller. A 32-bit reference
// memory in the testbench predicts every read. Also checked: one SDRAM
// handshake per 4-word read burst, two per 8-word burst, two per write
// beat, and no wait states on buffered burst beats.
module tb_ahb_mem_adapter;
  import liquid_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ahb_m2s_t m;
  ahb_s2m_t s;
  sd_req_t  sreq [1];
  sd_rsp_t  srsp [1];
  logic [15:0] n_hs, n_hits;

  ahb_master_bfm  bfm (.clk, .m, .s);
  ahb_mem_adapter dut (.clk, .rst_n, .hsel(m.haddr[31:28] == 4'h4), .ahb_m(m),
                       .hready_in(s.hready), .ahb_s(s), .sd_req(sreq[0]),
                       .sd_rsp(srsp[0]), .n_handshakes(n_hs), .n_buf_hits(n_hits));
  fpx_sdram_model #(.NPORT(1), .MEM_AW(10)) mdl (.clk, .rst_n, .req(sreq), .rsp(srsp));

  int checks = 0, failures = 0;
  logic [31:0] refm [2048];   // 32-bit words of the 8 KB model memory

  function automatic logic [31:0] pat(int j);
    return 32'h1234_5678 ^ (32'(j) * 32'h9E37_79B1);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference write with big-endian byte lanes
  task automatic ref_write(input logic [31:0] a, input logic [2:0] size, input logic [31:0] d);
    int j;
    j = int'(a[12:2]);
    for (int b = 0; b < 4; b++) begin
      bit hit;
      case (size)
        HSIZE_BYTE: hit = (b == int'(a[1:0]));
        HSIZE_HALF: hit = (b / 2 == int'(a[1]));
        default:    hit = 1;
      endcase
      if (hit) refm[j][31-8*b -: 8] = d[31-8*b -: 8];
    end
  endtask

  task automatic rd_burst(input logic [31:0] a, input int n, input int exp_hs);
    int hs0;
    hs0 = int'(n_hs);
    bfm.xfer(a, n, 1'b0, HSIZE_WORD);
    for (int k = 0; k < n; k++)
      check(bfm.rd_buf[k] == refm[int'(a[12:2]) + k],
            $sformatf("read %h beat %0d: %h vs %h", a, k, bfm.rd_buf[k], refm[int'(a[12:2]) + k]));
    @(negedge clk);
    if (exp_hs >= 0)
      check(int'(n_hs) - hs0 == exp_hs,
            $sformatf("burst %h x%0d: %0d handshakes, expected %0d", a, n, int'(n_hs) - hs0, exp_hs));
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c1, c4;
    for (int j = 0; j < 2048; j++) refm[j] = pat(j);
    for (int i = 0; i < 1024; i++) mdl.mem[i] = {pat(2 * i), pat(2 * i + 1)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // single reads, both halves of a 64-bit word
    for (int t = 0; t < 20; t++)
      rd_burst(32'h4000_0000 + 32'((($urandom % 2048)) * 4), 1, 1);

    // 4-word bursts: one handshake, aligned and unaligned; no wait on hits
    rd_burst(32'h4000_0100, 4, 1);
    rd_burst(32'h4000_0204, 4, 1);
    bfm.xfer(32'h4000_0300, 1, 1'b0, HSIZE_WORD);
    c1 = bfm.last_cycles;
    bfm.xfer(32'h4000_0300, 4, 1'b0, HSIZE_WORD);
    c4 = bfm.last_cycles;
    check(c4 - c1 == 3, $sformatf("buffered beats cost %0d cycles, expected 3", c4 - c1));

    // 8-word bursts: a second handshake after four words
    rd_burst(32'h4000_0400, 8, 2);
    rd_burst(32'h4000_0504, 8, 2);

    // writes: each beat is a read-modify-write of two handshakes
    for (int t = 0; t < 30; t++) begin
      logic [31:0] a, d;
      logic [2:0]  sz;
      int hs0;
      sz = 3'($urandom % 3);
      a  = 32'h4000_0000 + 32'($urandom % 8192);
      if (sz == HSIZE_HALF) a[0] = 1'b0;
      if (sz == HSIZE_WORD) a[1:0] = 2'b00;
      d  = $urandom;
      // AHB big-endian: the data sits on its byte lanes
      bfm.wr_buf[0] = d;
      hs0 = int'(n_hs);
      bfm.xfer(a, 1, 1'b1, sz);
      @(negedge clk);
      check(int'(n_hs) - hs0 == 2, "write beat needs two handshakes");
      ref_write(a, sz, d);
      rd_burst({a[31:2], 2'b00}, 1, 1);
    end

    // write burst of two words: no write bursting, four handshakes
    bfm.wr_buf[0] = 32'hCAFE_0001;
    bfm.wr_buf[1] = 32'hCAFE_0002;
    begin
      int hs0;
      hs0 = int'(n_hs);
      bfm.xfer(32'h4000_0604, 2, 1'b1, HSIZE_WORD);
      @(negedge clk);
      check(int'(n_hs) - hs0 == 4, "2-beat write burst needs four handshakes");
    end
    ref_write(32'h4000_0604, HSIZE_WORD, 32'hCAFE_0001);
    ref_write(32'h4000_0608, HSIZE_WORD, 32'hCAFE_0002);
    rd_burst(32'h4000_0600, 4, 1);

    // memory written behind the adapter is seen by the next burst
    mdl.mem[10'h0C0] = 64'h0BAD_F00D_1111_2222;
    refm[11'h180] = 32'h0BAD_F00D;
    refm[11'h181] = 32'h1111_2222;
    rd_burst(32'h4000_0600, 4, 1);
    check(int'(n_hits) > 0, "buffer hits happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
