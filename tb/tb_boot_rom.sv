// tb_boot_rom: self-checking test of the boot ROM.
// Reads the ROM through AHB single and burst transfers in two instances
// (start flag at 0x4000_0000 and at 0x4000_0ABC) and compares every word
// with the SPARC V8 machine code of the polling loop, hand-assembled:
//   sethi %hi(flag),%g1 / ld [%g1+%lo(flag)],%g2 / cmp %g2,0 / be .-8 /
//   nop / jmp %g2 / nop, then nops. Also checks zero wait states.
module tb_boot_rom;
  import liquid_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ahb_m2s_t m0, m1;
  ahb_s2m_t s0, s1;

  ahb_master_bfm b0 (.clk, .m(m0), .s(s0));
  ahb_master_bfm b1 (.clk, .m(m1), .s(s1));
  boot_rom #(.FLAG_ADDR(32'h4000_0000)) r0 (.clk, .rst_n, .hsel(1'b1), .ahb_m(m0),
                                           .hready_in(s0.hready), .ahb_s(s0));
  boot_rom #(.FLAG_ADDR(32'h4000_0ABC)) r1 (.clk, .rst_n, .hsel(1'b1), .ahb_m(m1),
                                           .hready_in(s1.hready), .ahb_s(s1));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] exp0 [8] = '{32'h0310_0000, 32'hC400_6000, 32'h80A0_A000, 32'h02BF_FFFE,
                            32'h0100_0000, 32'h81C0_A000, 32'h0100_0000, 32'h0100_0000};
  logic [31:0] exp1 [8] = '{32'h0310_0002, 32'hC400_62BC, 32'h80A0_A000, 32'h02BF_FFFE,
                            32'h0100_0000, 32'h81C0_A000, 32'h0100_0000, 32'h0100_0000};

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    b0.xfer(32'h0, 8, 1'b0, HSIZE_WORD);
    for (int i = 0; i < 8; i++) check(b0.rd_buf[i] == exp0[i], $sformatf("rom0 word %0d: %h", i, b0.rd_buf[i]));
    check(b0.last_cycles == 8, $sformatf("8-beat burst took %0d cycles", b0.last_cycles));
    b1.xfer(32'h0, 8, 1'b0, HSIZE_WORD);
    for (int i = 0; i < 8; i++) check(b1.rd_buf[i] == exp1[i], $sformatf("rom1 word %0d: %h", i, b1.rd_buf[i]));
    for (int t = 0; t < 20; t++) begin
      int i;
      i = int'($urandom % 8);
      b0.xfer(32'(4 * i), 1, 1'b0, HSIZE_WORD);
      check(b0.rd_buf[0] == exp0[i], $sformatf("rom0 single word %0d", i));
    end
    b0.xfer(32'h40, 4, 1'b0, HSIZE_WORD);
    for (int i = 0; i < 4; i++) check(b0.rd_buf[i] == 32'h0100_0000, "nop fill");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
