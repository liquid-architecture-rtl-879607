// tb_ahb_decoder: self-checking test of the AHB address decoder.
// Two testbench slaves stand behind it: a ROM slave with no wait states and
// a RAM slave with 0 to 3 random wait states (garbage data while waiting), each returning a value made
// from the address it was given. Random single and burst reads to ROM,
// RAM and unmapped addresses must return the right slave's data (zero for
// unmapped), and each slave must see only its own transfers.
module tb_ahb_decoder;
  import liquid_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ahb_m2s_t m;
  ahb_s2m_t bus_s, rom_s, ram_s;
  logic     hsel_rom, hsel_ram;

  ahb_master_bfm bfm (.clk, .m, .s(bus_s));
  ahb_decoder dut (.clk, .rst_n, .haddr(m.haddr), .hsel_rom, .hsel_ram,
                   .rom_s, .ram_s, .bus_s);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ROM slave: data phase of one cycle
  logic [31:0] rom_a;
  always_ff @(posedge clk)
    if (hsel_rom && bus_s.hready && m.htrans[1]) rom_a <= m.haddr;
  assign rom_s = '{hready: 1'b1, hresp: HRESP_OKAY, hrdata: rom_a ^ 32'hAAAA_0000};

  // RAM slave: random wait states
  logic [31:0] ram_a;
  int          ram_wait;
  bit          ram_busy;
  int          rom_seen, ram_seen;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ram_busy <= 0; ram_wait <= 0; rom_seen <= 0; ram_seen <= 0;
    end else begin
      if (ram_busy && ram_wait > 0) ram_wait <= ram_wait - 1;
      else if (ram_busy) ram_busy <= 0;
      if (bus_s.hready && m.htrans[1]) begin
        if (hsel_rom) rom_seen <= rom_seen + 1;
        if (hsel_ram) begin
          ram_seen <= ram_seen + 1;
          ram_a    <= m.haddr;
          ram_busy <= 1;
          ram_wait <= int'($urandom % 4);
        end
      end
    end
  end
  assign ram_s = '{hready: !(ram_busy && ram_wait > 0), hresp: HRESP_OKAY,
                   hrdata: (ram_busy && ram_wait > 0) ? 32'hDEAD_BEEF : ram_a ^ 32'h5555_0000};

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nrom = 0, nram = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic [31:0] a;
      int n, r;
      r = int'($urandom % 3);
      a = {(r == 0) ? 4'h0 : (r == 1) ? 4'h4 : 4'h8, 20'($urandom), 8'h00};
      n = 1 + int'($urandom % 4);
      bfm.xfer(a, n, 1'b0, HSIZE_WORD);
      if (r == 0) nrom += n;
      if (r == 1) nram += n;
      for (int k = 0; k < n; k++) begin
        logic [31:0] e;
        e = (r == 0) ? ((a + 32'(4 * k)) ^ 32'hAAAA_0000) :
            (r == 1) ? ((a + 32'(4 * k)) ^ 32'h5555_0000) : 32'd0;
        check(bfm.rd_buf[k] == e, $sformatf("read %h beat %0d: %h, expected %h", a, k, bfm.rd_buf[k], e));
      end
    end
    @(negedge clk);
    check(rom_seen == nrom && ram_seen == nram,
          $sformatf("slave transfers %0d/%0d, expected %0d/%0d", rom_seen, ram_seen, nrom, nram));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
