// tb_cycle_counter: self-checking test of the program cycle counter.
// For random run lengths it pulses start, drives unrelated bus traffic
// (reads of DONE_ADDR, writes elsewhere, a DONE_ADDR write while HREADY is
// low), then the end-of-program store, and checks that count equals the
// number of clock edges from start to that store and then holds.
module tb_cycle_counter;
  import liquid_pkg::*;

  localparam logic [31:0] DONE = 32'h4000_0004;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start, hready, running, done;
  ahb_m2s_t    m;
  logic [31:0] count;

  cycle_counter #(.DONE_ADDR(DONE)) dut (.clk, .rst_n, .start, .ahb_m(m), .hready,
                                         .count, .running, .done);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus(logic [31:0] a, logic [1:0] tr, logic wr, logic rdy);
    m.haddr = a; m.htrans = tr; m.hwrite = wr; hready = rdy;
  endtask

  initial begin
    m = '0; start = 0; hready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!running && !done && count == 0, "idle after reset");
    for (int t = 0; t < 20; t++) begin
      int n;
      n = 3 + int'($urandom % 500);
      @(negedge clk);
      start = 1;
      bus(32'h0, HTRANS_IDLE, 0, 1);
      @(posedge clk);
      @(negedge clk);
      start = 0;
      check(running && !done, "running after start");
      for (int i = 0; i < n - 1; i++) begin
        int r;
        r = int'($urandom % 4);
        case (r)
          0: bus(DONE, HTRANS_NONSEQ, 0, 1);           // read of the marker
          1: bus(DONE + 4, HTRANS_NONSEQ, 1, 1);       // other write
          2: bus(DONE, HTRANS_NONSEQ, 1, 0);           // bus stalled
          default: bus(DONE, HTRANS_IDLE, 1, 1);       // idle cycle
        endcase
        @(negedge clk);
      end
      bus(DONE, (t % 2 == 1) ? HTRANS_SEQ : HTRANS_NONSEQ, 1, 1);
      @(negedge clk);
      bus(32'h0, HTRANS_IDLE, 0, 1);
      check(done && !running, "done after marker store");
      check(count == 32'(n), $sformatf("count %0d, expected %0d", count, n));
      repeat (5) @(negedge clk);
      bus(DONE, HTRANS_NONSEQ, 1, 1);
      @(negedge clk);
      check(count == 32'(n), "count holds after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
