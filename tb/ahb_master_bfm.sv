// ahb_master_bfm: behavioural AHB master standing in for the LEON core in
// simulation. xfer() runs one single or incrementing transfer of n beats
// with AHB address/data pipelining: signals change at the falling clock
// edge, a beat's address phase and the previous beat's data phase end at the
// rising edge that sees HREADY high. Write data comes from wr_buf[], read
// data goes to rd_buf[]; last_cycles is the number of clock cycles the
// transfer took, from its first address phase to its last data phase.
module ahb_master_bfm
  import liquid_pkg::*;
(
  input  logic     clk,
  output ahb_m2s_t m,
  input  ahb_s2m_t s
);

  logic [31:0] wr_buf [16];
  logic [31:0] rd_buf [16];
  int          last_cycles;

  initial m = '{haddr: 32'd0, htrans: HTRANS_IDLE, hwrite: 1'b0,
                hsize: HSIZE_WORD, hburst: 3'b000, hwdata: 32'd0};

  task automatic xfer(input logic [31:0] a0, input int n, input logic wr,
                      input logic [2:0] size);
    int step;
    step = (size == HSIZE_BYTE) ? 1 : (size == HSIZE_HALF) ? 2 : 4;
    @(negedge clk);
    m.haddr  = a0;
    m.htrans = HTRANS_NONSEQ;
    m.hwrite = wr;
    m.hsize  = size;
    m.hburst = (n > 1) ? 3'b001 : 3'b000;   // INCR or SINGLE
    last_cycles = 0;
    for (int k = 0; k <= n; k++) begin
      while (!s.hready) begin
        @(negedge clk);
        last_cycles++;
      end
      if (k > 0 && !wr) rd_buf[k-1] = s.hrdata;
      if (k == n) break;
      @(negedge clk);
      last_cycles++;
      if (k + 1 < n) begin
        m.haddr  = a0 + 32'(step * (k + 1));
        m.htrans = HTRANS_SEQ;
      end else begin
        m.htrans = HTRANS_IDLE;
      end
      m.hwdata = wr ? wr_buf[k] : 32'd0;
    end
  endtask

endmodule
