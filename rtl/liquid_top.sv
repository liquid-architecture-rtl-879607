// liquid_top: the Liquid processor system, the control and memory logic
// that turns a LEON SPARC core on the FPX board into a processor that is
// loaded, started and read back over the Internet.
//
// Network side: IP packets arrive from the protocol wrappers as a word
// stream (net_in_*). The control packet processor (cpp) keeps the UDP
// packets sent to LEON_PORT and passes their commands to leon_ctrl, which
// loads program words into main memory, restarts LEON, reads memory and
// asks the message generator (msg_gen) for reply packets (net_out_*).
// Processor side: LEON's AHB master signals (leon_ahb_m) are decoded by
// ahb_decoder onto the boot ROM and the main-memory adapter. The boot ROM
// polls the start-flag word in main memory that leon_ctrl writes to start a
// program; the memory adapter turns AHB transfers into 64-bit accesses on
// one FPX SDRAM controller port (sd_leon_*). leon_ctrl uses a second port
// (sd_user_*); the SDRAM controller arbitrates between them. A cycle
// counter times each program from its start to its store to DONE_ADDR.
// LEON, the SDRAM controller and the protocol wrappers are outside this
// module; their signals are its ports.
// Parameters: LEON_PORT (UDP port of the control protocol), FLAG_ADDR
// (start-flag word), ENTRY (entry address written into it), DONE_ADDR
// (end-of-program store), RST_CYCLES (LEON reset length). All are this
// design's choices except FLAG_ADDR, the polled location 0x4000_0000.
module liquid_top
  import liquid_pkg::*;
#(
  parameter logic [15:0] LEON_PORT  = 16'd5000,
  parameter logic [31:0] FLAG_ADDR  = 32'h4000_0000,
  parameter logic [31:0] ENTRY      = 32'h4000_0100,
  parameter logic [31:0] DONE_ADDR  = 32'h4000_0004,
  parameter int unsigned RST_CYCLES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // network, from and to the IP protocol wrappers
  input  logic        net_in_valid,
  output logic        net_in_ready,
  input  pkt_word_t   net_in_word,
  output logic        net_out_valid,
  input  logic        net_out_ready,
  output pkt_word_t   net_out_word,
  // LEON processor
  output logic        leon_rst_n,
  input  ahb_m2s_t    leon_ahb_m,
  output ahb_s2m_t    leon_ahb_s,
  // FPX SDRAM controller client ports
  output sd_req_t     sd_leon_req,
  input  sd_rsp_t     sd_leon_rsp,
  output sd_req_t     sd_user_req,
  input  sd_rsp_t     sd_user_rsp,
  // status and statistics
  output logic [31:0] prog_cycles,
  output logic        prog_done,
  output logic [15:0] n_ctrl_pkts,
  output logic [15:0] n_dropped_pkts,
  output logic [15:0] n_replies,
  output logic [15:0] n_errors,
  output logic [15:0] n_starts,
  output logic [15:0] n_mem_handshakes,
  output logic [15:0] n_buf_hits
);

  // cpp -> leon_ctrl
  logic        cmd_valid, cmd_ready;
  cmd_t        cmd;
  logic        dat_valid, dat_ready, dat_last;
  logic [31:0] dat;
  // leon_ctrl -> msg_gen
  logic        msg_valid, msg_ready;
  msg_t        msg;
  // cycle counter
  logic        cnt_start, cnt_running;
  // AHB
  logic        hsel_rom, hsel_ram;
  ahb_s2m_t    rom_s, ram_s;

  cpp #(.LEON_PORT(LEON_PORT)) u_cpp (
    .clk, .rst_n,
    .in_valid (net_in_valid), .in_ready (net_in_ready), .in_word (net_in_word),
    .cmd_valid, .cmd_ready, .cmd,
    .dat_valid, .dat_ready, .dat, .dat_last,
    .n_ctrl_pkts, .n_dropped_pkts
  );

  leon_ctrl #(
    .FLAG_ADDR (FLAG_ADDR), .ENTRY (ENTRY),
    .RAM_NIBBLE (4'h4), .RST_CYCLES (RST_CYCLES)
  ) u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd,
    .dat_valid, .dat_ready, .dat, .dat_last,
    .msg_valid, .msg_ready, .msg,
    .leon_rst_n,
    .cnt_start, .cnt_cycles (prog_cycles), .cnt_running, .cnt_done (prog_done),
    .sd_req (sd_user_req), .sd_rsp (sd_user_rsp),
    .n_errors, .n_starts
  );

  msg_gen #(.LEON_PORT(LEON_PORT)) u_msg (
    .clk, .rst_n,
    .msg_valid, .msg_ready, .msg,
    .out_valid (net_out_valid), .out_ready (net_out_ready), .out_word (net_out_word),
    .n_sent (n_replies)
  );

  cycle_counter #(.DONE_ADDR(DONE_ADDR)) u_cnt (
    .clk, .rst_n,
    .start (cnt_start), .ahb_m (leon_ahb_m), .hready (leon_ahb_s.hready),
    .count (prog_cycles), .running (cnt_running), .done (prog_done)
  );

  ahb_decoder #(.ROM_NIBBLE(4'h0), .RAM_NIBBLE(4'h4)) u_dec (
    .clk, .rst_n,
    .haddr (leon_ahb_m.haddr), .hsel_rom, .hsel_ram,
    .rom_s, .ram_s, .bus_s (leon_ahb_s)
  );

  boot_rom #(.FLAG_ADDR(FLAG_ADDR)) u_rom (
    .clk, .rst_n,
    .hsel (hsel_rom), .ahb_m (leon_ahb_m), .hready_in (leon_ahb_s.hready),
    .ahb_s (rom_s)
  );

  ahb_mem_adapter u_mem (
    .clk, .rst_n,
    .hsel (hsel_ram), .ahb_m (leon_ahb_m), .hready_in (leon_ahb_s.hready),
    .ahb_s (ram_s),
    .sd_req (sd_leon_req), .sd_rsp (sd_leon_rsp),
    .n_handshakes (n_mem_handshakes), .n_buf_hits
  );

endmodule
