// liquid_pkg: types and constants shared by the Liquid processor system.
//
// It holds three groups of definitions:
//  * the network word stream between the IP protocol wrappers and the
//    control logic (32-bit words with start/end-of-packet marks),
//  * the command and reply codes of the UDP control protocol and the
//    records passed from the control packet processor to leon_ctrl and from
//    leon_ctrl to the message generator,
//  * the AMBA AHB signal bundles of the LEON bus and the client port of the
//    FPX SDRAM controller (64-bit words, burst length given up front).
// The four commands (LEON status, Load program, Start LEON, Read memory),
// the 1-byte length, 2-byte sequence number and 4-byte address fields and
// the 64-bit memory words follow the design description; the numeric code
// values, the reply layout and the SDRAM handshake are this design's choice.
package liquid_pkg;

  // ---------------------------------------------------------------- network
  typedef struct packed {
    logic [31:0] data;
    logic        sof;   // first word of an IP packet
    logic        eof;   // last word of an IP packet
  } pkt_word_t;

  localparam logic [7:0] IP_PROTO_UDP = 8'd17;

  // ------------------------------------------------------------ commands
  typedef enum logic [7:0] {
    CMD_STATUS = 8'h01,   // LEON status
    CMD_LOAD   = 8'h02,   // Load program
    CMD_START  = 8'h03,   // Start LEON (restart and execute)
    CMD_READ   = 8'h04    // Read memory
  } cmd_code_e;

  localparam logic [7:0] RSP_STATUS = 8'h81;
  localparam logic [7:0] RSP_READ   = 8'h84;
  localparam logic [7:0] RSP_ERROR  = 8'hEE;

  typedef enum logic [7:0] {
    ERR_NONE      = 8'h00,
    ERR_BAD_CMD   = 8'h01,  // unknown command code
    ERR_SHORT_PKT = 8'h02,  // payload too short for its command
    ERR_BAD_ADDR  = 8'h03   // address outside main memory or not word aligned
  } err_code_e;

  // Control command, as parsed by the control packet processor.
  typedef struct packed {
    logic [7:0]  code;       // command code (first payload byte)
    logic [7:0]  len;        // total data length, 32-bit words
    logic [15:0] seq;        // packet sequence number
    logic [31:0] addr;       // memory address (byte address, LEON map)
    logic [7:0]  ndata;      // data words that follow on the data stream
    logic        short_pkt;  // payload ended before the address field
    logic [31:0] peer_ip;    // source IP of the request
    logic [31:0] local_ip;   // destination IP of the request
    logic [15:0] peer_port;  // source UDP port of the request
  } cmd_t;

  // Reply request, from leon_ctrl to the message generator.
  localparam int MSG_MAX_WORDS = 3;
  typedef struct packed {
    logic [7:0]  code;                        // reply code
    logic [23:0] aux;                         // rest of the first payload word
    logic [1:0]  nwords;                      // data words after the first
    logic [MSG_MAX_WORDS-1:0][31:0] words;    // words[0] goes out first
    logic [31:0] peer_ip;
    logic [31:0] local_ip;
    logic [15:0] peer_port;
  } msg_t;

  // ------------------------------------------------------------ AMBA AHB
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_BUSY   = 2'b01;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [1:0] HTRANS_SEQ    = 2'b11;
  localparam logic [2:0] HSIZE_BYTE    = 3'b000;
  localparam logic [2:0] HSIZE_HALF    = 3'b001;
  localparam logic [2:0] HSIZE_WORD    = 3'b010;
  localparam logic [1:0] HRESP_OKAY    = 2'b00;

  typedef struct packed {
    logic [31:0] haddr;
    logic [1:0]  htrans;
    logic        hwrite;
    logic [2:0]  hsize;
    logic [2:0]  hburst;
    logic [31:0] hwdata;
  } ahb_m2s_t;

  typedef struct packed {
    logic        hready;
    logic [1:0]  hresp;
    logic [31:0] hrdata;
  } ahb_s2m_t;

  // ------------------------------------------------- FPX SDRAM client port
  localparam int SD_AW = 23;          // 64-bit word address (64 MB)
  localparam int SD_LW = 9;           // burst length 1..256

  typedef struct packed {
    logic             req;    // held until gnt
    logic             we;     // 1 = write burst
    logic [SD_AW-1:0] addr;   // first 64-bit word
    logic [SD_LW-1:0] len;    // number of 64-bit words
    logic [63:0]      wdata;  // current write word, advanced by wack
  } sd_req_t;

  typedef struct packed {
    logic        gnt;     // one-cycle pulse: request accepted
    logic        wack;    // one-cycle pulse: write word taken
    logic        rvalid;  // one-cycle pulse: rdata holds the next word
    logic [63:0] rdata;
  } sd_rsp_t;

  // Mask of the bytes a big-endian AHB write of size hsize touches at
  // byte offset off inside a 32-bit word (byte 0 is bits 31:24).
  function automatic logic [31:0] be_mask(input logic [2:0] hsize,
                                          input logic [1:0] off);
    logic [31:0] m;
    unique case (hsize)
      HSIZE_BYTE: m = 32'hFF00_0000 >> (8 * off);
      HSIZE_HALF: m = off[1] ? 32'h0000_FFFF : 32'hFFFF_0000;
      default:    m = 32'hFFFF_FFFF;
    endcase
    return m;
  endfunction

endpackage
