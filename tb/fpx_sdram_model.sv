// fpx_sdram_model: behavioural model of the FPX SDRAM controller and its
// memory, for simulation only (not synthesizable as written).
//
// NPORT client ports of type sd_req_t/sd_rsp_t. When idle the model picks
// one requesting port round-robin, pulses its gnt for one cycle and then
// serves the burst: after LAT cycles a read returns one word per cycle on
// rvalid; a write takes one word every second cycle, pulsing wack each time.
// The memory is 2**MEM_AW 64-bit words; higher address bits wrap. It starts
// all zero. n_conflicts counts cycles with more than one requesting
// port, n_grants the bursts served per port.
module fpx_sdram_model
  import liquid_pkg::*;
#(
  parameter int NPORT  = 3,
  parameter int MEM_AW = 12,
  parameter int LAT    = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sd_req_t req [NPORT],
  output sd_rsp_t rsp [NPORT]
);

  logic [63:0] mem [2**MEM_AW];
  int          n_conflicts;
  int          n_grants [NPORT];

  typedef enum {M_IDLE, M_WAIT, M_READ, M_WRITE, M_GAP} mstate_e;
  mstate_e     st;
  int          port, rr, lat_cnt, beat, len;
  logic [MEM_AW-1:0] base;

  initial begin
    for (int i = 0; i < 2**MEM_AW; i++) mem[i] = '0;
  end

  // cycles in which more than one client is requesting
  initial n_conflicts = 0;
  always @(posedge clk) begin
    int nr;
    nr = 0;
    for (int p = 0; p < NPORT; p++) if (req[p].req) nr++;
    if (rst_n && nr > 1) n_conflicts++;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= M_IDLE;
      rr          <= 0;
      for (int p = 0; p < NPORT; p++) begin
        rsp[p]      <= '0;
        n_grants[p] <= 0;
      end
    end else begin
      for (int p = 0; p < NPORT; p++) begin
        rsp[p].gnt    <= 1'b0;
        rsp[p].wack   <= 1'b0;
        rsp[p].rvalid <= 1'b0;
      end
      case (st)
        M_IDLE: begin
          int nreq, pick;
          nreq = 0;
          pick = -1;
          for (int k = 0; k < NPORT; k++) begin
            int p;
            p = (rr + k) % NPORT;
            if (req[p].req) begin
              nreq++;
              if (pick < 0) pick = p;
            end
          end
          if (pick >= 0) begin
            rsp[pick].gnt  <= 1'b1;
            n_grants[pick] <= n_grants[pick] + 1;
            port    <= pick;
            rr      <= (pick + 1) % NPORT;
            base    <= req[pick].addr[MEM_AW-1:0];
            len     <= int'(req[pick].len);
            beat    <= 0;
            lat_cnt <= LAT;
            st      <= req[pick].we ? M_WRITE : M_WAIT;
          end
        end
        M_WAIT: begin
          if (lat_cnt > 1) lat_cnt <= lat_cnt - 1;
          else             st      <= M_READ;
        end
        M_READ: begin
          rsp[port].rvalid <= 1'b1;
          rsp[port].rdata  <= mem[base + MEM_AW'(beat)];
          beat <= beat + 1;
          if (beat + 1 == len) st <= M_GAP;
        end
        M_WRITE: begin
          if (lat_cnt > 0) lat_cnt <= lat_cnt - 1;
          else begin
            mem[base + MEM_AW'(beat)] <= req[port].wdata;
            rsp[port].wack <= 1'b1;
            beat    <= beat + 1;
            lat_cnt <= 1;
            if (beat + 1 == len) st <= M_GAP;
          end
        end
        M_GAP: st <= M_IDLE;
        default: st <= M_IDLE;
      endcase
    end
  end

endmodule
