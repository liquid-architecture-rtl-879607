// cycle_counter: measures how many clock cycles a user program runs.
//
// start (one-cycle pulse from leon_ctrl, at the moment LEON leaves reset)
// clears the count and starts counting. The program ends by storing any
// value to DONE_ADDR; the counter watches the LEON AHB bus and stops on the
// address phase of that write (HTRANS NONSEQ or SEQ, HWRITE, HREADY high).
// count then holds the number of cycles from start to that store, with
// start itself as cycle 0; running and done give the state for the status
// reply. Counting a program's run time in hardware follows the design
// description; the end-of-program marker store and its address are this
// design's choice.
module cycle_counter
  import liquid_pkg::*;
#(
  parameter logic [31:0] DONE_ADDR = 32'h4000_0004,
  parameter int unsigned CW        = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  ahb_m2s_t      ahb_m,     // LEON bus, snooped
  input  logic          hready,    // bus HREADY
  output logic [CW-1:0] count,
  output logic          running,
  output logic          done
);

  wire stop = running && hready && ahb_m.htrans[1] && ahb_m.hwrite &&
              (ahb_m.haddr == DONE_ADDR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      running <= 1'b0;
      done    <= 1'b0;
    end else if (start) begin
      count   <= '0;
      running <= 1'b1;
      done    <= 1'b0;
    end else if (running) begin
      count <= count + CW'(1);
      if (stop) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

endmodule
