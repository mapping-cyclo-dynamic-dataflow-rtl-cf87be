// rle_fsm: control machine of the run-length decompressor: next-state
// node (NS), state register (ST) and output node (OS).
//
// States:
//   Free  idle; start moves it to Init.
//   Init  the buffer fills; once the write pointer leads the read pointer
//         by more than N codes (pw - pr > N, modulo 2**AW) it moves to Run.
//   Run   codes are taken from the buffer and expanded; once the buffer is
//         empty (pw == pr) and the last run is finished (c == 0) it
//         returns to Free.
// In Run the output node raises
//   ipr   when c == 0 and the buffer holds a code: the read pointer
//         advances, the run counter loads the code and the flag toggles;
//   dec, ex when c != 0: one output bit is valid, c counts down.
// So a code y takes y + 1 clocks: y output bits and one load clock.
//
// Also: a sticky end-of-stream flag, set by eos and cleared by start,
// lets Init move to Run when the stream has N codes or fewer and so can
// never build the lead; without it such a stream would hang in Init.
// That guard is this design's addition to the method's transitions; the
// states and the other transitions follow the method. The method also
// writes the Run-exit condition without end of stream, so an empty
// buffer in Run ends the stream: the source must keep pw ahead of pr.
//
// Timing: Moore state register; ipr, dec and ex are combinational from
// the state, the pointers and c. Synchronous active-high reset to Free.
module rle_fsm
  import rle_pkg::*;
#(
  parameter int unsigned AW = NB,
  parameter int unsigned N  = LEAD_N,
  parameter int unsigned W  = CODE_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          eos,    // end of stream seen at the input
  input  logic [AW-1:0] pw,     // write pointer
  input  logic [AW-1:0] pr,     // read pointer
  input  logic [W-1:0]  c,      // bits left in the current run
  output logic          ipr,    // advance read pointer, load next code
  output logic          dec,    // decrement run counter
  output logic          ex,     // an output bit is valid this clock
  output rle_state_t    state
);

  rle_state_t st_nxt;
  logic       eos_seen;
  logic [AW-1:0] lead;
  logic       c_zero, empty;

  assign lead   = pw - pr;
  assign empty  = (pw == pr);
  assign c_zero = (c == '0);

  // NS node
  always_comb begin
    st_nxt = state;
    unique case (state)
      ST_FREE: if (start) st_nxt = ST_INIT;
      ST_INIT: if ((lead > AW'(N)) || eos_seen) st_nxt = ST_RUN;
      ST_RUN:  if (empty && c_zero) st_nxt = ST_FREE;
      default: st_nxt = ST_FREE;
    endcase
  end

  // ST register and end-of-stream flag
  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= ST_FREE;
      eos_seen <= 1'b0;
    end else begin
      state <= st_nxt;
      if (start)    eos_seen <= 1'b0;
      else if (eos) eos_seen <= 1'b1;
    end
  end

  // OS node
  always_comb begin
    ipr = (state == ST_RUN) && c_zero && !empty;
    dec = (state == ST_RUN) && !c_zero;
    ex  = dec;
  end

  // A code is only taken from a non-empty buffer.
  assert property (@(posedge clk) disable iff (rst) ipr |-> !empty);
  // Loading and counting never happen in the same clock.
  assert property (@(posedge clk) disable iff (rst) !(ipr && dec));

  initial assert (N < (1 << AW)) else $error("lead N must be below the buffer depth");

endmodule
