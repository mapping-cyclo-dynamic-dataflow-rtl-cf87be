// rle_code_counter: the run-length register c and its decrement node
// (I3) in the run-length decompressor.
//
// Each clock edge c takes: zero on init; the code read from the buffer
// on ld; c - 1 on dec; otherwise it holds. A code y loaded here is then
// decremented y times, one output bit per decrement, until c is zero.
//
// Timing: d is combinational from the buffer's read multiplexer, so the
// read path plus this node is one clock. ld and dec are never high
// together in the decompressor; ld wins if they are.
//
// Load-and-decrement follows the method's run counter; the separate ld
// control input and the priority order are this design's choices.
module rle_code_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         init,  // clear to zero
  input  logic         ld,    // load a new code from d
  input  logic         dec,   // count one output bit
  input  logic [W-1:0] d,     // code read from the buffer
  output logic [W-1:0] c      // bits left in the current run
);

  always_ff @(posedge clk) begin
    if (init)      c <= '0;
    else if (ld)   c <= d;
    else if (dec)  c <= c - W'(1);
  end

endmodule
