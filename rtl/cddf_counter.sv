// cddf_counter: incrementing counter node with a register delay on its
// feedback edge and a second output edge taken straight from the node.
//
// The node computes nxt = init ? 0 : (en ? q + 1 : q) and the register q
// stores it on every clock edge. nxt is the undelayed output edge (the
// "counter with output from the node" form); q is the delayed one. The
// count wraps modulo 2**W, which gives the circular buffer pointers their
// modulo-M behaviour for free.
//
// Timing: nxt is combinational from q, en and init; q follows nxt one
// clock later. init has priority over en. Synchronous, no reset other
// than init.
//
// The node/register structure follows the counter symbol of the method;
// the priority of init over en is this design's choice.
module cddf_counter #(
  parameter int unsigned W = 9
) (
  input  logic         clk,
  input  logic         init,  // load zero
  input  logic         en,    // count up by one
  output logic [W-1:0] q,     // registered count
  output logic [W-1:0] nxt    // node output: the value q takes next
);

  always_comb begin
    if (init)    nxt = '0;
    else if (en) nxt = q + W'(1);
    else         nxt = q;
  end

  always_ff @(posedge clk) q <= nxt;

endmodule
