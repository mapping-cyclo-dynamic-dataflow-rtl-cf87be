// rle_bit_gen: the output flag trigger fl (node G) of the run-length
// decompressor: the value of every bit of the current run.
//
// fl is cleared by init and inverted on tgl, which the controller raises
// when the run counter has reached zero and the next code is loaded. So
// the first run after start is a run of ones, the next of zeros, and so
// on; a zero-length code just flips the polarity.
//
// Timing: one register; fl changes on the clock edge after tgl.
//
// The toggle-at-zero rule follows the method; the initial value and the
// point at which it toggles (on loading the next code, giving ones first,
// as in the method's example 3422 -> 11100001100) are this design's reading.
module rle_bit_gen (
  input  logic clk,
  input  logic init,  // clear fl
  input  logic tgl,   // invert fl
  output logic fl
);

  always_ff @(posedge clk) begin
    if (init)     fl <= 1'b0;
    else if (tgl) fl <= ~fl;
  end

endmodule
