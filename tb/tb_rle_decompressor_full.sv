// tb_rle_decompressor_full: end-to-end test of the run-length
// decompressor with every parameter at its default (512-code buffer,
// lead 8, 8-bit codes). Streams of 1500 codes wrap the pointers and fill
// the buffer. Stimulus and checking are in rle_stream_driver.
module tb_rle_decompressor_full;
  import rle_pkg::*;
  logic clk = 1'b0;
  logic rst, start, ey, eos, xo, exo;
  logic [CODE_W-1:0] yi;
  rle_state_t state;

  always #5 clk = ~clk;

  rle_decompressor dut (
    .clk, .rst, .start, .ey, .yi, .eos, .xo, .exo, .state
  );

  rle_stream_driver #(.CW(CODE_W), .AW(NB), .N(LEAD_N), .NSTREAM(2), .NCODES(1500),
                      .MAXCODE(255), .WATCHDOG(2000000)) drv (
    .clk, .rst, .start, .ey, .yi, .eos, .xo, .exo, .state
  );
endmodule
