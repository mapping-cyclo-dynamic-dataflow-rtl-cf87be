// tb_rle_decompressor: end-to-end test of the run-length decompressor at
// a reduced size (16-code buffer, lead 4, 5-bit codes) so that pointer
// wrap-around and a full buffer occur within a short run. Stimulus and
// checking are in rle_stream_driver.
module tb_rle_decompressor;
  import rle_pkg::*;
  localparam int unsigned CW = 5, AW = 4, N = 4;
  logic clk = 1'b0;
  logic rst, start, ey, eos, xo, exo;
  logic [CW-1:0] yi;
  rle_state_t state;

  always #5 clk = ~clk;

  rle_decompressor #(.CODE_W_P(CW), .NB_P(AW), .N_P(N)) dut (
    .clk, .rst, .start, .ey, .yi, .eos, .xo, .exo, .state
  );

  rle_stream_driver #(.CW(CW), .AW(AW), .N(N), .NSTREAM(3), .NCODES(100),
                      .MAXCODE(20), .WATCHDOG(200000)) drv (
    .clk, .rst, .start, .ey, .yi, .eos, .xo, .exo, .state
  );
endmodule
