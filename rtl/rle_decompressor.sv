// rle_decompressor: pipelined run-length decoder. A stream of run
// lengths (codes) goes in, one per clock at most, and the bit sequence
// they describe comes out one bit per clock: runs alternate between ones
// and zeros, starting with ones, so the codes 3,4,2,2 give 11100001100.
//
// Structure (one module per dataflow node, registers on the edges):
//   input registers  yi1, eyd, startd, eosd delay the inputs one clock;
//   I1 (cddf_counter) the write pointer pw, cleared by startd and
//                     advanced by eyd;
//   B  (cddf_bram)    a 2**NB-code circular buffer with registered write
//                     and read addresses aw and ar, written with yi1;
//   I2 (cddf_counter) the read pointer pr, cleared by startd, advanced by
//                     the controller's ipr;
//   I3 (rle_code_counter) the run counter c, loaded from the buffer and
//                     decremented once per output bit;
//   G  (rle_bit_gen)  the bit value fl, inverted whenever a new code is
//                     loaded;
//   NS/ST/OS (rle_fsm) the Free/Init/Run controller;
//   output registers  xo (after fl) and two stages on ex give exo.
// Writing and reading run side by side; the controller waits in Init
// until more than N codes are buffered, then expands codes until the
// buffer is empty and the last run is done.
//
// Interface and timing:
//   start  one-clock pulse; clears the pointers, the run counter and the
//          flag. Codes may follow from the next clock on.
//   ey/yi  code strobe and code. The source must keep fewer than 2**NB
//          codes unread (the buffer has no full flag) and, once output has
//          started, must not let the buffer run empty before the end of
//          the stream, since an empty buffer ends the stream.
//   eos    end-of-stream pulse, needed only when the stream holds N codes
//          or fewer.
//   xo/exo output bit and its strobe; a code y gives y strobed bits
//          followed by one clock without a strobe.
// The structure, register placement and state machine follow the
// optimized dataflow graph of the method; widths, depth, lead N, reset
// and the eos guard are this design's choices.
module rle_decompressor
  import rle_pkg::*;
#(
  parameter int unsigned CODE_W_P = CODE_W,
  parameter int unsigned NB_P     = NB,
  parameter int unsigned N_P      = LEAD_N
) (
  input  logic                clk,
  input  logic                rst,    // synchronous, active high
  input  logic                start,
  input  logic                ey,
  input  logic [CODE_W_P-1:0] yi,
  input  logic                eos,
  output logic                xo,
  output logic                exo,
  output rle_state_t          state
);

  // input pipeline registers
  logic [CODE_W_P-1:0] yi1;
  logic eyd, startd, eosd;

  always_ff @(posedge clk) begin
    yi1 <= yi;
    if (rst) begin
      eyd    <= 1'b0;
      startd <= 1'b0;
      eosd   <= 1'b0;
    end else begin
      eyd    <= ey;
      startd <= start;
      eosd   <= eos;
    end
  end

  logic init;
  assign init = rst | startd;

  // I1: write pointer
  logic [NB_P-1:0] pw, pwp;
  cddf_counter #(.W(NB_P)) u_i1 (
    .clk(clk), .init(init), .en(eyd), .q(pw), .nxt(pwp)
  );

  // I2: read pointer
  logic ipr, dec, ex;
  logic [NB_P-1:0] pr, prp;
  cddf_counter #(.W(NB_P)) u_i2 (
    .clk(clk), .init(init), .en(ipr), .q(pr), .nxt(prp)
  );

  // B: MW, storage, MR
  logic [CODE_W_P-1:0] yo;
  cddf_bram #(.AW(NB_P), .DW(CODE_W_P)) u_b (
    .clk(clk), .we(eyd), .wdata(yi1), .waddr_nxt(pwp), .raddr_nxt(prp),
    .rdata(yo)
  );

  // I3: run counter
  logic [CODE_W_P-1:0] c;
  rle_code_counter #(.W(CODE_W_P)) u_i3 (
    .clk(clk), .init(init), .ld(ipr), .dec(dec), .d(yo), .c(c)
  );

  // G: bit value
  logic fl;
  rle_bit_gen u_g (
    .clk(clk), .init(init), .tgl(ipr), .fl(fl)
  );

  // NS / ST / OS
  rle_fsm #(.AW(NB_P), .N(N_P), .W(CODE_W_P)) u_fsm (
    .clk(clk), .rst(rst), .start(start), .eos(eosd),
    .pw(pw), .pr(pr), .c(c),
    .ipr(ipr), .dec(dec), .ex(ex), .state(state)
  );

  // output registers: fl -> xo, ex -> ex1 -> exo
  logic ex1;
  always_ff @(posedge clk) begin
    xo <= fl;
    if (rst) begin
      ex1 <= 1'b0;
      exo <= 1'b0;
    end else begin
      ex1 <= ex;
      exo <= ex1;
    end
  end

endmodule
