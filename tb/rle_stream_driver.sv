// rle_stream_driver: stimulus and checker for the run-length decompressor,
// shared by the reduced-size and the full-size end-to-end testbenches.
//
// It plays a number of streams through the decompressor. Each stream is a
// start pulse followed by codes, one per clock while the buffer has room,
// and an eos pulse after the last code. The expected output is built in
// the testbench from the codes alone (runs alternate between ones and
// zeros, ones first), and every strobed output bit is compared with it.
// The cycles spent in Run must equal sum(code + 1) + 1 per stream: one
// load clock per code, one clock per bit, one clock to leave.
//
// Streams: the example 3,4,2,2 (shorter than the lead N, so it is
// released by eos); random streams several times the buffer depth, so the
// pointers wrap and the source is held back by a full buffer; zero-length
// codes inside them. Each mechanism is counted and must be seen.
//
// The source never lets the buffer hold more than DEPTH - 4 codes, judged
// only from what it has sent and the bits it has seen come out.
module rle_stream_driver
  import rle_pkg::*;
#(
  parameter int unsigned CW      = 8,
  parameter int unsigned AW      = 9,
  parameter int unsigned N       = 8,
  parameter int unsigned NSTREAM = 3,
  parameter int unsigned NCODES  = 1500,
  parameter int unsigned MAXCODE = 40,
  parameter int unsigned WATCHDOG = 2000000
) (
  input  logic          clk,
  output logic          rst,
  output logic          start,
  output logic          ey,
  output logic [CW-1:0] yi,
  output logic          eos,
  input  logic          xo,
  input  logic          exo,
  input  rle_state_t    state
);
  localparam int unsigned DEPTH = 1 << AW;

  int checks = 0, failures = 0;
  int codes[$];
  bit exp_bits[$];
  int prefix[$];         // prefix[j] = bits of codes 0..j
  int bits_seen;
  int run_cycles, init_cycles;
  int n_init_wait = 0, n_lead_release = 0, n_eos_release = 0, n_run_free = 0;
  int n_zero_code = 0, n_wrap = 0, n_full_stall = 0, n_runs_toggled = 0;
  rle_state_t prev_state;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%t FAIL: %s", $time, what);
    end
  endtask

  // watchdog
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker and state bookkeeping
  always @(posedge clk) begin
    if (!rst) begin
      if (exo) begin
        if (bits_seen < exp_bits.size())
          chk(xo == exp_bits[bits_seen], $sformatf("bit %0d", bits_seen));
        else
          chk(1'b0, "extra output bit");
        bits_seen <= bits_seen + 1;
      end
      if (state == ST_RUN)  run_cycles  <= run_cycles + 1;
      if (state == ST_INIT) init_cycles <= init_cycles + 1;
      if (prev_state == ST_RUN && state == ST_FREE) n_run_free++;
    end
    prev_state <= state;
  end

  task automatic build(input int kind, input int n);
    int y;
    bit v;
    int total;
    codes.delete(); exp_bits.delete(); prefix.delete();
    if (kind == 0) begin
      codes = '{3, 4, 2, 2};
    end else begin
      for (int j = 0; j < n; j++) begin
        // occasional zero-length code, never two in a row
        if (j > 0 && codes[j-1] != 0 && $urandom_range(0, 19) == 0) y = 0;
        else y = $urandom_range(1, MAXCODE);
        codes.push_back(y);
      end
    end
    v = 1'b1; total = 0;
    foreach (codes[j]) begin
      repeat (codes[j]) exp_bits.push_back(v);
      total += codes[j];
      prefix.push_back(total);
      if (codes[j] == 0) n_zero_code++;
      v = !v;
    end
  endtask

  task automatic play(input int kind, input int n);
    int sent, done_codes, expect_run;
    build(kind, n);
    bits_seen = 0; run_cycles = 0; init_cycles = 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    sent = 0;
    while (sent < codes.size()) begin
      // codes known to be finished: all of their bits have come out; a
      // zero-length code counts only once a later bit has appeared
      done_codes = 0;
      while (done_codes < prefix.size() && prefix[done_codes] <= bits_seen
             && (done_codes == 0 || prefix[done_codes] > prefix[done_codes-1]
                 || prefix[done_codes] < bits_seen))
        done_codes++;
      if (sent - done_codes < int'(DEPTH) - 4) begin
        ey = 1'b1; yi = CW'(codes[sent]); sent++;
        if (sent == int'(DEPTH) + 1) n_wrap++;
      end else begin
        ey = 1'b0; n_full_stall++;
      end
      @(negedge clk);
    end
    ey = 1'b0;
    eos = 1'b1;
    @(negedge clk);
    eos = 1'b0;
    // wait for the stream to finish
    do @(negedge clk); while (state != ST_FREE);
    repeat (4) @(negedge clk);
    chk(bits_seen == exp_bits.size(),
        $sformatf("stream %0d: %0d bits out, %0d expected", kind, bits_seen, exp_bits.size()));
    expect_run = 1;
    foreach (codes[j]) expect_run += codes[j] + 1;
    chk(run_cycles == expect_run,
        $sformatf("stream %0d: %0d clocks in Run, %0d expected", kind, run_cycles, expect_run));
    if (init_cycles > 1) n_init_wait++;
    if (codes.size() > N) n_lead_release++; else n_eos_release++;
    n_runs_toggled += codes.size();
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; ey = 1'b0; yi = '0; eos = 1'b0;
    bits_seen = 0; run_cycles = 0; init_cycles = 0; prev_state = ST_FREE;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    play(0, 4);
    for (int s = 0; s < int'(NSTREAM); s++) play(1, NCODES);
    play(0, 4);
    $display("init waits %0d, lead releases %0d, eos releases %0d, run->free %0d",
             n_init_wait, n_lead_release, n_eos_release, n_run_free);
    $display("zero-length codes %0d, pointer wraps %0d, full-buffer stalls %0d, runs %0d",
             n_zero_code, n_wrap, n_full_stall, n_runs_toggled);
    chk(n_init_wait > 0, "Init never waited");
    chk(n_lead_release > 0, "Init never released by lead");
    chk(n_eos_release > 0, "Init never released by eos");
    chk(n_run_free == int'(NSTREAM) + 2, "Run->Free count");
    chk(n_zero_code > 0, "no zero-length code");
    chk(n_wrap > 0, "buffer pointers never wrapped");
    chk(n_full_stall > 0, "source never held back by a full buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
