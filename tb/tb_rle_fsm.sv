// tb_rle_fsm: self-checking test of the Free/Init/Run controller. The
// pointers, run count, start and eos are driven with biased random values;
// a reference model in the testbench predicts the state and the ipr / dec
// / ex outputs every clock. Each transition (and the eos guard) is
// counted and must occur at least once.
module tb_rle_fsm;
  import rle_pkg::*;
  localparam int unsigned AW = 4, N = 3, W = 4;
  logic clk = 1'b0;
  logic rst, start, eos;
  logic [AW-1:0] pw, pr;
  logic [W-1:0] c;
  logic ipr, dec, ex;
  rle_state_t state;
  int checks = 0, failures = 0;

  rle_state_t ref_st;
  bit ref_eos;
  int n_free_init = 0, n_init_run = 0, n_init_run_eos = 0, n_run_free = 0, n_ipr = 0, n_dec = 0;

  rle_fsm #(.AW(AW), .N(N), .W(W)) dut (.clk, .rst, .start, .eos, .pw, .pr, .c, .ipr, .dec, .ex, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%t mismatch: %s", $time, what); end
  endtask

  initial begin
    logic [AW-1:0] lead;
    bit e_ipr, e_dec;
    rst = 1'b1; start = 1'b0; eos = 1'b0; pw = '0; pr = '0; c = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    ref_st = ST_FREE; ref_eos = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      start = ($urandom_range(0, 15) == 0);
      eos   = ($urandom_range(0, 40) == 0);
      pr    = AW'($urandom);
      case ($urandom_range(0, 3))
        0: pw = pr;
        1: pw = pr + AW'($urandom_range(0, N));
        2: pw = pr + AW'($urandom_range(N + 1, (1 << AW) - 1));
        default: pw = AW'($urandom);
      endcase
      c = ($urandom_range(0, 1) == 0) ? '0 : W'($urandom);
      #1;
      lead  = pw - pr;
      e_ipr = (ref_st == ST_RUN) && (c == 0) && (pw != pr);
      e_dec = (ref_st == ST_RUN) && (c != 0);
      chk(state == ref_st, "state");
      chk(ipr == e_ipr, "ipr");
      chk(dec == e_dec, "dec");
      chk(ex == e_dec, "ex");
      if (e_ipr) n_ipr++;
      if (e_dec) n_dec++;
      @(posedge clk);
      case (ref_st)
        ST_FREE: if (start) begin ref_st = ST_INIT; n_free_init++; end
        ST_INIT: if (lead > N || ref_eos) begin
                   ref_st = ST_RUN;
                   if (lead > N) n_init_run++; else n_init_run_eos++;
                 end
        ST_RUN:  if (pw == pr && c == 0) begin ref_st = ST_FREE; n_run_free++; end
        default: ref_st = ST_FREE;
      endcase
      if (start) ref_eos = 1'b0; else if (eos) ref_eos = 1'b1;
      #1;
    end
    $display("free->init %0d init->run %0d (by eos %0d) run->free %0d ipr %0d dec %0d",
             n_free_init, n_init_run, n_init_run_eos, n_run_free, n_ipr, n_dec);
    chk(n_free_init > 0, "Free->Init never taken");
    chk(n_init_run > 0, "Init->Run by lead never taken");
    chk(n_init_run_eos > 0, "Init->Run by eos never taken");
    chk(n_run_free > 0, "Run->Free never taken");
    chk(n_ipr > 0 && n_dec > 0, "outputs never raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
