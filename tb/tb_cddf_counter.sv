// tb_cddf_counter: self-checking test of the counter node. Drives random
// init/enable patterns and compares q and nxt every clock with a
// reference count kept in the testbench, including wrap-around at 2**W.
module tb_cddf_counter;
  localparam int unsigned W = 4;
  logic clk = 1'b0;
  logic init, en;
  logic [W-1:0] q, nxt;
  int checks = 0, failures = 0;
  int unsigned ref_q;
  int wraps = 0;

  cddf_counter #(.W(W)) dut (.clk, .init, .en, .q, .nxt);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 1'b1; en = 1'b0;
    @(posedge clk); #1;
    ref_q = 0;
    for (int i = 0; i < 400; i++) begin
      init = ($urandom_range(0, 49) == 0);
      en   = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (q != W'(ref_q)) begin failures++; $display("q %0d exp %0d", q, ref_q); end
      if (init) ref_q = 0;
      else if (en) begin
        if (ref_q == (1 << W) - 1) wraps++;
        ref_q = (ref_q + 1) % (1 << W);
      end
      checks++;
      if (nxt != W'(ref_q)) begin failures++; $display("nxt %0d exp %0d", nxt, ref_q); end
      @(posedge clk); #1;
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrap-around exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
