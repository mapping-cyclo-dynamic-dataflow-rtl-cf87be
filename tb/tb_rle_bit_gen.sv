// tb_rle_bit_gen: self-checking test of the output flag trigger: clears
// on init, inverts on tgl, holds otherwise.
module tb_rle_bit_gen;
  logic clk = 1'b0;
  logic init, tgl, fl;
  bit   ref_fl;
  int checks = 0, failures = 0;

  rle_bit_gen dut (.clk, .init, .tgl, .fl);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 1'b1; tgl = 1'b0;
    @(posedge clk); #1;
    ref_fl = 1'b0;
    checks++;
    if (fl != 1'b0) failures++;
    for (int i = 0; i < 500; i++) begin
      init = ($urandom_range(0, 29) == 0);
      tgl  = ($urandom_range(0, 2) == 0);
      if (init) ref_fl = 1'b0;
      else if (tgl) ref_fl = !ref_fl;
      @(posedge clk); #1;
      checks++;
      if (fl != ref_fl) begin failures++; $display("fl %0d exp %0d", fl, ref_fl); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
