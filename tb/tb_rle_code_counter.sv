// tb_rle_code_counter: self-checking test of the run counter. Random
// init / load / decrement patterns against a reference value.
module tb_rle_code_counter;
  localparam int unsigned W = 8;
  logic clk = 1'b0;
  logic init, ld, dec;
  logic [W-1:0] d, c;
  int checks = 0, failures = 0;
  int unsigned ref_c;

  rle_code_counter #(.W(W)) dut (.clk, .init, .ld, .dec, .d, .c);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 1'b1; ld = 1'b0; dec = 1'b0; d = '0;
    @(posedge clk); #1;
    ref_c = 0;
    for (int i = 0; i < 600; i++) begin
      init = ($urandom_range(0, 59) == 0);
      ld   = ($urandom_range(0, 7) == 0);
      dec  = !ld && ($urandom_range(0, 3) != 0);
      d    = W'($urandom);
      if (init) ref_c = 0;
      else if (ld) ref_c = d;
      else if (dec) ref_c = (ref_c + (1 << W) - 1) % (1 << W);
      @(posedge clk); #1;
      checks++;
      if (c != W'(ref_c)) begin failures++; $display("c %0d exp %0d", c, ref_c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
