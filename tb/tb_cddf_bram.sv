// tb_cddf_bram: self-checking test of the buffer memory. Drives random
// writes and reads; a reference model applies the same clock-edge rules
// (write at the registered write address, then both address registers
// load) and every read of a written word is compared with it. Reads of the
// address written on the previous clock are forced often.
module tb_cddf_bram;
  localparam int unsigned AW = 4, DW = 8;
  logic clk = 1'b0;
  logic we = 1'b0;
  logic [DW-1:0] wdata = '0;
  logic [DW-1:0] rdata;
  logic [AW-1:0] waddr_nxt = '0, raddr_nxt = '0;
  logic [DW-1:0] model [1 << AW];
  bit   valid [1 << AW];
  logic [AW-1:0] aw_m, ar_m;
  bit   aw_ok = 1'b0;
  int checks = 0, failures = 0, fresh = 0;
  logic [AW-1:0] last_w;

  cddf_bram #(.AW(AW), .DW(DW)) dut (.clk, .we, .wdata, .waddr_nxt, .raddr_nxt, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (valid[i]) valid[i] = 1'b0;
    for (int i = 0; i < 800; i++) begin
      @(posedge clk);
      // reference model of the clock edge
      if (we && aw_ok) begin
        model[aw_m] = wdata; valid[aw_m] = 1'b1; last_w = aw_m;
      end
      aw_m = waddr_nxt; ar_m = raddr_nxt; aw_ok = 1'b1;
      #1;
      if (valid[ar_m]) begin
        checks++;
        if (last_w == ar_m) fresh++;
        if (rdata !== model[ar_m]) begin
          failures++; $display("read %0d got %h exp %h", ar_m, rdata, model[ar_m]);
        end
      end
      we        = (i > 0) && ($urandom_range(0, 1) == 1);
      wdata     = DW'($urandom);
      waddr_nxt = AW'($urandom);
      raddr_nxt = ($urandom_range(0, 2) == 0) ? aw_m : AW'($urandom);
    end
    checks++;
    if (fresh == 0) begin failures++; $display("no read-after-write exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
