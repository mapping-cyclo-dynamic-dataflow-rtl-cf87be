// cddf_bram: simple dual-port buffer memory in the shape of an FPGA
// block RAM: a write node (MW), the storage array, and a read node (MR).
//
// Both addresses arrive as the *next* pointer values (the undelayed
// counter outputs) and are captured in the write and read address
// registers aw and ar inside this module, as a block RAM does. On a clock
// edge with we high, wdata is stored at aw. rdata is the word at ar, read
// through the read multiplexer without a further register: the register
// that follows it belongs to the consumer (the run counter), so the
// read-multiplex plus consumer logic is one of the two critical paths.
//
// Timing: an address presented on waddr_nxt/raddr_nxt in cycle t is in
// aw/ar in cycle t+1. A write in cycle t is visible on rdata from cycle
// t+1 if ar equals its address.
//
// Address and data registers and the MW/storage/MR split follow the
// block-RAM subgraph of the method; the depth and width are parameters.
module cddf_bram #(
  parameter int unsigned AW = 9,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          we,         // write enable, qualifies wdata/aw
  input  logic [DW-1:0] wdata,      // write data (already registered)
  input  logic [AW-1:0] waddr_nxt,  // write address for the next cycle
  input  logic [AW-1:0] raddr_nxt,  // read address for the next cycle
  output logic [DW-1:0] rdata       // word at the registered read address
);

  localparam int unsigned DEPTH = 1 << AW;

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] aw, ar;

  always_ff @(posedge clk) begin
    aw <= waddr_nxt;
    ar <= raddr_nxt;
  end

  always_ff @(posedge clk) begin
    if (we) mem[aw] <= wdata;
  end

  assign rdata = mem[ar];

endmodule
