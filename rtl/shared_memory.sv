// shared_memory: the paged shared buffer of the switch, PAGES pages of
// PAGE_WORDS words of W bits, one port: a write (we high) or a read per
// cycle; rdata shows the word addressed in the previous cycle. It stands in
// for the external DDR3 buffer, which is reached through a vendor memory
// controller in the original system; here it is an on-chip array.
module shared_memory #(
  parameter int PAGES      = 64,
  parameter int PAGE_WORDS = 256,
  parameter int W          = 512,
  localparam int AW        = $clog2(PAGES * PAGE_WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [PAGES * PAGE_WORDS];
  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
