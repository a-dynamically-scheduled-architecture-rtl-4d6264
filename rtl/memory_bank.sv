// memory_bank: one bank of the shared memory. A single-port synchronous RAM of
// WORDS 32-bit words: when en is high, a write (we high) stores wdata at addr
// at the clock edge, and a read returns mem[addr] on rdata after that edge
// (one cycle latency); rdata holds its value while en is low. Contents are not
// reset; this simulator starts them at random values, so software loads the
// data it reads. Size, width, port count and latency are this design's
// choices: the architecture only says that there are CH banks of shared memory
// reached through the memory interface controller.
module memory_bank #(
  parameter int unsigned WORDS = 16384,
  parameter int unsigned W     = 32
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
