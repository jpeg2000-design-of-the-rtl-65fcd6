// cf_ra2sd: significance state memory (1024 words x 2 bits).
//
// One word per code-block sample, address row*32 + column: bit 0 holds
// significance state 0 (sigma0), bit 1 significance state 1 (sigma1). Single
// port, synchronous: a write takes effect on the clock edge; a read returns the
// addressed word on rdata one cycle after the address (the old word when the
// same cycle writes it). Written as an array so that synthesis can map it onto a
// RAM macro.
//
// Origin: size and bit assignment (1024 x 2, bit 0 sigma0, bit 1 sigma1) follow
// the original design; the single synchronous port is this design's choice.
module cf_ra2sd #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 2
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                     we,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
