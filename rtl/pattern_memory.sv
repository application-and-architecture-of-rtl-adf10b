// pattern_memory: two-bank store for the generated test patterns.
//
// The memory is split into two banks ("two cores"): pattern number n is
// written to bank 1 when n is even and to bank 2 when n is odd, at bank
// address n/2. Both banks are read in the same clock at address raddr, so
// two consecutive patterns (2*raddr and 2*raddr+1) come out together on
// rdata1 and rdata2, one clock after raddr (registered read).
// Write: we with waddr = pattern number and wdata. The split into two banks
// follows the description of the memory; the interleaving, depth and timing
// are this design's choices. Contents are not reset.
module pattern_memory #(
  parameter int unsigned W = 10,
  parameter int unsigned NUM_PATTERNS = 64,
  localparam int unsigned BANK_DEPTH = NUM_PATTERNS / 2,
  localparam int unsigned AW = $clog2(NUM_PATTERNS),
  localparam int unsigned BAW = $clog2(BANK_DEPTH)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [AW-1:0]  waddr,
  input  logic [W-1:0]   wdata,
  input  logic [BAW-1:0] raddr,
  output logic [W-1:0]   rdata1,
  output logic [W-1:0]   rdata2
);
  logic [W-1:0] bank1 [BANK_DEPTH];
  logic [W-1:0] bank2 [BANK_DEPTH];

  always_ff @(posedge clk) begin
    if (we && !waddr[0]) bank1[waddr[AW-1:1]] <= wdata;
    if (we &&  waddr[0]) bank2[waddr[AW-1:1]] <= wdata;
  end

  always_ff @(posedge clk) begin
    rdata1 <= bank1[raddr];
    rdata2 <= bank2[raddr];
  end
endmodule
