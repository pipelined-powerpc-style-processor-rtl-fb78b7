// bus_arbiter: shares the single memory bus between the two caches.
//
// Requester 0 is the instruction cache, requester 1 the data cache. Grants
// are registered (one rising edge after a request) and mutually exclusive.
// A requester that holds the bus keeps it while it still requests; when both
// request and neither holds the bus, the data cache wins. These are the
// document's grant equations:
//   grant0 <= req0 & (!req1 | (grant0 & !grant1))
//   grant1 <= req1 & (!req0 | !grant0 | grant1)
// The address and line data sent to memory come from the granted cache
// (the data cache when grant1, otherwise the instruction cache); only the data
// cache writes, so the memory write enable is its write enable gated by
// grant1. The memory's valid strobe is routed back to the cache that holds the
// bus and is still requesting. mem_req tells the memory a transfer is wanted:
// it is high while the granted cache still requests, so a grant that lingers
// for the cycle after its last transfer starts nothing. The document's memory
// module has no such input; it is this design's addition.
// Synchronous reset removes both grants.
// The memory read line goes to both caches unchanged, so those output bits
// are plain wires from the input.
module bus_arbiter (
  input  logic         clk,
  input  logic         rst,
  input  logic         req0,
  input  logic         req1,
  input  logic [31:0]  addr0,
  input  logic [31:0]  addr1,
  input  logic [127:0] wdata1,
  input  logic         we1,
  output logic         grant0,
  output logic         grant1,
  output logic         valid0,
  output logic         valid1,
  // memory side
  output logic         mem_req,
  output logic [31:0]  mem_addr,
  output logic [127:0] mem_wdata,
  output logic         mem_we,
  input  logic         mem_valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      grant0 <= 1'b0;
      grant1 <= 1'b0;
    end else begin
      grant0 <= req0 && (!req1 || (grant0 && !grant1));
      grant1 <= req1 && (!req0 || !grant0 || grant1);
    end
  end

  assign mem_req   = (grant0 && req0) || (grant1 && req1);
  assign mem_addr  = grant1 ? addr1 : addr0;
  assign mem_wdata = wdata1;
  assign mem_we    = we1 && grant1;
  assign valid0    = mem_valid && !grant1 && req0;
  assign valid1    = mem_valid && grant1 && req1;

  // the two grants are never given together
  a_exclusive: assert property (@(posedge clk) disable iff (rst) !(grant0 && grant1));

endmodule
