// cache_tlb_seg: a cache together with its address checks.
//
// In the document this wraps the cache with four segment registers and a
// 5-entry TLB that translate the effective address into a physical one. How
// those are filled and searched is not recoverable, so translation here is the
// identity and the page-fault and protection-violation outputs stay low.
// What remains of the wrapper is implemented:
//  - I/O range: physical addresses whose two top bits are both 1
//    (0xC000_0000 and up) bypass the cache (cache_active low); the
//    cache_active_in input can also switch the cache off.
//  - alignment: a word access whose address is not a multiple of 4 raises
//    exc_align; such an access is not passed to the cache (the document lets
//    it through; blocking it keeps a trapped store from writing memory).
// Everything else is the cache's interface, passed through; see cache.sv
// for the timing.
module cache_tlb_seg #(
  parameter int SETS = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         valid_in,
  input  logic [31:0]  addr,
  input  logic         wr,
  input  logic         byte_sz,
  input  logic [31:0]  wdata,
  input  logic         cache_active_in,
  input  logic         flush,
  output logic         hit,
  output logic [31:0]  rdata,
  output logic         halt,
  output logic         exc_protection,
  output logic         exc_page_fault,
  output logic         exc_align,
  output logic         bus_req,
  input  logic         grant,
  input  logic         mem_valid,
  output logic [31:0]  mem_addr,
  output logic         mem_we,
  output logic [127:0] mem_wdata,
  input  logic [127:0] mem_rdata,
  output logic [31:0]  io_wdata,
  input  logic [31:0]  io_rdata
);

  logic [31:0] phys_addr;
  logic        cache_active;

  assign phys_addr      = addr;
  assign cache_active   = !(phys_addr[31] && phys_addr[30]) && cache_active_in;
  assign exc_align      = valid_in && !byte_sz && (phys_addr[1:0] != 2'b00);
  assign exc_protection = 1'b0;
  assign exc_page_fault = 1'b0;

  cache #(.SETS(SETS)) u_cache (
    .clk, .rst,
    .valid_in (valid_in && !exc_align),
    .addr     (phys_addr),
    .wr, .byte_sz, .wdata, .cache_active, .flush,
    .hit, .rdata, .halt,
    .bus_req, .grant, .mem_valid, .mem_addr, .mem_we, .mem_wdata, .mem_rdata,
    .io_wdata, .io_rdata
  );

endmodule
