// cache_tlb_seg_tb: test of the cache wrapper's address checks.
//
// The wrapper is connected to the behavioural memory through a registered
// one-requester grant. Checked:
//   - a misaligned word access raises exc_align at once and never reaches the
//     cache (no bus request, no hit); a misaligned byte access is legal;
//   - addresses below 0xC000_0000 (including 0x8000_xxxx, where only the top
//     bit is set) are cached: a second access hits in the same cycle;
//   - addresses from 0xC000_0000 up bypass the cache: every access goes to
//     the bus, writes reach the I/O register, reads return the I/O data;
//   - data read through the cache matches memory (the address is not
//     translated), and page-fault / protection outputs stay low.
// A watchdog ends the run if an access never completes.
module cache_tlb_seg_tb;

  logic         clk = 0, rst = 1;
  logic         valid_in, wr, byte_sz, cache_active_in, flush, hit, halt;
  logic         exc_protection, exc_page_fault, exc_align;
  logic [31:0]  addr, wdata, rdata;
  logic         bus_req, grant, mem_valid, mem_we;
  logic [31:0]  mem_addr, io_wdata, io_rdata;
  logic [127:0] mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  cache_tlb_seg #(.SETS(8)) dut (.*);

  mem_model #(.LATENCY(2), .LINES(1024)) u_mem (
    .clk, .mem_req (bus_req && grant), .mem_addr, .mem_we, .mem_wdata,
    .mem_rdata, .mem_valid, .io_wdata, .io_rdata
  );

  always #5 clk = !clk;
  always_ff @(posedge clk) grant <= !rst && bus_req;

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s @%h: got %h exp %h", what, addr, got, exp);
    end
  endtask

  task automatic access(input logic [31:0] a, input bit w, b, input logic [31:0] d,
                        output logic [31:0] rd, output int waited);
    @(negedge clk);
    valid_in = 1; addr = a; wr = w; byte_sz = b; wdata = d;
    waited = 0;
    #1;
    while (!hit && waited < 100) begin @(negedge clk); #1; waited++; end
    rd = rdata;
    @(posedge clk);
    #1 valid_in = 0;
  endtask

  initial begin
    logic [31:0] rd;
    int w;
    {valid_in, wr, byte_sz, flush} = '0; cache_active_in = 1; addr = '0; wdata = '0;
    for (int i = 0; i < 1024; i++) u_mem.mem[i] = {32'(i), 32'(i) + 1, 32'(i) + 2, 32'(i) + 3};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // misaligned word access
    @(negedge clk) valid_in = 1; addr = 32'h0000_1002; wr = 0; byte_sz = 0;
    repeat (5) begin
      #1;
      check("exc_align", exc_align, 1);
      check("no request", bus_req, 0);
      check("no hit", hit, 0);
      @(negedge clk);
    end
    valid_in = 0;
    #1 check("exc_align only with an access", exc_align, 0);

    // misaligned byte access is fine; word 0x1000 line = {0x100, 0x101, ...}
    access(32'h0000_1006, 0, 1, 0, rd, w);
    check("byte load", rd, 32'h0000_0001);
    check("byte exc_align", exc_align, 0);
    access(32'h0000_1004, 0, 0, 0, rd, w);
    check("word load (no translation)", rd, 32'h0000_0101);
    check("word load hits at once", w, 0);

    // 0x8000_xxxx is still memory: cached
    access(32'h8000_2008, 0, 0, 0, rd, w);
    check("0x8 region data", rd, 32'h0000_0202);
    access(32'h8000_200C, 0, 0, 0, rd, w);
    check("0x8 region cached", w, 0);

    // I/O region is never cached
    access(32'hC000_0010, 1, 0, 32'hA5A5_0001, rd, w);
    check("I/O write", u_mem.io_reg, 32'hA5A5_0001);
    access(32'hC000_0010, 1, 0, 32'hA5A5_0002, rd, w);
    check("I/O write again", u_mem.io_reg, 32'hA5A5_0002);
    check("I/O write went to the bus", w > 0, 1);
    access(32'hC000_0020, 0, 0, 0, rd, w);
    check("I/O read", rd, 32'hCAFE_F00D);
    check("I/O writes", u_mem.io_writes, 2);
    check("I/O reads", u_mem.io_reads, 1);
    check("no page fault / protection", {exc_page_fault, exc_protection}, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
