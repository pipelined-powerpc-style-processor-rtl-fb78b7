// cache_tb: test of the 2-way write-back cache against a shadow memory.
//
// The cache is connected to the behavioural memory (mem_model) through a
// one-requester grant (registered, like the arbiter's). Accesses are driven
// one at a time and held until hit; the data read is compared with a shadow
// copy of memory that every store also updates. The test covers:
//   - hit latency: an access to a resident line hits in the cycle it is
//     presented; a miss takes at least the memory latency;
//   - LRU replacement: after A, B, A in one set, a third line C replaces B,
//     so A still hits at once;
//   - random word and byte loads and stores over four tags per set, forcing
//     evictions of dirty lines (write-backs are counted);
//   - uncached I/O reads and writes;
//   - the flush on halt: afterwards halt is high and memory equals the shadow.
// A watchdog ends the run if an access never completes.
module cache_tb;

  localparam int SETS = 8;
  logic         clk = 0, rst = 1;
  logic         valid_in, wr, byte_sz, cache_active, flush, hit, halt;
  logic [31:0]  addr, wdata, rdata;
  logic         bus_req, grant, mem_valid, mem_we;
  logic [31:0]  mem_addr, io_wdata, io_rdata;
  logic [127:0] mem_wdata, mem_rdata;
  logic [127:0] shadow [1024];
  int checks = 0, failures = 0;

  cache #(.SETS(SETS)) dut (.*);

  mem_model #(.LATENCY(3), .LINES(1024)) u_mem (
    .clk, .mem_req (bus_req && grant), .mem_addr, .mem_we, .mem_wdata,
    .mem_rdata, .mem_valid, .io_wdata, .io_rdata
  );

  always #5 clk = !clk;
  always_ff @(posedge clk) grant <= !rst && bus_req;

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s @%h: got %h exp %h", what, addr, got, exp);
    end
  endtask

  function automatic logic [31:0] sh_word(input logic [31:0] a);
    logic [127:0] l;
    l = shadow[a[13:4]];
    return l[127 - 32*a[3:2] -: 32];
  endfunction

  // one access, held until hit; returns the wait in cycles
  task automatic access(input logic [31:0] a, input bit w, b, input logic [31:0] d,
                        output logic [31:0] rd, output int waited);
    @(negedge clk);
    valid_in = 1; addr = a; wr = w; byte_sz = b; wdata = d; cache_active = (a[31:30] != 2'b11);
    waited = 0;
    #1;
    while (!hit) begin
      @(negedge clk); #1; waited++;
      if (waited > 200) break;
    end
    rd = rdata;
    @(posedge clk);
    #1 valid_in = 0;
    if (w && cache_active) begin
      if (b) shadow[a[13:4]][127 - 32*a[3:2] - 8*a[1:0] -: 8] = d[7:0];
      else   shadow[a[13:4]][127 - 32*a[3:2] -: 32] = d;
    end
  endtask

  task automatic load_check(input logic [31:0] a, input bit b, output int waited);
    logic [31:0] rd, exp;
    access(a, 0, b, 0, rd, waited);
    exp = sh_word(a);
    if (b) exp = {24'd0, exp[31 - 8*a[1:0] -: 8]};
    check(b ? "byte load" : "word load", rd, exp);
  endtask

  function automatic logic [31:0] rand_addr(input bit b);
    logic [31:0] a;
    a = 32'h2000 + ($urandom_range(0, 3) << 7) + ($urandom_range(0, SETS - 1) << 4) +
        ($urandom_range(0, 3) << 2);
    if (b) a[1:0] = 2'($urandom);
    return a;
  endfunction

  initial begin
    logic [31:0] rd;
    int w, wb0;
    {valid_in, wr, byte_sz, flush} = '0; cache_active = 1; addr = '0; wdata = '0;
    for (int i = 0; i < 1024; i++) begin
      shadow[i] = {$urandom, $urandom, $urandom, $urandom};
      u_mem.mem[i] = shadow[i];
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // hit latency and LRU: A, B, A, C in set 2, then A must still be present
    load_check(32'h2020, 0, w); check("miss waits for memory", 32'(w >= 3), 1);
    load_check(32'h2024, 0, w); check("hit in same cycle", 32'(w), 0);
    load_check(32'h20A0, 0, w);
    load_check(32'h2020, 0, w); check("A still resident", 32'(w), 0);
    load_check(32'h2120, 0, w);
    load_check(32'h2028, 0, w); check("LRU kept A", 32'(w), 0);
    load_check(32'h20A0, 0, w); check("LRU evicted B", 32'(w >= 3), 1);

    // random traffic
    repeat (3000) begin
      bit b;
      b = $urandom_range(0, 1);
      if ($urandom_range(0, 1)) access(rand_addr(b), 1, b, $urandom, rd, w);
      else load_check(rand_addr(b), b, w);
    end
    wb0 = u_mem.line_writes;
    check("dirty lines written back", 32'(wb0 > 0), 1);

    // uncached I/O
    access(32'hC000_0040, 1, 0, 32'h1234_5678, rd, w);
    check("I/O write", u_mem.io_reg, 32'h1234_5678);
    access(32'hC000_0044, 0, 0, 0, rd, w);
    check("I/O read", rd, 32'hCAFE_F00D);

    // flush
    @(negedge clk) flush = 1;
    w = 0;
    while (!halt && w < 2000) begin @(negedge clk); w++; end
    check("halt after flush", 32'(halt), 1);
    for (int i = 0; i < 1024; i++)
      if (u_mem.mem[i] !== shadow[i]) begin
        checks++; failures++;
        if (failures < 10) $display("FAIL memory line %0d after flush", i);
      end
    checks++;
    $display("write-backs: %0d during traffic, %0d in flush", wb0, u_mem.line_writes - wb0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
