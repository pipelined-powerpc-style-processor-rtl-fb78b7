// bus_arbiter_tb: random test of the two-requester bus arbiter.
//
// Random request patterns (with runs, so that grants are held) from the
// instruction cache (0) and data cache (1), and random memory valid strobes.
// The registered grants are compared after each edge with a model of the
// grant equations (data cache first when neither holds the bus, the holder
// keeps it while requesting); the combinational outputs (mem_req, address,
// write enable, valid routing) are checked before each edge. Grants must
// never be given together. Watchdog included.
module bus_arbiter_tb;

  logic         clk = 0, rst = 1;
  logic         req0, req1, we1, mem_valid;
  logic [31:0]  addr0, addr1, mem_addr;
  logic [127:0] wdata1, mem_wdata;
  logic         grant0, grant1, valid0, valid1, mem_req, mem_we;
  logic         g0, g1;
  int checks = 0, failures = 0;
  int both = 0;

  bus_arbiter dut (.*);
  always #5 clk = !clk;

  task automatic check(input string what, input logic [127:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic n0, n1;
    {req0, req1, we1, mem_valid} = '0; addr0 = '0; addr1 = '0; wdata1 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    g0 = 0; g1 = 0;
    repeat (6000) begin
      if ($urandom_range(0, 3) == 0) req0 = $urandom_range(0, 1);
      if ($urandom_range(0, 3) == 0) req1 = $urandom_range(0, 1);
      if (req0 && req1) both++;
      we1 = $urandom_range(0, 1); mem_valid = $urandom_range(0, 1);
      addr0 = $urandom; addr1 = $urandom; wdata1 = {4{$urandom}};
      #1;
      check("grant0", grant0, g0);
      check("grant1", grant1, g1);
      check("exclusive", grant0 && grant1, 1'b0);
      check("mem_req", mem_req, (g0 && req0) || (g1 && req1));
      check("mem_addr", mem_addr, g1 ? addr1 : addr0);
      check("mem_we", mem_we, we1 && g1);
      check("mem_wdata", mem_wdata, wdata1);
      check("valid0", valid0, mem_valid && !g1 && req0);
      check("valid1", valid1, mem_valid && g1 && req1);
      n0 = req0 && (!req1 || (g0 && !g1));
      n1 = req1 && (!req0 || !g0 || g1);
      @(posedge clk);
      g0 = n0; g1 = n1;
      @(negedge clk);
    end
    check("both requested at some time", both > 0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
