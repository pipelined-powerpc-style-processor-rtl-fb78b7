// branch_predictor_tb: random test of the branch history table.
//
// Random updates (PC, outcome, target) with the hold input sometimes low,
// and random lookups, against a model with one 2-bit saturating counter and
// one stored target per entry, indexed by the low PC bits. The lookup is
// combinational and checked before each edge; updates take effect at the
// edge. A directed part first walks one entry through all four counter
// states in both directions. Watchdog included.
module branch_predictor_tb;

  localparam int ENTRIES = 32;
  logic        clk = 0, rst = 1;
  logic        hold_n, pred_taken, u_en, u_taken;
  logic [31:0] q_pc, pred_target, u_pc, u_target;
  logic [1:0]  m_cnt [ENTRIES];
  logic [31:0] m_tgt [ENTRIES];
  int checks = 0, failures = 0;

  branch_predictor #(.ENTRIES(ENTRIES), .IDX_LSB(0)) dut (.*);
  always #5 clk = !clk;

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic cycle();
    int qi;
    #1;
    qi = int'(q_pc[4:0]);
    check("pred_taken", {31'd0, pred_taken}, {31'd0, m_cnt[qi][1]});
    check("pred_target", pred_target, m_tgt[qi]);
    @(posedge clk);
    if (u_en && hold_n) begin
      qi = int'(u_pc[4:0]);
      if (u_taken && m_cnt[qi] != 2'b11) m_cnt[qi] = m_cnt[qi] + 2'd1;
      if (!u_taken && m_cnt[qi] != 2'b00) m_cnt[qi] = m_cnt[qi] - 2'd1;
      m_tgt[qi] = u_target;
    end
    @(negedge clk);
  endtask

  initial begin
    hold_n = 1; u_en = 0; u_taken = 0; q_pc = '0; u_pc = '0; u_target = '0;
    foreach (m_cnt[i]) begin m_cnt[i] = '0; m_tgt[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // one entry up to strongly taken and back down
    u_pc = 32'h0000_0048; q_pc = u_pc; u_en = 1; u_target = 32'h400;
    for (int k = 0; k < 10; k++) begin
      u_taken = (k < 5);
      cycle();
    end
    repeat (6000) begin
      u_en = $urandom_range(0, 1); hold_n = ($urandom_range(0, 5) != 0);
      u_taken = $urandom_range(0, 1); u_target = $urandom;
      u_pc = {$urandom_range(0, 255), 2'b00}; q_pc = $urandom_range(0, 1) ? u_pc : $urandom;
      cycle();
    end
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
