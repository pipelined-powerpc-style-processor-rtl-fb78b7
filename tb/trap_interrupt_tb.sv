// trap_interrupt_tb: directed test of the trap and interrupt controller.
//
// One scenario per source, each started from an idle controller:
//   MEM exception - state saved in the same cycle with the MEM PC; MEM, EX,
//                   ID and IF invalidated; the PC goes to the handler.
//   ID exception  - ID and IF invalidated at once, fetch held, and two cycles
//                   later state saved with the ID PC.
//   IF exception and external interrupt - IF invalidated, fetch held, state
//                   saved three cycles later with the IF PC.
//   Priority      - MEM over ID over IF over interrupt when raised together.
// The exact cycle of save_state and set_pc and the saved PC are checked, as
// are the idle outputs between scenarios. Watchdog included.
module trap_interrupt_tb;

  logic        clk = 0, rst = 1;
  logic [31:0] if_pc, id_pc, m_pc, saved_pc, handler_addr;
  logic [4:0]  if_exc, m_exc;
  logic        id_exc;
  logic [1:0]  io_int;
  logic        save_state, if_inval, id_inval, ex_inval, m_inval, insert_bubble, set_pc;
  int checks = 0, failures = 0;

  trap_interrupt #(.HANDLER_ADDR(32'h0FFF_F000)) dut (.*);
  always #5 clk = !clk;

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic quiet();
    if_exc = '0; id_exc = 0; m_exc = '0; io_int = '0;
  endtask

  // raise a source for one cycle, then count cycles until save_state
  task automatic scenario(input string name, input int src, input int exp_delay,
                          input logic [31:0] exp_pc, input logic [3:0] exp_inval);
    int d;
    @(negedge clk);
    if_pc = 32'h100; id_pc = 32'h200; m_pc = 32'h300;
    case (src)
      0: m_exc  = 5'b00001;
      1: id_exc = 1'b1;
      2: if_exc = 5'b00100;
      3: io_int = 2'b10;
      default: begin m_exc = 5'b10000; id_exc = 1; if_exc = 5'b1; io_int = 2'b1; end
    endcase
    #1;
    check({name, " inval {m,ex,id,if}"}, {m_inval, ex_inval, id_inval, if_inval}, exp_inval);
    d = 0;
    while (!save_state && d < 10) begin
      check({name, " fetch held"}, insert_bubble, 1'b1);
      @(negedge clk); quiet(); #1; d++;
    end
    check({name, " save delay"}, d, exp_delay);
    check({name, " set_pc"}, set_pc, 1'b1);
    check({name, " saved pc"}, saved_pc, exp_pc);
    check({name, " handler"}, handler_addr, 32'h0FFF_F000);
    @(negedge clk); quiet(); #1;
    check({name, " idle after"}, {save_state, set_pc, insert_bubble, if_inval}, 4'b0);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    quiet(); if_pc = '0; id_pc = '0; m_pc = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    #1 check("idle", {save_state, set_pc, insert_bubble, if_inval, id_inval, ex_inval, m_inval}, 0);
    scenario("mem",  0, 0, 32'h300, 4'b1111);
    scenario("id",   1, 2, 32'h200, 4'b0011);
    scenario("if",   2, 3, 32'h100, 4'b0001);
    scenario("irq",  3, 3, 32'h100, 4'b0001);
    scenario("prio", 4, 0, 32'h300, 4'b1111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
