// forward_select_tb: random test of the EX-stage operand multiplexers.
//
// Random forwarding flags (any combination, including several at once),
// register-file values, immediates and forwarded results are applied; each
// operand is compared with a reference that applies the priority
// EX/MEM port 1 > EX/MEM port 2 > MEM/WB port 1 > MEM/WB port 2 > register
// file, with the zero and immediate overrides. Combinational; checked 1 ns
// after each vector. Watchdog included.
module forward_select_tb;
  import ppc_pkg::*;

  logic        zero_a, sel_b_imm;
  fwd_t        fwd_a, fwd_b, fwd_s;
  logic [31:0] rf_a, rf_b, rf_s, imm, exmem_wd1, exmem_wd2, memwb_wd1, memwb_wd2;
  logic [31:0] op_a, op_b, op_s;
  int checks = 0, failures = 0;

  forward_select dut (.*);

  function automatic logic [31:0] ref_pick(input fwd_t f, input logic [31:0] rf);
    logic [31:0] r;
    r = rf;
    if (f.mem2) r = memwb_wd2;
    if (f.mem1) r = memwb_wd1;
    if (f.ex2)  r = exmem_wd2;
    if (f.ex1)  r = exmem_wd1;
    return r;
  endfunction

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) begin
      zero_a = ($urandom_range(0, 7) == 0);
      sel_b_imm = $urandom_range(0, 1);
      fwd_a = fwd_t'($urandom); fwd_b = fwd_t'($urandom); fwd_s = fwd_t'($urandom);
      rf_a = $urandom; rf_b = $urandom; rf_s = $urandom; imm = $urandom;
      exmem_wd1 = $urandom; exmem_wd2 = $urandom; memwb_wd1 = $urandom; memwb_wd2 = $urandom;
      #1;
      check("op_a", op_a, zero_a ? 32'd0 : ref_pick(fwd_a, rf_a));
      check("op_b", op_b, sel_b_imm ? imm : ref_pick(fwd_b, rf_b));
      check("op_s", op_s, ref_pick(fwd_s, rf_s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
