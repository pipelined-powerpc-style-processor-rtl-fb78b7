// super_alu_tb: random and corner-case test of the ALU/shifter.
//
// Every operation (add with and without carry-in and operand inversion, and,
// or, nand, orc, pass-B, slw, srw, sraw) is applied to random operands and to
// corner values, and result, carry-out and overflow are compared with a
// reference computed here with ordinary SystemVerilog arithmetic. The unit is
// combinational; each vector is checked 1 ns after it is applied. A watchdog
// ends the run if it stalls.
module super_alu_tb;
  import ppc_pkg::*;

  logic [31:0] a, b, result;
  alu_op_e     op;
  logic        sub, cin, shift, shift_right, shift_arith, cout, ovf;
  int checks = 0, failures = 0;

  super_alu dut (.*);

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h b=%h op=%s sh=%b%b%b: got %h exp %h",
                 what, a, b, op.name(), shift, shift_right, shift_arith, got, exp);
    end
  endtask

  task automatic apply_and_check();
    logic [32:0] s;
    logic [31:0] ae, r, lostm;
    logic        c, v;
    int          n;
    #1;
    ae = sub ? ~a : a;
    n  = int'(b[5:0]);
    if (shift) begin
      if (!shift_right)      begin r = (n > 31) ? 32'd0 : a << n; c = 1'b0; end
      else if (!shift_arith) begin r = (n > 31) ? 32'd0 : a >> n; c = 1'b0; end
      else begin
        r = (n > 31) ? {32{a[31]}} : 32'($signed(a) >>> n);
        lostm = (n > 31) ? 32'hFFFF_FFFF : ((32'd1 << n) - 32'd1);
        c = a[31] && ((a & lostm) != 0);
      end
      v = 1'b0;
    end else begin
      s = {1'b0, ae} + {1'b0, b} + {32'd0, cin};
      case (op)
        ALU_AND:   r = a & b;
        ALU_OR:    r = a | b;
        ALU_NAND:  r = ~(a & b);
        ALU_ORC:   r = a | ~b;
        ALU_PASSB: r = b;
        default:   r = s[31:0];
      endcase
      c = s[32];
      v = (op == ALU_ADD) && (ae[31] == b[31]) && (s[31] != ae[31]);
    end
    check("result", result, r);
    if (shift && !(shift_right && shift_arith)) ; else check("carry", {31'd0, cout}, {31'd0, c});
    if (!shift) check("overflow", {31'd0, ovf}, {31'd0, v});
  endtask

  localparam logic [31:0] CORNER [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF,
                                         32'h8000_0000, 32'hFFFF_FFFF, 32'h8000_0001};

  initial begin
    a = 0; b = 0; op = ALU_ADD; sub = 0; cin = 0;
    shift = 0; shift_right = 0; shift_arith = 0;
    // corner operands through the adder
    foreach (CORNER[i]) foreach (CORNER[j]) for (int k = 0; k < 4; k++) begin
      a = CORNER[i]; b = CORNER[j]; sub = k[0]; cin = k[1]; op = ALU_ADD; shift = 0;
      apply_and_check();
    end
    // every shift amount 0..63 on corner values
    foreach (CORNER[i]) for (int n = 0; n < 64; n++) for (int k = 0; k < 3; k++) begin
      a = CORNER[i] ^ 32'h0F0F_0A50; b = 32'(n); shift = 1;
      shift_right = (k != 0); shift_arith = (k == 2);
      apply_and_check();
    end
    // random
    repeat (20000) begin
      a = $urandom; b = $urandom;
      if ($urandom_range(0, 3) == 0) b[31:6] = '0;
      op = alu_op_e'($urandom_range(0, 5));
      sub = $urandom_range(0, 1); cin = $urandom_range(0, 1);
      shift = ($urandom_range(0, 2) == 0);
      shift_right = $urandom_range(0, 1); shift_arith = $urandom_range(0, 1);
      apply_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
