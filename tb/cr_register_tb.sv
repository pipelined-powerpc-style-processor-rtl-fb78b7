// cr_register_tb: random test of the condition register.
//
// Random signed and unsigned compares into random fields, and record-form
// updates of field 0 from a result, with operands biased towards equality
// and sign corners. After each rising edge the whole CR is compared with a
// model that writes {LT, GT, EQ, SO} into the chosen field and leaves the
// other fields alone. Reset is checked first. Watchdog included.
module cr_register_tb;

  logic        clk = 0, rst = 1;
  logic        we, compare, unsigned_cmp, so;
  logic [2:0]  bf;
  logic [31:0] a, b, result, cr, model;
  int checks = 0, failures = 0;

  cr_register dut (.*);
  always #5 clk = !clk;

  function automatic logic [31:0] pick();
    case ($urandom_range(0, 4))
      0: return 32'd0;
      1: return 32'h8000_0000;
      2: return 32'hFFFF_FFFF;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    logic lt, gt, eq;
    int   f;
    {we, compare, unsigned_cmp, so} = '0; bf = '0; a = '0; b = '0; result = '0;
    repeat (2) @(posedge clk);
    #1 checks++; if (cr !== 32'd0) begin failures++; $display("FAIL reset"); end
    rst = 0; model = '0;
    repeat (4000) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) != 0); compare = $urandom_range(0, 1);
      unsigned_cmp = $urandom_range(0, 1); so = $urandom_range(0, 1);
      bf = 3'($urandom); a = pick(); b = ($urandom_range(0, 3) == 0) ? a : pick();
      result = pick();
      if (compare) begin
        eq = (a == b);
        lt = unsigned_cmp ? (a < b) : ($signed(a) < $signed(b));
        f  = int'(bf);
      end else begin
        eq = (result == 0); lt = result[31]; f = 0;
      end
      gt = !lt && !eq;
      if (we) model[31 - 4*f -: 4] = {lt, gt, eq, so};
      @(posedge clk); #1;
      checks++;
      if (cr !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cr %h exp %h", cr, model);
      end
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
