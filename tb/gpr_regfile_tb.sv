// gpr_regfile_tb: random test of the 32 x 32-bit register file.
//
// Each cycle both write ports write random registers (often the same one, to
// exercise port priority) and three read ports read random registers. Reads
// are checked combinationally before the edge against a model that includes
// the same-cycle write bypass (port 1 wins), and the model is updated at the
// edge. Reset clearing every register is checked first. Watchdog included.
module gpr_regfile_tb;

  localparam int NREGS = 32;
  logic        clk = 0, rst = 1;
  logic [4:0]  ra1, ra2, ra3, wa1, wa2;
  logic [31:0] rd1, rd2, rd3, wd1, wd2;
  logic        we1, we2;
  logic [31:0] model [NREGS];
  int checks = 0, failures = 0;

  gpr_regfile #(.NREGS(NREGS)) dut (.*);
  always #5 clk = !clk;

  function automatic logic [31:0] exp_rd(input logic [4:0] a);
    if (we1 && wa1 == a) return wd1;
    if (we2 && wa2 == a) return wd2;
    return model[a];
  endfunction

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    {we1, we2} = '0; {ra1, ra2, ra3, wa1, wa2} = '0; wd1 = '0; wd2 = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < NREGS; i++) begin
      ra1 = 5'(i); #1 check("reset value", rd1, 32'd0);
    end
    repeat (5000) begin
      @(negedge clk);
      we1 = $urandom_range(0, 1); we2 = $urandom_range(0, 1);
      wa1 = 5'($urandom_range(0, 7)); wa2 = $urandom_range(0, 1) ? wa1 : 5'($urandom_range(0, 7));
      wd1 = $urandom; wd2 = $urandom;
      ra1 = 5'($urandom_range(0, 7)); ra2 = 5'($urandom_range(0, 7)); ra3 = 5'($urandom);
      #1;
      check("rd1", rd1, exp_rd(ra1));
      check("rd2", rd2, exp_rd(ra2));
      check("rd3", rd3, exp_rd(ra3));
      @(posedge clk);
      if (we2) model[wa2] = wd2;
      if (we1) model[wa1] = wd1;
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
