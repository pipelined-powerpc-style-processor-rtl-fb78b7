// choose_pc_tb: random test of the next-PC priority multiplexer.
//
// Random select lines (any combination) and addresses are applied and the
// output is compared with the priority trap > resolved branch > LR > SRR0 >
// predicted target > PC+4. Combinational; checked 1 ns after each vector.
// Watchdog included.
module choose_pc_tb;

  logic        int_s, bcr_s, rti_s, res_s, pred_s;
  logic [31:0] int_a, lr_a, srr0_a, res_a, pred_a, pc4_a, pc_out;
  int checks = 0, failures = 0;

  choose_pc dut (.*);

  initial begin
    logic [31:0] exp;
    repeat (3000) begin
      {int_s, bcr_s, rti_s, res_s, pred_s} = 5'($urandom);
      if ($urandom_range(0, 1)) {int_s, res_s} = 2'b00;
      int_a = $urandom; lr_a = $urandom; srr0_a = $urandom;
      res_a = $urandom; pred_a = $urandom; pc4_a = $urandom;
      #1;
      exp = int_s ? int_a : res_s ? res_a : bcr_s ? lr_a : rti_s ? srr0_a :
            pred_s ? pred_a : pc4_a;
      checks++;
      if (pc_out !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%b%b%b%b%b got %h exp %h",
                                    int_s, res_s, bcr_s, rti_s, pred_s, pc_out, exp);
      end
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
