// branch_logic_tb: exhaustive test of the branch-condition unit.
//
// Every BO value (32), both values of the selected CR bit and several CTR
// values (0, 1, 2, 5, all ones) with the branch flag on and off. Expected
// behaviour is the PowerPC rule, written here independently: the branch is
// taken when (BO2 or (CTR-1 != 0) xor BO3) and (BO0 or CR bit = BO1); CTR is
// decremented when BO2 is 0. Combinational; checked 1 ns after each vector.
// Watchdog included.
module branch_logic_tb;

  logic        branch, cr_bit;
  logic [4:0]  bo;
  logic [31:0] ctr;
  logic        dec_ctr, zero_ctr, use_ctr, on_false, on_true, taken;
  int checks = 0, failures = 0;

  branch_logic dut (.*);

  localparam logic [31:0] CTRS [5] = '{32'd0, 32'd1, 32'd2, 32'd5, 32'hFFFF_FFFF};

  initial begin
    logic b0, b1, b2, b3, ctr_ok, cond_ok, exp_taken;
    for (int v = 0; v < 32; v++) for (int c = 0; c < 2; c++)
      foreach (CTRS[k]) for (int br = 0; br < 2; br++) begin
        bo = 5'(v); cr_bit = c[0]; ctr = CTRS[k]; branch = br[0];
        #1;
        {b0, b1, b2, b3} = bo[4:1];
        ctr_ok    = b2 || (((ctr - 32'd1) != 0) ^ b3);
        cond_ok   = b0 || (cr_bit == b1);
        exp_taken = branch && ctr_ok && cond_ok;
        checks++;
        if (taken !== exp_taken || dec_ctr !== (branch && !b2)) begin
          failures++;
          if (failures < 10)
            $display("FAIL bo=%b cr=%b ctr=%0d br=%b: taken %b exp %b dec %b",
                     bo, cr_bit, ctr, branch, taken, exp_taken, dec_ctr);
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
