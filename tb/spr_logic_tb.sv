// spr_logic_tb: exhaustive test of the special-purpose-register decoder.
//
// All 32 SPR numbers with every combination of the mtspr/mfspr flags; the six
// select lines are compared with the expected decode of XER (1), LR (8) and
// CTR (9). Combinational; checked 1 ns after each vector. Watchdog included.
module spr_logic_tb;

  logic [4:0] spr;
  logic       mtspr, mfspr;
  logic       load_lr, load_ctr, load_xer, from_lr, from_ctr, from_xer;
  int checks = 0, failures = 0;

  spr_logic dut (.*);

  initial begin
    logic [5:0] exp, got;
    for (int s = 0; s < 32; s++) for (int m = 0; m < 4; m++) begin
      spr = 5'(s); {mtspr, mfspr} = 2'(m);
      #1;
      exp = {mtspr && s == 8, mtspr && s == 9, mtspr && s == 1,
             mfspr && s == 8, mfspr && s == 9, mfspr && s == 1};
      got = {load_lr, load_ctr, load_xer, from_lr, from_ctr, from_xer};
      checks++;
      if (got !== exp) begin
        failures++;
        $display("FAIL spr=%0d mt=%b mf=%b got %b exp %b", s, mtspr, mfspr, got, exp);
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
