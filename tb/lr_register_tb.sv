// lr_register_tb: random test of the link register.
//
// Random set_lr (branch and link), load (mtspr) and data; after each rising
// edge LR must hold RS when load was high, otherwise the return address when
// set_lr was high, otherwise its old value. Reset is checked first.
// Watchdog included.
module lr_register_tb;

  logic        clk = 0, rst = 1;
  logic [31:0] npc, rs, lr, model;
  logic        set_lr, load;
  int checks = 0, failures = 0;

  lr_register dut (.*);
  always #5 clk = !clk;

  initial begin
    npc = '0; rs = '0; set_lr = 0; load = 0;
    repeat (2) @(posedge clk);
    #1 checks++; if (lr !== 32'd0) begin failures++; $display("FAIL reset"); end
    rst = 0; model = '0;
    repeat (3000) begin
      @(negedge clk);
      npc = $urandom; rs = $urandom;
      set_lr = $urandom_range(0, 1); load = $urandom_range(0, 1);
      model = load ? rs : set_lr ? npc : model;
      @(posedge clk); #1;
      checks++;
      if (lr !== model) begin
        failures++;
        if (failures < 10) $display("FAIL lr %h exp %h", lr, model);
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
