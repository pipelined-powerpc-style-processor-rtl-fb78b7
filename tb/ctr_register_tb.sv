// ctr_register_tb: test of the count register.
//
// A loop of mtspr loads followed by runs of decrements (including a
// decrement through zero to all ones), with random strobes; after each
// rising edge CTR is compared with a reference model in which load wins over
// dec. Reset is checked first. Watchdog included.
module ctr_register_tb;

  logic        clk = 0, rst = 1;
  logic [31:0] rs, ctr, model;
  logic        dec, load;
  int checks = 0, failures = 0;

  ctr_register dut (.*);
  always #5 clk = !clk;

  initial begin
    rs = '0; dec = 0; load = 0;
    repeat (2) @(posedge clk);
    #1 checks++; if (ctr !== 32'd0) begin failures++; $display("FAIL reset"); end
    rst = 0; model = '0;
    repeat (3000) begin
      @(negedge clk);
      rs = $urandom_range(0, 3) == 0 ? 32'd1 : $urandom_range(0, 20);
      load = ($urandom_range(0, 9) == 0); dec = $urandom_range(0, 1);
      model = load ? rs : dec ? model - 32'd1 : model;
      @(posedge clk); #1;
      checks++;
      if (ctr !== model) begin
        failures++;
        if (failures < 10) $display("FAIL ctr %h exp %h", ctr, model);
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
