// xer_register_tb: random test of XER against a reference model.
//
// Random strobes (set_so, set_ov, set_ca, load) and ALU flags are applied for
// many cycles; after each rising edge the register is compared with a model
// that keeps SO sticky, replaces OV and CA on their strobes and lets mtspr
// (load) overwrite everything. Reset is checked first. Watchdog included.
module xer_register_tb;

  logic        clk = 0, rst = 1;
  logic        ovf, cout, set_so, set_ov, set_ca, load;
  logic [31:0] rs, xer, model;
  int checks = 0, failures = 0;

  xer_register dut (.*);
  always #5 clk = !clk;

  initial begin
    {ovf, cout, set_so, set_ov, set_ca, load} = '0; rs = '0;
    repeat (2) @(posedge clk);
    #1 checks++; if (xer !== 32'd0) begin failures++; $display("FAIL reset"); end
    rst = 0; model = '0;
    repeat (4000) begin
      @(negedge clk);
      ovf = $urandom_range(0, 1); cout = $urandom_range(0, 1);
      set_so = $urandom_range(0, 1); set_ov = set_so; set_ca = $urandom_range(0, 1);
      load = ($urandom_range(0, 15) == 0); rs = $urandom;
      if (load) model = rs;
      else begin
        if (set_so) model[31] = model[31] | ovf;
        if (set_ov) model[30] = ovf;
        if (set_ca) model[29] = cout;
      end
      @(posedge clk); #1;
      checks++;
      if (xer !== model) begin
        failures++;
        if (failures < 10) $display("FAIL xer %h exp %h", xer, model);
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
