// xer_register: the fixed-point exception register XER.
//
// Holds SO (summary overflow, architectural bit 0), OV (bit 1) and CA
// (bit 2); the other bits only hold what mtspr writes. SO is sticky: it is set
// together with OV and stays set until mtspr rewrites XER. OV and CA are
// replaced by the ALU's overflow and carry when their set strobes are high.
// mtspr XER (load) writes the whole register from RS and takes precedence.
// Writes happen on the rising clock edge; synchronous reset clears XER.
module xer_register (
  input  logic        clk,
  input  logic        rst,
  input  logic        ovf,
  input  logic        cout,
  input  logic [31:0] rs,
  input  logic        set_so,
  input  logic        set_ov,
  input  logic        set_ca,
  input  logic        load,
  output logic [31:0] xer
);

  always_ff @(posedge clk) begin
    if (rst)
      xer <= '0;
    else if (load)
      xer <= rs;
    else begin
      if (set_so) xer[31] <= xer[31] | ovf;
      if (set_ov) xer[30] <= ovf;
      if (set_ca) xer[29] <= cout;
    end
  end

endmodule
