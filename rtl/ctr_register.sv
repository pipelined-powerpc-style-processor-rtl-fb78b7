// ctr_register: the count register CTR.
//
// Decremented by one when a conditional branch whose BO field asks for it is
// executed (dec), loaded from RS by mtspr CTR (load, which takes precedence).
// Rising-edge register, synchronous reset to zero.
module ctr_register (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] rs,
  input  logic        dec,
  input  logic        load,
  output logic [31:0] ctr
);

  always_ff @(posedge clk) begin
    if (rst)       ctr <= '0;
    else if (load) ctr <= rs;
    else if (dec)  ctr <= ctr - 32'd1;
  end

endmodule
