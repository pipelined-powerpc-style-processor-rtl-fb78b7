// lr_register: the link register LR.
//
// A branch with LK = 1 (set_lr) stores the address of the instruction after
// the branch (npc); mtspr LR (load) stores RS and takes precedence, as the
// document's input multiplexer does. Rising-edge register, synchronous reset
// to zero.
module lr_register (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] npc,
  input  logic [31:0] rs,
  input  logic        set_lr,
  input  logic        load,
  output logic [31:0] lr
);

  always_ff @(posedge clk) begin
    if (rst)         lr <= '0;
    else if (load)   lr <= rs;
    else if (set_lr) lr <= npc;
  end

endmodule
