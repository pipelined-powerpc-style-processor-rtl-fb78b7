// gpr_regfile: the general-purpose register file.
//
// NREGS x 32-bit registers with three combinational read ports (RA, RB and
// RS/RT of the instruction in ID) and two write ports written on the rising
// clock edge: port 1 for the RT result, port 2 for the RA result of update
// loads/stores, logical and shift instructions. A read of a register that is
// being written in the same cycle returns the new value, so an instruction in
// ID sees the result of the one in WB (the document gets the same effect by
// writing on the falling edge). If both ports write one register, port 1
// wins. Synchronous reset clears all registers.
module gpr_regfile #(
  parameter int NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] ra1,
  input  logic [$clog2(NREGS)-1:0] ra2,
  input  logic [$clog2(NREGS)-1:0] ra3,
  output logic [31:0]              rd1,
  output logic [31:0]              rd2,
  output logic [31:0]              rd3,
  input  logic [$clog2(NREGS)-1:0] wa1,
  input  logic [31:0]              wd1,
  input  logic                     we1,
  input  logic [$clog2(NREGS)-1:0] wa2,
  input  logic [31:0]              wd2,
  input  logic                     we2
);

  localparam int AW = $clog2(NREGS);

  logic [31:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      if (we2) regs[wa2] <= wd2;
      if (we1) regs[wa1] <= wd1;
    end
  end

  function automatic logic [31:0] rd(input logic [AW-1:0] a);
    if (we1 && wa1 == a)      return wd1;
    else if (we2 && wa2 == a) return wd2;
    else                      return regs[a];
  endfunction

  assign rd1 = rd(ra1);
  assign rd2 = rd(ra2);
  assign rd3 = rd(ra3);

endmodule
