// forward_select: operand multiplexers of the EX stage with forwarding.
//
// Each of the three source values of the instruction in EX (first ALU
// operand, second ALU operand, RS for store data / mtspr) is taken from one
// of: the register-file value read in ID, a forwarded result, or (operand A)
// zero, or (operand B) the sign-extended immediate. The forwarding flags come
// from hazard_detect, registered in ID/EX. The four forwarding sources are
// the port-1 and port-2 results of the instruction now in MEM (EX/MEM
// register) and of the instruction now in WB (MEM/WB register).
//
// Priority follows the document's operand selectors: the younger result
// (EX/MEM) wins over the older (MEM/WB), and within one stage the RT write
// (port 1) wins over the RA write (port 2). Operand A is forced to zero for a
// load or store whose RA field is 0, as in the document.
//
// Combinational.
module forward_select
  import ppc_pkg::*;
(
  input  logic        zero_a,     // force operand A to 0
  input  logic        sel_b_imm,  // operand B is the immediate
  input  fwd_t        fwd_a,
  input  fwd_t        fwd_b,
  input  fwd_t        fwd_s,
  input  logic [31:0] rf_a,
  input  logic [31:0] rf_b,
  input  logic [31:0] rf_s,
  input  logic [31:0] imm,
  input  logic [31:0] exmem_wd1,
  input  logic [31:0] exmem_wd2,
  input  logic [31:0] memwb_wd1,
  input  logic [31:0] memwb_wd2,
  output logic [31:0] op_a,
  output logic [31:0] op_b,
  output logic [31:0] op_s
);

  function automatic logic [31:0] pick(input fwd_t f, input logic [31:0] rf);
    if      (f.ex1)  return exmem_wd1;
    else if (f.ex2)  return exmem_wd2;
    else if (f.mem1) return memwb_wd1;
    else if (f.mem2) return memwb_wd2;
    else             return rf;
  endfunction

  assign op_a = zero_a    ? 32'd0 : pick(fwd_a, rf_a);
  assign op_b = sel_b_imm ? imm   : pick(fwd_b, rf_b);
  assign op_s = pick(fwd_s, rf_s);

endmodule
