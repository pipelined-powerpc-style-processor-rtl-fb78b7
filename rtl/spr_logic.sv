// spr_logic: decodes the special-purpose-register number of mtspr / mfspr.
//
// SPR 1 is XER, 8 is LR and 9 is CTR (low five bits of the SPR field, which
// is what the document compares). mtspr raises the matching load strobe, mfspr
// the matching read select. Other numbers select nothing. Combinational.
module spr_logic
  import ppc_pkg::*;
(
  input  logic [4:0] spr,
  input  logic       mtspr,
  input  logic       mfspr,
  output logic       load_lr,
  output logic       load_ctr,
  output logic       load_xer,
  output logic       from_lr,
  output logic       from_ctr,
  output logic       from_xer
);

  assign load_xer = mtspr && (spr == SPR_XER);
  assign load_lr  = mtspr && (spr == SPR_LR);
  assign load_ctr = mtspr && (spr == SPR_CTR);
  assign from_xer = mfspr && (spr == SPR_XER);
  assign from_lr  = mfspr && (spr == SPR_LR);
  assign from_ctr = mfspr && (spr == SPR_CTR);

endmodule
