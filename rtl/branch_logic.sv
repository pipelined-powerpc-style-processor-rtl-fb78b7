// branch_logic: decides whether a bc instruction is taken.
//
// Decodes the five-bit BO field as the document's branch logic does: whether
// to decrement CTR (dec_ctr), whether to test CTR for zero or non-zero
// (use_ctr, zero_ctr), and whether to branch when the selected CR bit is
// false, true, or in either case (on_false, on_true). taken combines them:
// the condition test passes when the CR bit matches, and the counter test
// (when used) looks at the value CTR will have after the decrement. The
// document computes the counter signals but its taken equation leaves them
// out; they are applied here, as the architecture requires.
// Combinational. bo[4] is architectural BO bit 0.
module branch_logic (
  input  logic        branch,   // a bc instruction is in EX
  input  logic [4:0]  bo,
  input  logic        cr_bit,   // CR bit selected by BI
  input  logic [31:0] ctr,      // CTR before this branch
  output logic        dec_ctr,
  output logic        zero_ctr,
  output logic        use_ctr,
  output logic        on_false,
  output logic        on_true,
  output logic        taken
);

  logic bo0, bo1, bo2, bo3;
  logic ctr_ok, cond_ok;

  assign {bo0, bo1, bo2, bo3} = bo[4:1];

  assign dec_ctr  = branch && !bo2;
  assign use_ctr  = !bo2;
  assign zero_ctr = !bo2 && bo3;
  assign on_false = bo0 || !bo1;
  assign on_true  = bo0 || bo1;

  assign ctr_ok  = !use_ctr || (zero_ctr ? (ctr == 32'd1) : (ctr != 32'd1));
  assign cond_ok = (on_false && !cr_bit) || (on_true && cr_bit);
  assign taken   = branch && ctr_ok && cond_ok;

endmodule
