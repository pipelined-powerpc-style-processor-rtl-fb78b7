// cr_register: the condition register CR (eight 4-bit fields LT GT EQ SO).
//
// Two writers: a compare (cmp signed, cmpl unsigned) writes the field named
// by its BF bits with the ordering of operand a against operand b; a record
// form (Rc = 1, or ai.) writes field 0 with the sign of the result compared
// with zero. The SO bit of the field is a copy of XER[SO]. The document
// derives the compare result from the subtractor output and the operands'
// top bits; here the ordering is computed directly, which also gives the
// right answer when the subtraction overflows. Rising-edge register,
// synchronous reset to zero. Field 0 is architectural bits 0..3 (the MSBs).
module cr_register (
  input  logic        clk,
  input  logic        rst,
  input  logic        we,
  input  logic        compare,     // 1: compare a with b into field bf
  input  logic        unsigned_cmp,
  input  logic [2:0]  bf,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] result,
  input  logic        so,
  output logic [31:0] cr
);

  logic       lt, gt, eq;
  logic [2:0] field;

  always_comb begin
    if (compare) begin
      eq = (a == b);
      lt = unsigned_cmp ? (a < b) : ($signed(a) < $signed(b));
    end else begin
      eq = (result == 32'd0);
      lt = result[31];
    end
    gt    = !lt && !eq;
    field = compare ? bf : 3'd0;
  end

  always_ff @(posedge clk) begin
    if (rst)
      cr <= '0;
    else if (we)
      cr[31 - 4*field -: 4] <= {lt, gt, eq, so};
  end

endmodule
