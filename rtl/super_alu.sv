// super_alu: the EX-stage arithmetic/logic unit and shifter.
//
// Adder/logic half: a + b + cin (with operand A optionally inverted, which
// turns the add into subfc's ~RA + RB + 1), and, or, nand, orc, pass-B.
// Carry-out and signed overflow come from the adder.
//
// Shifter half (slw, srw, sraw): the value in operand A is shifted by the low
// five bits of operand B, then cleared by a mask, as the document builds it:
// a 32-bit mask with ones in its first n architectural bits (MSB end) clears
// the vacated bits of a right shift, and its mirror image those of a left
// shift; for sraw the vacated bits are filled with the sign instead. A shift
// amount of 32..63 (bit 26 of RB set) gives zero, or all sign bits for sraw.
// For sraw, CA is set when the value is negative and any one-bit was shifted
// out. The document read the mask from a ROM; here it is computed.
//
// Combinational.
module super_alu
  import ppc_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_op_e     op,
  input  logic        sub,         // invert a before the adder
  input  logic        cin,
  input  logic        shift,       // result from the shifter
  input  logic        shift_right,
  input  logic        shift_arith,
  output logic [31:0] result,
  output logic        cout,
  output logic        ovf
);

  logic [31:0] a_eff, sum, logic_out;
  logic        add_cout;
  logic [4:0]  n;
  logic        big;                 // shift amount >= 32
  logic [31:0] mask, flipped, sh_l, sh_r, sh_out, lost;
  logic        sh_ca;

  assign a_eff = sub ? ~a : a;
  assign {add_cout, sum} = {1'b0, a_eff} + {1'b0, b} + {32'd0, cin};

  always_comb begin
    unique case (op)
      ALU_ADD:   logic_out = sum;
      ALU_AND:   logic_out = a & b;
      ALU_OR:    logic_out = a | b;
      ALU_NAND:  logic_out = ~(a & b);
      ALU_ORC:   logic_out = a | ~b;
      ALU_PASSB: logic_out = b;
      default:   logic_out = sum;
    endcase
  end

  // Mask generator: ones in the n most significant bits, and its mirror.
  assign n    = b[4:0];
  assign big  = b[5];
  assign mask = ~(32'hFFFF_FFFF >> n);
  always_comb
    for (int i = 0; i < 32; i++) flipped[i] = mask[31-i];

  assign sh_l = (a << n) & ~flipped;
  assign sh_r = (a >> n) & ~mask;

  always_comb begin
    if (!shift_right)     sh_out = big ? 32'd0 : sh_l;
    else if (!shift_arith) sh_out = big ? 32'd0 : sh_r;
    else if (big)         sh_out = {32{a[31]}};
    else                  sh_out = sh_r | (mask & {32{a[31]}});
  end

  // Bits shifted out of the low end by a right shift.
  assign lost  = big ? a : (a & ~(32'hFFFF_FFFF << n));
  assign sh_ca = a[31] && (lost != 32'd0);

  assign result = shift ? sh_out : logic_out;
  assign cout   = shift ? sh_ca : add_cout;
  assign ovf    = !shift && (op == ALU_ADD) &&
                  (a_eff[31] == b[31]) && (sum[31] != a_eff[31]);

endmodule
