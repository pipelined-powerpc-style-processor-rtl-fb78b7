// branch_predictor: 2-bit counter branch predictor with a target store.
//
// Two tables of ENTRIES entries, indexed by PC bits taken from the byte
// address (the document uses architectural PC bits 27..31, i.e. the low five
// bits of the byte address; with word-aligned PCs that leaves 8 distinct
// entries in use - kept as the document has it, see IDX_LSB to change it):
//  - counter store: a 2-bit saturating counter per entry; the prediction is
//    "taken" when the counter's upper bit is set (10 or 11).
//  - target store: the last target address seen for the entry.
// The IF stage looks both up with the fetch PC (q_pc) combinationally. The
// EX stage, which resolves branches, updates the entry of the branch's own PC
// (u_pc) on the rising edge when u_en is high and the pipeline is not held
// (hold_n), moving the counter one step toward the outcome and writing the
// computed target. Synchronous reset clears both tables (not taken, 0).
module branch_predictor #(
  parameter int ENTRIES = 32,
  parameter int IDX_LSB = 0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        hold_n,
  input  logic [31:0] q_pc,
  output logic        pred_taken,
  output logic [31:0] pred_target,
  input  logic [31:0] u_pc,
  input  logic        u_en,
  input  logic        u_taken,
  input  logic [31:0] u_target
);

  localparam int IW = $clog2(ENTRIES);

  logic [1:0]    count  [ENTRIES];
  logic [31:0]   target [ENTRIES];
  logic [IW-1:0] q_idx, u_idx;

  assign q_idx = q_pc[IDX_LSB +: IW];
  assign u_idx = u_pc[IDX_LSB +: IW];

  assign pred_taken  = count[q_idx][1];
  assign pred_target = target[q_idx];

  // saturating up/down counter step
  function automatic logic [1:0] step(input logic [1:0] c, input logic t);
    if (t) return (c == 2'b11) ? c : c + 2'd1;
    else   return (c == 2'b00) ? c : c - 2'd1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < ENTRIES; i++) begin
        count[i]  <= 2'b00;
        target[i] <= '0;
      end
    end else if (u_en && hold_n) begin
      count[u_idx]  <= step(count[u_idx], u_taken);
      target[u_idx] <= u_target;
    end
  end

endmodule
