// trap_interrupt: precise trap and interrupt controller.
//
// Exceptions are reported by the IF stage (5 causes: TLB miss, page fault,
// protection violation, translation error, alignment), the ID stage (illegal
// instruction) and the MEM stage (the same 5 causes for data accesses);
// external devices raise two interrupt lines. Each cycle the oldest reporting
// stage "throws": MEM before ID before IF before an interrupt. The throwing
// instruction and every younger one are invalidated (turned into bubbles)
// through the *_inval outputs, and its PC is saved. A CAUSED marker is then
// passed down a chain of flip-flops (ID, EX, MEM) in step with the pipeline
// so that the instructions older than the trap can finish; while the marker
// is in flight insert_bubble holds the fetch. When the marker reaches MEM
// (or a MEM exception is thrown directly) save_state tells the datapath to
// copy the saved PC into SRR0 and the MSR into SRR1, and set_pc loads the
// handler address into the PC.
//
// As in the document, every exception and interrupt goes to one handler
// address (HANDLER_ADDR) and no new interrupt is expected while one is being
// serviced. A MEM exception's PC goes to SRR0 in the cycle it is thrown
// (the document reads the saved-PC register there, one cycle too early).
// This design also saves the PC for an interrupt (the document's
// saved-PC register is enabled only by the three trap sources).
// Registers update on the rising edge; synchronous reset clears them.
module trap_interrupt #(
  parameter logic [31:0] HANDLER_ADDR = 32'h0FFF_F000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] if_pc,
  input  logic [31:0] id_pc,
  input  logic [31:0] m_pc,
  input  logic [4:0]  if_exc,
  input  logic        id_exc,
  input  logic [4:0]  m_exc,
  input  logic [1:0]  io_int,
  output logic        save_state,
  output logic        if_inval,
  output logic        id_inval,
  output logic        ex_inval,
  output logic        m_inval,
  output logic        insert_bubble,
  output logic        set_pc,
  output logic [31:0] saved_pc,
  output logic [31:0] handler_addr
);

  logic if_sig, m_sig, io_sig;
  logic m_throw, id_throw, if_throw, io_throw;
  logic id_caused, ex_caused, m_caused;
  logic [31:0] saved_q;

  assign if_sig = |if_exc;
  assign m_sig  = |m_exc;
  assign io_sig = |io_int;

  assign m_throw  = m_sig;
  assign id_throw = id_exc && !m_sig;
  assign if_throw = if_sig && !id_exc && !m_sig;
  assign io_throw = io_sig && !if_sig && !id_exc && !m_sig;

  always_ff @(posedge clk) begin
    if (rst) begin
      id_caused <= 1'b0;
      ex_caused <= 1'b0;
      m_caused  <= 1'b0;
      saved_q   <= '0;
    end else begin
      id_caused <= if_throw || io_throw;
      ex_caused <= (id_caused || id_throw) && !m_throw;
      m_caused  <= ex_caused && !m_throw;
      if (m_throw)                    saved_q <= m_pc;
      else if (id_throw)              saved_q <= id_pc;
      else if (if_throw || io_throw)  saved_q <= if_pc;
    end
  end

  // A MEM exception saves state in the cycle it is thrown, so its PC is passed
  // straight through rather than from the register.
  assign saved_pc      = m_throw ? m_pc : saved_q;
  assign save_state    = m_caused || m_throw;
  assign set_pc        = save_state;
  assign if_inval      = if_throw || id_throw || m_throw || io_throw;
  assign id_inval      = id_throw || m_throw;
  assign ex_inval      = m_throw;
  assign m_inval       = m_throw;
  assign insert_bubble = id_caused || ex_caused || if_throw || id_throw || io_throw;
  assign handler_addr  = HANDLER_ADDR;

endmodule
