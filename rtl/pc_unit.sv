// pc_unit: program counter of the instruction fetch stage.
//
// The PC register addresses the instruction cache, which returns the
// instructions at PC and PC+4. Normally both issue and the next PC is PC+8.
// When the issuing unit raises rollback, only the first instruction went
// down the pipeline and the next PC is PC+4, so the fetch restarts at the
// held instruction. A redirect (branch target or interrupt service address)
// has priority over both. PC+4, PC+8 and a next-PC multiplexer with a branch
// and ISR address input follow the pipeline diagram; the priority order,
// the reset value RESET_PC and the synchronous active-high reset are this
// design's choices.
//
// Ports: clk, reset, rollback, redirect, redirect_pc [31:0], pc [31:0].
// The PC changes on each rising clock edge.
module pc_unit #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        rollback,
  input  logic        redirect,
  input  logic [31:0] redirect_pc,
  output logic [31:0] pc
);

  logic [31:0] pc_plus4, pc_plus8, next_pc;

  assign pc_plus4 = pc + 32'd4;
  assign pc_plus8 = pc + 32'd8;

  always_comb begin
    if (redirect)      next_pc = redirect_pc;
    else if (rollback) next_pc = pc_plus4;
    else               next_pc = pc_plus8;
  end

  always_ff @(posedge clk) begin
    if (reset) pc <= RESET_PC;
    else       pc <= next_pc;
  end

endmodule
