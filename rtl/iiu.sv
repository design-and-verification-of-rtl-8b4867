// iiu: instruction issuing unit of the decode stage of a dual-issue pipeline.
//
// Each cycle it receives two consecutive instructions and decides whether
// both can enter the two pipes together. If the second reads a register the
// first writes (read after write) or writes the same register (write after
// write), only the first issues: Pipe 2 gets the all-zero word, the second
// instruction goes into the hold register and rollback is raised so the
// fetch stage moves on by one instruction (PC+4) instead of two. In the next
// cycle Pipe 1 takes the held instruction, and the newly fetched second
// instruction is checked against it in the same way. Pipe 1 and Pipe 2 are
// registers, so inst_1 and inst_2 appear one clock after the fetch.
//
// The three-input multiplexers in front of the hold register and Pipe 2
// (Instruction 1, Instruction 2, zero) and the two-input one in front of
// Pipe 1 (Instruction 1, held instruction) follow the block diagram; the
// dependency rule, the rollback-to-PC+4 policy and the flush input are this
// design's choices. The all-zero word is not a valid RISC-V instruction and
// marks an empty slot. Instructions are decoded as RV32I: rd is bits 11:7,
// rs1 bits 19:15, rs2 bits 24:20, and x0 never creates a dependency.
//
// Ports: clk, reset (synchronous, active high), flush (drop the held
// instruction, for a redirected fetch), instr1, instr2 [31:0] from the
// instruction cache, inst_1, inst_2 [31:0] to the pipes, rollback,
// hold_valid (a held instruction issues in this cycle).
module iiu
  import rv_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        flush,
  input  logic [31:0] instr1,
  input  logic [31:0] instr2,
  output logic [31:0] inst_1,
  output logic [31:0] inst_2,
  output logic        rollback,
  output logic        hold_valid
);

  logic [31:0] hold_q;
  logic        hold_v_q;
  logic [31:0] first;
  logic        dep;
  logic        pipe1_sel;     // 0: Instruction 1, 1: held instruction
  issue_sel_e  pipe2_sel;
  issue_sel_e  hold_sel;
  logic [31:0] pipe1_d, pipe2_d, hold_d;

  assign hold_valid = hold_v_q;

  // The instruction going to Pipe 1 and the dependency of the second on it
  assign pipe1_sel = hold_v_q;
  assign first     = pipe1_sel ? hold_q : instr1;
  assign dep       = depends_on(first, instr2);
  assign rollback  = dep;
  assign pipe2_sel = dep ? SEL_ZERO : SEL_INSTR2;
  assign hold_sel  = dep ? SEL_INSTR2 : SEL_ZERO;

  function automatic logic [31:0] mux3(input issue_sel_e sel, input logic [31:0] a,
                                       input logic [31:0] b);
    unique case (sel)
      SEL_INSTR1: return a;
      SEL_INSTR2: return b;
      default:    return '0;
    endcase
  endfunction

  assign pipe1_d = first;
  assign pipe2_d = mux3(pipe2_sel, instr1, instr2);
  assign hold_d  = mux3(hold_sel, instr1, instr2);

  always_ff @(posedge clk) begin
    if (reset) begin
      inst_1   <= '0;
      inst_2   <= '0;
      hold_q   <= '0;
      hold_v_q <= 1'b0;
    end else begin
      inst_1   <= pipe1_d;
      inst_2   <= pipe2_d;
      hold_q   <= hold_d;
      hold_v_q <= dep && !flush;
    end
  end

  // After a rollback Pipe 2 is empty, and a held instruction is always the
  // one that entered the hold register on the rollback.
  a_rollback_empties_pipe2: assert property (@(posedge clk) disable iff (reset)
    rollback |=> inst_2 == '0);
  a_hold_follows_rollback: assert property (@(posedge clk) disable iff (reset)
    hold_v_q |-> $past(rollback));

endmodule
