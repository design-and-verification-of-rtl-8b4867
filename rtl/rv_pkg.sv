// rv_pkg: types and constants shared by the functional blocks of the
// 32-bit dual-issue RISC-V pipeline (fetch/issue front end, INT ALU,
// D-cache, integer register file).
//
// The ALU opcode values are the 4-bit codes of the ALU operation table.
// The flag bit positions for parity, zero and sign are read off the flag
// values shown in the ALU simulation results; carry and overflow sit in the
// two remaining bits as this design's own choice.
package rv_pkg;


  // 4-bit ALU opcode
  typedef enum logic [3:0] {
    ALU_ADD   = 4'b0000,  // A + B
    ALU_SUB   = 4'b0001,  // A - B
    ALU_INC   = 4'b0010,  // A + 1
    ALU_DEC   = 4'b0011,  // A - 1
    ALU_NOT   = 4'b0100,  // ~A
    ALU_AND   = 4'b0101,
    ALU_OR    = 4'b0110,
    ALU_NAND  = 4'b0111,
    ALU_NOR   = 4'b1000,
    ALU_XOR   = 4'b1001,
    ALU_XNOR  = 4'b1010,
    ALU_LSR   = 4'b1011,  // logical shift right by one
    ALU_LSL   = 4'b1100,  // logical shift left by one
    ALU_CMPGT = 4'b1101,  // 1 if A > B (unsigned)
    ALU_CMPLT = 4'b1110,  // 1 if A < B (unsigned)
    ALU_CMPEQ = 4'b1111   // 1 if A == B
  } alu_op_e;

  // Bit positions in the 5-bit ALU flag vector
  localparam int unsigned FLAG_CARRY    = 0;  // carry out (add/inc) or borrow (sub/dec)
  localparam int unsigned FLAG_PARITY   = 1;  // result has an even number of ones
  localparam int unsigned FLAG_ZERO     = 2;  // result is zero
  localparam int unsigned FLAG_SIGN     = 3;  // result bit 31
  localparam int unsigned FLAG_OVERFLOW = 4;  // two's-complement overflow (add/sub/inc/dec)

  // Select codes of the three-input multiplexers of the instruction issuing
  // unit: 0 = Instruction 1, 1 = Instruction 2, 2 = all-zero word.
  typedef enum logic [1:0] {
    SEL_INSTR1 = 2'd0,
    SEL_INSTR2 = 2'd1,
    SEL_ZERO   = 2'd2
  } issue_sel_e;

  // Register fields of a 32-bit RISC-V instruction
  function automatic logic [4:0] rd_of(input logic [31:0] i);
    return i[11:7];
  endfunction
  function automatic logic [4:0] rs1_of(input logic [31:0] i);
    return i[19:15];
  endfunction
  function automatic logic [4:0] rs2_of(input logic [31:0] i);
    return i[24:20];
  endfunction

  // RV32I major opcodes (bits 6:0) that take part in the dependency check
  localparam logic [6:0] OPC_LUI    = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC  = 7'b0010111;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;
  localparam logic [6:0] OPC_JALR   = 7'b1100111;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_OPIMM  = 7'b0010011;
  localparam logic [6:0] OPC_OP     = 7'b0110011;

  function automatic logic writes_rd(input logic [31:0] i);
    logic [6:0] opc;
    opc = i[6:0];
    return (opc == OPC_LUI || opc == OPC_AUIPC || opc == OPC_JAL || opc == OPC_JALR ||
            opc == OPC_LOAD || opc == OPC_OPIMM || opc == OPC_OP) && (i[11:7] != 5'd0);
  endfunction
  function automatic logic reads_rs1(input logic [31:0] i);
    logic [6:0] opc;
    opc = i[6:0];
    return opc == OPC_JALR || opc == OPC_BRANCH || opc == OPC_LOAD || opc == OPC_STORE ||
           opc == OPC_OPIMM || opc == OPC_OP;
  endfunction
  function automatic logic reads_rs2(input logic [31:0] i);
    logic [6:0] opc;
    opc = i[6:0];
    return opc == OPC_BRANCH || opc == OPC_STORE || opc == OPC_OP;
  endfunction

  // True when `second` must not issue in the same cycle as `first`:
  // it reads a register `first` writes (RAW) or writes the same one (WAW).
  function automatic logic depends_on(input logic [31:0] first, input logic [31:0] second);
    logic raw, waw;
    raw = writes_rd(first) &&
          ((reads_rs1(second) && rs1_of(second) == rd_of(first)) ||
           (reads_rs2(second) && rs2_of(second) == rd_of(first)));
    waw = writes_rd(first) && writes_rd(second) && rd_of(second) == rd_of(first);
    return raw || waw;
  endfunction

endpackage
