// rv_fblocks_top: the functional blocks of a five-stage, dual-issue 32-bit
// RISC-V pipeline (IF, ID, EX, MEM, WB), wired as in the pipeline diagram.
//
// IF:  pc_unit holds the PC; icache returns the instructions at PC and PC+4.
// ID:  iiu issues one or two of them into Pipe 1 / Pipe 2 (inst_1, inst_2)
//      and raises rollback, which makes the next PC PC+4 instead of PC+8.
// EX:  two int_alu lanes. Their opcodes and operands come from the opcode
//      logic, operand logic and forwarding unit, which are not part of this
//      design and so enter as ports (ex_opcode, ex_operand_a, ex_operand_b).
//      Results and flags are registered into the EX/MEM register.
// MEM: lane 0's result, as a byte address, selects a word of the dcache
//      (bits AW+1:2); a store writes ex_store_data there.
// WB:  the integer register file is written with the load data (the dcache
//      read arrives one clock after the MEM cycle) or with lane 0's result.
//
// The D-cache read is enabled only for loads. The register file has a
// single address: in a cycle without write-back it reads rf_read_addr, and
// rf_read_data shows that register one clock later and holds it through
// write-back cycles.
// Lane 1's registered result leaves on ex1_result for a second write-back
// path, which the single-port register file does not have. Which lane goes
// to memory, the word addressing of the D-cache and the single write-back
// lane are this design's choices; the stage order, the two INT ALUs, the
// PC+4/PC+8 adders and the branch/ISR next-PC input follow the diagram.
// The floating-point unit, its register file and the branch predictor are
// not included; the branch/ISR target enters as redirect / redirect_pc.
//
// Reset is synchronous and active high.
module rv_fblocks_top
  import rv_pkg::*;
#(
  parameter int unsigned ICACHE_DEPTH = 256,
  parameter int unsigned DCACHE_DEPTH = 256,
  parameter logic [31:0] RESET_PC     = 32'h0000_0000,
  localparam int unsigned IAW         = $clog2(ICACHE_DEPTH),
  localparam int unsigned DAW         = $clog2(DCACHE_DEPTH)
) (
  input  logic            clk,
  input  logic            reset,
  // instruction cache refill
  input  logic            icache_fill_en,
  input  logic [IAW-1:0]  icache_fill_addr,
  input  logic [31:0]     icache_fill_data,
  // branch / interrupt redirect of the next PC
  input  logic            redirect,
  input  logic [31:0]     redirect_pc,
  // fetch and issue
  output logic [31:0]     pc,
  output logic            rollback,
  output logic            hold_issue,
  output logic [31:0]     inst_1,
  output logic [31:0]     inst_2,
  // execute stage inputs for lanes 0 and 1
  input  alu_op_e         ex_opcode    [2],
  input  logic [31:0]     ex_operand_a [2],
  input  logic [31:0]     ex_operand_b [2],
  // lane 0 memory and write-back control, given in the EX cycle
  input  logic            ex_mem_write,
  input  logic            ex_mem_read,
  input  logic [31:0]     ex_store_data,
  input  logic            ex_wb_en,
  input  logic [4:0]      ex_wb_rd,
  // EX/MEM register
  output logic [31:0]     ex0_result,
  output logic [31:0]     ex1_result,
  output logic [4:0]      ex_flags     [2],
  // write-back
  output logic            wb_en,
  output logic [4:0]      wb_rd,
  output logic [31:0]     wb_data,
  // register file read
  input  logic [4:0]      rf_read_addr,
  output logic [31:0]     rf_read_data
);

  // ---------------------------------------------------------------- IF
  logic [31:0] instr1, instr2;

  pc_unit #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .reset,
    .rollback,
    .redirect,
    .redirect_pc,
    .pc
  );

  icache #(.DEPTH(ICACHE_DEPTH)) u_icache (
    .clk,
    .addr      (pc[IAW+1:2]),
    .instr1,
    .instr2,
    .fill_en   (icache_fill_en),
    .fill_addr (icache_fill_addr),
    .fill_data (icache_fill_data)
  );

  // ---------------------------------------------------------------- ID
  iiu u_iiu (
    .clk, .reset,
    .flush      (redirect),
    .instr1,
    .instr2,
    .inst_1,
    .inst_2,
    .rollback,
    .hold_valid (hold_issue)
  );

  // ---------------------------------------------------------------- EX
  logic [31:0] alu_result [2];
  logic [4:0]  alu_flags  [2];

  for (genvar l = 0; l < 2; l++) begin : g_lane
    int_alu #(.WIDTH(32)) u_alu (
      .operand_a (ex_operand_a[l]),
      .operand_b (ex_operand_b[l]),
      .opcode    (ex_opcode[l]),
      .reset,
      .result    (alu_result[l]),
      .flags     (alu_flags[l])
    );
  end

  // lane 0 carries at most one memory operation per cycle
  a_one_mem_op: assert property (@(posedge clk) disable iff (reset)
    !(ex_mem_write && ex_mem_read));

  // EX/MEM register
  logic        mem_write_m, mem_read_m, wb_en_m;
  logic [4:0]  wb_rd_m;
  logic [31:0] store_data_m;

  always_ff @(posedge clk) begin
    if (reset) begin
      ex0_result   <= '0;
      ex1_result   <= '0;
      ex_flags     <= '{default: '0};
      mem_write_m  <= 1'b0;
      mem_read_m   <= 1'b0;
      wb_en_m      <= 1'b0;
      wb_rd_m      <= '0;
      store_data_m <= '0;
    end else begin
      ex0_result   <= alu_result[0];
      ex1_result   <= alu_result[1];
      ex_flags     <= alu_flags;
      mem_write_m  <= ex_mem_write;
      mem_read_m   <= ex_mem_read;
      wb_en_m      <= ex_wb_en;
      wb_rd_m      <= ex_wb_rd;
      store_data_m <= ex_store_data;
    end
  end

  // ---------------------------------------------------------------- MEM
  logic [31:0] load_data;

  dcache #(.WIDTH(32), .DEPTH(DCACHE_DEPTH)) u_dcache (
    .clk, .reset,
    .address (ex0_result[DAW+1:2]),
    .wr_en   (mem_write_m),
    .rd_en   (mem_read_m),
    .w_data  (store_data_m),
    .r_data  (load_data)
  );

  // MEM/WB register
  logic [31:0] result_w;
  logic        mem_read_w;

  always_ff @(posedge clk) begin
    if (reset) begin
      result_w   <= '0;
      mem_read_w <= 1'b0;
      wb_en      <= 1'b0;
      wb_rd      <= '0;
    end else begin
      result_w   <= ex0_result;
      mem_read_w <= mem_read_m;
      wb_en      <= wb_en_m;
      wb_rd      <= wb_rd_m;
    end
  end

  // ---------------------------------------------------------------- WB
  assign wb_data = mem_read_w ? load_data : result_w;

  int_regfile #(.WIDTH(32), .NREGS(32)) u_regfile (
    .clk, .reset,
    .address (wb_en ? wb_rd : rf_read_addr),
    .wr_en   (wb_en),
    .rd_en   (!wb_en),
    .w_data  (wb_data),
    .r_data  (rf_read_data)
  );

endmodule
