// tb_rv_fblocks_top: end-to-end testbench of rv_fblocks_top at its default
// sizes (256-word caches, 32 registers).
//
// Front end: a random RV32I program with registers x0-x3 (so dependencies
// are common) is loaded through the instruction-cache fill port. Each cycle
// a reference model of fetch and issue predicts the PC, rollback and the
// contents of Pipe 1 / Pipe 2; now and then a redirect jumps to a random
// word. Back end: independently, lane 0 gets a random mix of ALU
// operations with write-back, stores and loads with write-back, and lane 1
// random ALU operations. A reference model predicts the EX/MEM results and
// flags, the D-cache contents and the write-back data two clocks after the
// EX cycle. At the end all 32 registers are read back and compared.
// Every mechanism must occur at least once: dual issue, rollback, held
// issue, redirect, every ALU opcode in each lane, store, load, ALU
// write-back and register read.
module tb_rv_fblocks_top;
  import rv_pkg::*;

  logic        clk = 1'b0, reset;
  logic        icache_fill_en;
  logic [7:0]  icache_fill_addr;
  logic [31:0] icache_fill_data;
  logic        redirect;
  logic [31:0] redirect_pc, pc;
  logic        rollback, hold_issue;
  logic [31:0] inst_1, inst_2;
  alu_op_e     ex_opcode [2];
  logic [31:0] ex_operand_a [2], ex_operand_b [2];
  logic        ex_mem_write, ex_mem_read, ex_wb_en;
  logic [31:0] ex_store_data;
  logic [4:0]  ex_wb_rd;
  logic [31:0] ex0_result, ex1_result;
  logic [4:0]  ex_flags [2];
  logic        wb_en;
  logic [4:0]  wb_rd;
  logic [31:0] wb_data;
  logic [4:0]  rf_read_addr;
  logic [31:0] rf_read_data;

  int checks = 0, failures = 0;
  int n_dual = 0, n_roll = 0, n_hold = 0, n_redir = 0;
  int n_store = 0, n_load = 0, n_alu_wb = 0, n_rf_read = 0;
  int n_op [2][16];

  always #5 clk = ~clk;

  rv_fblocks_top dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // ------------------------------------------------------------ models
  function automatic void alu_model(input logic [31:0] x, input logic [31:0] y, input int o,
                                    output logic [31:0] r, output logic [4:0] f);
    logic c, v;
    longint sx, sy, sr;
    c = 0; v = 0; sx = longint'($signed(x)); sy = longint'($signed(y));
    case (o)
      0: begin r = x + y; c = ({1'b0, x} + {1'b0, y}) > 33'hffff_ffff; sr = sx + sy; v = 1; end
      1: begin r = x - y; c = x < y; sr = sx - sy; v = 1; end
      2: begin r = x + 1; c = x == '1; sr = sx + 1; v = 1; end
      3: begin r = x - 1; c = x == 0; sr = sx - 1; v = 1; end
      4: r = ~x;        5: r = x & y;     6: r = x | y;     7: r = ~(x & y);
      8: r = ~(x | y);  9: r = x ^ y;     10: r = ~(x ^ y); 11: r = x >> 1;
      12: r = x << 1;   13: r = 32'(x > y); 14: r = 32'(x < y); default: r = 32'(x == y);
    endcase
    if (v) v = (sr != longint'($signed(r)));
    f = {v, r[31], r == 0, ($countones(r) % 2 == 0), c};
  endfunction

  function automatic bit writes(input logic [31:0] i);
    return (i[6:0] inside {7'h33, 7'h13, 7'h03, 7'h67, 7'h37, 7'h17, 7'h6f}) && i[11:7] != 0;
  endfunction
  function automatic bit conflict(input logic [31:0] a, input logic [31:0] b);
    bit r1, r2;
    r1 = b[6:0] inside {7'h33, 7'h13, 7'h03, 7'h67, 7'h23, 7'h63};
    r2 = b[6:0] inside {7'h33, 7'h23, 7'h63};
    if (!writes(a)) return 0;
    return (r1 && b[19:15] == a[11:7]) || (r2 && b[24:20] == a[11:7]) ||
           (writes(b) && b[11:7] == a[11:7]);
  endfunction

  logic [31:0] imem [256];
  logic [31:0] dmem [256];
  bit          dknown [256];
  logic [31:0] regs [32];

  // expected write-back, indexed by cycle
  typedef struct { bit en; logic [4:0] rd; logic [31:0] data; bit chk; } wb_t;
  wb_t         wb_exp [0:5000];
  logic [31:0] ex_exp [2][0:5000];
  logic [4:0]  fl_exp [2][0:5000];

  initial begin
    logic [31:0] pc_m, held, first, i1, i2;
    bit          held_v, dep;
    logic [31:0] e1, e2, wbd;
    int          cyc;
    localparam int CYCLES = 3000;

    foreach (wb_exp[k]) wb_exp[k] = '{0, '0, '0, 0};
    foreach (dknown[k]) dknown[k] = 0;
    foreach (regs[k]) regs[k] = '0;

    // ---------------- reset and program load
    reset = 1'b1; redirect = 1'b0; redirect_pc = '0;
    ex_opcode = '{ALU_ADD, ALU_ADD}; ex_operand_a = '{0, 0}; ex_operand_b = '{0, 0};
    ex_mem_write = 0; ex_mem_read = 0; ex_wb_en = 0; ex_wb_rd = 0; ex_store_data = 0;
    rf_read_addr = 0; icache_fill_en = 0; icache_fill_addr = 0; icache_fill_data = 0;
    for (int k = 0; k < 256; k++) begin
      logic [31:0] i;
      logic [6:0]  opcs [10];
      opcs = '{7'h33, 7'h13, 7'h03, 7'h67, 7'h23, 7'h63, 7'h37, 7'h17, 7'h6f, 7'h15};
      i = $urandom;
      i[6:0] = opcs[$urandom_range(9)];
      i[11:7] = 5'($urandom_range(3)); i[19:15] = 5'($urandom_range(3));
      i[24:20] = 5'($urandom_range(3));
      imem[k] = i;
      @(negedge clk);
      icache_fill_en = 1; icache_fill_addr = 8'(k); icache_fill_data = i;
    end
    @(negedge clk);
    icache_fill_en = 0;
    @(posedge clk); #1;
    checks++;
    if (pc !== 32'h0 || ex0_result !== 0 || wb_en !== 0) fail("reset state");

    pc_m = 0; held_v = 0; held = '0;
    for (cyc = 0; cyc < CYCLES; cyc++) begin
      int kind, o0, o1;
      logic [31:0] a0, b0, a1, b1, r, sd;
      logic [4:0] f, rd;
      bit do_redir;
      @(negedge clk);
      reset = 1'b0;

      // ---- front end stimulus and prediction
      i1 = imem[pc_m[9:2]]; i2 = imem[8'(pc_m[9:2] + 1)];
      first = held_v ? held : i1;
      dep = conflict(first, i2);
      do_redir = ($urandom_range(24) == 0);
      redirect = do_redir;
      redirect_pc = {22'd0, 8'($urandom), 2'b00};

      // ---- back end stimulus
      kind = $urandom_range(3);   // 0 ALU+wb, 1 store, 2 load+wb, 3 no memory / no wb
      o0 = (kind == 1 || kind == 2) ? 0 : $urandom_range(15);
      o1 = $urandom_range(15);
      a0 = $urandom; b0 = $urandom; a1 = $urandom; b1 = (o1 == 15 && $urandom_range(1) != 0) ? a1 : $urandom;
      if (kind == 1 || kind == 2) begin a0 = {$urandom} & 32'h0000_03fc; b0 = 0; end
      rd = 5'($urandom);
      sd = $urandom;
      ex_opcode[0] = alu_op_e'(o0); ex_operand_a[0] = a0; ex_operand_b[0] = b0;
      ex_opcode[1] = alu_op_e'(o1); ex_operand_a[1] = a1; ex_operand_b[1] = b1;
      ex_mem_write = (kind == 1); ex_mem_read = (kind == 2); ex_store_data = sd;
      ex_wb_en = (kind == 0 || kind == 2); ex_wb_rd = rd;
      n_op[0][o0]++; n_op[1][o1]++;

      alu_model(a0, b0, o0, r, f); ex_exp[0][cyc + 1] = r; fl_exp[0][cyc + 1] = f;
      if (kind == 1) begin dmem[r[9:2]] = sd; dknown[r[9:2]] = 1; n_store++; end
      if (kind == 0) begin wb_exp[cyc + 2] = '{1, rd, r, 1}; n_alu_wb++; end
      if (kind == 2) begin
        wb_exp[cyc + 2] = '{1, rd, dmem[r[9:2]], dknown[r[9:2]]};
        n_load++;
      end
      if (kind == 3 || kind == 1) wb_exp[cyc + 2] = '{0, '0, '0, 0};
      alu_model(a1, b1, o1, r, f); ex_exp[1][cyc + 1] = r; fl_exp[1][cyc + 1] = f;

      // register reads in cycles without write-back
      rf_read_addr = 5'($urandom);

      #1;
      checks++;
      if (pc !== pc_m || rollback !== dep || hold_issue !== held_v)
        fail($sformatf("cycle %0d: pc=%h rollback=%0b hold=%0b expected %h %0b %0b",
                       cyc, pc, rollback, hold_issue, pc_m, dep, held_v));
      // write-back of the op issued two cycles ago is on the WB stage now
      checks++;
      if (wb_en !== wb_exp[cyc].en || (wb_en && (wb_rd !== wb_exp[cyc].rd ||
          (wb_exp[cyc].chk && wb_data !== wb_exp[cyc].data))))
        fail($sformatf("cycle %0d: wb en=%0b rd=%0d data=%h expected %0b %0d %h", cyc, wb_en,
                       wb_rd, wb_data, wb_exp[cyc].en, wb_exp[cyc].rd, wb_exp[cyc].data));
      e1 = first; e2 = dep ? 32'h0 : i2;
      wbd = wb_data;

      @(posedge clk); #1;
      // register file: write-back of this cycle, or the read just made
      if (wb_exp[cyc].en) begin
        if (wb_exp[cyc].rd != 0) regs[wb_exp[cyc].rd] = wbd;
      end else begin
        checks++; n_rf_read++;
        if (rf_read_data !== regs[rf_read_addr])
          fail($sformatf("cycle %0d: rf read x%0d=%h expected %h", cyc, rf_read_addr,
                         rf_read_data, regs[rf_read_addr]));
      end
      checks++;
      if (inst_1 !== e1 || inst_2 !== e2)
        fail($sformatf("cycle %0d: inst_1=%h inst_2=%h expected %h %h", cyc, inst_1, inst_2,
                       e1, e2));
      checks++;
      if (ex0_result !== ex_exp[0][cyc + 1] || ex1_result !== ex_exp[1][cyc + 1] ||
          ex_flags[0] !== fl_exp[0][cyc + 1] || ex_flags[1] !== fl_exp[1][cyc + 1])
        fail($sformatf("cycle %0d: ex results %h %h flags %h %h expected %h %h %h %h", cyc,
                       ex0_result, ex1_result, ex_flags[0], ex_flags[1], ex_exp[0][cyc + 1],
                       ex_exp[1][cyc + 1], fl_exp[0][cyc + 1], fl_exp[1][cyc + 1]));

      if (dep) n_roll++; else n_dual++;
      if (held_v) n_hold++;
      held_v = dep && !do_redir;
      held   = i2;
      if (do_redir) begin pc_m = redirect_pc; n_redir++; end
      else pc_m = pc_m + (dep ? 4 : 8);
    end

    // drain the pipeline, then read back every register
    @(negedge clk);
    redirect = 0; ex_wb_en = 0; ex_mem_write = 0; ex_mem_read = 0;
    for (int k = 0; k < 2; k++) begin
      #1 wbd = wb_data;
      if (wb_exp[cyc + k].en && wb_exp[cyc + k].rd != 0) regs[wb_exp[cyc + k].rd] = wbd;
      @(negedge clk);
    end
    for (int k = 0; k < 32; k++) begin
      @(negedge clk); rf_read_addr = 5'(k);
      @(posedge clk); #1;
      checks++; n_rf_read++;
      if (rf_read_data !== regs[k])
        fail($sformatf("final x%0d=%h expected %h", k, rf_read_data, regs[k]));
    end

    // every mechanism must have happened
    checks++;
    if (n_dual == 0 || n_roll == 0 || n_hold == 0 || n_redir == 0 || n_store == 0 ||
        n_load == 0 || n_alu_wb == 0 || n_rf_read == 0)
      fail("a mechanism never happened");
    for (int l = 0; l < 2; l++)
      for (int o = 0; o < 16; o++) begin
        checks++;
        if (n_op[l][o] == 0) fail($sformatf("lane %0d opcode %0d never used", l, o));
      end
    $display("dual=%0d rollback=%0d held=%0d redirect=%0d store=%0d load=%0d alu_wb=%0d rf_read=%0d",
             n_dual, n_roll, n_hold, n_redir, n_store, n_load, n_alu_wb, n_rf_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
