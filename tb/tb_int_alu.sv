// tb_int_alu: self-checking testbench of int_alu.
//
// First replays the operand/opcode pairs of the reference simulations
// (A=0x0f, B=0x0a for add, subtract, increment; A=0x23, B=0x28 for the
// rest) and checks result and flags against the printed values. Then checks
// 4000 random vectors, plus corner operands, against a reference model
// written here independently of the design, and checks that reset forces
// result and flags to zero.
module tb_int_alu;
  import rv_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, result;
  alu_op_e     op;
  logic        reset;
  logic [4:0]  flags;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  int_alu dut (.operand_a(a), .operand_b(b), .opcode(op), .reset, .result, .flags);

  // reference model
  function automatic void model(input logic [31:0] x, input logic [31:0] y, input alu_op_e o,
                                output logic [31:0] r, output logic [4:0] f);
    longint unsigned wide;
    logic c, v;
    c = 0; v = 0;
    case (o)
      ALU_ADD: begin wide = longint'(x) + longint'(y); r = wide[31:0]; c = wide[32];
                     v = (longint'($signed(x)) + longint'($signed(y))) != longint'($signed(r)); end
      ALU_SUB: begin r = x - y; c = (x < y);
                     v = (longint'($signed(x)) - longint'($signed(y))) != longint'($signed(r)); end
      ALU_INC: begin r = x + 1; c = (x == 32'hffff_ffff); v = (x == 32'h7fff_ffff); end
      ALU_DEC: begin r = x - 1; c = (x == 0); v = (x == 32'h8000_0000); end
      ALU_NOT:  r = ~x;
      ALU_AND:  r = x & y;
      ALU_OR:   r = x | y;
      ALU_NAND: r = ~(x & y);
      ALU_NOR:  r = ~(x | y);
      ALU_XOR:  r = x ^ y;
      ALU_XNOR: r = ~(x ^ y);
      ALU_LSR:  r = {1'b0, x[31:1]};
      ALU_LSL:  r = {x[30:0], 1'b0};
      ALU_CMPGT: r = (x > y) ? 1 : 0;
      ALU_CMPLT: r = (x < y) ? 1 : 0;
      default:   r = (x == y) ? 1 : 0;
    endcase
    f = {v, r[31], (r == 0), ($countones(r) % 2 == 0), c};
  endfunction

  task automatic check(input logic [31:0] exp_r, input logic [4:0] exp_f, input string what);
    #1;
    checks++;
    if (result !== exp_r || flags !== exp_f) begin
      failures++;
      $display("FAIL %s: op=%0d a=%h b=%h result=%h flags=%h expected %h %h",
               what, op, a, b, result, flags, exp_r, exp_f);
    end
  endtask

  task automatic apply(input logic [31:0] x, input logic [31:0] y, input alu_op_e o);
    logic [31:0] r; logic [4:0] f;
    a = x; b = y; op = o;
    model(x, y, o, r, f);
    check(r, f, "model");
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6];
    corner = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h5555_aaaa};
    reset = 1'b1; a = 32'h23; b = 32'h28; op = ALU_CMPEQ;
    check(32'h0, 5'h00, "reset");
    reset = 1'b0;

    // reference simulation values
    a = 32'h0f; b = 32'h0a;
    op = ALU_ADD;  check(32'h19, 5'h00, "fig add");
    op = ALU_SUB;  check(32'h05, 5'h02, "fig sub");
    op = ALU_INC;  check(32'h10, 5'h00, "fig inc");
    a = 32'h23; b = 32'h28;
    op = ALU_DEC;  check(32'h22, 5'h02, "fig dec");
    op = ALU_NOT;  check(32'hffffffdc, 5'h08, "fig not");
    op = ALU_AND;  check(32'h20, 5'h00, "fig and");
    op = ALU_OR;   check(32'h2b, 5'h02, "fig or");
    op = ALU_NAND; check(32'hffffffdf, 5'h08, "fig nand");
    op = ALU_NOR;  check(32'hffffffd4, 5'h0a, "fig nor");
    op = ALU_XOR;  check(32'h0b, 5'h00, "fig xor");
    op = ALU_XNOR; check(32'hfffffff4, 5'h08, "fig xnor");
    op = ALU_LSR;  check(32'h11, 5'h02, "fig lsr");
    op = ALU_LSL;  check(32'h46, 5'h00, "fig lsl");
    op = ALU_CMPGT; check(32'h0, 5'h06, "fig gt");
    op = ALU_CMPLT; check(32'h1, 5'h00, "fig lt");
    op = ALU_CMPEQ; check(32'h0, 5'h06, "fig eq");

    // corner operands, every opcode
    for (int o = 0; o < 16; o++)
      foreach (corner[i])
        foreach (corner[j])
          apply(corner[i], corner[j], alu_op_e'(o));

    // random operands
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] x, y;
      x = $urandom; y = (n % 8 == 0) ? x : $urandom;
      apply(x, y, alu_op_e'($urandom_range(15)));
    end

    reset = 1'b1; a = 32'hffff_ffff; b = 32'h1; op = ALU_ADD;
    check(32'h0, 5'h00, "reset again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
