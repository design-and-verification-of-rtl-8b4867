// int_alu: 32-bit integer ALU of the execute stage.
//
// Purely combinational. The 4-bit opcode selects one of sixteen operations:
// add, subtract, increment and decrement of A; NOT A; AND, OR, NAND, NOR,
// XOR and XNOR of A and B; logical shift of A right or left by one bit; and
// the comparisons A > B, A < B and A == B, which return 1 or 0. The opcode
// values follow the ALU operation table of the design.
//
// Flags[4:0] describe the result: bit 1 is even parity, bit 2 is zero and
// bit 3 is the sign bit; these three match the flag values of the reference
// simulations. Bit 0 (carry out of add/increment, borrow of
// subtract/decrement) and bit 4 (signed overflow of the four arithmetic
// operations) are this design's own choice; they stay 0 for the other
// operations. Shifts move by exactly one bit and comparisons are unsigned,
// also choices of this design. While reset is high, result and flags are 0.
//
// Ports: operand_a, operand_b [WIDTH-1:0]; opcode [3:0]; reset (active
// high); result [WIDTH-1:0]; flags [4:0]. No clock, no latency.
module int_alu
  import rv_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] operand_a,
  input  logic [WIDTH-1:0] operand_b,
  input  alu_op_e          opcode,
  input  logic             reset,
  output logic [WIDTH-1:0] result,
  output logic [4:0]       flags
);

  logic [WIDTH:0]   sum;      // one extra bit for carry / borrow
  logic [WIDTH-1:0] addend;
  logic             sub;      // subtract addend instead of adding it
  logic             arith;
  logic [WIDTH-1:0] res;

  always_comb begin
    sub    = 1'b0;
    arith  = 1'b1;
    addend = operand_b;
    unique case (opcode)
      ALU_ADD: addend = operand_b;
      ALU_SUB: begin addend = operand_b; sub = 1'b1; end
      ALU_INC: addend = WIDTH'(1);
      ALU_DEC: begin addend = WIDTH'(1); sub = 1'b1; end
      default: arith = 1'b0;
    endcase
    // sum[WIDTH] is the carry of an addition and the borrow of a subtraction
    sum = sub ? ({1'b0, operand_a} - {1'b0, addend})
              : ({1'b0, operand_a} + {1'b0, addend});

    unique case (opcode)
      ALU_ADD, ALU_SUB, ALU_INC, ALU_DEC: res = sum[WIDTH-1:0];
      ALU_NOT:   res = ~operand_a;
      ALU_AND:   res = operand_a & operand_b;
      ALU_OR:    res = operand_a | operand_b;
      ALU_NAND:  res = ~(operand_a & operand_b);
      ALU_NOR:   res = ~(operand_a | operand_b);
      ALU_XOR:   res = operand_a ^ operand_b;
      ALU_XNOR:  res = ~(operand_a ^ operand_b);
      ALU_LSR:   res = operand_a >> 1;
      ALU_LSL:   res = operand_a << 1;
      ALU_CMPGT: res = WIDTH'(operand_a > operand_b);
      ALU_CMPLT: res = WIDTH'(operand_a < operand_b);
      ALU_CMPEQ: res = WIDTH'(operand_a == operand_b);
      default:   res = '0;
    endcase

    if (reset) begin
      result = '0;
      flags  = '0;
    end else begin
      result                = res;
      flags                 = '0;
      flags[FLAG_CARRY]     = arith & sum[WIDTH];
      flags[FLAG_PARITY]    = ~^res;
      flags[FLAG_ZERO]      = (res == '0);
      flags[FLAG_SIGN]      = res[WIDTH-1];
      // overflow: operands of equal sign (after negating a subtrahend) give
      // a result of the other sign
      flags[FLAG_OVERFLOW]  = arith &
                              ((operand_a[WIDTH-1] == (addend[WIDTH-1] ^ sub)) &&
                               (res[WIDTH-1] != operand_a[WIDTH-1]));
    end
  end

endmodule
