// icache: instruction cache of the fetch stage, DEPTH words of 32 bits.
//
// Given the word index of the program counter, it returns the instruction at
// that index and the one after it (Instruction 1 and Instruction 2), so the
// issuing unit always sees two consecutive instructions. Both reads are
// combinational: the IF stage hands them to the issuing logic in the same
// cycle. The index of the second word wraps at the end of the array.
// Contents are loaded through a one-word fill port (fill_en, fill_addr,
// fill_data), written on the rising clock edge.
//
// The two-instruction read follows the design description. It gives no size,
// tags or refill protocol, so this is the simplest thing that performs the
// function: a directly indexed array that always hits, sized like the data
// cache (256 words), with a plain write port standing in for the refill path
// from main memory.
//
// Ports: clk, addr [AW-1:0] (word index), instr1, instr2 [31:0];
// fill_en, fill_addr [AW-1:0], fill_data [31:0].
module icache #(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [31:0]   instr1,
  output logic [31:0]   instr2,
  input  logic          fill_en,
  input  logic [AW-1:0] fill_addr,
  input  logic [31:0]   fill_data
);

  logic [31:0]   mem [DEPTH];
  logic [AW-1:0] addr_next;

  assign addr_next = addr + AW'(1);
  assign instr1    = mem[addr];
  assign instr2    = mem[addr_next];

  always_ff @(posedge clk) begin
    if (fill_en) mem[fill_addr] <= fill_data;
  end

endmodule
