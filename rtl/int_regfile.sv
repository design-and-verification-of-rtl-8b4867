// int_regfile: integer register file of the write-back stage, NREGS
// registers of WIDTH bits.
//
// One 5-bit address serves both the write from write-back and the read.
// On each rising clock edge with rd_en high the register at `address` is
// read into r_data; with rd_en low r_data keeps its value. When wr_en is
// high, w_data is written there on the edge and, if rd_en is high, appears
// on r_data at once (write-first). 32 registers of 32 bits at a 5-bit
// address follow the design description; the read enable and write-first
// order follow the values in its reference waveforms.
// This design's own choices: register x0 reads as zero and ignores writes
// (the RISC-V rule, set by ZERO_REG), and a synchronous active-high reset
// clears all registers and r_data.
//
// Ports: clk, reset, address [AW-1:0], wr_en, rd_en, w_data [WIDTH-1:0],
// r_data [WIDTH-1:0]. Read latency one clock.
module int_regfile #(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned NREGS    = 32,
  parameter bit          ZERO_REG = 1'b1,
  localparam int unsigned AW      = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [AW-1:0]    address,
  input  logic             wr_en,
  input  logic             rd_en,
  input  logic [WIDTH-1:0] w_data,
  output logic [WIDTH-1:0] r_data
);

  logic [WIDTH-1:0] regs [NREGS];
  logic             writable;

  assign writable = wr_en && !(ZERO_REG && address == '0);

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
      r_data <= '0;
    end else begin
      if (writable) regs[address] <= w_data;
      if (rd_en) r_data <= writable ? w_data : regs[address];
    end
  end

endmodule
