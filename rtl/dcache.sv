// dcache: data cache of the memory stage, DEPTH words of WIDTH bits.
//
// A single-port synchronous memory. On every rising clock edge with rd_en
// high, the word at `address` is read into r_data; with rd_en low, r_data
// keeps its value. When wr_en is high, w_data is written to `address` on the
// edge; if rd_en is high too, the new word appears on r_data at once
// (write-first). The size (256 words of 32 bits, 8-bit address), the read on
// each clock and the write on write enable follow the design description;
// the read-enable and write-first behaviour follow the values in its
// reference waveforms. The synchronous, active-high reset, which clears only
// r_data and leaves the contents alone, is this design's choice.
//
// Ports: clk, reset, address [AW-1:0], wr_en, rd_en, w_data [WIDTH-1:0],
// r_data [WIDTH-1:0]. Read latency one clock.
module dcache #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [AW-1:0]    address,
  input  logic             wr_en,
  input  logic             rd_en,
  input  logic [WIDTH-1:0] w_data,
  output logic [WIDTH-1:0] r_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[address] <= w_data;
  end

  always_ff @(posedge clk) begin
    if (reset)      r_data <= '0;
    else if (rd_en) r_data <= wr_en ? w_data : mem[address];
  end

endmodule
