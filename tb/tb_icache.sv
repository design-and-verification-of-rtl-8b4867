// tb_icache: self-checking testbench of icache.
//
// Fills all 256 words through the fill port with random instructions, then
// checks, for every index, that instr1 is the word at the index and instr2
// the word after it (wrapping at the end). Finally overwrites a few words
// and checks that the new contents are read.
module tb_icache;
  logic        clk = 1'b0;
  logic [7:0]  addr, fill_addr;
  logic [31:0] instr1, instr2, fill_data;
  logic        fill_en;
  logic [31:0] ref_mem [256];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  icache dut (.clk, .addr, .instr1, .instr2, .fill_en, .fill_addr, .fill_data);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    fill_en = 1'b1; fill_addr = a; fill_data = d; ref_mem[a] = d;
    @(posedge clk); #1 fill_en = 1'b0;
  endtask

  task automatic check_at(input logic [7:0] a);
    addr = a; #1;
    checks++;
    if (instr1 !== ref_mem[a] || instr2 !== ref_mem[8'(a + 1)]) begin
      failures++;
      $display("FAIL addr=%h instr1=%h instr2=%h expected %h %h", a, instr1, instr2,
               ref_mem[a], ref_mem[8'(a + 1)]);
    end
  endtask

  initial begin
    fill_en = 1'b0; fill_addr = '0; fill_data = '0; addr = '0;
    for (int i = 0; i < 256; i++) fill(8'(i), $urandom);
    for (int i = 0; i < 256; i++) check_at(8'(i));
    fill(8'h10, 32'h78aa_5495);
    fill(8'h11, 32'h00aa_5495);
    fill(8'h00, 32'h0000_0811);
    check_at(8'h10);
    check_at(8'hff);
    check_at(8'h0f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
