// tb_dcache: self-checking testbench of dcache.
//
// Writes the words of the reference simulations (0x23415678 at 0x32,
// 0x28765402 at 0x26, 0x1b1eb521 at 0x04, 0x4f34fedd at 0xc5) and replays
// a reference sequence in which a write with the read disabled leaves r_data
// unchanged. Then runs 3000 random cycles of writes, reads and idle cycles
// against a shadow array. Every cycle it checks r_data one clock after the
// address was applied: the stored word on a read, the new word on a write
// with read enabled, the previous value with read disabled. It also checks
// that reset clears r_data. Inputs change on the falling edge.
module tb_dcache;
  logic        clk = 1'b0, reset;
  logic [7:0]  address;
  logic        wr_en, rd_en;
  logic [31:0] last;
  bit          last_known;
  logic [31:0] w_data, r_data;
  logic [31:0] shadow [256];
  logic        known  [256];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  dcache dut (.clk, .reset, .address, .wr_en, .rd_en, .w_data, .r_data);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one access; checks r_data right after the next rising edge
  task automatic access(input logic [7:0] ad, input logic we, input logic [31:0] d,
                        input logic re = 1'b1);
    logic [31:0] exp;
    logic        chk;
    @(negedge clk);
    address = ad; wr_en = we; rd_en = re; w_data = d;
    if (re) begin
      last_known = we || known[ad];
      last       = we ? d : shadow[ad];
    end
    chk = last_known;
    exp = last;
    @(posedge clk); #1;
    if (we) begin shadow[ad] = d; known[ad] = 1'b1; end
    if (chk) begin
      checks++;
      if (r_data !== exp) begin
        failures++;
        $display("FAIL addr=%h we=%0b r_data=%h expected %h", ad, we, r_data, exp);
      end
    end
  endtask

  initial begin
    foreach (known[i]) known[i] = 1'b0;
    reset = 1'b1; address = 8'h32; wr_en = 1'b0; rd_en = 1'b1; w_data = '0;
    last = '0; last_known = 1'b1;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (r_data !== 32'h0) begin failures++; $display("FAIL reset r_data=%h", r_data); end
    @(negedge clk); reset = 1'b0;

    access(8'h32, 1'b1, 32'h2341_5678);
    access(8'h32, 1'b0, 32'h0);
    access(8'h26, 1'b1, 32'h2876_5402);
    access(8'h04, 1'b1, 32'h1b1e_b521);
    access(8'hc5, 1'b1, 32'h4f34_fedd);
    access(8'h32, 1'b0, 32'h0);
    access(8'h04, 1'b0, 32'h0);
    access(8'hc5, 1'b0, 32'h0);
    access(8'h26, 1'b0, 32'h0);
    // reference sequence: write with read disabled keeps the old r_data
    access(8'h10, 1'b1, 32'h3012_568e);
    access(8'h95, 1'b1, 32'h325a_ecf1, 1'b0);
    access(8'h95, 1'b0, 32'h0, 1'b0);
    access(8'h95, 1'b0, 32'h0);

    for (int i = 0; i < 256; i++) access(8'(i), 1'b1, $urandom);
    for (int n = 0; n < 3000; n++)
      access(8'($urandom), ($urandom_range(2) == 0), $urandom, ($urandom_range(3) != 0));

    // reset clears the read register, not the contents
    @(negedge clk); reset = 1'b1; address = 8'h04; wr_en = 1'b0; rd_en = 1'b1;
    @(posedge clk); #1;
    last = '0; last_known = 1'b1;
    checks++;
    if (r_data !== 32'h0) begin failures++; $display("FAIL reset r_data=%h", r_data); end
    @(negedge clk); reset = 1'b0;
    access(8'h04, 1'b0, 32'h0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
