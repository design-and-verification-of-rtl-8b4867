// tb_int_regfile: self-checking testbench of int_regfile.
//
// Writes the words of the reference simulations (0x34560987 to register
// 0x12, 0x23765490 to 0x17, 0x4f334e03 to 0x18, 0x073825ca to 0x1e), then
// replays a reference sequence in which a read with rd_en low keeps the
// previous r_data (0x77afee4c), then runs 3000 random cycles of writes,
// reads and idle cycles against a shadow array, checking r_data one clock
// after the address was applied. It checks that reset clears every register,
// that register 0 reads zero and ignores writes, and that a write with the
// read enabled appears on r_data at once.
module tb_int_regfile;
  logic        clk = 1'b0, reset;
  logic [4:0]  address;
  logic        wr_en, rd_en;
  logic [31:0] last;
  logic [31:0] w_data, r_data;
  logic [31:0] shadow [32];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  int_regfile dut (.clk, .reset, .address, .wr_en, .rd_en, .w_data, .r_data);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input logic [4:0] ad, input logic we, input logic [31:0] d,
                        input logic re = 1'b1);
    logic [31:0] exp;
    @(negedge clk);
    address = ad; wr_en = we; rd_en = re; w_data = d;
    if (we && ad != 0) shadow[ad] = d;
    if (re) last = shadow[ad];
    exp = last;
    @(posedge clk); #1;
    checks++;
    if (r_data !== exp) begin
      failures++;
      $display("FAIL addr=%h we=%0b r_data=%h expected %h", ad, we, r_data, exp);
    end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    reset = 1'b1; address = '0; wr_en = 1'b0; rd_en = 1'b1; w_data = '0; last = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); reset = 1'b0;
    for (int i = 0; i < 32; i++) access(5'(i), 1'b0, '0);   // all cleared

    access(5'h12, 1'b1, 32'h3456_0987);
    access(5'h17, 1'b1, 32'h2376_5490);
    access(5'h18, 1'b1, 32'h4f33_4e03);
    access(5'h1e, 1'b1, 32'h0738_25ca);
    access(5'h12, 1'b0, '0);
    access(5'h18, 1'b0, '0);
    access(5'h1e, 1'b0, '0);
    access(5'h00, 1'b1, 32'hdead_beef);                      // x0 stays zero
    access(5'h00, 1'b0, '0);
    // reference sequence: the read of 0x1a with rd_en low keeps 0x77afee4c
    access(5'h08, 1'b1, 32'h77af_ee4c, 1'b0);
    access(5'h1f, 1'b1, 32'h5221_414c);
    access(5'h1a, 1'b1, 32'h5d77_2907);
    access(5'h19, 1'b1, 32'h1563_5d01);
    access(5'h08, 1'b0, 32'h12a9_ff9e);
    access(5'h1a, 1'b0, 32'h269f_b5e5, 1'b0);
    checks++;
    if (r_data !== 32'h77af_ee4c) begin failures++; $display("FAIL read enable"); end

    for (int n = 0; n < 3000; n++)
      access(5'($urandom), ($urandom_range(2) == 0), $urandom, ($urandom_range(3) != 0));

    @(negedge clk); reset = 1'b1; wr_en = 1'b0;
    @(negedge clk); reset = 1'b0;
    foreach (shadow[i]) shadow[i] = '0;
    last = '0;
    for (int i = 0; i < 32; i++) access(5'(i), 1'b0, '0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
