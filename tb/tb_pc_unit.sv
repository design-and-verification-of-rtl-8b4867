// tb_pc_unit: self-checking testbench of pc_unit.
//
// Checks the reset value, then for 2000 cycles drives random rollback and
// redirect requests and checks each new PC against a reference: redirect
// target first, otherwise PC+4 on rollback and PC+8 when both instructions
// issued.
module tb_pc_unit;
  logic        clk = 1'b0, reset, rollback, redirect;
  logic [31:0] redirect_pc, pc, exp_pc;
  int          checks = 0, failures = 0;
  int          n_roll = 0, n_redir = 0;

  always #5 clk = ~clk;

  pc_unit #(.RESET_PC(32'h0000_0100)) dut (.clk, .reset, .rollback, .redirect, .redirect_pc, .pc);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; rollback = 1'b0; redirect = 1'b0; redirect_pc = '0;
    repeat (2) @(posedge clk); #1;
    exp_pc = 32'h100;
    checks++;
    if (pc !== exp_pc) begin failures++; $display("FAIL reset pc=%h", pc); end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      reset       = 1'b0;
      rollback    = ($urandom_range(3) == 0);
      redirect    = ($urandom_range(7) == 0);
      redirect_pc = {$urandom} & 32'hffff_fffc;
      if (redirect)      begin exp_pc = redirect_pc; n_redir++; end
      else if (rollback) begin exp_pc = exp_pc + 4;  n_roll++;  end
      else                     exp_pc = exp_pc + 8;
      @(posedge clk); #1;
      checks++;
      if (pc !== exp_pc) begin failures++; $display("FAIL pc=%h expected %h", pc, exp_pc); end
    end
    checks++;
    if (n_roll == 0 || n_redir == 0) begin failures++; $display("FAIL no rollback/redirect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
