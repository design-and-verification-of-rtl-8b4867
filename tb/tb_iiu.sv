// tb_iiu: self-checking testbench of the instruction issuing unit.
//
// The testbench plays the fetch stage: it keeps its own fetch index into a
// random RV32I program whose instructions use registers x0-x3, so that
// dependencies are frequent, and presents the instructions at the index and
// the one after it. A reference model, with its own decoder, predicts
// rollback each cycle and the contents of Pipe 1 and Pipe 2 after the clock.
// The model advances the index by one after a rollback and by two otherwise,
// and now and then jumps to a random index with flush raised. The stream of
// issued instructions is also checked against program order. The pair
// 0x78aa5495 / 0x00aa5495 of the reference simulation must issue together.
// Counts of dual issues, rollbacks, held issues and flushes must be nonzero.
module tb_iiu;
  logic        clk = 1'b0, reset, flush;
  logic [31:0] instr1, instr2, inst_1, inst_2;
  logic        rollback, hold_valid;
  int          checks = 0, failures = 0;
  int          n_dual = 0, n_roll = 0, n_hold = 0, n_flush = 0;

  localparam int N = 512;
  logic [31:0] prog [N];

  always #5 clk = ~clk;

  iiu dut (.clk, .reset, .flush, .instr1, .instr2, .inst_1, .inst_2, .rollback, .hold_valid);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference decoder: which register fields an instruction uses
  function automatic void fields(input logic [31:0] i, output bit w, output bit r1, output bit r2);
    case (i[6:0])
      7'h33:                   begin w = 1; r1 = 1; r2 = 1; end  // OP
      7'h13, 7'h03, 7'h67:     begin w = 1; r1 = 1; r2 = 0; end  // OP-IMM, LOAD, JALR
      7'h23, 7'h63:            begin w = 0; r1 = 1; r2 = 1; end  // STORE, BRANCH
      7'h37, 7'h17, 7'h6f:     begin w = 1; r1 = 0; r2 = 0; end  // LUI, AUIPC, JAL
      default:                 begin w = 0; r1 = 0; r2 = 0; end
    endcase
  endfunction

  function automatic bit conflict(input logic [31:0] a, input logic [31:0] b);
    bit aw, ar1, ar2, bw, br1, br2;
    fields(a, aw, ar1, ar2);
    fields(b, bw, br1, br2);
    if (!aw || a[11:7] == 5'd0) return 0;
    return (br1 && b[19:15] == a[11:7]) || (br2 && b[24:20] == a[11:7]) ||
           (bw && b[11:7] == a[11:7]);
  endfunction

  function automatic logic [31:0] rand_instr();
    logic [6:0] opcs [10];
    logic [31:0] i;
    opcs = '{7'h33, 7'h13, 7'h03, 7'h67, 7'h23, 7'h63, 7'h37, 7'h17, 7'h6f, 7'h15};
    i = $urandom;
    i[6:0]   = opcs[$urandom_range(9)];
    i[11:7]  = 5'($urandom_range(3));
    i[19:15] = 5'($urandom_range(3));
    i[24:20] = 5'($urandom_range(3));
    return i;
  endfunction

  initial begin
    int idx, next_expect, steps;
    bit held_v, dep;
    logic [31:0] held, first, i1, i2, exp1, exp2;

    foreach (prog[k]) prog[k] = rand_instr();
    prog[0] = 32'h78aa_5495;
    prog[1] = 32'h00aa_5495;

    reset = 1'b1; flush = 1'b0; instr1 = '0; instr2 = '0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (inst_1 !== 0 || inst_2 !== 0 || hold_valid !== 0) begin
      failures++; $display("FAIL reset");
    end

    idx = 0; held_v = 0; held = '0; next_expect = 0; steps = 0;
    while (steps < 3000) begin
      bit do_flush;
      @(negedge clk);
      reset = 1'b0;
      steps++;
      if (idx >= N - 2) begin idx = 0; next_expect = -1; end
      i1 = prog[idx]; i2 = prog[idx + 1];
      do_flush = ($urandom_range(19) == 0);
      instr1 = i1; instr2 = i2; flush = do_flush;
      first = held_v ? held : i1;
      dep   = conflict(first, i2);
      #1;
      checks++;
      if (rollback !== dep || hold_valid !== held_v) begin
        failures++;
        $display("FAIL step %0d: rollback=%0b hold=%0b expected %0b %0b", steps, rollback,
                 hold_valid, dep, held_v);
      end
      exp1 = first; exp2 = dep ? 32'h0 : i2;
      @(posedge clk); #1;
      checks++;
      if (inst_1 !== exp1 || inst_2 !== exp2) begin
        failures++;
        $display("FAIL step %0d: inst_1=%h inst_2=%h expected %h %h", steps, inst_1, inst_2,
                 exp1, exp2);
      end
      if (steps == 1) begin
        checks++;
        if (inst_1 !== 32'h78aa_5495 || inst_2 !== 32'h00aa_5495) begin
          failures++; $display("FAIL reference pair not issued together");
        end
      end
      // program order: Pipe 1 must hold the next instruction in sequence
      if (next_expect >= 0) begin
        checks++;
        if (inst_1 !== prog[next_expect]) begin
          failures++; $display("FAIL step %0d: out of order issue", steps);
        end
      end
      if (dep) n_roll++; else n_dual++;
      if (held_v) n_hold++;
      held_v = dep && !do_flush;
      held   = i2;
      idx    = idx + (dep ? 1 : 2);
      next_expect = (next_expect < 0) ? -1 : idx;
      if (!dep && next_expect >= 0) next_expect = idx;
      if (do_flush) begin
        n_flush++;
        idx = $urandom_range(N - 3);
        next_expect = -1;        // the stream restarts at the new index
      end else if (next_expect < 0) begin
        next_expect = idx;
      end
    end
    checks++;
    if (n_dual == 0 || n_roll == 0 || n_hold == 0 || n_flush == 0) begin
      failures++; $display("FAIL mechanism missing: dual=%0d roll=%0d hold=%0d flush=%0d",
                           n_dual, n_roll, n_hold, n_flush);
    end
    $display("dual=%0d rollback=%0d held=%0d flush=%0d", n_dual, n_roll, n_hold, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
