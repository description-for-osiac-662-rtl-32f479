// Self-checking test of the micro-programmed controller on its own. The test
// plays the datapath: it holds an instruction in cond.ir, answers the
// condition inputs, records the control word of every cycle until the next
// instruction fetch begins, and checks the words and cycle counts that the
// register-transfer sequences worked out by hand require: the fetch
// sequence, HALT, a register ADD, SUB borrow handling, branch taken and not
// taken, RTS, JSR pushing the updated PC, DBRA, and the 16-step AND loop.
module tb_osiac_control;
  import osiac_pkg::*;
  logic  clk = 1'b0, rst;
  cond_t cond;
  ctrl_t ctrl;
  logic  halted;
  int checks = 0, failures = 0;
  ctrl_t trace [$];
  int    add_steps;     // how many adder "doubling T5" words to see before cout = 1

  always #5 clk = ~clk;

  osiac_control dut (.clk, .rst, .cond, .ctrl, .halted);

  localparam ctrl_t W_F0 = '{rac: 2'd1, rn: 2'd3, imar: 1'b1, ib: 1'b1, p1: 1'b1, oadder: 1'b1, default: '0};
  localparam ctrl_t W_F1 = '{read: 1'b1, oq: 1'b1, wac: 2'd1, wn: 2'd3, default: '0};
  localparam ctrl_t W_F2 = '{omdr: 1'b1, iir: 1'b1, default: '0};

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic is_dbl_t5(input ctrl_t w);
    return w.ot5 && w.oa && w.ib && w.oadder;
  endfunction

  // run one instruction from reset; returns the number of cycles up to the
  // next fetch (or to halt); a fetch is recognised by its MDR -> IR word
  task automatic run(input logic [15:0] ir, input logic cout_v, input logic busz_v,
                     input logic ibrch_v, output int ncyc);
    int dbl_seen;
    int f2 = 0;
    trace    = '{};
    dbl_seen = 0;
    cond     = '0;
    rst      = 1'b1;
    @(posedge clk); #1 rst = 1'b0;
    ncyc = 0;
    // IR holds the previous value until FETCH2 loads it; model that
    cond.ir = 16'hFFFF;
    do begin
      cond.busz  = busz_v;
      cond.ibrch = ibrch_v;
      cond.cout  = cout_v;
      cond.busn  = 1'b1;
      if (is_dbl_t5(ctrl)) begin
        dbl_seen++;
        cond.cout = (dbl_seen == add_steps);
      end
      trace.push_back(ctrl);
      if (ctrl == W_F2) f2++;
      @(posedge clk);
      if (ctrl.iir) cond.ir = ir;
      #1;
      ncyc++;
    end while (!(f2 == 2 || halted) && ncyc < 2000);
    // drop the fetch of the next instruction
    if (f2 == 2) begin
      repeat (3) void'(trace.pop_back());
      ncyc -= 3;
    end
  endtask

  function automatic int count(input ctrl_t w);
    int c = 0;
    foreach (trace[i]) if (trace[i] == w) c++;
    return c;
  endfunction

  initial begin
    int n;
    ctrl_t w;
    add_steps = 16;

    // HALT: fetch then halt, after four cycles
    run(16'h0000, 1'b0, 1'b0, 1'b0, n);
    chk("halt cycles", n, 4);
    chk("halt line", int'(ctrl.halt), 1);
    chk("fetch word 0", int'(trace[0] == W_F0), 1);
    chk("fetch word 1", int'(trace[1] == W_F1), 1);
    chk("fetch word 2", int'(trace[2] == W_F2), 1);
    repeat (5) @(posedge clk);
    #1 chk("stays halted", int'(halted), 1);

    // ADD X,AC (register to register): 13 cycles
    run({4'd1, 4'd0, 4'd0, 2'd1, 2'd0}, 1'b0, 1'b0, 1'b0, n);
    chk("add cycles", n, 13);
    w = '{ot2: 1'b1, oa: 1'b1, ib: 1'b1, oadder: 1'b1, newc: 1'b1, newv: 1'b1, default: '0};
    chk("add word", count(w), 1);
    w = '{oq: 1'b1, wac: 2'd3, newz: 1'b1, newn: 1'b1, default: '0};
    chk("add write-back", count(w), 1);

    // SUB: borrow = not cout
    run({4'd6, 4'd0, 4'd0, 2'd1, 2'd0}, 1'b0, 1'b0, 1'b0, n);
    chk("sub setc", count('{setc: 1'b1, default: '0}), 1);
    chk("sub no clrc", count('{clrc: 1'b1, default: '0}), 0);
    run({4'd6, 4'd0, 4'd0, 2'd1, 2'd0}, 1'b1, 1'b0, 1'b0, n);
    chk("sub clrc", count('{clrc: 1'b1, default: '0}), 1);

    // branch taken: fetch 4 + test 1 + 5 = 10 cycles, reads the offset word
    run(16'h0088, 1'b0, 1'b0, 1'b1, n);
    chk("branch taken cycles", n, 10);
    chk("branch taken reads", count(W_F1), 2);
    // same branch with the sense inverted (IR5): not taken, 7 cycles
    run(16'h00A8, 1'b0, 1'b0, 1'b1, n);
    chk("branch not taken cycles", n, 7);
    chk("branch not taken reads", count(W_F1), 1);

    // RTS: [[SP]] -> PC, SP + 1 -> SP
    run(16'h00C0, 1'b0, 1'b0, 1'b0, n);
    chk("rts cycles", n, 7);
    chk("rts pop", count('{omdr: 1'b1, wac: 2'd1, wn: 2'd3, default: '0}), 1);
    chk("rts sp", count('{read: 1'b1, oq: 1'b1, wac: 2'd1, wn: 2'd2, default: '0}), 1);

    // JSR (X): SP decremented, updated PC written, EA -> PC
    run({4'd0, 4'd4, 4'd1, 2'd0, 2'd1}, 1'b0, 1'b0, 1'b0, n);
    chk("jsr pc to mdr", count('{rac: 2'd1, rn: 2'd3, imdr: 1'b1, default: '0}), 1);
    chk("jsr write", count('{write: 1'b1, default: '0}), 1);
    chk("jsr jump", count('{ot4: 1'b1, wac: 2'd1, wn: 2'd3, default: '0}), 1);
    chk("jsr no operand read", count('{read: 1'b1, default: '0}), 0);

    // DBRA AC: busz = 1 means the count reached -1, fall through (7 + 12)
    run({4'd0, 4'd10, 4'd0, 2'd0, 2'd0}, 1'b0, 1'b1, 1'b0, n);
    chk("dbra exit reads", count(W_F1), 1);
    chk("dbra no flags", count('{oq: 1'b1, wac: 2'd3, default: '0}), 1);
    run({4'd0, 4'd10, 4'd0, 2'd0, 2'd0}, 1'b0, 1'b0, 1'b0, n);
    chk("dbra loop reads offset", count(W_F1), 2);

    // AND AC,X: the loop runs until the 16th doubling of T5 carries out
    run({4'd2, 4'd0, 4'd0, 2'd0, 2'd1}, 1'b0, 1'b0, 1'b0, n);
    w = '{ot5: 1'b1, oa: 1'b1, ib: 1'b1, oadder: 1'b1, default: '0};
    chk("and loop steps", count(w), 16);
    chk("and final", count('{ot5: 1'b1, ib: 1'b1, oadder: 1'b1, newv: 1'b1, clrc: 1'b1, default: '0}), 1);
    // with busn = 1 on every test, every bit adds one: 16 increments
    chk("and bits", count('{oq: 1'b1, ib: 1'b1, p1: 1'b1, oadder: 1'b1, default: '0}), 16);

    // EXG AC,X: both values pass through Q, no flag line at all
    run({4'd3, 4'd0, 4'd0, 2'd0, 2'd1}, 1'b0, 1'b0, 1'b0, n);
    chk("exg to dst", count('{ot2: 1'b1, iq: 1'b1, default: '0}), 1);
    chk("exg to src", count('{ot1: 1'b1, iq: 1'b1, default: '0}), 1);
    chk("exg src write", count('{oq: 1'b1, wac: 2'd2, default: '0}), 1);
    chk("exg dst write", count('{oq: 1'b1, wac: 2'd3, default: '0}), 1);

    // undefined opcode halts
    run(16'hF000, 1'b0, 1'b0, 1'b0, n);
    chk("undefined halts", int'(halted), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
