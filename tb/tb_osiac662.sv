// End-to-end test of the OSIAC 662 processor with its default parameters.
//
// Part 1 runs a short hand-written program (array sum with DBRA, a
// subroutine with JSR/RTS, AND, OR, SUB with borrow, conditional branches
// taken and not taken, EXG, NEG overflow, indexed and absolute operands, TST,
// SUBQ, JMP, HALT) and checks registers, flags and memory against values
// worked out by hand.
// Part 2 runs random programs (random instruction words, registers and data)
// in lock-step with an instruction-level reference model written here from
// the instruction-set definition: after every instruction the four registers
// and the flags are compared, and at the end of each program all of memory.
// Coverage counters record every instruction, addressing mode, branch
// outcome, DBRA outcome, borrow, overflow and halt; each must occur.
module tb_osiac662;
  import osiac_pkg::*;

  localparam int N_RANDOM_PROGS = 400;
  localparam int MAX_INSNS      = 2000;
  localparam int WATCHDOG       = 20_000_000;

  logic        clk = 1'b0;
  logic        rst;
  logic [15:0] mem_addr, mem_wdata, mem_rdata;
  logic        mem_read, mem_write, halted;
  logic [15:0] dbg_regs [4];
  logic [3:0]  dbg_cc;

  int checks = 0, failures = 0;
  bit dbgp = 0;
  int cycles = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cycles <= cycles + 1;

  osiac662 dut (
    .clk, .rst, .mem_addr, .mem_wdata, .mem_rdata, .mem_read, .mem_write,
    .halted, .dbg_regs, .dbg_cc
  );

  osiac_mem_model u_mem (
    .clk, .addr(mem_addr), .wdata(mem_wdata), .read(mem_read), .write(mem_write),
    .rdata(mem_rdata)
  );

  // ------------------------------------------------------------ encoders
  function automatic logic [15:0] dbl(input int op, input int sm, input int s,
                                      input int dm, input int d);
    return {op[3:0], sm[3:0], dm[3:0], s[1:0], d[1:0]};
  endfunction
  function automatic logic [15:0] sgl(input int op, input int dm, input int qq, input int d);
    return {4'h0, op[3:0], dm[3:0], qq[1:0], d[1:0]};
  endfunction
  function automatic logic [15:0] bcc(input int inv, input int sc, input int cvzn);
    return {8'h00, 2'b10, inv[0], sc[0], cvzn[3:0]};
  endfunction

  // ------------------------------------------------- reference model state
  logic [15:0] rm [65536];
  logic [15:0] rr [4];
  logic        rc, rv, rz, rn, rhalt;

  // coverage
  int cov_op2 [16];
  int cov_op1 [16];
  int cov_smode [8];
  int cov_dmode [8];
  int cov_br_taken, cov_br_not, cov_dbra_loop, cov_dbra_exit, cov_rts;
  int cov_halt, cov_borrow, cov_ovf, cov_and_or;

  function automatic logic [15:0] rfetch();
    logic [15:0] w;
    w = rm[rr[3]];
    rr[3] = rr[3] + 16'd1;
    return w;
  endfunction

  // evaluate an addressing mode; returns the address, sets val
  function automatic logic [15:0] rea(input logic [3:0] m, input logic [1:0] k,
                                     output logic [15:0] val);
    logic [15:0] ea;
    case (m)
      4'd0: begin ea = rr[k]; val = rr[k]; end
      4'd1: begin ea = rr[k]; val = rm[ea]; end
      4'd2: begin ea = rr[k]; rr[k] = rr[k] + 16'd1; val = rm[ea]; end
      4'd3: begin rr[k] = rr[k] - 16'd1; ea = rr[k]; val = rm[ea]; end
      4'd4: begin ea = rfetch(); ea = ea + rr[k]; val = rm[ea]; end
      4'd5: begin ea = rfetch(); val = rm[ea]; end
      default: begin ea = rr[3]; val = rfetch(); end
    endcase
    return ea;
  endfunction

  function automatic void rstore(input logic [3:0] m, input logic [1:0] k,
                                 input logic [15:0] ea, input logic [15:0] v);
    if (m == 4'd0)      rr[k] = v;
    else if (m != 4'd6) rm[ea] = v;
  endfunction

  function automatic void rnz(input logic [15:0] r);
    rn = r[15];
    rz = (r == 16'd0);
  endfunction

  // one instruction of the reference model
  function automatic void rstep();
    logic [15:0] ir, sea, dea, sv, dv, r, off;
    logic [3:0]  op2, op1, sm, dm;
    logic [16:0] wide;
    logic        cnd;
    ir  = rfetch();
    op2 = ir[15:12]; op1 = ir[11:8]; sm = ir[11:8]; dm = ir[7:4];
    if (op2 >= 4'd1 && op2 <= 4'd6) begin
      cov_op2[op2]++;
      if (sm > 4'd6) begin rhalt = 1'b1; cov_halt++; return; end
      cov_smode[sm[2:0]]++;
      sea = rea(sm, ir[3:2], sv);
      if (dm > 4'd6) begin rhalt = 1'b1; cov_halt++; return; end
      cov_dmode[dm[2:0]]++;
      dea = rea(dm, ir[1:0], dv);
      case (op2)
        4'd1: begin
          wide = {1'b0, dv} + {1'b0, sv}; r = wide[15:0];
          rc = wide[16]; rv = (dv[15] == sv[15]) && (r[15] != dv[15]);
          if (rv) cov_ovf++;
          rnz(r); rstore(dm, ir[1:0], dea, r);
        end
        4'd2, 4'd5: begin
          r = (op2 == 4'd2) ? (sv & dv) : (sv | dv);
          rc = 1'b0; rv = 1'b0; cov_and_or++;
          rnz(r); rstore(dm, ir[1:0], dea, r);
        end
        4'd3: begin
          rstore(dm, ir[1:0], dea, sv);
          rstore(sm, ir[3:2], sea, dv);
        end
        4'd4: begin
          rc = 1'b0; rv = 1'b0; rnz(sv); rstore(dm, ir[1:0], dea, sv);
        end
        default: begin
          r = dv - sv; rc = (dv < sv); rv = (dv[15] != sv[15]) && (r[15] != dv[15]);
          if (rc) cov_borrow++;
          if (rv) cov_ovf++;
          rnz(r); rstore(dm, ir[1:0], dea, r);
        end
      endcase
    end else if (op2 == 4'd0 && ((op1 >= 4'd1 && op1 <= 4'd8) || op1 == 4'd10)) begin
      cov_op1[op1]++;
      if (dm > 4'd6) begin rhalt = 1'b1; cov_halt++; return; end
      cov_dmode[dm[2:0]]++;
      dea = rea(dm, ir[1:0], dv);
      sv  = {14'd0, ir[3:2]};
      case (op1)
        4'd1: begin
          wide = {1'b0, dv} + {1'b0, sv}; r = wide[15:0];
          rc = wide[16]; rv = (dv[15] == sv[15]) && (r[15] != dv[15]);
          rnz(r); rstore(dm, ir[1:0], dea, r);
        end
        4'd2: begin
          rn = 1'b0; rz = 1'b1; rv = 1'b0; rc = 1'b0; rstore(dm, ir[1:0], dea, 16'd0);
        end
        4'd3: rr[3] = dea;
        4'd4: begin
          rr[2] = rr[2] - 16'd1; rm[rr[2]] = rr[3]; rr[3] = dea;
        end
        4'd5: begin
          r = 16'd0 - dv; rc = (dv != 16'd0); rv = (dv == 16'h8000);
          if (rc) cov_borrow++;
          if (rv) cov_ovf++;
          rnz(r); rstore(dm, ir[1:0], dea, r);
        end
        4'd6: begin
          r = ~dv; rc = 1'b0; rv = 1'b0; rnz(r); rstore(dm, ir[1:0], dea, r);
        end
        4'd7: begin
          r = dv - sv; rc = (dv < sv); rv = (dv[15] != sv[15]) && (r[15] != dv[15]);
          if (rc) cov_borrow++;
          rnz(r); rstore(dm, ir[1:0], dea, r);
        end
        4'd8: begin
          rc = 1'b0; rv = 1'b0; rnz(dv);
        end
        default: begin  // DBRA
          r = dv - 16'd1;
          rstore(dm, ir[1:0], dea, r);
          off = rfetch();
          if (r != 16'hFFFF) begin rr[3] = rr[3] + off; cov_dbra_loop++; end
          else cov_dbra_exit++;
        end
      endcase
    end else if (ir[15:8] == 8'h00 && ir[7:6] == 2'b10) begin
      off = rfetch();
      cnd = (ir[3] & (ir[4] == rc)) | (ir[2] & (ir[4] == rv)) |
            (ir[1] & (ir[4] == rz)) | (ir[0] & (ir[4] == rn));
      if (ir[5] ^ cnd) begin rr[3] = rr[3] + off; cov_br_taken++; end
      else cov_br_not++;
    end else if (ir == 16'h00C0) begin
      rr[3] = rm[rr[2]]; rr[2] = rr[2] + 16'd1; cov_rts++;
    end else begin
      rhalt = 1'b1; cov_halt++;
    end
  endfunction

  // ----------------------------------------------------------------- helpers
  task automatic chk(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic do_reset();
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
  endtask

  // wait for the next instruction boundary (controller in its first fetch
  // state) or for halt
  task automatic next_boundary();
    do begin
      @(posedge clk);
      #1;
    end while (!(int'(dut.u_ctl.st) == 0 || halted));
    if (dbgp) $display("boundary t=%0t st=%0d pc=%h", $time, int'(dut.u_ctl.st), dbg_regs[3]);
  endtask

  // ------------------------------------------------------ directed program
  task automatic directed();
    logic [15:0] p [$];
    int t0;
    for (int i = 0; i < 65536; i++) u_mem.mem[i] = 16'd0;
    p = '{};
    p.push_back(dbl(4, 6, 0, 0, 2)); p.push_back(16'h0100);            // 0  MOVE #100,SP
    p.push_back(dbl(4, 6, 0, 0, 1)); p.push_back(16'h0200);            // 2  MOVE #200,X
    p.push_back(sgl(2, 0, 0, 0));                                       // 4  CLR AC
    p.push_back(dbl(4, 6, 0, 5, 0)); p.push_back(16'd3); p.push_back(16'h0300); // 5 MOVE #3,300
    p.push_back(dbl(1, 2, 1, 0, 0));                                    // 8  ADD (X)+,AC
    p.push_back(sgl(10, 5, 0, 0)); p.push_back(16'h0300); p.push_back(16'hFFFC); // 9 DBRA 300,-4
    p.push_back(dbl(4, 0, 0, 5, 0)); p.push_back(16'h0301);            // 12 MOVE AC,301
    p.push_back(sgl(4, 5, 0, 0)); p.push_back(16'h0040);               // 14 JSR 40
    p.push_back(dbl(4, 0, 0, 5, 0)); p.push_back(16'h0302);            // 16 MOVE AC,302
    p.push_back(dbl(2, 6, 0, 0, 0)); p.push_back(16'h0F0F);            // 18 AND #0F0F,AC
    p.push_back(dbl(5, 6, 0, 0, 0)); p.push_back(16'h3000);            // 20 OR #3000,AC
    p.push_back(dbl(4, 0, 0, 3, 2));                                    // 22 MOVE AC,-(SP)
    p.push_back(dbl(6, 6, 0, 0, 0)); p.push_back(16'h4000);            // 23 SUB #4000,AC
    p.push_back(bcc(0, 1, 8)); p.push_back(16'd2);               // 25 BCS +2
    p.push_back(dbl(4, 6, 0, 0, 0)); p.push_back(16'hDEAD);            // 27 (skipped)
    p.push_back(bcc(0, 1, 2)); p.push_back(16'd5);               // 29 BEQ (not taken)
    p.push_back(dbl(3, 0, 0, 0, 1));                                    // 31 EXG AC,X
    p.push_back(dbl(4, 6, 0, 5, 0)); p.push_back(16'h8000); p.push_back(16'h0303); // 32
    p.push_back(sgl(5, 5, 0, 0)); p.push_back(16'h0303);               // 35 NEG 303
    p.push_back(bcc(0, 1, 4)); p.push_back(16'd1);               // 37 BVS +1
    p.push_back(16'h0000);                                              // 39 HALT (skipped)
    p.push_back(dbl(4, 4, 2, 5, 0)); p.push_back(16'd1); p.push_back(16'h0304); // 40 MOVE 1(SP),304
    p.push_back(sgl(8, 0, 0, 0));                                       // 43 TST AC
    p.push_back(sgl(7, 5, 3, 0)); p.push_back(16'h0304);               // 44 SUBQ #3,304
    p.push_back(sgl(3, 5, 0, 0)); p.push_back(16'h0050);               // 46 JMP 50
    p.push_back(16'h0000);                                              // 48 HALT (skipped)
    foreach (p[i]) u_mem.mem[i] = p[i];
    u_mem.mem[16'h40] = sgl(6, 0, 0, 0);                                // NOT AC
    u_mem.mem[16'h41] = sgl(1, 0, 1, 0);                                // ADDQ #1,AC
    u_mem.mem[16'h42] = 16'h00C0;                                       // RTS
    u_mem.mem[16'h50] = 16'h0000;                                       // HALT
    u_mem.mem[16'h100] = 16'd16;
    u_mem.mem[16'h200] = 16'd10; u_mem.mem[16'h201] = 16'd20;
    u_mem.mem[16'h202] = 16'd30; u_mem.mem[16'h203] = 16'd40;
    do_reset();
    t0 = cycles;
    while (!halted && cycles < t0 + 20000) @(posedge clk);
    #1;
    checks++;
    if (!halted) begin failures++; $display("FAIL directed program did not halt"); end
    chk("AC", dbg_regs[0], 16'h0204);
    chk("X", dbg_regs[1], 16'hFF0C);
    chk("SP", dbg_regs[2], 16'h00FF);
    chk("PC", dbg_regs[3], 16'h0051);
    chk("CVZN", {12'd0, dbg_cc}, 16'h0000);
    chk("m300", u_mem.mem[16'h300], 16'hFFFF);
    chk("m301", u_mem.mem[16'h301], 16'd100);
    chk("m302", u_mem.mem[16'h302], 16'hFF9C);
    chk("m0FF", u_mem.mem[16'h0FF], 16'h3F0C);
    chk("m303", u_mem.mem[16'h303], 16'h8000);
    chk("m304", u_mem.mem[16'h304], 16'd13);
    chk("m200", u_mem.mem[16'h200], 16'd10);
  endtask

  // --------------------------------------------------------- random word
  function automatic logic [15:0] rand_insn();
    int k;
    logic [3:0] sm, dm;
    k  = $urandom_range(0, 99);
    sm = 4'($urandom_range(0, 6));
    dm = 4'($urandom_range(0, 6));
    if ($urandom_range(0, 199) == 0) sm = 4'd7;        // rare undefined mode
    if (k < 45)       return {4'($urandom_range(1, 6)), sm, dm, 4'($urandom)};
    else if (k < 75)  return {4'h0, 4'($urandom_range(1, 8)), dm, 4'($urandom)};
    else if (k < 82)  return {4'h0, 4'hA, dm, 4'($urandom)};
    else if (k < 94)  return {8'h00, 2'b10, 6'($urandom)};
    else if (k < 98)  return 16'h00C0;
    else if (k < 99)  return 16'h0000;
    else              return 16'($urandom);
  endfunction

  task automatic random_prog(input int n);
    int insns;
    for (int i = 0; i < 65536; i++) u_mem.mem[i] = 16'($urandom_range(0, 15));
    for (int i = 0; i < 256; i++)   u_mem.mem[i] = rand_insn();
    for (int i = 0; i < 16; i++)    u_mem.mem[16'(32'hFFF0 + i)] = rand_insn();
    for (int i = 0; i < 65536; i++) rm[i] = u_mem.mem[i];
    do_reset();
    // random general registers, same in both
    for (int k = 0; k < 3; k++) begin
      rr[k] = (k == 0) ? 16'($urandom) : 16'($urandom_range(16'h0100, 16'hFF00));
      dut.u_dp.u_rf.r[k] = rr[k];
    end
    rr[3] = 16'd0;
    {rc, rv, rz, rn} = 4'b0000;
    rhalt = 1'b0;
    insns = 0;
    while (!rhalt && insns < MAX_INSNS) begin
      rstep();
      next_boundary();
      insns++;
      if (rhalt) begin
        checks++;
        if (!halted) begin failures++; $display("FAIL prog %0d: model halted, core did not", n); end
      end else begin
        for (int k = 0; k < 4; k++) chk($sformatf("p%0d i%0d R%0d", n, insns, k), dbg_regs[k], rr[k]);
        chk($sformatf("p%0d i%0d CVZN", n, insns), {12'd0, dbg_cc}, {12'd0, rc, rv, rz, rn});
      end
      if (failures > 20) break;
    end
    for (int i = 0; i < 65536; i++)
      if (u_mem.mem[i] !== rm[i]) begin
        failures++;
        if (failures < 20) $display("FAIL prog %0d: mem[%h] %h expected %h", n, i, u_mem.mem[i], rm[i]);
      end
    checks++;
  endtask

  initial begin
    #1;
    rst = 1'b1;
    directed();
    for (int i = 0; i < 16; i++) begin cov_op1[i] = 0; cov_op2[i] = 0; end
    for (int i = 0; i < 8; i++) begin cov_smode[i] = 0; cov_dmode[i] = 0; end
    for (int n = 0; n < N_RANDOM_PROGS && failures < 20; n++) random_prog(n);
    // every mechanism must have been exercised
    for (int i = 1; i <= 6; i++) begin
      checks++;
      if (cov_op2[i] == 0) begin failures++; $display("FAIL: OP2 %0d never ran", i); end
    end
    for (int i = 1; i <= 10; i++) if (i != 9) begin
      checks++;
      if (cov_op1[i] == 0) begin failures++; $display("FAIL: OP1 %0d never ran", i); end
    end
    for (int i = 0; i <= 6; i++) begin
      checks += 2;
      if (cov_smode[i] == 0) begin failures++; $display("FAIL: source mode %0d never used", i); end
      if (cov_dmode[i] == 0) begin failures++; $display("FAIL: destination mode %0d never used", i); end
    end
    checks += 9;
    if (cov_br_taken == 0)  begin failures++; $display("FAIL: no branch taken"); end
    if (cov_br_not == 0)    begin failures++; $display("FAIL: no branch not taken"); end
    if (cov_dbra_loop == 0) begin failures++; $display("FAIL: DBRA never looped"); end
    if (cov_dbra_exit == 0) begin failures++; $display("FAIL: DBRA never fell through"); end
    if (cov_rts == 0)       begin failures++; $display("FAIL: RTS never ran"); end
    if (cov_halt == 0)      begin failures++; $display("FAIL: never halted"); end
    if (cov_borrow == 0)    begin failures++; $display("FAIL: no borrow"); end
    if (cov_ovf == 0)       begin failures++; $display("FAIL: no overflow"); end
    if (cov_and_or == 0)    begin failures++; $display("FAIL: no AND/OR"); end
    $display("coverage: taken=%0d not=%0d dbra_loop=%0d dbra_exit=%0d rts=%0d halt=%0d borrow=%0d ovf=%0d andor=%0d cycles=%0d",
             cov_br_taken, cov_br_not, cov_dbra_loop, cov_dbra_exit, cov_rts, cov_halt,
             cov_borrow, cov_ovf, cov_and_or, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
