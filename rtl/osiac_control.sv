// Microprogrammed control unit of the OSIAC 662.
//
// Each micro-state asserts a set of the machine's control lines (ctrl_t) for
// one clock cycle and chooses the next micro-state from the condition inputs
// (IR fields, ibrch, cout, vout, busz, busn and the flags). The micro-program
// is organised as the machine's instruction set suggests:
//   fetch     PC -> MAR, PC+1 -> Q; READ, Q -> PC; MDR -> IR; decode.
//   operands  one shared routine evaluates an addressing mode (0..6); a
//             sequencer bit (opsel) says whether it works on the source
//             (IR[11:8], IR[3:2]; value -> T2, address -> T3) or on the
//             destination (IR[7:4], IR[1:0]; value -> T1, address -> T4).
//             The source is always evaluated before the destination, and the
//             PC is advanced as soon as an extension word has been read.
//             MOVE, CLR, JMP and JSR only need the destination's address.
//   execute   one short sequence per instruction, result left in Q.
//   write     Q goes back to the destination, setting N and Z from the bus.
// The datapath has no logic unit, so AND and OR are built from the adder: a
// 16-step loop doubles the two operands to bring each bit pair to bit 15,
// tests them with busn and shifts the result bit into T5. T5 starts as 1; the
// carry out of its 16th doubling marks the last step.
// Subtraction borrow is the complement of the adder carry, so SUB, SUBQ and
// NEG branch on cout to SETC or CLRC. V is cleared by latching the overflow of
// an addition that cannot overflow (0 + value). DBRA tests the decremented
// value for -1 by complementing it onto the bus and looking at busz.
// Encodings follow the machine's instruction formats; the micro-program
// itself, halting on undefined opcodes or modes 7..15, the address of an
// immediate word as the target of JMP #n, and using [Rk] as the target of
// JMP Rk are this design's choices.
// Interface: cond in, ctrl out, halted high once HALT has executed (the
// controller then stays put until reset). Synchronous, active-high reset
// starts a fetch from the PC.
module osiac_control
  import osiac_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  cond_t cond,
  output ctrl_t ctrl,
  output logic  halted
);

  typedef enum logic [6:0] {
    FETCH0, FETCH1, FETCH2, DECODE,
    OP_START, OP_M0, OP_M1, OP_M2A, OP_M2B, OP_M3A, OP_M3B, OP_M3C,
    OP_X0, OP_X1, OP_M4A, OP_M4B, OP_M4C, OP_M5A, OP_M6A, OP_RD, OP_RD2, OP_DONE,
    E_ADD, E_SUB, E_CSET, E_CCLR, E_MOV, E_CLR, E_NOT, E_NEG, E_TST, E_TST2,
    E_Q0, E_Q1, E_Q2, E_Q3, E_Q4,
    E_JMP, E_JSR0, E_JSR1, E_JSR2, E_JSR3, E_JSR4,
    E_EXG0, E_EXG1, WS_START, WS_REG, WS_M0, WS_M1, WS_M2,
    E_AL0, E_AL1, E_AL2, L_D1, L_D2,
    L_TA, L_TB, L_INC, L_ST, LX_TA, LX_TB, LX_INC, LX_ST,
    L_SH1, L_SH2, L_SH3, L_SH4, L_SH5, L_SH6, E_ALF,
    WB_START, WB_REG, WB_M0, WB_M1, WB_M2, WB_NONE,
    D0, D1, D2, D3,
    BR0, BT0, BT1, BT2, BT3, BT4, BS0, BS1,
    RTS0, RTS1, RTS2,
    HALTED
  } ustate_e;

  ustate_e    st, nx;
  logic       opsel, opsel_nx;   // 0: source operand, 1: destination operand
  logic [3:0] op2, op1, mode, smode, dmode;
  logic [1:0] racsel;
  logic       ea_only, cc_upd, is_and, single, dbl_ok, sgl_ok;
  logic [15:0] ir;

  assign ir     = cond.ir;
  assign op2    = ir[15:12];
  assign op1    = ir[11:8];
  assign smode  = ir[11:8];
  assign dmode  = ir[7:4];
  assign mode   = opsel ? dmode : smode;
  assign racsel = opsel ? AC_DST : AC_SRC;
  assign single = (op2 == 4'd0);
  assign is_and = (op2 == OP2_AND);
  assign dbl_ok = (op2 >= OP2_ADD) && (op2 <= OP2_SUB);
  assign sgl_ok = single && (((op1 >= OP1_ADDQ) && (op1 <= OP1_TST)) || (op1 == OP1_DBRA));
  // destination needs only its address
  assign ea_only = opsel && ((op2 == OP2_MOVE) ||
                   (single && ((op1 == OP1_CLR) || (op1 == OP1_JMP) || (op1 == OP1_JSR))));
  // EXG and DBRA leave the condition codes alone
  assign cc_upd = !((op2 == OP2_EXG) || (single && (op1 == OP1_DBRA)));

  // state after a destination write-back
  function automatic ustate_e after_wb(input logic [15:0] irv);
    if (irv[15:12] == OP2_EXG) return E_EXG1;
    if (irv[15:12] == 4'd0 && irv[11:8] == OP1_DBRA) return D2;
    return FETCH0;
  endfunction

  function automatic ustate_e after_addr(input logic eo);
    return eo ? OP_DONE : OP_RD;
  endfunction

  always_comb begin
    ctrl     = '0;
    nx       = st;
    opsel_nx = opsel;
    unique case (st)
      // ---------------------------------------------------------------- fetch
      FETCH0: begin
        ctrl.rac = AC_RN; ctrl.rn = R_PC; ctrl.imar = 1'b1;
        ctrl.ib = 1'b1; ctrl.p1 = 1'b1; ctrl.oadder = 1'b1;
        nx = FETCH1;
      end
      FETCH1: begin
        ctrl.read = 1'b1; ctrl.oq = 1'b1; ctrl.wac = AC_RN; ctrl.wn = R_PC;
        nx = FETCH2;
      end
      FETCH2: begin
        ctrl.omdr = 1'b1; ctrl.iir = 1'b1;
        nx = DECODE;
      end
      DECODE: begin
        if (dbl_ok) begin
          opsel_nx = 1'b0; nx = OP_START;
        end else if (sgl_ok) begin
          opsel_nx = 1'b1; nx = OP_START;
        end else if (ir[15:8] == 8'h00 && ir[7:6] == 2'b10) begin
          nx = BR0;
        end else if (ir == 16'h00C0) begin
          nx = RTS0;
        end else begin
          nx = HALTED;   // HALT (0x0000) and every undefined code
        end
      end
      // ------------------------------------------------------------- operands
      OP_START: begin
        unique case (mode)
          M_REG:                nx = OP_M0;
          M_IND:                nx = OP_M1;
          M_AINC:               nx = OP_M2A;
          M_ADEC:               nx = OP_M3A;
          M_INDEX, M_ABS, M_IMM: nx = OP_X0;
          default:              nx = HALTED;
        endcase
      end
      OP_M0: begin    // Rk: value (and, for jumps, address) is [Rk]
        ctrl.rac = racsel;
        if (opsel) begin ctrl.it1 = 1'b1; ctrl.it4 = 1'b1; end
        else       begin ctrl.it2 = 1'b1; ctrl.it3 = 1'b1; end
        nx = OP_DONE;
      end
      OP_M1: begin    // (Rk)
        ctrl.rac = racsel; ctrl.imar = 1'b1;
        if (opsel) ctrl.it4 = 1'b1; else ctrl.it3 = 1'b1;
        nx = after_addr(ea_only);
      end
      OP_M2A: begin   // (Rk)+ : address, then Rk + 1
        ctrl.rac = racsel; ctrl.imar = 1'b1;
        if (opsel) ctrl.it4 = 1'b1; else ctrl.it3 = 1'b1;
        ctrl.ib = 1'b1; ctrl.p1 = 1'b1; ctrl.oadder = 1'b1;
        nx = OP_M2B;
      end
      OP_M2B: begin
        ctrl.oq = 1'b1; ctrl.wac = racsel;
        nx = after_addr(ea_only);
      end
      OP_M3A: begin   // -(Rk): Q = -Rk
        ctrl.rac = racsel; ctrl.ib = 1'b1; ctrl.comp = 1'b1; ctrl.p1 = 1'b1;
        ctrl.oadder = 1'b1;
        nx = OP_M3B;
      end
      OP_M3B: begin   // Q = ~(-Rk) = Rk - 1
        ctrl.oq = 1'b1; ctrl.ib = 1'b1; ctrl.comp = 1'b1; ctrl.oadder = 1'b1;
        nx = OP_M3C;
      end
      OP_M3C: begin
        ctrl.oq = 1'b1; ctrl.wac = racsel; ctrl.imar = 1'b1;
        if (opsel) ctrl.it4 = 1'b1; else ctrl.it3 = 1'b1;
        nx = after_addr(ea_only);
      end
      OP_X0: begin    // extension word: PC -> MAR, PC + 1 -> Q
        ctrl.rac = AC_RN; ctrl.rn = R_PC; ctrl.imar = 1'b1;
        if (opsel) ctrl.it4 = 1'b1; else ctrl.it3 = 1'b1;
        ctrl.ib = 1'b1; ctrl.p1 = 1'b1; ctrl.oadder = 1'b1;
        nx = OP_X1;
      end
      OP_X1: begin
        ctrl.read = 1'b1; ctrl.oq = 1'b1; ctrl.wac = AC_RN; ctrl.wn = R_PC;
        if (mode == M_INDEX)    nx = OP_M4A;
        else if (mode == M_ABS) nx = OP_M5A;
        else                    nx = ea_only ? OP_DONE : OP_M6A;
      end
      OP_M4A: begin   // n(Rk): n -> T1
        ctrl.omdr = 1'b1; ctrl.it1 = 1'b1;
        nx = OP_M4B;
      end
      OP_M4B: begin   // Q = n + Rk
        ctrl.rac = racsel; ctrl.oa = 1'b1; ctrl.ib = 1'b1; ctrl.oadder = 1'b1;
        nx = OP_M4C;
      end
      OP_M4C: begin
        ctrl.oq = 1'b1; ctrl.imar = 1'b1;
        if (opsel) ctrl.it4 = 1'b1; else ctrl.it3 = 1'b1;
        nx = after_addr(ea_only);
      end
      OP_M5A: begin   // absolute n
        ctrl.omdr = 1'b1; ctrl.imar = 1'b1;
        if (opsel) ctrl.it4 = 1'b1; else ctrl.it3 = 1'b1;
        nx = after_addr(ea_only);
      end
      OP_M6A: begin   // #n: the word itself is the operand
        ctrl.omdr = 1'b1;
        if (opsel) ctrl.it1 = 1'b1; else ctrl.it2 = 1'b1;
        nx = OP_DONE;
      end
      OP_RD: begin
        ctrl.read = 1'b1;
        nx = OP_RD2;
      end
      OP_RD2: begin
        ctrl.omdr = 1'b1;
        if (opsel) ctrl.it1 = 1'b1; else ctrl.it2 = 1'b1;
        nx = OP_DONE;
      end
      OP_DONE: begin
        if (!opsel) begin
          opsel_nx = 1'b1; nx = OP_START;
        end else if (!single) begin
          unique case (op2)
            OP2_ADD:        nx = E_ADD;
            OP2_SUB:        nx = E_SUB;
            OP2_MOVE:       nx = E_MOV;
            OP2_EXG:        nx = E_EXG0;
            default:        nx = E_AL0;     // AND, OR
          endcase
        end else begin
          unique case (op1)
            OP1_ADDQ, OP1_SUBQ: nx = E_Q0;
            OP1_CLR:  nx = E_CLR;
            OP1_JMP:  nx = E_JMP;
            OP1_JSR:  nx = E_JSR0;
            OP1_NEG:  nx = E_NEG;
            OP1_NOT:  nx = E_NOT;
            OP1_TST:  nx = E_TST;
            default:  nx = D0;              // DBRA
          endcase
        end
      end
      // -------------------------------------------------------------- execute
      E_ADD: begin    // Q = dst + src
        ctrl.ot2 = 1'b1; ctrl.oa = 1'b1; ctrl.ib = 1'b1; ctrl.oadder = 1'b1;
        ctrl.newc = 1'b1; ctrl.newv = 1'b1;
        nx = WB_START;
      end
      E_SUB: begin    // Q = dst + ~src + 1
        ctrl.ot2 = 1'b1; ctrl.oa = 1'b1; ctrl.ib = 1'b1; ctrl.comp = 1'b1;
        ctrl.p1 = 1'b1; ctrl.oadder = 1'b1; ctrl.newv = 1'b1;
        nx = cond.cout ? E_CCLR : E_CSET;
      end
      E_CSET: begin ctrl.setc = 1'b1; nx = WB_START; end
      E_CCLR: begin ctrl.clrc = 1'b1; nx = WB_START; end
      E_MOV: begin    // Q = 0 + src, V = 0, C = 0
        ctrl.ot2 = 1'b1; ctrl.ib = 1'b1; ctrl.oadder = 1'b1;
        ctrl.newv = 1'b1; ctrl.clrc = 1'b1;
        nx = WB_START;
      end
      E_CLR: begin    // Q = 0
        ctrl.oadder = 1'b1; ctrl.newv = 1'b1; ctrl.clrc = 1'b1;
        nx = WB_START;
      end
      E_NOT: begin    // Q = 0 + ~dst
        ctrl.ot1 = 1'b1; ctrl.ib = 1'b1; ctrl.comp = 1'b1; ctrl.oadder = 1'b1;
        ctrl.newv = 1'b1; ctrl.clrc = 1'b1;
        nx = WB_START;
      end
      E_NEG: begin    // Q = 0 + ~dst + 1
        ctrl.ot1 = 1'b1; ctrl.ib = 1'b1; ctrl.comp = 1'b1; ctrl.p1 = 1'b1;
        ctrl.oadder = 1'b1; ctrl.newv = 1'b1;
        nx = cond.cout ? E_CCLR : E_CSET;
      end
      E_TST: begin
        ctrl.ot1 = 1'b1; ctrl.ib = 1'b1; ctrl.oadder = 1'b1;
        ctrl.newv = 1'b1; ctrl.clrc = 1'b1;
        nx = E_TST2;
      end
      E_TST2: begin   // flags only, no write-back
        ctrl.oq = 1'b1; ctrl.newz = 1'b1; ctrl.newn = 1'b1;
        nx = FETCH0;
      end
      E_Q0: begin     // build QQ in Q: 0, +2 if IR3, +1 if IR2
        ctrl.oadder = 1'b1;
        nx = ir[3] ? E_Q1 : (ir[2] ? E_Q3 : E_Q4);
      end
      E_Q1: begin
        ctrl.oq = 1'b1; ctrl.ib = 1'b1; ctrl.p1 = 1'b1; ctrl.oadder = 1'b1;
        nx = E_Q2;
      end
      E_Q2: begin
        ctrl.oq = 1'b1; ctrl.ib = 1'b1; ctrl.p1 = 1'b1; ctrl.oadder = 1'b1;
        nx = ir[2] ? E_Q3 : E_Q4;
      end
      E_Q3: begin
        ctrl.oq = 1'b1; ctrl.ib = 1'b1; ctrl.p1 = 1'b1; ctrl.oadder = 1'b1;
        nx = E_Q4;
      end
      E_Q4: begin     // QQ -> T2, then add or subtract like a source operand
        ctrl.oq = 1'b1; ctrl.it2 = 1'b1;
        nx = (op1 == OP1_ADDQ) ? E_ADD : E_SUB;
      end
      E_JMP: begin    // EA(dst) -> PC
        ctrl.ot4 = 1'b1; ctrl.wac = AC_RN; ctrl.wn = R_PC;
        nx = FETCH0;
      end
      E_JSR0: begin   // Q = -SP
        ctrl.rac = AC_RN; ctrl.rn = R_SP; ctrl.ib = 1'b1; ctrl.comp = 1'b1;
        ctrl.p1 = 1'b1; ctrl.oadder = 1'b1;
        nx = E_JSR1;
      end
      E_JSR1: begin   // Q = SP - 1
        ctrl.oq = 1'b1; ctrl.ib = 1'b1; ctrl.comp = 1'b1; ctrl.oadder = 1'b1;
        nx = E_JSR2;
      end
      E_JSR2: begin   // SP - 1 -> SP, MAR
        ctrl.oq = 1'b1; ctrl.wac = AC_RN; ctrl.wn = R_SP; ctrl.imar = 1'b1;
        nx = E_JSR3;
      end
      E_JSR3: begin   // updated PC -> MDR
        ctrl.rac = AC_RN; ctrl.rn = R_PC; ctrl.imdr = 1'b1;
        nx = E_JSR4;
      end
      E_JSR4: begin
        ctrl.write = 1'b1;
        nx = E_JMP;
      end
      E_EXG0: begin   // src value -> Q, written to the destination
        ctrl.ot2 = 1'b1; ctrl.iq = 1'b1;
        nx = WB_START;
      end
      E_EXG1: begin   // old destination value -> Q, written to the source
        ctrl.ot1 = 1'b1; ctrl.iq = 1'b1;
        nx = WS_START;
      end
      WS_START: begin
        if (smode == M_REG)      nx = WS_REG;
        else if (smode == M_IMM) nx = FETCH0;
        else                     nx = WS_M0;
      end
      WS_REG: begin
        ctrl.oq = 1'b1; ctrl.wac = AC_SRC;
        nx = FETCH0;
      end
      WS_M0: begin ctrl.oq = 1'b1; ctrl.imdr = 1'b1; nx = WS_M1; end
      WS_M1: begin ctrl.ot3 = 1'b1; ctrl.imar = 1'b1; nx = WS_M2; end
      WS_M2: begin ctrl.write = 1'b1; nx = FETCH0; end
      // AND / OR: a = T2 (src), b = T3 (dst), result with sentinel in T5
      E_AL0: begin ctrl.ot1 = 1'b1; ctrl.it3 = 1'b1; nx = E_AL1; end
      E_AL1: begin ctrl.p1 = 1'b1; ctrl.oadder = 1'b1; nx = E_AL2; end
      E_AL2: begin ctrl.oq = 1'b1; ctrl.it5 = 1'b1; nx = L_D1; end
      L_D1:  begin ctrl.ot5 = 1'b1; ctrl.it1 = 1'b1; nx = L_D2; end
      L_D2: begin     // Q = 2 * T5; carry out = sentinel left, last bit
        ctrl.ot5 = 1'b1; ctrl.oa = 1'b1; ctrl.ib = 1'b1; ctrl.oadder = 1'b1;
        nx = cond.cout ? LX_TA : L_TA;
      end
      L_TA, LX_TA: begin
        ctrl.ot2 = 1'b1;
        if (is_and) nx = cond.busn ? ((st == L_TA) ? L_TB : LX_TB)
                                   : ((st == L_TA) ? L_ST : LX_ST);
        else        nx = cond.busn ? ((st == L_TA) ? L_INC : LX_INC)
                                   : ((st == L_TA) ? L_TB : LX_TB);
      end
      L_TB, LX_TB: begin
        ctrl.ot3 = 1'b1;
        nx = cond.busn ? ((st == L_TB) ? L_INC : LX_INC)
                       : ((st == L_TB) ? L_ST : LX_ST);
      end
      L_INC, LX_INC: begin
        ctrl.oq = 1'b1; ctrl.ib = 1'b1; ctrl.p1 = 1'b1; ctrl.oadder = 1'b1;
        nx = (st == L_INC) ? L_ST : LX_ST;
      end
      L_ST:  begin ctrl.oq = 1'b1; ctrl.it5 = 1'b1; nx = L_SH1; end
      LX_ST: begin ctrl.oq = 1'b1; ctrl.it5 = 1'b1; nx = E_ALF; end
      L_SH1: begin ctrl.ot2 = 1'b1; ctrl.it1 = 1'b1; nx = L_SH2; end
      L_SH2: begin
        ctrl.ot2 = 1'b1; ctrl.oa = 1'b1; ctrl.ib = 1'b1; ctrl.oadder = 1'b1;
        nx = L_SH3;
      end
      L_SH3: begin ctrl.oq = 1'b1; ctrl.it2 = 1'b1; nx = L_SH4; end
      L_SH4: begin ctrl.ot3 = 1'b1; ctrl.it1 = 1'b1; nx = L_SH5; end
      L_SH5: begin
        ctrl.ot3 = 1'b1; ctrl.oa = 1'b1; ctrl.ib = 1'b1; ctrl.oadder = 1'b1;
        nx = L_SH6;
      end
      L_SH6: begin ctrl.oq = 1'b1; ctrl.it3 = 1'b1; nx = L_D1; end
      E_ALF: begin    // Q = 0 + result, V = 0, C = 0
        ctrl.ot5 = 1'b1; ctrl.ib = 1'b1; ctrl.oadder = 1'b1;
        ctrl.newv = 1'b1; ctrl.clrc = 1'b1;
        nx = WB_START;
      end
      // ----------------------------------------------------------- write back
      WB_START: begin
        if (dmode == M_REG)      nx = WB_REG;
        else if (dmode == M_IMM) nx = WB_NONE;
        else                     nx = WB_M0;
      end
      WB_REG: begin
        ctrl.oq = 1'b1; ctrl.wac = AC_DST;
        ctrl.newz = cc_upd; ctrl.newn = cc_upd;
        nx = after_wb(ir);
      end
      WB_M0: begin
        ctrl.oq = 1'b1; ctrl.imdr = 1'b1;
        ctrl.newz = cc_upd; ctrl.newn = cc_upd;
        nx = WB_M1;
      end
      WB_M1: begin ctrl.ot4 = 1'b1; ctrl.imar = 1'b1; nx = WB_M2; end
      WB_M2: begin ctrl.write = 1'b1; nx = after_wb(ir); end
      WB_NONE: begin  // immediate destination: flags only
        ctrl.oq = 1'b1; ctrl.newz = cc_upd; ctrl.newn = cc_upd;
        nx = after_wb(ir);
      end
      // ----------------------------------------------------------------- DBRA
      D0: begin       // Q = -dst
        ctrl.ot1 = 1'b1; ctrl.ib = 1'b1; ctrl.comp = 1'b1; ctrl.p1 = 1'b1;
        ctrl.oadder = 1'b1;
        nx = D1;
      end
      D1: begin       // Q = dst - 1, written back without touching the flags
        ctrl.oq = 1'b1; ctrl.ib = 1'b1; ctrl.comp = 1'b1; ctrl.oadder = 1'b1;
        nx = WB_START;
      end
      D2: begin       // Q = ~(dst - 1), zero when dst - 1 = -1
        ctrl.oq = 1'b1; ctrl.ib = 1'b1; ctrl.comp = 1'b1; ctrl.oadder = 1'b1;
        nx = D3;
      end
      D3: begin
        ctrl.oq = 1'b1;
        nx = cond.busz ? BS0 : BT0;
      end
      // ------------------------------------------------------------- branches
      BR0: nx = (ir[5] ^ cond.ibrch) ? BT0 : BS0;
      BT0: begin      // offset word: PC -> MAR, PC + 1 -> Q
        ctrl.rac = AC_RN; ctrl.rn = R_PC; ctrl.imar = 1'b1;
        ctrl.ib = 1'b1; ctrl.p1 = 1'b1; ctrl.oadder = 1'b1;
        nx = BT1;
      end
      BT1: begin
        ctrl.read = 1'b1; ctrl.oq = 1'b1; ctrl.wac = AC_RN; ctrl.wn = R_PC;
        nx = BT2;
      end
      BT2: begin ctrl.omdr = 1'b1; ctrl.it1 = 1'b1; nx = BT3; end
      BT3: begin      // Q = offset + updated PC
        ctrl.rac = AC_RN; ctrl.rn = R_PC; ctrl.oa = 1'b1; ctrl.ib = 1'b1;
        ctrl.oadder = 1'b1;
        nx = BT4;
      end
      BT4: begin
        ctrl.oq = 1'b1; ctrl.wac = AC_RN; ctrl.wn = R_PC;
        nx = FETCH0;
      end
      BS0: begin      // not taken: step the PC over the offset word
        ctrl.rac = AC_RN; ctrl.rn = R_PC; ctrl.ib = 1'b1; ctrl.p1 = 1'b1;
        ctrl.oadder = 1'b1;
        nx = BS1;
      end
      BS1: begin
        ctrl.oq = 1'b1; ctrl.wac = AC_RN; ctrl.wn = R_PC;
        nx = FETCH0;
      end
      // ------------------------------------------------------------------ RTS
      RTS0: begin     // SP -> MAR, SP + 1 -> Q
        ctrl.rac = AC_RN; ctrl.rn = R_SP; ctrl.imar = 1'b1;
        ctrl.ib = 1'b1; ctrl.p1 = 1'b1; ctrl.oadder = 1'b1;
        nx = RTS1;
      end
      RTS1: begin
        ctrl.read = 1'b1; ctrl.oq = 1'b1; ctrl.wac = AC_RN; ctrl.wn = R_SP;
        nx = RTS2;
      end
      RTS2: begin
        ctrl.omdr = 1'b1; ctrl.wac = AC_RN; ctrl.wn = R_PC;
        nx = FETCH0;
      end
      HALTED: begin
        ctrl.halt = 1'b1;
        nx = HALTED;
      end
      default: nx = HALTED;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= FETCH0;
      opsel <= 1'b0;
    end else begin
      st    <= nx;
      opsel <= opsel_nx;
    end
  end

  assign halted = (st == HALTED);

endmodule
