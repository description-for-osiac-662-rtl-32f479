// Shared definitions of the OSIAC 662 processor.
//
// ctrl_t has one field per control line of the machine: the I<reg> lines load
// a register from the bus, the O<reg> lines drive the bus, OA/IB/COMP/P1/
// OADDER steer the adder, READ/WRITE talk to memory, RAC/RN and WAC/WN select
// general registers, and NEWC/SETC/CLRC/NEWV/NEWZ/NEWN update the condition
// codes. A line that is not asserted is 0. cond_t carries the condition
// inputs the controller branches on (the whole IR, ibrch, cout, vout, busz,
// busn and the four condition codes). The opcode values follow the
// instruction-format tables of the machine description; which register may
// drive or load the bus (no OMAR, no OIR) is this design's choice.
package osiac_pkg;

  localparam int unsigned WORD = 16;

  // register numbers (each register has two names)
  localparam logic [1:0] R_AC = 2'd0;
  localparam logic [1:0] R_X  = 2'd1;
  localparam logic [1:0] R_SP = 2'd2;
  localparam logic [1:0] R_PC = 2'd3;

  // register access control values for RAC / WAC
  localparam logic [1:0] AC_NONE = 2'd0;  // no access
  localparam logic [1:0] AC_RN   = 2'd1;  // register named by RN / WN
  localparam logic [1:0] AC_SRC  = 2'd2;  // IR[3:2]
  localparam logic [1:0] AC_DST  = 2'd3;  // IR[1:0]

  // double operand opcodes, IR[15:12]
  localparam logic [3:0] OP2_ADD  = 4'd1;
  localparam logic [3:0] OP2_AND  = 4'd2;
  localparam logic [3:0] OP2_EXG  = 4'd3;
  localparam logic [3:0] OP2_MOVE = 4'd4;
  localparam logic [3:0] OP2_OR   = 4'd5;
  localparam logic [3:0] OP2_SUB  = 4'd6;

  // single operand opcodes, IR[11:8] with IR[15:12] = 0
  localparam logic [3:0] OP1_ADDQ = 4'd1;
  localparam logic [3:0] OP1_CLR  = 4'd2;
  localparam logic [3:0] OP1_JMP  = 4'd3;
  localparam logic [3:0] OP1_JSR  = 4'd4;
  localparam logic [3:0] OP1_NEG  = 4'd5;
  localparam logic [3:0] OP1_NOT  = 4'd6;
  localparam logic [3:0] OP1_SUBQ = 4'd7;
  localparam logic [3:0] OP1_TST  = 4'd8;
  localparam logic [3:0] OP1_DBRA = 4'd10;

  // addressing modes
  localparam logic [3:0] M_REG   = 4'd0;  // Rk
  localparam logic [3:0] M_IND   = 4'd1;  // (Rk)
  localparam logic [3:0] M_AINC  = 4'd2;  // (Rk)+
  localparam logic [3:0] M_ADEC  = 4'd3;  // -(Rk)
  localparam logic [3:0] M_INDEX = 4'd4;  // n(Rk)
  localparam logic [3:0] M_ABS   = 4'd5;  // n
  localparam logic [3:0] M_IMM   = 4'd6;  // #n

  typedef struct packed {
    // bus loads
    logic imar, imdr, iir, iq;
    logic it1, it2, it3, it4, it5;
    // bus drivers
    logic omdr, oq;
    logic ot1, ot2, ot3, ot4, ot5;
    // adder system
    logic oa, ib, comp, p1, oadder;
    // memory and halt
    logic read, write, halt;
    // general registers
    logic [1:0] rac, rn, wac, wn;
    // condition codes
    logic newc, setc, clrc, newv, newz, newn;
  } ctrl_t;

  typedef struct packed {
    logic [WORD-1:0] ir;
    logic ibrch;
    logic cout, vout, busz, busn;
    logic c, v, z, n;
  } cond_t;

endpackage
