// OSIAC 662: a 16-bit, four-register, microprogrammed processor.
//
// The top joins the microprogrammed controller to the single-bus datapath.
// Every instruction is carried out as a sequence of one-cycle register
// transfers (see osiac_control for the micro-program and osiac_datapath for
// the bus). Memory is outside: it is word addressed, mem_addr is MAR,
// mem_wdata is MDR, mem_read / mem_write are the READ / WRITE control lines,
// and mem_rdata must be valid in the cycle READ is high (the word is latched
// into MDR at that clock edge; a write is done at the edge as well).
// After reset the machine fetches from address 0; halted goes high after a
// HALT instruction (or an undefined code) and stays high until reset.
// dbg_regs (R0..R3) and dbg_cc ({C,V,Z,N}) are there for observation.
module osiac662
  import osiac_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  output logic [WORD-1:0] mem_addr,
  output logic [WORD-1:0] mem_wdata,
  input  logic [WORD-1:0] mem_rdata,
  output logic            mem_read,
  output logic            mem_write,
  output logic            halted,
  output logic [WORD-1:0] dbg_regs [4],
  output logic [3:0]      dbg_cc
);

  ctrl_t ctrl;
  cond_t cond;

  osiac_control u_ctl (
    .clk, .rst, .cond, .ctrl, .halted
  );

  osiac_datapath u_dp (
    .clk, .rst, .ctrl, .cond,
    .mem_addr, .mem_wdata, .mem_rdata, .mem_read, .mem_write,
    .dbg_regs, .dbg_cc
  );

endmodule
