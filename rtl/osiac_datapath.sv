// Single-bus datapath of the OSIAC 662.
//
// One 16-bit bus joins everything. In a cycle exactly one source drives it
// (register file when RAC != 0, MDR on OMDR, Q on OQ, T1..T5 on OT1..OT5; with
// none the bus reads 0) and any number of registers load from it (IMAR, IMDR,
// IIR, IQ, IT1..IT5, and the register file when WAC != 0). The adder system
// adds T1 (OA) to the gated, optionally complemented bus (IB, COMP) plus P1;
// OADDER latches the sum into Q. Q can also load the bus directly (IQ).
// MAR addresses memory; READ latches the addressed word into MDR and WRITE
// stores MDR, both in the cycle the line is asserted. busz and busn look at
// the bus; with cout, vout, ibrch, the IR and the condition codes they form
// the condition inputs of the controller. All registers change only on the
// rising clock edge, so a value moves bus-to-register in one cycle.
// The lines and their names follow the machine description. Which registers
// have an O line (none for MAR and IR), the synchronous memory timing and
// the reset of all registers are this design's choices.
// The HALT line is acted on inside the controller, which stops sequencing;
// the datapath does not use it.
module osiac_datapath
  import osiac_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  ctrl_t            ctrl,
  output cond_t            cond,
  output logic [WORD-1:0] mem_addr,
  output logic [WORD-1:0] mem_wdata,
  input  logic [WORD-1:0] mem_rdata,
  output logic             mem_read,
  output logic             mem_write,
  output logic [WORD-1:0] dbg_regs [4],
  output logic [3:0]       dbg_cc
);

  logic [WORD-1:0] mar, mdr, ir, q;
  logic [WORD-1:0] t1, t2, t3, t4, t5;
  logic [WORD-1:0] bus, rf_data, sum;
  logic             rf_en, cout, vout;
  logic             c, v, z, n, ibrch;

  osiac_regfile #(.WIDTH(WORD)) u_rf (
    .clk, .rst,
    .rac(ctrl.rac), .rn(ctrl.rn), .wac(ctrl.wac), .wn(ctrl.wn),
    .ir(ir[15:0]), .wdata(bus),
    .rd_en(rf_en), .rdata(rf_data), .regs(dbg_regs)
  );

  osiac_adder #(.WIDTH(WORD)) u_add (
    .t1, .bus, .oa(ctrl.oa), .ib(ctrl.ib), .comp(ctrl.comp), .p1(ctrl.p1),
    .sum, .cout, .vout
  );

  osiac_ccr u_cc (
    .clk, .rst,
    .newc(ctrl.newc), .setc(ctrl.setc), .clrc(ctrl.clrc),
    .newv(ctrl.newv), .newz(ctrl.newz), .newn(ctrl.newn),
    .cout, .vout,
    .busz(bus == '0), .busn(bus[WORD-1]),
    .ir(ir[15:0]),
    .c, .v, .z, .n, .ibrch
  );

  // bus: OR of the gated sources (only one may be enabled)
  always_comb begin
    bus = '0;
    if (rf_en)    bus |= rf_data;
    if (ctrl.omdr) bus |= mdr;
    if (ctrl.oq)  bus |= q;
    if (ctrl.ot1) bus |= t1;
    if (ctrl.ot2) bus |= t2;
    if (ctrl.ot3) bus |= t3;
    if (ctrl.ot4) bus |= t4;
    if (ctrl.ot5) bus |= t5;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mar <= '0; mdr <= '0; ir <= '0; q <= '0;
      t1 <= '0; t2 <= '0; t3 <= '0; t4 <= '0; t5 <= '0;
    end else begin
      if (ctrl.imar) mar <= bus;
      if (ctrl.read)      mdr <= mem_rdata;
      else if (ctrl.imdr) mdr <= bus;
      if (ctrl.iir) ir <= bus;
      if (ctrl.oadder)  q <= sum;
      else if (ctrl.iq) q <= bus;
      if (ctrl.it1) t1 <= bus;
      if (ctrl.it2) t2 <= bus;
      if (ctrl.it3) t3 <= bus;
      if (ctrl.it4) t4 <= bus;
      if (ctrl.it5) t5 <= bus;
    end
  end

  assign mem_addr  = mar;
  assign mem_wdata = mdr;
  assign mem_read  = ctrl.read;
  assign mem_write = ctrl.write;
  assign dbg_cc    = {c, v, z, n};

  assign cond = '{ir: ir[15:0], ibrch: ibrch, cout: cout, vout: vout,
                  busz: (bus == '0), busn: bus[WORD-1],
                  c: c, v: v, z: z, n: n};

  // rules of the bus and of the register loads
  a_one_driver: assert property (@(posedge clk) disable iff (rst)
    $countones({rf_en, ctrl.omdr, ctrl.oq, ctrl.ot1, ctrl.ot2, ctrl.ot3, ctrl.ot4, ctrl.ot5}) <= 1);
  a_q_one_load: assert property (@(posedge clk) disable iff (rst) !(ctrl.oadder && ctrl.iq));
  a_mdr_one_load: assert property (@(posedge clk) disable iff (rst) !(ctrl.read && ctrl.imdr));
  a_mem_rw: assert property (@(posedge clk) disable iff (rst) !(ctrl.read && ctrl.write));

endmodule
