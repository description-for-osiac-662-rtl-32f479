// Self-checking test of the single-bus datapath. Each cycle a random but
// legal control word is applied (at most one bus driver, never READ with
// WRITE or IMDR, never OADDER with IQ); a behavioural shadow of the bus,
// registers, adder, flags and memory predicts every register after the
// clock edge, and the condition inputs (busz, busn, cout, vout) before it.
module tb_osiac_datapath;
  import osiac_pkg::*;
  logic        clk = 1'b0, rst;
  ctrl_t       ctrl;
  cond_t       cond;
  logic [15:0] mem_addr, mem_wdata, mem_rdata;
  logic        mem_read, mem_write;
  logic [15:0] dbg_regs [4];
  logic [3:0]  dbg_cc;
  int checks = 0, failures = 0;

  // shadow state
  logic [15:0] s_r [4];
  logic [15:0] s_mar, s_mdr, s_ir, s_q, s_t [1:5];
  logic        s_c, s_v, s_z, s_n;

  always #5 clk = ~clk;

  osiac_datapath dut (.clk, .rst, .ctrl, .cond, .mem_addr, .mem_wdata, .mem_rdata,
                      .mem_read, .mem_write, .dbg_regs, .dbg_cc);
  osiac_mem_model u_mem (.clk, .addr(mem_addr), .wdata(mem_wdata), .read(mem_read),
                         .write(mem_write), .rdata(mem_rdata));

  task automatic chk(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [1:0] pick(input logic [1:0] ac, input logic [1:0] num);
    if (ac == 2'd1) return num;
    if (ac == 2'd2) return s_ir[3:2];
    return s_ir[1:0];
  endfunction

  initial begin
    logic [15:0] bus, a, b;
    logic [16:0] w;
    logic        vo;
    int          drv;
    logic [1:0]  widx;
    logic [15:0] rdv;
    for (int i = 0; i < 65536; i++) u_mem.mem[i] = 16'($urandom);
    ctrl = '0;
    rst  = 1'b1;
    @(posedge clk); #1 rst = 1'b0;
    for (int k = 0; k < 4; k++) s_r[k] = '0;
    for (int k = 1; k <= 5; k++) s_t[k] = '0;
    s_mar = '0; s_mdr = '0; s_ir = '0; s_q = '0;
    {s_c, s_v, s_z, s_n} = '0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      ctrl = ctrl_t'({$urandom, $urandom});
      // one bus driver at most
      {ctrl.omdr, ctrl.oq, ctrl.ot1, ctrl.ot2, ctrl.ot3, ctrl.ot4, ctrl.ot5} = '0;
      ctrl.rac = 2'd0;
      drv = $urandom_range(0, 8);
      case (drv)
        0: ctrl.rac = 2'($urandom_range(1, 3));
        1: ctrl.omdr = 1'b1;
        2: ctrl.oq = 1'b1;
        3: ctrl.ot1 = 1'b1;
        4: ctrl.ot2 = 1'b1;
        5: ctrl.ot3 = 1'b1;
        6: ctrl.ot4 = 1'b1;
        7: ctrl.ot5 = 1'b1;
        default: ;
      endcase
      if (ctrl.read) begin ctrl.write = 1'b0; ctrl.imdr = 1'b0; end
      if (ctrl.oadder) ctrl.iq = 1'b0;
      ctrl.halt = 1'b0;
      // keep fresh random data flowing in through memory reads
      if (ctrl.read) u_mem.mem[s_mar] = 16'($urandom);
      // shadow: bus and adder
      case (drv)
        0: bus = s_r[pick(ctrl.rac, ctrl.rn)];
        1: bus = s_mdr;
        2: bus = s_q;
        3, 4, 5, 6, 7: bus = s_t[drv - 2];
        default: bus = '0;
      endcase
      a  = ctrl.oa ? s_t[1] : '0;
      b  = (ctrl.ib ? bus : '0) ^ {16{ctrl.comp}};
      w  = {1'b0, a} + {1'b0, b} + 17'(ctrl.p1);
      vo = (a[15] == b[15]) && (w[15] != a[15]);
      #1;
      checks += 4;
      if (cond.busz !== (bus == 0)) begin failures++; $display("FAIL busz"); end
      if (cond.busn !== bus[15])    begin failures++; $display("FAIL busn"); end
      if (cond.cout !== w[16])      begin failures++; $display("FAIL cout"); end
      if (cond.vout !== vo)         begin failures++; $display("FAIL vout"); end
      widx = pick(ctrl.wac, ctrl.wn);   // selected with the IR before the edge
      rdv  = u_mem.mem[s_mar];          // read with MAR before the edge
      @(posedge clk);
      if (ctrl.imar) s_mar = bus;
      if (ctrl.read) s_mdr = rdv;
      else if (ctrl.imdr) s_mdr = bus;
      if (ctrl.iir) s_ir = bus;
      if (ctrl.oadder) s_q = w[15:0]; else if (ctrl.iq) s_q = bus;
      if (ctrl.it1) s_t[1] = bus;
      if (ctrl.it2) s_t[2] = bus;
      if (ctrl.it3) s_t[3] = bus;
      if (ctrl.it4) s_t[4] = bus;
      if (ctrl.it5) s_t[5] = bus;
      if (ctrl.wac != 0) s_r[widx] = bus;
      if (ctrl.newc) s_c = w[16]; else if (ctrl.setc) s_c = 1'b1; else if (ctrl.clrc) s_c = 1'b0;
      if (ctrl.newv) s_v = vo;
      if (ctrl.newz) s_z = (bus == 0);
      if (ctrl.newn) s_n = bus[15];
      #1;
      chk("MAR", mem_addr, s_mar);
      chk("MDR", mem_wdata, s_mdr);
      chk("IR", cond.ir, s_ir);
      chk("Q", dut.q, s_q);
      chk("T1", dut.t1, s_t[1]);
      chk("T2", dut.t2, s_t[2]);
      chk("T3", dut.t3, s_t[3]);
      chk("T4", dut.t4, s_t[4]);
      chk("T5", dut.t5, s_t[5]);
      for (int k = 0; k < 4; k++) chk($sformatf("R%0d", k), dbg_regs[k], s_r[k]);
      chk("CVZN", {12'd0, dbg_cc}, {12'd0, s_c, s_v, s_z, s_n});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
