// Self-checking test of the general register file: every RAC / WAC selection
// mode (RN, IR[3:2], IR[1:0]), no-access when RAC / WAC = 0, read-before-
// write in one cycle, and reset. A shadow array in the test is the reference.
module tb_osiac_regfile;
  logic        clk = 1'b0, rst;
  logic [1:0]  rac, rn, wac, wn;
  logic [15:0] ir, wdata, rdata;
  logic        rd_en;
  logic [15:0] regs [4];
  logic [15:0] shadow [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  osiac_regfile dut (.clk, .rst, .rac, .rn, .wac, .wn, .ir, .wdata, .rd_en, .rdata, .regs);

  function automatic logic [1:0] pick(input logic [1:0] ac, input logic [1:0] num,
                                      input logic [15:0] irv);
    if (ac == 2'd1) return num;
    if (ac == 2'd2) return irv[3:2];
    return irv[1:0];
  endfunction

  task automatic chk(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1; rac = 0; rn = 0; wac = 0; wn = 0; ir = 0; wdata = 0;
    @(posedge clk); #1 rst = 1'b0;
    for (int k = 0; k < 4; k++) begin
      shadow[k] = 16'd0;
      chk("reset", regs[k], 16'd0);
    end
    for (int t = 0; t < 2000; t++) begin
      rac   = 2'($urandom); rn = 2'($urandom);
      wac   = 2'($urandom); wn = 2'($urandom);
      ir    = 16'($urandom); wdata = 16'($urandom);
      #1;
      checks++;
      if (rd_en !== (rac != 0)) begin failures++; $display("FAIL rd_en"); end
      if (rac != 0) chk("read", rdata, shadow[pick(rac, rn, ir)]);
      @(posedge clk);
      if (wac != 0) shadow[pick(wac, wn, ir)] = wdata;
      #1;
      for (int k = 0; k < 4; k++) chk($sformatf("R%0d", k), regs[k], shadow[k]);
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
