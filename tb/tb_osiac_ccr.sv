// Self-checking test of the condition-code register and ibrch: random
// update lines and inputs each cycle against a shadow model; ibrch compared
// with the branch formula written out bit by bit.
module tb_osiac_ccr;
  logic        clk = 1'b0, rst;
  logic        newc, setc, clrc, newv, newz, newn, cout, vout, busz, busn;
  logic [15:0] ir;
  logic        c, v, z, n, ibrch;
  logic        ec, ev, ez, en, eb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  osiac_ccr dut (.clk, .rst, .newc, .setc, .clrc, .newv, .newz, .newn,
                 .cout, .vout, .busz, .busn, .ir, .c, .v, .z, .n, .ibrch);

  initial begin
    rst = 1'b1;
    {newc, setc, clrc, newv, newz, newn, cout, vout, busz, busn} = '0;
    ir = '0;
    @(posedge clk); #1 rst = 1'b0;
    {ec, ev, ez, en} = 4'b0000;
    checks++;
    if ({c, v, z, n} !== 4'b0000) begin failures++; $display("FAIL reset"); end
    for (int t = 0; t < 5000; t++) begin
      {newc, setc, clrc, newv, newz, newn, cout, vout, busz, busn} = 10'($urandom);
      if ($urandom_range(0, 3) != 0) {setc, clrc} = 2'b00;   // mostly one line
      ir = 16'($urandom);
      #1;
      // ibrch: IR[3:0] select C,V,Z,N; IR4 = 1 tests set, 0 tests clear
      eb = 1'b0;
      if (ir[3] && (c == ir[4])) eb = 1'b1;
      if (ir[2] && (v == ir[4])) eb = 1'b1;
      if (ir[1] && (z == ir[4])) eb = 1'b1;
      if (ir[0] && (n == ir[4])) eb = 1'b1;
      checks++;
      if (ibrch !== eb) begin failures++; $display("FAIL ibrch ir=%h cvzn=%b", ir, {c, v, z, n}); end
      @(posedge clk);
      if (newc) ec = cout; else if (setc) ec = 1'b1; else if (clrc) ec = 1'b0;
      if (newv) ev = vout;
      if (newz) ez = busz;
      if (newn) en = busn;
      #1;
      checks++;
      if ({c, v, z, n} !== {ec, ev, ez, en}) begin
        failures++;
        $display("FAIL flags %b expected %b", {c, v, z, n}, {ec, ev, ez, en});
      end
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
