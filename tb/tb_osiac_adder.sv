// Self-checking test of the adder system: random and corner operands through
// every combination of OA, IB, COMP and P1. The reference computes the sum
// with 17-bit integers and the overflow from the operand and result signs.
module tb_osiac_adder;
  logic [15:0] t1, bus, sum;
  logic        oa, ib, comp, p1, cout, vout;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  osiac_adder dut (.t1, .bus, .oa, .ib, .comp, .p1, .sum, .cout, .vout);

  task automatic one();
    logic [15:0] a, b;
    logic [16:0] w;
    logic        v;
    a = oa ? t1 : 16'd0;
    b = ib ? bus : 16'd0;
    if (comp) b = ~b;
    w = {1'b0, a} + {1'b0, b} + 17'(p1);
    v = (a[15] == b[15]) && (w[15] != a[15]);
    #1;
    checks++;
    if (sum !== w[15:0] || cout !== w[16] || vout !== v) begin
      failures++;
      if (failures < 10)
        $display("FAIL t1=%h bus=%h oa=%b ib=%b comp=%b p1=%b: %h %b %b expected %h %b %b",
                 t1, bus, oa, ib, comp, p1, sum, cout, vout, w[15:0], w[16], v);
    end
  endtask

  localparam logic [15:0] CORNER [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h8001};

  initial begin
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++)
        for (int m = 0; m < 16; m++) begin
          t1 = CORNER[i]; bus = CORNER[j]; {oa, ib, comp, p1} = 4'(m);
          one();
        end
    for (int t = 0; t < 20000; t++) begin
      t1 = 16'($urandom); bus = 16'($urandom); {oa, ib, comp, p1} = 4'($urandom);
      one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
