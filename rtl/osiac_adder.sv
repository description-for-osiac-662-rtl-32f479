// Adder system of the OSIAC 662 (the machine's only arithmetic unit).
//
// A side: T1 when OA is asserted, otherwise 0.
// B side: the bus when IB is asserted, otherwise 0, then passed through a
//         programmable inverter that complements every bit when COMP is set.
// The adder forms A + B + P1. cout is the carry out of bit WIDTH-1; vout is
// the two's-complement overflow (carry into the top bit differs from the
// carry out of it). Subtraction x - y is T1 = x, bus = y, COMP, P1, and its
// borrow is the complement of cout.
// Purely combinational; the sum is latched into Q by the datapath (OADDER).
// The structure follows the machine's control-line description; computing
// vout from the two top carries is this design's choice.
module osiac_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] t1,
  input  logic [WIDTH-1:0] bus,
  input  logic             oa,
  input  logic             ib,
  input  logic             comp,
  input  logic             p1,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             vout
);

  logic [WIDTH-1:0] a, b;
  logic [WIDTH-1:0] low;   // sum of the low WIDTH-1 bits, with carry at the top
  logic             c_top; // carry into bit WIDTH-1

  always_comb begin
    a = oa ? t1 : '0;
    b = (ib ? bus : '0) ^ {WIDTH{comp}};
    {cout, sum} = {1'b0, a} + {1'b0, b} + {{WIDTH{1'b0}}, p1};
    low   = {1'b0, a[WIDTH-2:0]} + {1'b0, b[WIDTH-2:0]} + {{(WIDTH-1){1'b0}}, p1};
    c_top = low[WIDTH-1];
    vout  = c_top ^ cout;
  end

endmodule
