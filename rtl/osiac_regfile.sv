// General register file of the OSIAC 662: R0 = AC, R1 = X, R2 = SP, R3 = PC.
//
// The four registers sit in one small memory, so they have no increment or
// decrement lines of their own; all arithmetic on them goes through the
// adder. One read port drives the bus and one write port loads from it.
// RAC (read) and WAC (write) choose how the register is named:
//   0 - no access, 1 - the number on RN / WN, 2 - IR[3:2] (source register),
//   3 - IR[1:0] (destination register).
// rd_en tells the bus that the file is driving it.
// Timing: the read is combinational; the write happens at the rising clock
// edge, so a register read and written in the same cycle reads its old value.
// Reset clearing the registers (PC = 0) is this design's choice.
module osiac_regfile #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [1:0]       rac,
  input  logic [1:0]       rn,
  input  logic [1:0]       wac,
  input  logic [1:0]       wn,
  input  logic [15:0]      ir,
  input  logic [WIDTH-1:0] wdata,
  output logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic [WIDTH-1:0] regs [4]
);

  logic [WIDTH-1:0] r [4];
  logic [1:0]       rsel, wsel;

  function automatic logic [1:0] sel(input logic [1:0] ac, input logic [1:0] num,
                                     input logic [15:0] irv);
    unique case (ac)
      2'd1:    return num;
      2'd2:    return irv[3:2];
      2'd3:    return irv[1:0];
      default: return 2'd0;
    endcase
  endfunction

  assign rsel  = sel(rac, rn, ir);
  assign wsel  = sel(wac, wn, ir);
  assign rd_en = (rac != 2'd0);
  assign rdata = r[rsel];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) r[i] <= '0;
    end else if (wac != 2'd0) begin
      r[wsel] <= wdata;
    end
  end

  assign regs = r;

endmodule
