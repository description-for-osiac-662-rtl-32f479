// Condition-code register of the OSIAC 662 and the ibrch branch condition.
//
// C, V, Z and N are single flip-flops, each changed only by its own lines:
//   NEWC  C <= cout (adder carry out)     SETC / CLRC  C <= 1 / 0
//   NEWV  V <= vout (adder overflow)
//   NEWZ  Z <= busz (bus is zero)         NEWN  N <= busn (bus is negative)
// If several C lines are given in one cycle NEWC wins, then SETC (this
// design's choice; the controller never does it). Updates happen at the
// rising clock edge; reset clears all four bits (also a choice).
// ibrch = IR3.(IR4 xnor C) + IR2.(IR4 xnor V) + IR1.(IR4 xnor Z)
//       + IR0.(IR4 xnor N), combinational, exactly as the machine defines it:
// IR[3:0] pick the flags, IR4 says whether they are tested set or clear.
module osiac_ccr (
  input  logic        clk,
  input  logic        rst,
  input  logic        newc,
  input  logic        setc,
  input  logic        clrc,
  input  logic        newv,
  input  logic        newz,
  input  logic        newn,
  input  logic        cout,
  input  logic        vout,
  input  logic        busz,
  input  logic        busn,
  input  logic [15:0] ir,
  output logic        c,
  output logic        v,
  output logic        z,
  output logic        n,
  output logic        ibrch
);

  always_ff @(posedge clk) begin
    if (rst) begin
      c <= 1'b0;
      v <= 1'b0;
      z <= 1'b0;
      n <= 1'b0;
    end else begin
      if (newc)      c <= cout;
      else if (setc) c <= 1'b1;
      else if (clrc) c <= 1'b0;
      if (newv) v <= vout;
      if (newz) z <= busz;
      if (newn) n <= busn;
    end
  end

  always_comb begin
    ibrch = (ir[3] & ~(ir[4] ^ c)) |
            (ir[2] & ~(ir[4] ^ v)) |
            (ir[1] & ~(ir[4] ^ z)) |
            (ir[0] & ~(ir[4] ^ n));
  end

endmodule
