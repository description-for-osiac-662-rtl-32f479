// Behavioural model of the main memory seen by the OSIAC 662: 64K words of
// 16 bits, word addressed. Reads are combinational (rdata follows addr), a
// write stores wdata at the rising clock edge while write is high. Test
// benches load and inspect the array mem[] directly.
module osiac_mem_model (
  input  logic        clk,
  input  logic [15:0] addr,
  input  logic [15:0] wdata,
  input  logic        read,
  input  logic        write,
  output logic [15:0] rdata
);
  logic [15:0] mem [65536];

  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (write) mem[addr] <= wdata;
  end

  // the processor never reads and writes in the same cycle
  a_rw: assert property (@(posedge clk) !(read && write));
endmodule
