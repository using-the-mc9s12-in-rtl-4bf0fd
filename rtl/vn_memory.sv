// vn_memory: the single program-and-data memory of the Princeton processor, with one
// memory-mapped input port and one output port.
//
// An array of 2**W bytes. Reading is combinational: rdata shows the byte at addr, except at
// IO_ADDR, where it shows the Input port. Writing happens at the rising clock edge when mem_w
// is high; a write to IO_ADDR also loads the Output register, which drives out_port. Reset
// clears the Output register; the array itself is not reset. The Output and Input
// connections and the Mem_W control come from the original datapath; their placement at one
// address (IO_ADDR = 0xFE) and the size are this design's choice.
module vn_memory
  import vn_pkg::*;
#(
  parameter logic [W-1:0] IO_AT = IO_ADDR
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] addr,
  input  logic [W-1:0] wdata,
  input  logic         mem_w,
  output logic [W-1:0] rdata,
  input  logic [W-1:0] in_port,
  output logic [W-1:0] out_port
);

  logic [W-1:0] ram [2**W];

  always_ff @(posedge clk) begin
    if (mem_w) ram[addr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         out_port <= '0;
    else if (mem_w && addr == IO_AT)    out_port <= wdata;
  end

  assign rdata = (addr == IO_AT) ? in_port : ram[addr];

endmodule
