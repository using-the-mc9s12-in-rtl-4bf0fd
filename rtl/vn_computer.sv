// vn_computer: Princeton (von Neumann) computer: the processor datapath and its single
// program-and-data memory, with the control lines brought out.
//
// The datapath (vn_datapath) addresses the memory (vn_memory) through its Addr_Mux, writes
// the Data_Mux output into it when Mem_W is high and takes the memory read data into its
// ALU, PC, MAR and IR. The memory has one input port and one output port at a
// memory-mapped location. The control unit, which would step through fetch and execute
// using inst and the flags, is outside this module: ctrl, inst and flags are its ports.
//
// Interface: clk, rst_n, ctrl (X_Load ... Mem_W), inst (IR), flags (Z, C, V, N), in_port
// (Input), out_port (Output). Timing: one register transfer or memory write per clock.
module vn_computer
  import vn_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  ctrl_t        ctrl,
  output logic [W-1:0] inst,
  output flags_t       flags,
  input  logic [W-1:0] in_port,
  output logic [W-1:0] out_port
);

  logic [W-1:0] mem_addr, mem_wdata, mem_rdata;

  vn_datapath u_dp (
    .clk,
    .rst_n,
    .ctrl,
    .mem_rdata,
    .mem_addr,
    .mem_wdata,
    .inst,
    .flags
  );

  vn_memory u_mem (
    .clk,
    .rst_n,
    .addr  (mem_addr),
    .wdata (mem_wdata),
    .mem_w (ctrl.mem_w),
    .rdata (mem_rdata),
    .in_port,
    .out_port
  );

endmodule
