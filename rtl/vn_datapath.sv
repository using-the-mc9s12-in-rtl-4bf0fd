// vn_datapath: the processor datapath of a small Princeton (von Neumann) computer.
//
// What it holds: index register X, accumulator A, program counter PC, memory address
// register MAR, instruction register IR, the four flag bits Z, C, V, N, an ALU, a data
// multiplexer (Data_Mux) and an address multiplexer (Addr_Mux). Every register loads at the
// rising clock edge when the control unit raises its load line; the control unit itself is
// not part of this block: it reads IR (inst) and the flags and drives the ctrl bundle.
//
// How the parts are connected (the register set and control lines follow the original
// datapath; how the multiplexers and registers connect is this design's reading of it):
//   Data_Mux   selects A or X; its output d is the memory write data and the ALU's D input
//   ALU        combines d with the memory read data m; its result loads X or A
//   flags      each of Z, C, V, N loads its ALU flag when its own load line is high
//   PC         reset to the reset vector 0xFF; PC_Load (which wins) loads m, PC_Inc adds 1
//   MAR, IR    load m (operand address, opcode)
//   Addr_Mux   selects PC, MAR or X as the memory address
// So an instruction is fetched with Addr_Mux = PC and IR_Load, an operand address with
// MAR_Load, and data is read or written with Addr_Mux = MAR or X.
//
// Interface: clk, rst_n (asynchronous, active low), ctrl (control lines), mem_rdata (from
// memory), mem_addr and mem_wdata (to memory), inst (IR contents) and flags (Z, C, V, N).
// Timing: one register transfer per clock; memory reads are combinational, so a value read
// in a cycle can be loaded at the end of that cycle.
module vn_datapath
  import vn_pkg::*;
#(
  parameter logic [W-1:0] RESET_PC = RESET_VECTOR
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ctrl_t        ctrl,
  input  logic [W-1:0] mem_rdata,
  output logic [W-1:0] mem_addr,
  output logic [W-1:0] mem_wdata,
  output logic [W-1:0] inst,
  output flags_t       flags
);

  logic [W-1:0] x_q, a_q, pc_q, mar_q, ir_q;
  logic [W-1:0] d, alu_y;
  flags_t       alu_f;

  // Data_Mux
  assign d = (ctrl.data_mux_sel == DSEL_X) ? x_q : a_q;

  vn_alu u_alu (
    .op (ctrl.alu_ctrl),
    .d  (d),
    .m  (mem_rdata),
    .y  (alu_y),
    .f  (alu_f)
  );

  // Addr_Mux
  always_comb begin
    unique case (ctrl.addr_mux_sel)
      ASEL_MAR: mem_addr = mar_q;
      ASEL_X:   mem_addr = x_q;
      default:  mem_addr = pc_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      a_q   <= '0;
      pc_q  <= RESET_PC;
      mar_q <= '0;
      ir_q  <= '0;
      flags <= '0;
    end else begin
      if (ctrl.x_load)        x_q   <= alu_y;
      if (ctrl.a_load)        a_q   <= alu_y;
      if (ctrl.pc_load)       pc_q  <= mem_rdata;
      else if (ctrl.pc_inc)   pc_q  <= pc_q + 1'b1;
      if (ctrl.mar_load)      mar_q <= mem_rdata;
      if (ctrl.ir_load)       ir_q  <= mem_rdata;
      if (ctrl.z_load)        flags.z <= alu_f.z;
      if (ctrl.c_load)        flags.c <= alu_f.c;
      if (ctrl.v_load)        flags.v <= alu_f.v;
      if (ctrl.n_load)        flags.n <= alu_f.n;
    end
  end

  assign mem_wdata = d;
  assign inst      = ir_q;

endmodule
