// vn_pkg: shared constants and encodings of the small Princeton (von Neumann) processor
// datapath: one memory holds program and data, reached through a single address and data
// path. Data and addresses are 8 bits wide; the program counter starts at the reset vector
// 0xFF. The encodings of the ALU and of the two multiplexer selects are this design's own.
package vn_pkg;

  localparam int unsigned W            = 8;       // data and address width
  localparam logic [7:0]  RESET_VECTOR = 8'hFF;   // value loaded into PC at reset
  localparam logic [7:0]  IO_ADDR      = 8'hFE;   // memory-mapped Input/Output location

  // ALU function, selected by ALU_Ctrl. M is the memory read data, D the Data_Mux output.
  typedef enum logic [2:0] {
    ALU_PASS_M = 3'd0,   // M
    ALU_PASS_D = 3'd1,   // D
    ALU_ADD    = 3'd2,   // D + M
    ALU_SUB    = 3'd3,   // D - M (C is the borrow)
    ALU_AND    = 3'd4,   // D & M
    ALU_OR     = 3'd5,   // D | M
    ALU_XOR    = 3'd6,   // D ^ M
    ALU_INC    = 3'd7    // D + 1
  } alu_op_t;

  // Data_Mux: which register drives the internal data path (memory write data, ALU input D).
  typedef enum logic {
    DSEL_A = 1'b0,
    DSEL_X = 1'b1
  } data_sel_t;

  // Addr_Mux: which register addresses the memory.
  typedef enum logic [1:0] {
    ASEL_PC  = 2'd0,
    ASEL_MAR = 2'd1,
    ASEL_X   = 2'd2,
    ASEL_PC2 = 2'd3    // unused code, also selects PC
  } addr_sel_t;

  // Condition flags.
  typedef struct packed {
    logic z;
    logic c;
    logic v;
    logic n;
  } flags_t;

  // Control lines from the control unit to the datapath and memory, one per control line
  // of the original datapath.
  typedef struct packed {
    logic      x_load;
    logic      a_load;
    logic      pc_inc;
    logic      pc_load;
    logic      mar_load;
    logic      ir_load;
    data_sel_t data_mux_sel;
    addr_sel_t addr_mux_sel;
    alu_op_t   alu_ctrl;
    logic      z_load;
    logic      c_load;
    logic      v_load;
    logic      n_load;
    logic      mem_w;
  } ctrl_t;

endpackage
