// vn_alu: arithmetic/logic unit of the Princeton processor datapath.
//
// Combinational. Takes the memory read data m and the Data_Mux output d, performs the
// function chosen by op (see vn_pkg::alu_op_t) and reports the four condition flags of the
// result: Z (zero), C (carry out of add/increment, borrow of subtract), V (two's-complement
// overflow of add/subtract/increment) and N (sign bit). C and V are 0 for the pass and logic
// functions. The unit, its control input and the four flags come from the original
// datapath; the function list and its encoding are this design's choice.
module vn_alu
  import vn_pkg::*;
(
  input  alu_op_t        op,
  input  logic [W-1:0]   d,
  input  logic [W-1:0]   m,
  output logic [W-1:0]   y,
  output flags_t         f
);

  logic [W:0] wide;

  always_comb begin
    wide = '0;
    f.c  = 1'b0;
    f.v  = 1'b0;
    unique case (op)
      ALU_PASS_M: y = m;
      ALU_PASS_D: y = d;
      ALU_ADD: begin
        wide = {1'b0, d} + {1'b0, m};
        y    = wide[W-1:0];
        f.c  = wide[W];
        f.v  = (d[W-1] == m[W-1]) && (y[W-1] != d[W-1]);
      end
      ALU_SUB: begin
        wide = {1'b0, d} - {1'b0, m};
        y    = wide[W-1:0];
        f.c  = wide[W];
        f.v  = (d[W-1] != m[W-1]) && (y[W-1] != d[W-1]);
      end
      ALU_AND: y = d & m;
      ALU_OR:  y = d | m;
      ALU_XOR: y = d ^ m;
      ALU_INC: begin
        wide = {1'b0, d} + 1'b1;
        y    = wide[W-1:0];
        f.c  = wide[W];
        f.v  = !d[W-1] && y[W-1];
      end
      default: y = m;
    endcase
    f.z = (y == '0);
    f.n = y[W-1];
  end

endmodule
