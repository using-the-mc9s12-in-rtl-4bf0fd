// expanded_mode_top: the two pieces of bus hardware covered by this package, side by side.
//
//  * mc9s12_ext_mem - the external memory system of an MC9S12 in expanded mode: the
//    multiplexed address/data bus AD15-0 is split into address and data by a latch clocked on
//    E, and the MCU's E, R/W and LSTRB are turned into the chip select, output enable, write
//    enable and byte enables of a 16-bit static memory (16 KB at 0x4000-0x7FFF, with two
//    peripheral bytes at 0x4000/0x4001 brought out).
//  * vn_computer - a small Princeton (von Neumann) computer: an 8-bit datapath with X, A,
//    PC, MAR, IR, ALU and flags sharing one memory for program and data; its control unit is
//    external, so its control lines are ports.
//
// The two do not share any signal; each keeps its own ports (the computer's carry the vn_
// prefix). See the two modules for the interface and timing of each.
module expanded_mode_top
  import ebi_pkg::*;
  import vn_pkg::*;
#(
  parameter int unsigned MEM_AW = 13
) (
  // MC9S12 expanded-mode bus
  input  logic         rst_n,
  input  logic         e,
  input  logic         rw,
  input  logic         lstrb_n,
  input  logic [15:0]  ad_i,
  output logic [15:0]  ad_o,
  output logic [1:0]   ad_oe,
  output logic [15:0]  ext_addr,
  output mem_ctrl_t    ext_ctrl,
  output logic         periph_cs_n,
  input  logic [15:0]  periph_rdata,
  // Princeton computer
  input  logic         vn_clk,
  input  logic         vn_rst_n,
  input  ctrl_t        vn_ctrl,
  output logic [W-1:0] vn_inst,
  output flags_t       vn_flags,
  input  logic [W-1:0] vn_in_port,
  output logic [W-1:0] vn_out_port
);

  mc9s12_ext_mem #(.MEM_AW(MEM_AW)) u_ext_mem (
    .rst_n,
    .e,
    .rw,
    .lstrb_n,
    .ad_i,
    .ad_o,
    .ad_oe,
    .ext_addr,
    .ext_ctrl,
    .periph_cs_n,
    .periph_rdata
  );

  vn_computer u_vn (
    .clk      (vn_clk),
    .rst_n    (vn_rst_n),
    .ctrl     (vn_ctrl),
    .inst     (vn_inst),
    .flags    (vn_flags),
    .in_port  (vn_in_port),
    .out_port (vn_out_port)
  );

endmodule
