// mc9s12_ext_mem: external memory system of an MC9S12 running in expanded mode.
//
// What it does. The MCU's multiplexed address/data bus (AD15-0, E, R/W, LSTRB) is connected
// to a 16-bit static memory through the de-multiplexer ebi_demux, and a select for two
// external peripheral bytes is brought out. Together they give the MCU 16 KB of external
// memory at 0x4000-0x7FFF, with the peripheral bytes at 0x4000/0x4001 taking precedence.
//
// How it works. ebi_demux captures the address at the rising edge of E and makes the chip
// strobes; ext_sram stores data at the end of a write (falling edge of E) and returns data
// during the E-high phase of a read. The read data of the memory and of the peripheral are
// merged onto ad_o; ad_oe says, per byte lane, when the external side drives AD15-0 (the
// board would use it as the enable of the tri-state drivers).
//
// Interface:
//   rst_n, e, rw, lstrb_n, ad_i   MCU pins (ad_i: the level on AD15-0)
//   ad_o, ad_oe                   data driven back to the MCU on reads, per-lane enables
//   ext_addr, ext_ctrl            de-multiplexed address and shared strobes (for a peripheral)
//   periph_cs_n                   peripheral window select
//   periph_rdata                  data the peripheral returns when it is read
//
// Timing: one bus cycle is one E period; a write is stored at the falling edge of E, a read
// is sampled by the MCU at the falling edge of E. No wait states.
module mc9s12_ext_mem
  import ebi_pkg::*;
#(
  parameter int unsigned MEM_AW = 13   // memory word-address bits (8K x 16 = 16 KB)
) (
  input  logic        rst_n,
  input  logic        e,
  input  logic        rw,
  input  logic        lstrb_n,
  input  logic [15:0] ad_i,
  output logic [15:0] ad_o,
  output logic [1:0]  ad_oe,
  output logic [15:0] ext_addr,
  output mem_ctrl_t   ext_ctrl,
  output logic        periph_cs_n,
  input  logic [15:0] periph_rdata
);

  logic [15:0] mem_dq_o;
  logic [1:0]  mem_dq_oe;
  logic [1:0]  periph_oe;

  ebi_demux u_demux (
    .rst_n,
    .e,
    .rw,
    .lstrb_n,
    .ad_i,
    .addr        (ext_addr),
    .mem         (ext_ctrl),
    .periph_cs_n
  );

  ext_sram #(.AW(MEM_AW)) u_sram (
    .addr  (ext_addr),
    .dq_i  (ad_i),
    .dq_o  (mem_dq_o),
    .dq_oe (mem_dq_oe),
    .cs_n  (ext_ctrl.cs_n),
    .oe_n  (ext_ctrl.oe_n),
    .we_n  (ext_ctrl.we_n),
    .ub_n  (ext_ctrl.ub_n),
    .lb_n  (ext_ctrl.lb_n)
  );

  // Read-data merge. The peripheral drives the enabled lanes while it is read.
  always_comb begin
    periph_oe[1] = !periph_cs_n && !ext_ctrl.oe_n && !ext_ctrl.ub_n;
    periph_oe[0] = !periph_cs_n && !ext_ctrl.oe_n && !ext_ctrl.lb_n;
    ad_oe        = mem_dq_oe | periph_oe;
    ad_o         = periph_cs_n ? mem_dq_o : periph_rdata;
  end

  // The external side may drive AD15-0 only in the data phase of a read.
  always_comb begin
    if (ad_oe != 2'b00) assert (e && rw) else $error("external bus driver on outside a read");
  end

endmodule
