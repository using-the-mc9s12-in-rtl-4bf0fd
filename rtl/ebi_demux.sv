// ebi_demux: address/data de-multiplexer and strobe generator between the MC9S12
// multiplexed expanded-mode bus and a 16-bit memory chip (plus a peripheral select).
//
// How it works. While E is low the MCU drives the address on AD15-0; while E is high the same
// lines carry data. A 16-bit register clocked by the rising edge of E captures AD15-0 at the
// end of the address phase and holds it as the memory's address for the data phase and until
// the next rising edge. The captured address is compared with two windows: the memory window
// (default 0x4000-0x7FFF, the space freed by disabling the internal Flash) and the peripheral
// window (default 0x4000-0x4001). A hit in the peripheral window takes precedence, so the two
// chip selects are never low together. From R/W, E, LSTRB and the captured ADDR0 the block
// makes the memory-chip strobes:
//   cs_n  low while the captured address is in the device's window
//   oe_n  low while E is high, R/W is high (read) and the device is selected
//   we_n  low while E is high, R/W is low (write) and the device is selected; a memory
//         therefore latches the data on the rising edge of we_n, which is the falling edge of E
//   ub_n  low for word accesses and for single bytes at even addresses (DATA15-8)
//   lb_n  low for word accesses and for single bytes at odd addresses (DATA7-0)
// oe_n, we_n, ub_n and lb_n are shared by both devices; only the chip selects differ.
//
// Interface: e, rw, lstrb_n and ad_i come straight from the MCU pins; rst_n is the system
// reset. Outputs: addr (the de-multiplexed address), mem (strobes of the memory chip),
// periph_cs_n (select of the peripheral window; its other strobes are those of mem).
//
// Timing: addr changes only on the rising edge of E (or on reset, to 0x0000, which is outside
// both windows). The strobes are combinational in E, R/W and LSTRB, so they are valid for the
// whole E-high phase and go inactive with the falling edge of E.
//
// The two-phase use of AD15-0, the data latch on the falling edge of E, the control lines
// and the 0x4000 placement follow the MC9S12 bus; the edge-triggered address register (rather
// than a transparent latch), the window sizes, the peripheral precedence and the gating of
// oe_n/we_n with E are choices of this design.
module ebi_demux
  import ebi_pkg::*;
#(
  parameter logic [15:0] MEM_LO    = MEM_FIRST,
  parameter logic [15:0] MEM_HI    = MEM_LAST,
  parameter logic [15:0] PERIPH_LO = PERIPH_FIRST,
  parameter logic [15:0] PERIPH_HI = PERIPH_LAST
) (
  input  logic        rst_n,
  input  logic        e,
  input  logic        rw,        // 1 = read, 0 = write
  input  logic        lstrb_n,
  input  logic [15:0] ad_i,
  output logic [15:0] addr,
  output mem_ctrl_t   mem,
  output logic        periph_cs_n
);

  // Address phase ends on the rising edge of E.
  always_ff @(posedge e or negedge rst_n) begin
    if (!rst_n) addr <= '0;
    else        addr <= ad_i;
  end

  logic    periph_hit, mem_hit;
  access_t acc;

  always_comb begin
    periph_hit = (addr >= PERIPH_LO) && (addr <= PERIPH_HI);
    mem_hit    = (addr >= MEM_LO) && (addr <= MEM_HI) && !periph_hit;
    acc        = decode_access(addr[0], lstrb_n);
  end

  always_comb begin
    mem.cs_n    = !mem_hit;
    periph_cs_n = !periph_hit;
    mem.oe_n    = !(e && rw && (mem_hit || periph_hit));
    mem.we_n    = !(e && !rw && (mem_hit || periph_hit));
    mem.ub_n    = !(acc == ACC_WORD || acc == ACC_BYTE_EVEN);
    mem.lb_n    = !(acc == ACC_WORD || acc == ACC_BYTE_ODD);
  end

  // The two devices must never be selected together.
  always_comb begin
    assert (mem.cs_n || periph_cs_n) else $error("memory and peripheral selected together");
  end

endmodule
