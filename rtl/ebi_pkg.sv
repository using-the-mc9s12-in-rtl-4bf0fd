// ebi_pkg: memory map and shared types of the MC9S12 expanded-mode external bus glue.
//
// The MC9S12 in expanded mode uses the 16 lines AD15-0 (normally ports A and B) for the
// address while the E clock is low and for data while E is high. The glue logic turns this
// multiplexed bus and the MCU's R/W and LSTRB lines into a separate address bus and the
// active-low strobes a memory chip needs. The constants below place the external devices in
// the part of the map that is freed when the internal Flash at 0x4000-0x7FFF is disabled:
// the memory chip fills that 16 KB window and the two peripheral bytes sit at 0x4000/0x4001.
// Where the two overlap, the peripheral wins (a design choice, see ebi_demux).
package ebi_pkg;

  // Freed 16 KB window of the MC9S12DP256 map.
  localparam logic [15:0] MEM_FIRST    = 16'h4000;
  localparam logic [15:0] MEM_LAST     = 16'h7FFF;
  // External peripheral bytes.
  localparam logic [15:0] PERIPH_FIRST = 16'h4000;
  localparam logic [15:0] PERIPH_LAST  = 16'h4001;

  // Active-low control lines of a 16-bit memory chip with byte enables.
  // ub_n selects data lines 15-8 (even byte address), lb_n lines 7-0 (odd byte address).
  typedef struct packed {
    logic cs_n;   // chip select
    logic oe_n;   // output (read) enable
    logic we_n;   // write enable
    logic ub_n;   // upper byte enable, DATA15-8
    logic lb_n;   // lower byte enable, DATA7-0
  } mem_ctrl_t;

  // Kind of access coded by LSTRB and ADDR0 on the MC9S12 bus.
  typedef enum logic [1:0] {
    ACC_WORD      = 2'b00,  // ADDR0=0, LSTRB=0: both bytes of an aligned word
    ACC_BYTE_EVEN = 2'b01,  // ADDR0=0, LSTRB=1: single byte at the even address
    ACC_BYTE_ODD  = 2'b10,  // ADDR0=1, LSTRB=0: single byte at the odd address
    ACC_NONE      = 2'b11   // ADDR0=1, LSTRB=1: misaligned word, not used in normal expanded mode
  } access_t;

  function automatic access_t decode_access(input logic addr0, input logic lstrb_n);
    return access_t'({addr0, lstrb_n});
  endfunction

endpackage
