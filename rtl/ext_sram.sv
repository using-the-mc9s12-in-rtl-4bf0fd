// ext_sram: 16-bit wide static memory chip with active-low chip select, output enable,
// write enable and upper/lower byte enables, as attached to the de-multiplexed MC9S12 bus.
//
// How it works. The memory is an array of 2**AW words of 16 bits. It receives the full
// 16-bit byte address; the word is picked by addr[AW:1], and addr[0] plays no part because the
// byte lanes are chosen by ub_n (DATA15-8) and lb_n (DATA7-0). Writing is edge-triggered on
// the rising edge of we_n, the end of the write pulse, as in an asynchronous SRAM: every
// enabled lane of the addressed word takes the value on dq_i if cs_n is low at that edge.
// Reading is combinational: dq_o always shows the addressed word and dq_oe[1]/dq_oe[0] say
// which lanes the chip drives (cs_n and oe_n low, we_n high, lane enabled).
//
// Interface: addr, dq_i (data from the bus), dq_o/dq_oe (data to the bus, per-lane drive
// enables in place of tri-state pins), cs_n, oe_n, we_n, ub_n, lb_n.
//
// Timing: write at the rising edge of we_n; read data valid as soon as the address and
// strobes are. The control pins are those of the memory chip drawn at the bus; its size is
// this design's choice: by default 8K words, exactly the 16 KB window 0x4000-0x7FFF.
// The array is not reset, like a real SRAM.
module ext_sram #(
  parameter int unsigned AW = 13   // word address bits: 2**AW 16-bit words
) (
  input  logic [15:0] addr,
  input  logic [15:0] dq_i,
  output logic [15:0] dq_o,
  output logic [1:0]  dq_oe,      // [1]: DATA15-8 driven, [0]: DATA7-0 driven
  input  logic        cs_n,
  input  logic        oe_n,
  input  logic        we_n,
  input  logic        ub_n,
  input  logic        lb_n
);

  logic [15:0] mem [2**AW];
  logic [AW-1:0] widx;

  assign widx = addr[AW:1];

  always_ff @(posedge we_n) begin
    if (!cs_n) begin
      if (!ub_n) mem[widx][15:8] <= dq_i[15:8];
      if (!lb_n) mem[widx][7:0]  <= dq_i[7:0];
    end
  end

  always_comb begin
    dq_o     = mem[widx];
    dq_oe[1] = !cs_n && !oe_n && we_n && !ub_n;
    dq_oe[0] = !cs_n && !oe_n && we_n && !lb_n;
  end

  // Address width check: the word index must fit inside the 16-bit byte address.
  initial assert (AW >= 1 && AW <= 15) else $fatal(1, "AW must be 1..15");

endmodule
