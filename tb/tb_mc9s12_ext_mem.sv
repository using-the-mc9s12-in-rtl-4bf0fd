// tb_mc9s12_ext_mem: end-to-end test of the external memory system at its default size.
//
// A bus-functional model of the MC9S12 expanded-mode bus (tasks bus_write/bus_read below)
// runs cycles of one E period each: address, R/W and LSTRB are driven while E is low; when E
// is high the MCU drives data on a write, or the test samples AD15-0 just before the falling
// edge of E on a read, as the MCU does. A peripheral model returns a fixed pattern at
// 0x4000/0x4001 and records what is written there.
//
// The test fills the whole 16 KB window with word writes, reads it all back, runs the two
// example cycles of the MC9S12 bus (write 0xFEDC to 0x3456, read 0xBA98 from 0x5678; the
// first one lands in internal RAM and must not reach the external side), then mixes random
// word and byte accesses. A shadow memory kept here predicts every read. Each kind of cycle
// (word / even byte / odd byte, read and write, peripheral, unselected) is counted, and one
// that never happened is a failure.
module tb_mc9s12_ext_mem;
  timeunit 1ns;
  timeprecision 1ps;
  import ebi_pkg::*;

  localparam int unsigned WORDS = 8192;   // the window 0x4000-0x7FFF
  localparam logic [15:0] PERIPH_PATTERN = 16'hC35A;

  logic        rst_n, e, rw, lstrb_n;
  logic [15:0] ad_i, ad_o, ext_addr, periph_rdata;
  logic [1:0]  ad_oe;
  mem_ctrl_t   ext_ctrl;
  logic        periph_cs_n;

  logic [15:0] shadow [WORDS];
  logic [15:0] periph_reg;

  int checks = 0, failures = 0;
  int n_wr_word = 0, n_wr_even = 0, n_wr_odd = 0;
  int n_rd_word = 0, n_rd_even = 0, n_rd_odd = 0;
  int n_periph_rd = 0, n_periph_wr = 0, n_unsel = 0;
  longint cycles = 0;

  mc9s12_ext_mem dut (.*);

  // Peripheral model: two byte registers, written on the rising edge of we_n.
  assign periph_rdata = PERIPH_PATTERN;
  always @(posedge ext_ctrl.we_n) begin
    if (!periph_cs_n) begin
      if (!ext_ctrl.ub_n) periph_reg[15:8] <= ad_i[15:8];
      if (!ext_ctrl.lb_n) periph_reg[7:0]  <= ad_i[7:0];
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: addr=%h rw=%b lstrb_n=%b ad_o=%h ad_oe=%b", what, ext_addr, rw,
               lstrb_n, ad_o, ad_oe);
    end
  endtask

  function automatic bit in_mem(input logic [15:0] a);
    return a >= 16'h4002 && a <= 16'h7FFF;
  endfunction
  function automatic bit in_periph(input logic [15:0] a);
    return a == 16'h4000 || a == 16'h4001;
  endfunction

  // One write cycle. ls = LSTRB level. Word write when a is even and ls = 0.
  task automatic bus_write(input logic [15:0] a, input logic ls, input logic [15:0] d);
    int w;
    bit up, lo;
    w  = int'(a[13:1]);
    up = !a[0];
    lo = !ls;
    e = 0; rw = 0; lstrb_n = ls; ad_i = a;
    #40 e = 1;
    #5 ad_i = d;
    #35;
    check(ad_oe == 2'b00, "bus not driven during a write");
    e = 0;
    #2 ad_i = 16'($urandom);
    cycles++;
    if (a[0] && ls) return;
    if (in_mem(a)) begin
      if (up) shadow[w][15:8] = d[15:8];
      if (lo) shadow[w][7:0]  = d[7:0];
      if (up && lo) n_wr_word++; else if (up) n_wr_even++; else n_wr_odd++;
    end else if (in_periph(a)) begin
      check(!up || periph_reg[15:8] == d[15:8], "peripheral upper byte written");
      check(!lo || periph_reg[7:0] == d[7:0], "peripheral lower byte written");
      n_periph_wr++;
    end else n_unsel++;
  endtask

  // One read cycle; compares the lanes the MCU uses with the expected data.
  task automatic bus_read(input logic [15:0] a, input logic ls);
    int w;
    bit up, lo;
    logic [15:0] exp;
    w  = int'(a[13:1]);
    up = !a[0];
    lo = !ls;
    if (a[0] && ls) begin up = 0; lo = 0; end
    e = 0; rw = 1; lstrb_n = ls; ad_i = a;
    #40 e = 1;
    #5 ad_i = 16'($urandom);   // the MCU no longer drives the lines; value is ignored
    #33;                        // just before the falling edge: MCU samples here
    cycles++;
    if (in_mem(a)) begin
      exp = shadow[w];
      check(ad_oe == {up, lo}, "memory drives the addressed lanes");
      if (up) check(ad_o[15:8] == exp[15:8], "read upper byte");
      if (lo) check(ad_o[7:0] == exp[7:0], "read lower byte");
      if (up && lo) n_rd_word++; else if (up) n_rd_even++; else if (lo) n_rd_odd++;
    end else if (in_periph(a)) begin
      check(ad_oe == {up, lo}, "peripheral drives the addressed lanes");
      if (up) check(ad_o[15:8] == PERIPH_PATTERN[15:8], "peripheral upper byte");
      if (lo) check(ad_o[7:0] == PERIPH_PATTERN[7:0], "peripheral lower byte");
      n_periph_rd++;
    end else begin
      check(ad_oe == 2'b00, "nothing drives outside the windows");
      n_unsel++;
    end
    #2 e = 0;
    #2;
    check(ad_oe == 2'b00, "bus released after E fall");
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; e = 0; rw = 1; lstrb_n = 1; ad_i = 0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    #20;
    check(ext_ctrl.cs_n && periph_cs_n && ad_oe == 2'b00, "idle after reset");

    // Fill and read back the whole window (word accesses, peripheral words skipped).
    for (int i = 1; i < int'(WORDS); i++) bus_write(16'(16'h4000 + 2 * i), 1'b0, 16'(i * 16'h9E37));
    for (int i = 1; i < int'(WORDS); i++) bus_read(16'(16'h4000 + 2 * i), 1'b0);

    // The two example cycles of the MC9S12 bus.
    bus_write(16'h3456, 1'b0, 16'hFEDC);   // internal RAM: external side stays quiet
    bus_write(16'h5678, 1'b0, 16'hBA98);
    bus_read(16'h5678, 1'b0);
    check(ad_o == 16'hBA98, "example read of 0x5678");

    // Peripheral bytes.
    bus_write(16'h4000, 1'b0, 16'h1234);
    bus_write(16'h4001, 1'b0, 16'h00AB);
    bus_read(16'h4000, 1'b0);
    bus_read(16'h4000, 1'b1);
    bus_read(16'h4001, 1'b0);

    // Random mix.
    repeat (20000) begin
      logic [15:0] a;
      logic ls;
      a  = 16'($urandom);
      if ($urandom_range(0, 3) != 0) a[15:14] = 2'b01;
      ls = 1'($urandom);
      if (a[0]) ls = 1'b0;                 // odd address: single byte
      if ($urandom_range(0, 1) == 0) bus_write(a, ls, 16'($urandom));
      else bus_read(a, ls);
    end

    check(n_wr_word > 0, "word write seen");
    check(n_wr_even > 0, "even byte write seen");
    check(n_wr_odd > 0, "odd byte write seen");
    check(n_rd_word > 0, "word read seen");
    check(n_rd_even > 0, "even byte read seen");
    check(n_rd_odd > 0, "odd byte read seen");
    check(n_periph_rd > 0, "peripheral read seen");
    check(n_periph_wr > 0, "peripheral write seen");
    check(n_unsel > 0, "unselected cycle seen");
    $display("cycles=%0d wr word/even/odd=%0d/%0d/%0d rd word/even/odd=%0d/%0d/%0d",
             cycles, n_wr_word, n_wr_even, n_wr_odd, n_rd_word, n_rd_even, n_rd_odd);
    $display("peripheral rd/wr=%0d/%0d unselected=%0d", n_periph_rd, n_periph_wr, n_unsel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
