// tb_ebi_demux: self-checking test of the address de-multiplexer and strobe generator.
//
// Drives MC9S12-style bus cycles (address on AD15-0 while E is low, data while E is high)
// with random addresses, directions and LSTRB values, plus directed addresses at the window
// edges. After the rising edge of E it checks the captured address; in the E-high phase it
// checks every strobe against a reference computed here from the memory map; in the
// following E-low phase it checks that oe_n and we_n are inactive and that the address is
// held although AD15-0 now carries something else.
module tb_ebi_demux;
  timeunit 1ns;
  timeprecision 1ps;
  import ebi_pkg::*;

  logic        rst_n, e, rw, lstrb_n;
  logic [15:0] ad_i, addr;
  mem_ctrl_t   mem;
  logic        periph_cs_n;

  int checks = 0, failures = 0;
  int n_mem = 0, n_periph = 0, n_none = 0;

  ebi_demux dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (addr=%h rw=%b lstrb_n=%b ctrl=%b pcs=%b)", what, addr, rw, lstrb_n,
               mem, periph_cs_n);
    end
  endtask

  task automatic cycle(input logic [15:0] a, input logic r, input logic ls);
    bit in_p, in_m, up, lo;
    in_p = (a >= 16'h4000) && (a <= 16'h4001);
    in_m = (a >= 16'h4000) && (a <= 16'h7FFF) && !in_p;
    up   = (a[0] == 1'b0);              // even byte or word: upper lane
    lo   = (a[0] == 1'b1) || !ls;       // odd byte or word: lower lane
    if (a[0] && ls) begin up = 0; lo = 0; end
    if (a[0] == 1'b0 && ls) lo = 0;
    // address phase
    e = 0; ad_i = a; rw = r; lstrb_n = ls;
    #10;
    check(mem.oe_n && mem.we_n, "strobes idle while E low");
    e = 1;
    #2 ad_i = 16'($urandom);                 // data phase: lines now carry data
    #3;
    check(addr == a, "captured address");
    check(mem.cs_n == !in_m, "memory chip select");
    check(periph_cs_n == !in_p, "peripheral select");
    check(mem.oe_n == !((in_m || in_p) && r), "output enable");
    check(mem.we_n == !((in_m || in_p) && !r), "write enable");
    check(mem.ub_n == !up, "upper byte enable");
    check(mem.lb_n == !lo, "lower byte enable");
    if (in_m) n_mem++; else if (in_p) n_periph++; else n_none++;
    #5 e = 0;
    #1;
    check(mem.oe_n && mem.we_n, "strobes released at E fall");
    check(addr == a, "address held after E fall");
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Addresses at the edges of the two windows.
  localparam logic [15:0] EDGES [8] = '{16'h3FFF, 16'h4000, 16'h4001, 16'h4002, 16'h7FFE,
                                        16'h7FFF, 16'h8000, 16'h0000};

  initial begin
    rst_n = 1; e = 0; rw = 1; lstrb_n = 1; ad_i = 16'h1234;
    #1 rst_n = 0;
    #5;
    check(addr == 16'h0000, "reset address");
    check(mem.cs_n && periph_cs_n, "nothing selected after reset");
    rst_n = 1;
    #5;
    foreach (EDGES[i]) begin
      cycle(EDGES[i], 1'b1, 1'b0);
      cycle(EDGES[i], 1'b0, 1'b1);
    end
    repeat (400) begin
      logic [15:0] a;
      a = 16'($urandom);
      if ($urandom_range(0, 1) != 0) a[15:14] = 2'b01;   // bias towards the memory window
      cycle(a, 1'($urandom), 1'($urandom));
    end
    check(n_mem > 0 && n_periph > 0 && n_none > 0, "all decode outcomes seen");
    $display("memory=%0d peripheral=%0d unselected=%0d", n_mem, n_periph, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
