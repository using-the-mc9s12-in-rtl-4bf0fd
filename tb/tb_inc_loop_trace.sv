// tb_inc_loop_trace: replays the bus trace of the MC9S12 program
//     2000: inc $0400   (72 04 00)
//     2003: bra loop    (20 FB)
// on the external memory system, cycle by cycle as a simplified byte-wide trace:
//     addr  2000 2001 2002 0400 FFFF 0400 2003 2004 FFFF 2000
//     data    72   04   00   A3   00   A4   20   FB   00   72
//     R/W      1    1    1    1    1    0    1    1    1    1
// (0xFFFF marks the free cycles in which the CPU works internally.) Program and data live in
// the MCU's internal RAM and EEPROM, so the external memory and peripheral must stay
// deselected and must never drive the bus during any of these cycles. The loop is replayed
// several times, then one write and one read inside the external window confirm that the
// same bus model does reach the external memory.
module tb_inc_loop_trace;
  timeunit 1ns;
  timeprecision 1ps;
  import ebi_pkg::*;

  localparam int N = 10;
  localparam logic [15:0] TR_ADDR [N] = '{16'h2000, 16'h2001, 16'h2002, 16'h0400, 16'hFFFF,
                                          16'h0400, 16'h2003, 16'h2004, 16'hFFFF, 16'h2000};
  localparam logic [7:0]  TR_DATA [N] = '{8'h72, 8'h04, 8'h00, 8'hA3, 8'h00,
                                          8'hA4, 8'h20, 8'hFB, 8'h00, 8'h72};
  localparam bit          TR_RW   [N] = '{1, 1, 1, 1, 1, 0, 1, 1, 1, 1};

  logic        rst_n, e, rw, lstrb_n;
  logic [15:0] ad_i, ad_o, ext_addr;
  logic [1:0]  ad_oe;
  mem_ctrl_t   ext_ctrl;
  logic        periph_cs_n;
  logic [15:0] periph_rdata = 16'h0000;

  int checks = 0, failures = 0, n_internal = 0;

  mc9s12_ext_mem dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: addr=%h ctrl=%b pcs=%b ad_oe=%b", what, ext_addr, ext_ctrl,
               periph_cs_n, ad_oe);
    end
  endtask

  // One byte cycle; the byte sits on the lane of its address (even: DATA15-8).
  task automatic cycle(input logic [15:0] a, input logic r, input logic [7:0] d,
                       output logic [7:0] q);
    e = 0; rw = r; lstrb_n = !a[0]; ad_i = a;
    #40 e = 1;
    #5 if (!r) ad_i = a[0] ? {8'h00, d} : {d, 8'h00};
    #33 q = a[0] ? ad_o[7:0] : ad_o[15:8];
    #2 e = 0;
    #2;
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] q;
    rst_n = 1; e = 0; rw = 1; lstrb_n = 1; ad_i = 0;
    #1 rst_n = 0;
    #10 rst_n = 1;
    repeat (4) begin
      for (int i = 0; i < N; i++) begin
        fork
          cycle(TR_ADDR[i], TR_RW[i], TR_DATA[i], q);
          begin
            #60;    // middle of the data phase
            check(ext_ctrl.cs_n && periph_cs_n, "no external device selected");
            check(ad_oe == 2'b00, "external side does not drive the bus");
            check(ext_addr == TR_ADDR[i], "address captured from the trace");
          end
        join
        n_internal++;
      end
    end
    // The same bus model reaches the external window.
    cycle(16'h4400, 1'b0, 8'hA4, q);
    cycle(16'h4400, 1'b1, 8'h00, q);
    check(q == 8'hA4, "byte written to the external window reads back");
    check(n_internal == 4 * N, "whole trace replayed four times");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
