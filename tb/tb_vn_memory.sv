// tb_vn_memory: self-checking test of the processor memory and its memory-mapped ports.
//
// Random clocked writes and combinational reads against a shadow array kept here; accesses
// to the port address must return the Input port on a read and update the Output port on a
// write, and writes elsewhere must leave the Output port alone.
module tb_vn_memory;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk = 0, rst_n;
  logic [7:0] addr, wdata, rdata, in_port, out_port;
  logic       mem_w;

  logic [7:0] shadow [256];
  bit         known  [256];
  logic [7:0] exp_out;

  int checks = 0, failures = 0, n_io_wr = 0, n_io_rd = 0;

  vn_memory dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s addr=%h rdata=%h out=%h", what, addr, rdata, out_port);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (known[i]) known[i] = 0;
    rst_n = 1; mem_w = 0; addr = 0; wdata = 0; in_port = 8'h3C;
    #1 rst_n = 0;
    #2 rst_n = 1;
    exp_out = 0;
    check(out_port == 8'h00, "output port cleared by reset");
    repeat (5000) begin
      @(negedge clk);
      addr    = 8'($urandom);
      if ($urandom_range(0, 15) == 0) addr = 8'hFE;
      wdata   = 8'($urandom);
      in_port = 8'($urandom);
      mem_w   = 1'($urandom);
      #1;
      if (addr == 8'hFE) begin
        check(rdata == in_port, "input port read");
        n_io_rd++;
      end else if (known[addr]) check(rdata == shadow[addr], "memory read");
      @(posedge clk);
      if (mem_w) begin
        shadow[addr] = wdata;
        known[addr]  = 1;
        if (addr == 8'hFE) begin
          exp_out = wdata;
          n_io_wr++;
        end
      end
      #1 check(out_port == exp_out, "output port");
    end
    check(n_io_rd > 0 && n_io_wr > 0, "port reads and writes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
