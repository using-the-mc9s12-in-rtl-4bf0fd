// tb_vn_datapath: self-checking test of the processor datapath.
//
// The test plays both the control unit and the memory. Each clock it applies a random
// set of control lines and serves memory reads from an array kept here. A register-level
// reference model, written independently below, predicts X, A, PC, MAR, IR and the flags;
// every cycle the memory address, the write data, inst and the flags are compared with it.
// A directed prologue checks the reset vector and one fetch. Each control line is counted
// and one that was never exercised is a failure.
module tb_vn_datapath;
  timeunit 1ns;
  timeprecision 1ps;
  import vn_pkg::*;

  logic       clk = 0, rst_n;
  ctrl_t      ctrl;
  logic [7:0] mem_rdata, mem_addr, mem_wdata, inst;
  flags_t     flags;

  logic [7:0] mem [256];
  // reference state
  logic [7:0] rx, ra, rpc, rmar, rir;
  flags_t     rf;

  int checks = 0, failures = 0;
  int n_use [8];

  vn_datapath dut (.*);

  always #5 clk = !clk;
  assign mem_rdata = mem[mem_addr];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s ctrl=%h addr=%h wdata=%h inst=%h flags=%b", what,
                                  ctrl, mem_addr, mem_wdata, inst, flags);
    end
  endtask

  // Reference ALU, independent of vn_alu.
  function automatic void ref_alu(input logic [2:0] op, input logic [7:0] d, input logic [7:0] m,
                                  output logic [7:0] y, output flags_t f);
    int r, sd, sm, sr;
    sd = $signed(d); sm = $signed(m);
    f = '0;
    case (op)
      3'd0: y = m;
      3'd1: y = d;
      3'd2: begin r = d + m; y = 8'(r); f.c = r[8]; sr = sd + sm; f.v = sr > 127 || sr < -128; end
      3'd3: begin r = d - m; y = 8'(r); f.c = d < m; sr = sd - sm; f.v = sr > 127 || sr < -128; end
      3'd4: y = d & m;
      3'd5: y = d | m;
      3'd6: y = d ^ m;
      default: begin r = d + 1; y = 8'(r); f.c = r[8]; f.v = (d == 8'h7F); end
    endcase
    f.z = (y == 0);
    f.n = y[7];
  endfunction

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d, m, ea, y;
    flags_t     f;
    foreach (mem[i]) mem[i] = 8'($urandom);
    foreach (n_use[i]) n_use[i] = 0;
    ctrl = '0;
    rst_n = 1;
    #1 rst_n = 0;
    #2 rst_n = 1;
    rx = 0; ra = 0; rpc = 8'hFF; rmar = 0; rir = 0; rf = '0;
    check(mem_addr == 8'hFF, "PC starts at the reset vector 0xFF");
    repeat (20000) begin
      @(negedge clk);
      ctrl = ctrl_t'($urandom);
      // Sparse loads keep the registers around for a while.
      if ($urandom_range(0, 1) == 0) {ctrl.x_load, ctrl.a_load, ctrl.mar_load} = '0;
      #1;
      d  = ctrl.data_mux_sel ? rx : ra;
      ea = (ctrl.addr_mux_sel == 2'd1) ? rmar : (ctrl.addr_mux_sel == 2'd2) ? rx : rpc;
      m  = mem[ea];
      ref_alu(ctrl.alu_ctrl, d, m, y, f);
      check(mem_addr == ea, "memory address (Addr_Mux)");
      check(mem_wdata == d, "write data (Data_Mux)");
      check(inst == rir, "instruction register");
      check(flags == rf, "flags");
      @(posedge clk);
      #1;
      if (ctrl.mem_w) mem[ea] = d;   // the test's memory, written just after the clock edge
      if (ctrl.x_load) begin rx = y; n_use[0]++; end
      if (ctrl.a_load) begin ra = y; n_use[1]++; end
      if (ctrl.pc_load) begin rpc = m; n_use[2]++; end
      else if (ctrl.pc_inc) begin rpc = rpc + 1; n_use[3]++; end
      if (ctrl.mar_load) begin rmar = m; n_use[4]++; end
      if (ctrl.ir_load) begin rir = m; n_use[5]++; end
      if (ctrl.z_load) rf.z = f.z;
      if (ctrl.c_load) rf.c = f.c;
      if (ctrl.v_load) rf.v = f.v;
      if (ctrl.n_load) rf.n = f.n;
      if (ctrl.c_load && f.c) n_use[6]++;
      if (ctrl.v_load && f.v) n_use[7]++;
    end
    foreach (n_use[i]) check(n_use[i] > 0, "every register transfer exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
