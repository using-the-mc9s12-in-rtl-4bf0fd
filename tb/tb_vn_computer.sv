// tb_vn_computer: runs a short program on the Princeton computer (datapath plus memory).
//
// The test acts as the control unit: it fetches an opcode into IR, reads IR back through
// inst and runs a fixed sequence of register transfers for each opcode of a tiny test
// instruction set (defined only here, to give the datapath something to do):
//   A1 a : [a] <- [a] + 1, also left in A  (the "increment a memory location" example)
//   D4 a : X <- [a]; A <- X + [X]           (X-indexed operand)
//   B2 a : [a] <- A                          (with a = 0xFE this writes the Output port)
//   C3 a : PC <- a                           (branch)
// The program starts at the reset vector 0xFF and loops three times:
//   FF: A1 40   01: D4 FE   03: B2 FE   05: C3 FF      with [40] = 7F and Input = 40.
// Each pass, the expected Output value and flags are computed here and compared.
module tb_vn_computer;
  timeunit 1ns;
  timeprecision 1ps;
  import vn_pkg::*;

  logic       clk = 0, rst_n;
  ctrl_t      ctrl;
  logic [7:0] inst, in_port, out_port;
  flags_t     flags;

  int checks = 0, failures = 0;
  int n_inc = 0, n_idx = 0, n_out = 0, n_bra = 0;
  int cycles = 0;

  vn_computer dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s inst=%h flags=%b out=%h", what, inst, flags, out_port);
    end
  endtask

  // Apply one set of control lines for one clock.
  task automatic step(input ctrl_t c);
    @(negedge clk);
    ctrl = c;
    @(posedge clk);
    #1 ctrl = '0;
    cycles++;
  endtask

  function automatic ctrl_t idle();
    return '0;
  endfunction

  task automatic fetch();                // IR <- [PC], PC++
    ctrl_t c = idle();
    c.addr_mux_sel = ASEL_PC; c.ir_load = 1; c.pc_inc = 1;
    step(c);
  endtask

  task automatic fetch_addr();           // MAR <- [PC], PC++
    ctrl_t c = idle();
    c.addr_mux_sel = ASEL_PC; c.mar_load = 1; c.pc_inc = 1;
    step(c);
  endtask

  task automatic all_flags(inout ctrl_t c);
    c.z_load = 1; c.c_load = 1; c.v_load = 1; c.n_load = 1;
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] mcell, a_exp, sum;
    ctrl_t c;
    ctrl = '0; in_port = 8'h40;
    rst_n = 1;
    #1 rst_n = 0;
    // Program and data, placed directly in the memory array.
    dut.u_mem.ram[8'hFF] = 8'hA1; dut.u_mem.ram[8'h00] = 8'h40;
    dut.u_mem.ram[8'h01] = 8'hD4; dut.u_mem.ram[8'h02] = 8'hFE;
    dut.u_mem.ram[8'h03] = 8'hB2; dut.u_mem.ram[8'h04] = 8'hFE;
    dut.u_mem.ram[8'h05] = 8'hC3; dut.u_mem.ram[8'h06] = 8'hFF;
    dut.u_mem.ram[8'h40] = 8'h7F;
    #2 rst_n = 1;
    mcell = 8'h7F;
    a_exp = 0;
    check(out_port == 8'h00, "output port cleared at reset");

    for (int pass = 0; pass < 3; pass++) begin
      // ---- A1: increment memory
      fetch();
      check(inst == 8'hA1, "opcode A1 fetched from the reset vector");
      fetch_addr();
      c = idle(); c.addr_mux_sel = ASEL_MAR; c.alu_ctrl = ALU_PASS_M; c.a_load = 1; step(c);
      c = idle(); c.data_mux_sel = DSEL_A; c.alu_ctrl = ALU_INC; c.a_load = 1; all_flags(c); step(c);
      c = idle(); c.addr_mux_sel = ASEL_MAR; c.data_mux_sel = DSEL_A; c.mem_w = 1; step(c);
      mcell = mcell + 1;
      a_exp = mcell;
      check(flags.z == (mcell == 0), "Z after increment");
      check(flags.n == mcell[7], "N after increment");
      check(flags.v == (mcell == 8'h80), "V after increment");
      check(flags.c == (mcell == 8'h00), "C after increment");
      n_inc++;
      // ---- D4: X <- [a]; A <- X + [X]
      fetch();
      check(inst == 8'hD4, "opcode D4");
      fetch_addr();
      c = idle(); c.addr_mux_sel = ASEL_MAR; c.alu_ctrl = ALU_PASS_M; c.x_load = 1; step(c);
      c = idle(); c.addr_mux_sel = ASEL_X; c.data_mux_sel = DSEL_X; c.alu_ctrl = ALU_ADD;
      c.a_load = 1; all_flags(c); step(c);
      sum = 8'h40 + mcell;
      a_exp = sum;
      check(flags.z == (sum == 0), "Z after indexed add");
      check(flags.n == sum[7], "N after indexed add");
      check(flags.c == ((9'h40 + 9'(mcell)) > 9'hFF), "C after indexed add");
      n_idx++;
      // ---- B2: store A to the Output port
      fetch();
      check(inst == 8'hB2, "opcode B2");
      fetch_addr();
      c = idle(); c.addr_mux_sel = ASEL_MAR; c.data_mux_sel = DSEL_A; c.mem_w = 1; step(c);
      check(out_port == a_exp, "Output port shows X + [X]");
      n_out++;
      // ---- C3: branch to the reset vector
      fetch();
      check(inst == 8'hC3, "opcode C3");
      c = idle(); c.addr_mux_sel = ASEL_PC; c.pc_load = 1; step(c);
      n_bra++;
    end
    check(dut.u_mem.ram[8'h40] == 8'h82, "memory cell incremented three times");
    check(n_inc == 3 && n_idx == 3 && n_out == 3 && n_bra == 3, "all opcodes executed");
    $display("cycles=%0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
