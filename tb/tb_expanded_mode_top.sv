// tb_expanded_mode_top: end-to-end test of expanded_mode_top at its default parameters.
//
// Runs both designs of the top at the same time.
//  * MC9S12 bus: a bus-functional model of the MCU (bus_write/bus_read) fills the whole 16 KB
//    external window with word writes and reads it back, runs the two example bus cycles
//    (write 0xFEDC to 0x3456, which is internal RAM and must not reach the external side;
//    read 0xBA98 back from 0x5678), exercises the peripheral bytes and then random word and
//    byte traffic, all checked against a shadow memory.
//  * Princeton computer: the test acts as its control unit and runs a four-instruction loop
//    (increment a memory cell, X-indexed add of the Input port, store to the Output port,
//    branch to the reset vector) three times, checking flags and the Output port.
// Every mechanism (word, even-byte and odd-byte reads and writes, peripheral read and
// write, unselected cycle, and the four instruction types) is counted; one that never
// happened is a failure.
module tb_expanded_mode_top;
  timeunit 1ns;
  timeprecision 1ps;
  import ebi_pkg::*;
  import vn_pkg::*;

  localparam int unsigned WORDS = 8192;
  localparam logic [15:0] PERIPH_PATTERN = 16'h5AC3;

  logic        rst_n, e, rw, lstrb_n;
  logic [15:0] ad_i, ad_o, ext_addr, periph_rdata;
  logic [1:0]  ad_oe;
  mem_ctrl_t   ext_ctrl;
  logic        periph_cs_n;
  logic        vn_clk = 0, vn_rst_n;
  ctrl_t       vn_ctrl;
  logic [7:0]  vn_inst, vn_in_port, vn_out_port;
  flags_t      vn_flags;

  logic [15:0] shadow [WORDS];
  logic [15:0] periph_reg;

  int checks = 0, failures = 0;
  int n_wr_word = 0, n_wr_even = 0, n_wr_odd = 0, n_rd_word = 0, n_rd_even = 0, n_rd_odd = 0;
  int n_periph_rd = 0, n_periph_wr = 0, n_unsel = 0;
  int n_inc = 0, n_idx = 0, n_out = 0, n_bra = 0;

  expanded_mode_top dut (.*);

  always #5 vn_clk = !vn_clk;

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
      if (failures < 20) $display("FAIL %s (bus addr=%h ad_o=%h ad_oe=%b; vn inst=%h flags=%b out=%h)",
                                  what, ext_addr, ad_o, ad_oe, vn_inst, vn_flags, vn_out_port);
    end
  endtask

  // ------------------------------------------------------------------ MC9S12 bus model
  function automatic bit in_mem(input logic [15:0] a);
    return a >= 16'h4002 && a <= 16'h7FFF;
  endfunction
  function automatic bit in_periph(input logic [15:0] a);
    return a == 16'h4000 || a == 16'h4001;
  endfunction

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

  task automatic bus_read(input logic [15:0] a, input logic ls);
    int w;
    bit up, lo;
    w  = int'(a[13:1]);
    up = !a[0];
    lo = !ls;
    e = 0; rw = 1; lstrb_n = ls; ad_i = a;
    #40 e = 1;
    #5 ad_i = 16'($urandom);
    #33;
    if (in_mem(a)) begin
      check(ad_oe == {up, lo}, "memory drives the addressed lanes");
      if (up) check(ad_o[15:8] == shadow[w][15:8], "read upper byte");
      if (lo) check(ad_o[7:0] == shadow[w][7:0], "read lower byte");
      if (up && lo) n_rd_word++; else if (up) n_rd_even++; else n_rd_odd++;
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

  task automatic run_bus();
    for (int i = 1; i < int'(WORDS); i++) bus_write(16'(16'h4000 + 2 * i), 1'b0, 16'(i * 16'h6F4B));
    for (int i = 1; i < int'(WORDS); i++) bus_read(16'(16'h4000 + 2 * i), 1'b0);
    bus_write(16'h3456, 1'b0, 16'hFEDC);
    bus_write(16'h5678, 1'b0, 16'hBA98);
    bus_read(16'h5678, 1'b0);
    check(ad_o == 16'hBA98, "example read of 0x5678");
    bus_write(16'h4000, 1'b0, 16'h1234);
    bus_write(16'h4001, 1'b0, 16'h0056);
    bus_read(16'h4000, 1'b0);
    bus_read(16'h4000, 1'b1);
    bus_read(16'h4001, 1'b0);
    repeat (5000) begin
      logic [15:0] a;
      logic ls;
      a  = 16'($urandom);
      if ($urandom_range(0, 3) != 0) a[15:14] = 2'b01;
      ls = a[0] ? 1'b0 : 1'($urandom);
      if ($urandom_range(0, 1) == 0) bus_write(a, ls, 16'($urandom));
      else bus_read(a, ls);
    end
  endtask

  // ------------------------------------------------------------------ computer control
  task automatic step(input ctrl_t c);
    @(negedge vn_clk);
    vn_ctrl = c;
    @(posedge vn_clk);
    #1 vn_ctrl = '0;
  endtask

  task automatic fetch_ir();
    ctrl_t c = '0;
    c.addr_mux_sel = ASEL_PC; c.ir_load = 1; c.pc_inc = 1;
    step(c);
  endtask

  task automatic fetch_mar();
    ctrl_t c = '0;
    c.addr_mux_sel = ASEL_PC; c.mar_load = 1; c.pc_inc = 1;
    step(c);
  endtask

  task automatic run_vn();
    logic [7:0] mcell, sum;
    ctrl_t c;
    mcell = 8'hFE;
    for (int pass = 0; pass < 3; pass++) begin
      fetch_ir();
      check(vn_inst == 8'hA1, "increment opcode");
      fetch_mar();
      c = '0; c.addr_mux_sel = ASEL_MAR; c.alu_ctrl = ALU_PASS_M; c.a_load = 1; step(c);
      c = '0; c.data_mux_sel = DSEL_A; c.alu_ctrl = ALU_INC; c.a_load = 1;
      c.z_load = 1; c.c_load = 1; c.v_load = 1; c.n_load = 1; step(c);
      c = '0; c.addr_mux_sel = ASEL_MAR; c.data_mux_sel = DSEL_A; c.mem_w = 1; step(c);
      mcell = mcell + 1;
      check(vn_flags.z == (mcell == 0) && vn_flags.c == (mcell == 0), "Z and C after increment");
      check(vn_flags.n == mcell[7], "N after increment");
      n_inc++;
      fetch_ir();
      check(vn_inst == 8'hD4, "indexed-add opcode");
      fetch_mar();
      c = '0; c.addr_mux_sel = ASEL_MAR; c.alu_ctrl = ALU_PASS_M; c.x_load = 1; step(c);
      c = '0; c.addr_mux_sel = ASEL_X; c.data_mux_sel = DSEL_X; c.alu_ctrl = ALU_ADD;
      c.a_load = 1; c.z_load = 1; c.c_load = 1; c.v_load = 1; c.n_load = 1; step(c);
      sum = 8'h40 + mcell;
      check(vn_flags.z == (sum == 0), "Z after indexed add");
      n_idx++;
      fetch_ir();
      check(vn_inst == 8'hB2, "store opcode");
      fetch_mar();
      c = '0; c.addr_mux_sel = ASEL_MAR; c.data_mux_sel = DSEL_A; c.mem_w = 1; step(c);
      check(vn_out_port == sum, "Output port");
      n_out++;
      fetch_ir();
      check(vn_inst == 8'hC3, "branch opcode");
      c = '0; c.addr_mux_sel = ASEL_PC; c.pc_load = 1; step(c);
      n_bra++;
    end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; vn_rst_n = 1;
    e = 0; rw = 1; lstrb_n = 1; ad_i = 0; vn_ctrl = '0; vn_in_port = 8'h40;
    #1 rst_n = 0; vn_rst_n = 0;
    dut.u_vn.u_mem.ram[8'hFF] = 8'hA1; dut.u_vn.u_mem.ram[8'h00] = 8'h40;
    dut.u_vn.u_mem.ram[8'h01] = 8'hD4; dut.u_vn.u_mem.ram[8'h02] = 8'hFE;
    dut.u_vn.u_mem.ram[8'h03] = 8'hB2; dut.u_vn.u_mem.ram[8'h04] = 8'hFE;
    dut.u_vn.u_mem.ram[8'h05] = 8'hC3; dut.u_vn.u_mem.ram[8'h06] = 8'hFF;
    dut.u_vn.u_mem.ram[8'h40] = 8'hFE;
    #20 rst_n = 1; vn_rst_n = 1;
    #20;
    check(ext_ctrl.cs_n && periph_cs_n && ad_oe == 2'b00, "bus idle after reset");
    check(vn_out_port == 8'h00, "Output port cleared at reset");
    fork
      run_bus();
      run_vn();
    join
    check(n_wr_word > 0, "word write seen");
    check(n_wr_even > 0, "even byte write seen");
    check(n_wr_odd > 0, "odd byte write seen");
    check(n_rd_word > 0, "word read seen");
    check(n_rd_even > 0, "even byte read seen");
    check(n_rd_odd > 0, "odd byte read seen");
    check(n_periph_rd > 0, "peripheral read seen");
    check(n_periph_wr > 0, "peripheral write seen");
    check(n_unsel > 0, "unselected cycle seen");
    check(n_inc == 3 && n_idx == 3 && n_out == 3 && n_bra == 3, "computer loop ran three times");
    $display("bus wr word/even/odd=%0d/%0d/%0d rd word/even/odd=%0d/%0d/%0d periph rd/wr=%0d/%0d unsel=%0d",
             n_wr_word, n_wr_even, n_wr_odd, n_rd_word, n_rd_even, n_rd_odd, n_periph_rd,
             n_periph_wr, n_unsel);
    $display("computer inc/idx/out/bra=%0d/%0d/%0d/%0d", n_inc, n_idx, n_out, n_bra);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
