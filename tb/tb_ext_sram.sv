// tb_ext_sram: self-checking test of the 16-bit byte-lane static memory.
//
// Uses a small array (AW=6, 64 words) so that random traffic revisits words often. Each step
// is either a write pulse (we_n low then high, with random chip select and byte enables) or a
// read (oe_n low). A shadow copy kept here predicts every read word and the per-lane drive
// enables; the byte lanes written by single-byte writes must leave the other lane untouched.
module tb_ext_sram;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int unsigned AW = 6;

  logic [15:0] addr, dq_i, dq_o;
  logic [1:0]  dq_oe;
  logic        cs_n, oe_n, we_n, ub_n, lb_n;

  logic [15:0] shadow [2**AW];
  bit          known  [2**AW];

  int checks = 0, failures = 0;
  int n_word_wr = 0, n_byte_wr = 0, n_reads = 0;

  ext_sram #(.AW(AW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s addr=%h dq_o=%h oe=%b", what, addr, dq_o, dq_oe);
    end
  endtask

  task automatic write(input logic [15:0] a, input logic [15:0] d, input logic cs,
                       input logic ub, input logic lb);
    int w;
    w = int'(a[AW:1]);
    addr = a; dq_i = d; cs_n = cs; ub_n = ub; lb_n = lb; oe_n = 1;
    #2 we_n = 0;
    #4 we_n = 1;                       // data taken on this rising edge
    #1 dq_i = 16'($urandom);
    if (!cs) begin
      if (!ub) shadow[w][15:8] = d[15:8];
      if (!lb) shadow[w][7:0]  = d[7:0];
      if (!ub && !lb) known[w] = 1;
      if (!ub && !lb) n_word_wr++; else if (!ub || !lb) n_byte_wr++;
    end
    #2;
  endtask

  task automatic read(input logic [15:0] a, input logic ub, input logic lb);
    int w;
    w = int'(a[AW:1]);
    addr = a; cs_n = 0; ub_n = ub; lb_n = lb; we_n = 1; oe_n = 0;
    #3;
    check(dq_oe == {!ub, !lb}, "lane drive enables");
    if (known[w]) begin
      check(dq_o == shadow[w], "read data");
      n_reads++;
    end
    oe_n = 1;
    #1;
    check(dq_oe == 2'b00, "no drive without oe_n");
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cs_n = 1; oe_n = 1; we_n = 1; ub_n = 1; lb_n = 1; addr = 0; dq_i = 0;
    foreach (known[i]) known[i] = 0;
    // Fill every word once, then random traffic.
    for (int i = 0; i < 2**AW; i++) write(16'(i * 2), 16'($urandom), 1'b0, 1'b0, 1'b0);
    // Deselected chip must not be written.
    write(16'h0000, 16'h5A5A ^ shadow[0], 1'b1, 1'b0, 1'b0);
    read(16'h0000, 1'b0, 1'b0);
    repeat (3000) begin
      logic [15:0] a;
      a = 16'($urandom);
      if ($urandom_range(0, 2) == 0) read(a, 1'($urandom), 1'($urandom));
      else write(a, 16'($urandom), 1'($urandom_range(0, 7) == 0), 1'($urandom), 1'($urandom));
    end
    // Deselected chip drives nothing.
    addr = 0; cs_n = 1; oe_n = 0; ub_n = 0; lb_n = 0; #2;
    check(dq_oe == 2'b00, "no drive while deselected");
    check(n_word_wr > 0 && n_byte_wr > 0 && n_reads > 0, "word and byte writes and reads seen");
    $display("word writes=%0d byte writes=%0d reads=%0d", n_word_wr, n_byte_wr, n_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
