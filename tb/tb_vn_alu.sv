// tb_vn_alu: exhaustive self-checking test of the processor ALU.
//
// Applies every function to every pair of 8-bit operands and compares the result and the
// Z, C, V, N flags with values computed here with integer arithmetic.
module tb_vn_alu;
  timeunit 1ns;
  timeprecision 1ps;
  import vn_pkg::*;

  alu_op_t     op;
  logic [7:0]  d, m, y;
  flags_t      f;

  int checks = 0, failures = 0;

  vn_alu dut (.*);

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 8; o++) begin
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          int  sd, sm, r, ey;
          bit  ec, ev;
          op = alu_op_t'(o); d = 8'(i); m = 8'(j);
          #1;
          sd = (i > 127) ? i - 256 : i;
          sm = (j > 127) ? j - 256 : j;
          ec = 0; ev = 0;
          case (o)
            0: ey = j;
            1: ey = i;
            2: begin r = i + j; ey = r % 256; ec = (r > 255); ev = (sd + sm > 127) || (sd + sm < -128); end
            3: begin r = i - j; ey = (r + 256) % 256; ec = (r < 0); ev = (sd - sm > 127) || (sd - sm < -128); end
            4: ey = i & j;
            5: ey = i | j;
            6: ey = i ^ j;
            default: begin r = i + 1; ey = r % 256; ec = (r > 255); ev = (sd + 1 > 127); end
          endcase
          checks++;
          if (y != 8'(ey) || f.z != (ey == 0) || f.n != (ey > 127) || f.c != ec || f.v != ev) begin
            failures++;
            if (failures < 10)
              $display("FAIL op=%0d d=%h m=%h y=%h f=%b expected y=%h c=%b v=%b", o, d, m, y, f,
                       8'(ey), ec, ev);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
