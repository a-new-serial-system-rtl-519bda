// tb_scc_special_decode: every N/F/A combination against the code table of
// the special commands, written out here as a list of (F, A, action).
`timescale 1ns/1ps
module tb_scc_special_decode;
  import camac_serial_pkg::*;

  logic [4:0] n, f;
  logic [3:0] a;
  logic special, read_l, set_i, clr_i, en_l, dis_l, cycle_c, cycle_z, valid;
  int checks = 0, failures = 0;

  scc_special_decode dut (.n, .f, .a, .special, .read_l, .set_i, .clr_i, .en_l, .dis_l,
                          .cycle_c, .cycle_z, .valid);

  initial begin
    for (int nn = 0; nn < 32; nn++)
      for (int ff = 0; ff < 32; ff++)
        for (int aa = 0; aa < 16; aa++) begin
          // expected: {read_l, set_i, clr_i, en_l, dis_l, cycle_c, cycle_z}
          logic [6:0] e;
          e = '0;
          if (nn == 30) begin
            if (ff == 1  && aa == 0)  e = 7'b1000000;
            if (ff == 24 && aa == 9)  e = 7'b0010000;
            if (ff == 26 && aa == 9)  e = 7'b0100000;
            if (ff == 24 && aa == 10) e = 7'b0000100;
            if (ff == 26 && aa == 10) e = 7'b0001000;
            if (ff == 26 && aa == 11) e = 7'b0000010;
            if (ff == 26 && aa == 8)  e = 7'b0010101;   // Z, I = 0, L disabled
          end
          n = 5'(nn); f = 5'(ff); a = 4'(aa);
          #1;
          checks++;
          if ({read_l, set_i, clr_i, en_l, dis_l, cycle_c, cycle_z} != e ||
              special != (nn == 30) || valid != (e != 0)) begin
            failures++;
            $display("FAIL: N%0d F%0d A%0d", nn, ff, aa);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
