// tb_sbd_scan_unit: walks whole scans, applying next_cw over and over from a
// start address, and compares the sequence of addresses with the one the
// mode table describes, produced here by nested loops. Checks that the LAM
// request comes exactly after the last address, and the LQ / LX conditions.
`timescale 1ns/1ps
module tb_sbd_scan_unit;
  import camac_serial_pkg::*;

  ctrl_word_t cw, next_cw;
  logic q = 1, x = 1, scan_end, lam_req;
  int checks = 0, failures = 0;

  sbd_scan_unit dut (.cw, .q, .x, .next_cw, .scan_end, .lam_req);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // walk one scan: expected addresses from nested loops
  task automatic walk(input logic [4:0] mode, input int c0, input int n0, input int a0);
    int cs, ns, as_, ce, ne, ae, steps, bad;
    cw = '0;
    cw.mode = scan_mode_t'(mode);
    cw.f = 5'd2; cw.d = 1'b1;
    cw.c = 4'(c0); cw.n = 5'(n0); cw.a = 4'(a0);
    ce = mode[2] ? 15 : c0;
    ne = mode[1] ? 23 : n0;
    ae = mode[0] ? 15 : a0;
    steps = 0;
    bad = 0;
    for (int c = c0; c <= ce; c++)
      for (int n = ((c == c0 || !mode[1]) ? n0 : 1); n <= ne; n++)
        for (int aa = (((c == c0 && n == n0) || !mode[0]) ? a0 : 0); aa <= ae; aa++) begin
          #1;
          if (cw.c != 4'(c) || cw.n != 5'(n) || cw.a != 4'(aa) || cw.f != 5'd2 || !cw.d) bad++;
          if (scan_end != (c == ce && n == ne && aa == ae)) bad++;
          if (lam_req != scan_end) bad++;
          if (!scan_end) cw = next_cw;
          steps++;
        end
    check(bad == 0, $sformatf("mode %0d from C%0d N%0d A%0d: %0d steps, %0d mismatches",
                              mode, c0, n0, a0, steps, bad));
    #1;
    check(next_cw == cw, $sformatf("address held at the end of a scan %h %h", next_cw, cw));
  endtask

  initial begin
    walk(5'd1, 3, 5, 0);        // scan A
    walk(5'd2, 3, 1, 7);        // scan N
    walk(5'd4, 0, 9, 2);        // scan C
    walk(5'd7, 13, 1, 0);       // scan A, N, C
    walk(5'd15, 14, 20, 4);     // mode 15: all modules of all crates, LAM on no Q
    walk(5'd3, 2, 22, 14);
    walk(5'd5, 12, 4, 13);
    walk(5'd6, 10, 17, 3);
    // no scan bits: nothing changes, no LAM
    cw = ctrl_word_t'(24'h0_5_3_2_1);
    cw.mode = '0;
    #1;
    check(next_cw == cw && !scan_end && !lam_req, "mode 0 leaves the address alone");
    // LAM on no Q / no X
    cw.mode = scan_mode_t'(5'b01000);
    q = 0; x = 1; #1; check(lam_req, "LQ: LAM on no Q");
    q = 1; x = 0; #1; check(!lam_req, "LQ: no LAM on no X");
    cw.mode = scan_mode_t'(5'b10000);
    #1; check(lam_req, "LX: LAM on no X");
    q = 0; x = 1; #1; check(!lam_req, "LX: no LAM on no Q");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
