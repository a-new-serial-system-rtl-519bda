// tb_camac_cycle_gen: runs read, write, control, broadcast, C and Z cycles
// and checks every clock of them against the intended dataway timing:
// B for 40 clocks (1 us), S1 on clocks 8..15, S2 on clocks 24..31, C/Z on
// clocks 4..35, N one-hot (all lines for N28, none for C/Z), W only for
// writes, `done` on the last clock, and R/Q/X latched from the crate model.
`timescale 1ns/1ps
module tb_camac_cycle_gen;
  import camac_serial_pkg::*;

  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic        start = 0, do_c = 0, do_z = 0, busy, done, q, x;
  logic [4:0]  n = '0, f = '0;
  logic [3:0]  a = '0;
  logic [24:1] w = '0, r;
  dw_cmd_t     dw;
  dw_resp_t    resp;
  int checks = 0, failures = 0;

  camac_cycle_gen dut (.clk, .rst_n, .start, .n, .a, .f, .w, .do_c, .do_z, .dw,
                       .dw_resp(resp), .r, .q, .x, .busy, .done);
  tb_crate_model #(.CRATE(5)) crate (.clk, .dw, .l_in('0), .resp);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic cycle(input int nn, input int ff, input int aa, input logic [24:1] ww,
                       input bit c, input bit z);
    logic [N_STATIONS:1] exp_n;
    bit bad_b, bad_s1, bad_s2, bad_cz, bad_n, bad_w;
    int done_at;
    exp_n = '0;
    if (!c && !z)
      for (int s = 1; s <= N_STATIONS; s++) exp_n[s] = (nn == s) || (nn == 28);
    @(posedge clk);
    n <= 5'(nn); f <= 5'(ff); a <= 4'(aa); w <= ww; do_c <= c; do_z <= z;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    n <= '0; f <= '0; a <= '0; w <= '0;      // inputs are captured at start
    {bad_b, bad_s1, bad_s2, bad_cz, bad_n, bad_w} = '0;
    done_at = -1;
    for (int t = 0; t < 44; t++) begin
      #1;
      if (dw.b  != (t < 40))                     bad_b  = 1;
      if (dw.s1 != (t >= 8 && t < 16))           bad_s1 = 1;
      if (dw.s2 != (t >= 24 && t < 32))          bad_s2 = 1;
      if (dw.c  != (c && t >= 4 && t < 36))      bad_cz = 1;
      if (dw.z  != (z && t >= 4 && t < 36))      bad_cz = 1;
      if (dw.n  != (t < 40 ? exp_n : '0))        bad_n  = 1;
      if (dw.w  != ((t < 40 && !c && !z && ff >= 16 && ff < 24) ? ww : 24'h0)) bad_w = 1;
      if (done) done_at = t;
      @(posedge clk);
    end
    check(!bad_b,  "B timing");
    check(!bad_s1, "S1 timing");
    check(!bad_s2, "S2 timing");
    check(!bad_cz, "C/Z timing");
    check(!bad_n,  $sformatf("N lines for N%0d", nn));
    check(!bad_w,  "W only for writes");
    check(done_at == 39, $sformatf("done at clock %0d", done_at));
    if (!c && !z && nn >= 1 && nn <= 23) begin
      check(x == 1'b1, "X latched");
      check(q == crate.expected_q(nn, aa), "Q latched");
      if (ff < 8) check(r == crate.expected_read(5, nn, aa), "R latched");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    cycle(3, 0, 2, '0, 0, 0);
    cycle(4, 16, 15, 24'hABCDEF, 0, 0);
    check(crate.last_w == 24'hABCDEF && crate.last_n == 5'd4, "write reached the module");
    cycle(7, 9, 1, 24'h123456, 0, 0);
    cycle(28, 16, 0, 24'h555555, 0, 0);
    cycle(0, 0, 0, '0, 1, 0);
    cycle(0, 0, 0, '0, 0, 1);
    check(crate.n_c == 1 && crate.n_z == 1, "one C and one Z cycle seen");
    for (int k = 0; k < 20; k++)
      cycle(1 + $urandom_range(0, 22), $urandom_range(0, 31), $urandom_range(0, 15), 24'($urandom), 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
