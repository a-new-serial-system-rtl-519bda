// tb_camac_serial_system: end-to-end test of one serial branch with 8 crate
// controllers (crate addresses 0..7), each with a crate model, driven from
// the host side of the branch driver through whole dataway cycles.
// Exercises and counts: random read/write/control (full command), read,
// write and control block transfers (short forms), 24-bit transfers, a
// timeout (crate 12 is absent), special commands (L enable, read L, Z), the
// prompt L, the scan modes with their LAMs (mode 3 over the end of a crate,
// mode 7 across a crate boundary, LAM on no Q) and unaddressing. Checks the data end to end
// and the transaction times against the published table (the time HOLD
// holds the host cycle, which must be at most the table value and at most
// 2 us below it). Every mechanism must occur at least once.
`timescale 1ns/1ps
module tb_camac_serial_system;
  import camac_serial_pkg::*;
  localparam int NC  = 8;
  localparam int CPB = 8;

  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic        n_sel = 0, s1 = 0;
  logic [3:0]  a = '0;
  logic [4:0]  f = '0;
  logic [24:1] w = '0, r;
  logic        q, x, hold, lam, timed_out, short_used, prompt_l, line;
  dw_cmd_t     crate_dw   [NC];
  dw_resp_t    crate_resp [NC];
  logic [N_STATIONS:1] l_in [NC];
  int checks = 0, failures = 0;

  camac_serial_system #(.N_CRATES(NC)) dut (
    .clk, .rst_n, .sbd_n(n_sel), .sbd_a(a), .sbd_f(f), .sbd_s1(s1), .sbd_w(w),
    .sbd_r(r), .sbd_q(q), .sbd_x(x), .sbd_hold(hold), .sbd_lam(lam),
    .sbd_timed_out(timed_out), .sbd_short_used(short_used),
    .crate_dw, .crate_resp, .prompt_l, .line
  );

  for (genvar k = 0; k < NC; k++) begin : g_crate
    tb_crate_model #(.CRATE(k)) crate (.clk, .dw(crate_dw[k]), .l_in(l_in[k]), .resp(crate_resp[k]));
  end

  // mechanism counters
  int n_full = 0, n_short = 0, n_wbt = 0, n_timeout = 0, n_d24 = 0, n_scan_lam = 0,
      n_lq_lam = 0, n_special = 0, n_prompt_l = 0, n_unaddr = 0, n_scan_step = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [24:1] d_r;
  logic        d_q, d_x;
  int          d_hold;
  task automatic dw_cycle(input int ff, input logic [24:1] ww);
    @(posedge clk);
    n_sel <= 1'b1; f <= 5'(ff); a <= 4'd0; w <= ww;
    repeat (8) @(posedge clk);
    d_hold = 8;
    while (hold && d_hold < 5000) begin
      @(posedge clk);
      d_hold++;
    end
    repeat (2) @(posedge clk);
    s1 <= 1'b1;
    repeat (8) @(posedge clk);
    d_r = r; d_q = q; d_x = x;
    s1 <= 1'b0;
    repeat (16) @(posedge clk);
    n_sel <= 1'b0; f <= '0; w <= '0;
    repeat (4) @(posedge clk);
    if (ff == 0 || ff == 16) begin
      if (timed_out) n_timeout++;
      else if (short_used) n_short++;
      else n_full++;
    end
  endtask

  function automatic logic [24:1] cword(int mode, bit d, int c, int ff, int n, int aa);
    return {5'(mode), d, 4'(c), 5'(ff), 5'(n), 4'(aa)};
  endfunction

  // Table 1 check: time from the start of the host cycle to HOLD release
  task automatic timing(input int clks, input real table_us, input string what);
    real us;
    us = real'(clks) / 40.0;
    $display("  %-24s %6.2f us (table %4.1f us)", what, us, table_us);
    check(us <= table_us && us >= table_us - 2.0, $sformatf("%s: %0.2f us against %0.1f", what, us, table_us));
  endtask

  function automatic logic [24:1] rd(int c, int n, int aa, bit d);
    logic [24:1] v;
    v = g_crate[0].crate.expected_read(c, n, aa);
    return d ? v : {8'h00, v[16:1]};
  endfunction

  initial begin
    int ops;
    for (int k = 0; k < NC; k++) l_in[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // random reads from every crate
    for (int c = 0; c < NC; c++) begin
      dw_cycle(17, cword(0, 0, c, 0, 3 + c, c));
      dw_cycle(0, '0);
      check(d_r == rd(c, 3 + c, c, 0) && d_q && d_x, $sformatf("random read from crate %0d", c));
      if (c == 0) timing(d_hold, 11.0, "random read");
    end
    // read block transfer (short commands)
    for (int k = 0; k < 3; k++) begin
      dw_cycle(0, '0);
      check(d_r == rd(NC - 1, 3 + NC - 1, NC - 1, 0) && short_used, "read block transfer");
    end
    timing(d_hold, 7.5, "read block transfer");
    // 24-bit read
    dw_cycle(17, cword(0, 1, 5, 2, 11, 6));
    dw_cycle(0, '0);
    check(d_r == rd(5, 11, 6, 1), "24-bit read");
    n_d24++;

    // random write, then a write block transfer
    dw_cycle(17, cword(0, 0, 3, 16, 7, 2));
    dw_cycle(16, 24'h00ABCD);
    timing(d_hold, 12.0, "random write");
    check(g_crate[3].crate.last_w == 24'h00ABCD && g_crate[3].crate.last_n == 5'd7 && d_x,
          "random write reached crate 3 N7");
    for (int k = 0; k < 3; k++) begin
      dw_cycle(16, 24'(16'h4000 + k));
      check(g_crate[3].crate.last_w == 24'(16'h4000 + k) && short_used, "write block transfer");
      n_wbt++;
    end
    timing(d_hold, 7.5, "write block transfer");
    dw_cycle(17, cword(0, 1, 4, 16, 2, 0));
    dw_cycle(16, 24'hFEDCBA);
    check(g_crate[4].crate.last_w == 24'hFEDCBA, "24-bit write");
    n_d24++;

    // control and repeat control
    dw_cycle(17, cword(0, 0, 1, 9, 12, 0));
    dw_cycle(0, '0);
    timing(d_hold, 8.0, "control");
    dw_cycle(0, '0);
    timing(d_hold, 4.5, "control block transfer");
    check(short_used && d_x && g_crate[1].crate.last_f == 5'd9, "control block transfer");

    // address crate 2, then a command to crate 1: only crate 1 may answer
    // (two answers would collide on the line and fail the data check)
    dw_cycle(17, cword(0, 0, 2, 0, 1, 1));
    dw_cycle(0, '0);
    dw_cycle(17, cword(0, 0, 1, 0, 1, 1));
    dw_cycle(0, '0);
    check(d_r == rd(1, 1, 1, 0), "crate 1 answers, crate 2 unaddressed");
    n_unaddr++;

    // absent crate: timeout
    dw_cycle(17, cword(0, 0, 12, 0, 1, 0));
    dw_cycle(0, '0);
    check(timed_out && !d_q && !d_x, "absent crate: timeout, Q = X = 0");

    // special commands in crate 2: enable L, prompt L, read L, Z
    l_in[2] = 23'h000110;
    dw_cycle(17, cword(0, 0, 2, 26, 30, 10));
    dw_cycle(0, '0);
    n_special++;
    repeat (2) @(posedge clk);
    check(prompt_l, "prompt L from crate 2");
    if (prompt_l) n_prompt_l++;
    dw_cycle(17, cword(0, 1, 2, 1, 30, 0));
    dw_cycle(0, '0);
    n_special++;
    check(d_r == 24'h000110 && d_x, "read L of crate 2 (X = L enable)");
    dw_cycle(17, cword(0, 0, 2, 26, 30, 8));
    dw_cycle(0, '0);
    n_special++;
    check(g_crate[2].crate.n_z == 1 && !prompt_l, "Z in crate 2 disables L");

    // scan mode 3 (A and N) from C6 N22 A14 to the end of crate 6
    dw_cycle(17, cword(3, 0, 6, 0, 22, 14));
    ops = 0;
    begin
      int n, aa, bad;
      n = 22; aa = 14; bad = 0;
      while (!lam && ops < 100) begin
        dw_cycle(0, '0);
        if (d_r != rd(6, n, aa, 0)) bad++;
        ops++;
        n_scan_step++;
        aa++;
        if (aa == 16) begin aa = 0; n++; end
      end
      check(bad == 0, $sformatf("scan mode 3: %0d wrong addresses", bad));
    end
    check(ops == 2 + 16, $sformatf("scan mode 3: %0d operations", ops));
    if (lam) n_scan_lam++;
    // scan mode 7 crosses from the last module of crate 6 into crate 7
    dw_cycle(17, cword(7, 0, 6, 0, 23, 14));
    dw_cycle(0, '0);
    check(d_r == rd(6, 23, 14, 0), "mode 7: C6 N23 A14");
    dw_cycle(0, '0);
    check(d_r == rd(6, 23, 15, 0), "mode 7: C6 N23 A15");
    dw_cycle(0, '0);
    check(d_r == rd(7, 1, 0, 0) && !lam, "mode 7: next crate, N1 A0");
    dw_cycle(1, '0);
    check(d_r == cword(7, 0, 7, 0, 1, 1), "mode 7: control word at C7 N1 A1");
    n_scan_step += 3;
    // LAM on no Q (mode 9 = LQ + SA) at the even station 8, A14 -> A15
    dw_cycle(17, cword(9, 0, 0, 0, 8, 14));
    dw_cycle(0, '0);
    check(!lam && d_q, "LQ: Q at A14, no LAM");
    dw_cycle(0, '0);
    check(lam && !d_q, "LQ: no Q at A15 -> LAM");
    if (lam) n_lq_lam++;

    check(n_full > 0,      $sformatf("full commands: %0d", n_full));
    check(n_short > 0,     $sformatf("short forms: %0d", n_short));
    check(n_wbt > 0,       $sformatf("write block transfers: %0d", n_wbt));
    check(n_timeout > 0,   $sformatf("timeouts: %0d", n_timeout));
    check(n_d24 > 0,       $sformatf("24-bit transfers: %0d", n_d24));
    check(n_special > 0,   $sformatf("special commands: %0d", n_special));
    check(n_prompt_l > 0,  $sformatf("prompt L: %0d", n_prompt_l));
    check(n_unaddr > 0,    $sformatf("unaddressing: %0d", n_unaddr));
    check(n_scan_step > 0, $sformatf("scan steps: %0d", n_scan_step));
    check(n_scan_lam > 0,  $sformatf("scan-end LAMs: %0d", n_scan_lam));
    check(n_lq_lam > 0,    $sformatf("no-Q LAMs: %0d", n_lq_lam));
    $display("mechanisms: full=%0d short=%0d writeBT=%0d timeout=%0d d24=%0d special=%0d promptL=%0d unaddr=%0d scan=%0d scanLAM=%0d LQ=%0d",
             n_full, n_short, n_wbt, n_timeout, n_d24, n_special, n_prompt_l, n_unaddr,
             n_scan_step, n_scan_lam, n_lq_lam);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
