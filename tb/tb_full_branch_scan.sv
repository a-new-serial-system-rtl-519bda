// tb_full_branch_scan: the scan of every subaddress of every station of
// every crate (mode 7: SC SN SA set) on a full branch of 16 crates, with
// every parameter of the top at its default. The computer loads the control
// word once with C0 N1 A0 and then issues F0 cycles until the LAM rises. The
// test checks that exactly 16 x 23 x 16 = 5888 operations ran, that each
// returned the read data of its own crate, station and subaddress in the
// scan order (A fastest, then N, then crate), that the LAM rose on the last
// one and not before, and that the address then holds at C15 N23 A15. Every
// operation sends a full command because the address moves each time, so
// the average time per word must be that of a random read (11 us published)
// plus this host cycle's tail after HOLD, not that of a block transfer. A second short scan in mode
// 15 (the same scan with a LAM on no Q) must stop at the first station
// without Q, at A15 of an even station of the crate models.
`timescale 1ns/1ps
module tb_full_branch_scan;
  import camac_serial_pkg::*;
  localparam int NC = 16;

  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic        n_sel = 0, s1 = 0;
  logic [3:0]  a = '0;
  logic [4:0]  f = '0;
  logic [24:1] w = '0, r;
  logic        q, x, hold, lam, timed_out, short_used, prompt_l, line;
  dw_cmd_t     crate_dw   [NC];
  dw_resp_t    crate_resp [NC];
  int checks = 0, failures = 0;

  camac_serial_system dut (
    .clk, .rst_n, .sbd_n(n_sel), .sbd_a(a), .sbd_f(f), .sbd_s1(s1), .sbd_w(w),
    .sbd_r(r), .sbd_q(q), .sbd_x(x), .sbd_hold(hold), .sbd_lam(lam),
    .sbd_timed_out(timed_out), .sbd_short_used(short_used),
    .crate_dw, .crate_resp, .prompt_l, .line
  );

  for (genvar k = 0; k < NC; k++) begin : g_crate
    tb_crate_model #(.CRATE(k)) crate (.clk, .dw(crate_dw[k]), .l_in('0), .resp(crate_resp[k]));
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [24:1] d_r;
  logic        d_q, d_x;
  task automatic dw_cycle(input int ff, input logic [24:1] ww);
    int guard;
    @(posedge clk);
    n_sel <= 1'b1; f <= 5'(ff); a <= 4'd0; w <= ww;
    repeat (8) @(posedge clk);
    guard = 0;
    while (hold && guard < 5000) begin
      @(posedge clk);
      guard++;
    end
    repeat (2) @(posedge clk);
    s1 <= 1'b1;
    repeat (8) @(posedge clk);
    d_r = r; d_q = q; d_x = x;
    s1 <= 1'b0;
    repeat (16) @(posedge clk);
    n_sel <= 1'b0; f <= '0; w <= '0;
    repeat (4) @(posedge clk);
  endtask

  function automatic logic [24:1] cword(int mode, bit d, int c, int ff, int n, int aa);
    return {5'(mode), d, 4'(c), 5'(ff), 5'(n), 4'(aa)};
  endfunction

  function automatic logic [24:1] rd(int c, int n, int aa, bit d);
    logic [24:1] v;
    v = g_crate[0].crate.expected_read(c, n, aa);
    return d ? v : {8'h00, v[16:1]};
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    int ops, bad, c0, n0, a0, t_start;
    real us_per_op;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    dw_cycle(17, cword(7, 0, 0, 0, 1, 0));
    check(!lam, "F17 leaves the LAM clear");
    ops = 0; bad = 0;
    t_start = cyc;
    while (!lam && ops < 6000) begin
      c0 = ops / (23 * 16);
      n0 = 1 + (ops / 16) % 23;
      a0 = ops % 16;
      dw_cycle(0, '0);
      if (d_r != rd(c0, n0, a0, 0) || !d_x || timed_out) begin
        bad++;
        if (bad < 5) $display("FAIL: op %0d C%0d N%0d A%0d read %h", ops, c0, n0, a0, d_r);
      end
      ops++;
    end
    us_per_op = real'(cyc - t_start) * 0.025 / real'(ops);
    $display("full scan: %0d operations, %0d bad, %.2f us per operation", ops, bad, us_per_op);
    check(ops == 16 * 23 * 16, $sformatf("5888 operations in the full scan, got %0d", ops));
    check(bad == 0, $sformatf("every word of the full scan correct, %0d bad", bad));
    check(lam, "LAM at the end of the full scan");
    // a full command per word: a random read (about 10.7 us to the release
    // of HOLD) plus the 38 clocks of this host cycle after HOLD
    check(us_per_op > 10.5 && us_per_op < 12.5,
          $sformatf("a scanned read costs a random read, %.2f us", us_per_op));
    dw_cycle(1, '0);
    check(d_r == cword(7, 0, 15, 0, 23, 15), "address holds at C15 N23 A15");

    // mode 15: the LAM also rises on no Q; station 2 has no Q at A15
    dw_cycle(17, cword(15, 0, 3, 0, 1, 0));
    check(!lam, "F17 clears the LAM");
    ops = 0;
    while (!lam && ops < 100) begin
      dw_cycle(0, '0);
      ops++;
    end
    check(ops == 32 && !d_q && lam, $sformatf("mode 15 stops on no Q after 32 operations, got %0d", ops));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
