// tb_slac_branch: the branch configuration of the first installation
// described for this system - one branch driver with 7 crates - running a
// read block transfer of 64 16-bit words from one module (the short command
// after the first full command) and a scan of all modules of one crate
// (mode 3). Measures the remote time of each transfer (from the start of
// the host cycle to the release of HOLD) and the resulting block transfer
// rate, which must lie within 5 % of 276 kbyte/s, the maximum rate
// published for 16-bit block transfers at 5 Mbit/s.
`timescale 1ns/1ps
module tb_slac_branch;
  import camac_serial_pkg::*;
  localparam int NC = 7;

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

  camac_serial_system #(.N_CRATES(NC)) dut (
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
    d_r = r;
    s1 <= 1'b0;
    repeat (16) @(posedge clk);
    n_sel <= 1'b0; f <= '0; w <= '0;
    repeat (4) @(posedge clk);
  endtask

  function automatic logic [24:1] rd(int c, int n, int aa);
    logic [24:1] v;
    v = g_crate[0].crate.expected_read(c, n, aa);
    return {8'h00, v[16:1]};
  endfunction

  initial begin
    int bad, ops, bt_clks;
    real rate;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // read block transfer of 64 words from crate 6, N 12, A 3
    dw_cycle(17, {5'd0, 1'b0, 4'd6, 5'd0, 5'd12, 4'd3});
    bad = 0;
    bt_clks = 0;
    for (int k = 0; k < 65; k++) begin
      dw_cycle(0, '0);
      if (d_r != rd(6, 12, 3) || timed_out) bad++;
      if (k > 0) begin
        bt_clks += d_hold;
        if (!short_used) bad++;
      end
    end
    rate = 2.0 * 64.0 / (real'(bt_clks) / 40.0);   // bytes per us = Mbyte/s
    $display("read block transfer: 64 words, %0.2f us per word, %0.1f kbyte/s",
             real'(bt_clks) / 40.0 / 64.0, rate * 1000.0);
    check(bad == 0, $sformatf("block transfer: %0d bad words", bad));
    check(rate * 1000.0 >= 276.0 * 0.95 && rate * 1000.0 <= 276.0 * 1.05,
          $sformatf("block transfer rate %0.1f kbyte/s against 276", rate * 1000.0));

    // scan every module of crate 3 (mode 3 from N1 A0): 23 x 16 reads, then the LAM
    dw_cycle(17, {5'd3, 1'b0, 4'd3, 5'd0, 5'd1, 4'd0});
    bad = 0;
    ops = 0;
    while (!lam && ops < 400) begin
      dw_cycle(0, '0);
      if (d_r != rd(3, 1 + ops / 16, ops % 16)) bad++;
      ops++;
    end
    check(bad == 0 && ops == 23 * 16 && lam,
          $sformatf("crate scan: %0d reads, %0d bad, LAM %0d", ops, bad, lam));
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
