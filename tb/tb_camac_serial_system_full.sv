// tb_camac_serial_system_full: the serial branch at its full size, with
// every parameter at its default (16 crate controllers, 5 Mbit/s line at 8
// clocks per bit). Runs a random read from the last crate, a random write to
// the first, a read block transfer, a special command and a scan in mode 7
// over the last two stations of crate 15 that ends the scan of all crates
// with its LAM, checking the data of every operation.
`timescale 1ns/1ps
module tb_camac_serial_system_full;
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

  initial begin
    int ops, bad;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    dw_cycle(17, cword(0, 1, 15, 0, 23, 9));
    dw_cycle(0, '0);
    check(d_r == rd(15, 23, 9, 1) && d_x && !timed_out, "24-bit read from crate 15");
    dw_cycle(0, '0);
    check(d_r == rd(15, 23, 9, 1) && short_used, "read block transfer");
    dw_cycle(17, cword(0, 0, 0, 16, 1, 0));
    dw_cycle(16, 24'h00C0DE);
    check(g_crate[0].crate.last_w == 24'h00C0DE && d_x, "write to crate 0");
    dw_cycle(17, cword(0, 0, 9, 26, 30, 9));
    dw_cycle(0, '0);
    check(crate_dw[9].i && d_q, "special command: I set in crate 9");

    dw_cycle(17, cword(7, 0, 15, 0, 22, 0));
    ops = 0; bad = 0;
    while (!lam && ops < 40) begin
      dw_cycle(0, '0);
      if (d_r != rd(15, 22 + ops / 16, ops % 16, 0)) bad++;
      ops++;
    end
    check(bad == 0 && ops == 32 && lam, $sformatf("mode 7 scan to C15 N23 A15: %0d ops, %0d bad", ops, bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
