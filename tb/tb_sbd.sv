// tb_sbd: a host dataway model drives the branch driver as the crate
// controller of its crate would (N, F, A, W; waits while HOLD is up; then
// S1), and the line model plays a crate controller on the serial line.
// Checks control word load and read-back, the messages the driver sends for
// read, write and control (full command, short command, write data only),
// Q/X/R returned to the dataway, HOLD timing, the timeout, the scan-mode
// address advance and the scan LAM.
`timescale 1ns/1ps
module tb_sbd;
  import camac_serial_pkg::*;
  localparam int CPB = 8;
  localparam int TMO = 640;

  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic        n_sel = 0, s1 = 0;
  logic [3:0]  a = '0;
  logic [4:0]  f = '0;
  logic [24:1] w = '0, r;
  logic        q, x, hold, lam, timed_out, short_used;
  logic        sbd_out, sbd_oe, mdl_out, mdl_oe, line;
  int checks = 0, failures = 0;

  assign line = (sbd_out & sbd_oe) | (mdl_out & mdl_oe);

  sbd dut (.clk, .rst_n, .n_sel, .a, .f, .s1, .w, .r, .q, .x, .hold, .lam,
           .line_in(line), .line_out(sbd_out), .line_oe(sbd_oe), .timed_out, .short_used);
  tb_line_model #(.CPB(CPB)) scc (.clk, .line_in(line), .line_out(mdl_out), .oe(mdl_oe));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one dataway cycle of the host crate addressed to the driver
  logic [24:1] d_r;
  logic        d_q, d_x;
  int          d_hold;
  task automatic dw_cycle(input int ff, input logic [24:1] ww);
    @(posedge clk);
    n_sel <= 1'b1; f <= 5'(ff); a <= 4'd0; w <= ww;
    repeat (8) @(posedge clk);
    d_hold = 0;
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
  endtask

  function automatic logic [24:1] cword(int mode, bit d, int c, int ff, int n, int aa);
    return {5'(mode), d, 4'(c), 5'(ff), 5'(n), 4'(aa)};
  endfunction

  function automatic msg_t m_cmd(int c, int ff, int n, int aa, bit d);
    msg_t m;
    m = '0;
    m[2] = d; m[6:3] = 4'(c); m[11:7] = 5'(ff); m[16:12] = 5'(n); m[20:17] = 4'(aa);
    return m;
  endfunction

  function automatic msg_t m_resp(bit b, bit d, bit rq, bit rx, bit rl, logic [24:1] data);
    msg_t m;
    m = '0;
    m[0] = 1'b1; m[1] = b; m[2] = d; m[3] = rq; m[4] = rx; m[5] = rl;
    m[29:6] = data;
    return m;
  endfunction

  // the remote side: expect one or two messages, then answer (or not)
  task automatic remote(input msg_t e1, input int l1, input msg_t e2, input int l2,
                        input msg_t rsp, input int lr, input string what);
    msg_t m;
    longint unsigned ts;
    bit ok;
    scc.recv(m, l1, 300, ts, ok);
    check(ok && m == e1, $sformatf("%s: first message %h, expected %h", what, m, e1));
    if (l2 > 0) begin
      scc.recv(m, l2, 300, ts, ok);
      check(ok && m == e2, $sformatf("%s: second message %h, expected %h", what, m, e2));
    end
    repeat (48) @(posedge clk);
    if (lr > 0) scc.send(rsp, lr);
  endtask

  localparam msg_t M_SHORT = msg_t'(3'b110);

  initial begin
    logic [24:1] cw;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // control word load and read-back
    cw = cword(0, 0, 2, 0, 5, 1);
    dw_cycle(17, cw);
    check(d_q && d_x, "F17: Q and X");
    dw_cycle(1, '0);
    check(d_r == cw && d_q && d_x, "F1 reads the control word back");

    // random read: full command, 16-bit read response (its L bit is ignored)
    fork
      dw_cycle(0, '0);
      remote(m_cmd(2, 0, 5, 1, 0), 21, '0, 0, m_resp(0, 0, 1, 1, 1, 24'h00A5C3), 22, "read");
    join
    check(d_r == 24'h00A5C3 && d_q && d_x, "read data, Q, X to the dataway");
    check(d_hold > 0 && !short_used && !lam, "HOLD held, full command, no LAM");
    // the same address again: short command (read block transfer)
    fork
      dw_cycle(0, '0);
      remote(M_SHORT, 3, '0, 0, m_resp(0, 0, 0, 1, 0, 24'h001234), 22, "read BT");
    join
    check(d_r == 24'h001234 && !d_q && d_x && short_used, "short command used, Q = 0 passed on");

    // 24-bit read
    dw_cycle(17, cword(0, 1, 2, 2, 5, 1));
    fork
      dw_cycle(0, '0);
      remote(m_cmd(2, 2, 5, 1, 1), 21, '0, 0, m_resp(0, 1, 1, 1, 0, 24'hF0E1D2), 30, "read24");
    join
    check(d_r == 24'hF0E1D2 && !short_used, "24-bit read data");

    // write: command then write data, short response
    dw_cycle(17, cword(0, 1, 4, 16, 9, 3));
    fork
      dw_cycle(16, 24'h123456);
      remote(m_cmd(4, 16, 9, 3, 1), 21, msg_t'({24'h123456, 3'b010}), 27,
             m_resp(1, 0, 1, 1, 0, '0), 6, "write");
    join
    check(d_q && d_x && !short_used, "write: Q, X");
    // write block transfer: write data only
    fork
      dw_cycle(16, 24'h654321);
      remote(msg_t'({24'h654321, 3'b010}), 27, '0, 0, m_resp(1, 0, 1, 1, 0, '0), 6, "write BT");
    join
    check(short_used, "write BT sends only the data");
    // 16-bit write sends 16 bits only
    dw_cycle(17, cword(0, 0, 4, 17, 9, 3));
    fork
      dw_cycle(16, 24'hFF8001);
      remote(m_cmd(4, 17, 9, 3, 0), 21, msg_t'({16'h8001, 3'b010}), 19,
             m_resp(1, 0, 1, 1, 0, '0), 6, "write16");
    join

    // control and repeat control
    dw_cycle(17, cword(0, 0, 6, 9, 11, 0));
    fork
      dw_cycle(0, '0);
      remote(m_cmd(6, 9, 11, 0, 0), 21, '0, 0, m_resp(1, 0, 1, 1, 0, '0), 6, "control");
    join
    fork
      dw_cycle(0, '0);
      remote(M_SHORT, 3, '0, 0, m_resp(1, 0, 1, 1, 0, '0), 6, "control BT");
    join
    check(short_used && d_q, "repeat control by short command");

    // no response: timeout, then the full command is sent again
    fork
      dw_cycle(0, '0);
      remote(M_SHORT, 3, '0, 0, '0, 0, "timeout");
    join
    check(timed_out && !d_q && !d_x, "timeout: Q = X = 0");
    check(d_hold >= TMO && d_hold <= TMO + 3 * 8 * CPB, $sformatf("timeout after %0d clocks", d_hold));
    fork
      dw_cycle(0, '0);
      remote(m_cmd(6, 9, 11, 0, 0), 21, '0, 0, m_resp(1, 0, 1, 1, 0, '0), 6, "after timeout");
    join
    check(!timed_out && !short_used, "full command after a timeout");

    // scan mode 1 (scan A): the address advances, LAM after A = 15
    dw_cycle(17, cword(1, 0, 2, 0, 5, 14));
    fork
      dw_cycle(0, '0);
      remote(m_cmd(2, 0, 5, 14, 0), 21, '0, 0, m_resp(0, 0, 1, 1, 0, 24'h1), 22, "scan A14");
    join
    dw_cycle(1, '0);
    check(d_r == cword(1, 0, 2, 0, 5, 15) && !lam, "scan: A advanced to 15, no LAM yet");
    fork
      dw_cycle(0, '0);
      remote(m_cmd(2, 0, 5, 15, 0), 21, '0, 0, m_resp(0, 0, 1, 1, 0, 24'h2), 22, "scan A15");
    join
    check(lam, "scan: LAM after A = 15");
    dw_cycle(17, cword(8, 0, 2, 0, 5, 0));   // LQ only
    check(!lam, "F17 clears the LAM");
    fork
      dw_cycle(0, '0);
      remote(m_cmd(2, 0, 5, 0, 0), 21, '0, 0, m_resp(0, 0, 0, 1, 0, 24'h3), 22, "LQ");
    join
    check(lam, "LQ: LAM on no Q");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
