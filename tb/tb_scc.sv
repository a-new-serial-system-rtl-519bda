// tb_scc: the line model plays the branch driver and sends command, write
// data and short command messages to a crate controller with crate address
// 3; a crate model answers on its dataway. Checks each response message
// (header, Q, X, L, data) bit for bit, what reached the dataway, the
// addressed state (single-address block transfers, unaddressing by a
// command to another crate), all special commands, the prompt L and the
// turnaround time (command end to response sync).
`timescale 1ns/1ps
module tb_scc;
  import camac_serial_pkg::*;
  localparam int CPB = 8;
  localparam int MY_CRATE = 3;

  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic mdl_out, mdl_oe, scc_out, scc_oe, line, lam;
  logic [N_STATIONS:1] l_in = '0;
  dw_cmd_t  dw;
  dw_resp_t resp;
  int checks = 0, failures = 0;

  assign line = (mdl_out & mdl_oe) | (scc_out & scc_oe);

  tb_line_model #(.CPB(CPB)) drv (.clk, .line_in(line), .line_out(mdl_out), .oe(mdl_oe));
  scc dut (.clk, .rst_n, .crate_addr(4'(MY_CRATE)), .line_in(line), .line_out(scc_out),
           .line_oe(scc_oe), .dw, .dw_resp(resp), .lam);
  tb_crate_model #(.CRATE(MY_CRATE)) crate (.clk, .dw, .l_in, .resp);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic msg_t m_cmd(int c, int f, int n, int a, bit d);
    msg_t m;
    m = '0;
    m[2] = d;
    m[6:3] = 4'(c);
    m[11:7] = 5'(f);
    m[16:12] = 5'(n);
    m[20:17] = 4'(a);
    return m;
  endfunction

  function automatic msg_t m_wr(logic [24:1] w);
    msg_t m;
    m = '0;
    m[1] = 1'b1;
    m[26:3] = w;
    return m;
  endfunction

  localparam msg_t M_SHORT = msg_t'(3'b110);

  longint unsigned t_sent;
  task automatic send(msg_t m, int len);
    drv.send(m, len);
    t_sent = drv.cyc;
  endtask

  // expect a response; returns its bits
  task automatic expect_resp(input int len, output msg_t m, input string what);
    longint unsigned ts;
    bit ok;
    drv.recv(m, len, 200, ts, ok);
    check(ok, {what, ": response received"});
    if (ok) check(ts - t_sent >= 10 && ts - t_sent <= 56,
                  $sformatf("%s: turnaround %0d clocks", what, ts - t_sent));
    repeat (12) @(posedge clk);
  endtask

  task automatic expect_none(input string what);
    msg_t m;
    longint unsigned ts;
    bit ok;
    drv.recv(m, 6, 120, ts, ok);
    check(!ok, {what, ": no response"});
  endtask

  task automatic read_op(int f, int n, int a, bit d, bit use_short);
    msg_t m;
    logic [24:1] e;
    int len;
    int rd0;
    rd0 = crate.n_reads;
    if (use_short) send(M_SHORT, 3);
    else send(m_cmd(MY_CRATE, f, n, a, d), 21);
    len = d ? 30 : 22;
    expect_resp(len, m, $sformatf("read N%0d A%0d", n, a));
    e = crate.expected_read(MY_CRATE, n, a);
    if (!d) e[24:17] = '0;
    check(m[2:0] == {d, 2'b01}, "read response header 1 0 D");
    check(m[3] == crate.expected_q(n, a) && m[4] == 1'b1, "read response Q, X");
    check(m[6 +: 24] == (d ? e : {8'h00, e[16:1]}) , $sformatf("read data %h", m[6 +: 24]));
    check(crate.n_reads == rd0 + 1, "one read cycle on the dataway");
  endtask

  initial begin
    msg_t m;
    int s0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(dw.i == 1'b0 && !lam, "power on: I = 0, L disabled");

    // random reads, 16 and 24 bit, then a read block transfer by short commands
    read_op(0, 5, 2, 0, 0);
    read_op(0, 5, 2, 0, 1);
    read_op(0, 5, 2, 0, 1);
    read_op(2, 7, 15, 1, 0);
    read_op(2, 8, 15, 1, 0);          // even station, A15: no Q
    read_op(2, 8, 15, 1, 1);

    // write: command, then write data; the command alone gets no response
    send(m_cmd(MY_CRATE, 16, 4, 1, 0), 21);
    expect_none("write command alone");
    s0 = crate.n_writes;
    send(m_wr(24'h00BEEF), 19);
    expect_resp(6, m, "write");
    check(m[2:0] == 3'b011 && m[3] && m[4], "short response 1 1 0 with Q, X");
    check(crate.last_w == 24'h00BEEF && crate.last_n == 5'd4 && crate.last_a == 4'd1 &&
          crate.n_writes == s0 + 1, "write reached N4 A1");
    // single address write block transfer
    for (int k = 0; k < 3; k++) begin
      send(m_wr(24'(16'h1000 + k)), 19);
      expect_resp(6, m, "write block transfer");
      check(crate.last_w == 24'(16'h1000 + k), "block write data");
    end
    check(crate.n_writes == s0 + 4, "four writes");
    // 24-bit write
    send(m_cmd(MY_CRATE, 17, 9, 3, 1), 21);
    send(m_wr(24'hC0FFEE), 27);
    expect_resp(6, m, "24-bit write");
    check(crate.last_w == 24'hC0FFEE && crate.last_f == 5'd17, "24-bit write data");

    // control and repeat control
    s0 = crate.n_s1;
    send(m_cmd(MY_CRATE, 9, 6, 0, 0), 21);
    expect_resp(6, m, "control");
    check(m[2:0] == 3'b011 && m[4], "control: short response, X");
    send(M_SHORT, 3);
    expect_resp(6, m, "repeat control");
    check(crate.n_s1 == s0 + 2 && crate.last_f == 5'd9, "two control cycles");

    // messages an addressed controller cannot execute are refused, not ignored
    send(m_cmd(MY_CRATE, 16, 4, 1, 0), 21);
    expect_none("write command alone");
    send(M_SHORT, 3);
    expect_resp(6, m, "short command with a write function stored");
    check(m[2:0] == 3'b011 && !m[3] && !m[4], "refused: Q = X = 0");
    send(m_cmd(MY_CRATE, 9, 6, 0, 0), 21);
    expect_resp(6, m, "control");
    s0 = crate.n_s1;
    send(m_wr(24'h77), 19);
    expect_resp(6, m, "write data with a control function stored");
    check(m[2:0] == 3'b011 && !m[3] && !m[4] && crate.n_s1 == s0, "refused without a cycle");

    // a command to another crate unaddresses this one
    send(m_cmd(5, 0, 5, 2, 0), 21);
    expect_none("command to crate 5");
    send(M_SHORT, 3);
    expect_none("short command while unaddressed");
    send(m_wr(24'h1), 19);
    expect_none("write data while unaddressed");

    // special commands
    send(m_cmd(MY_CRATE, 26, 30, 9, 0), 21);
    expect_resp(6, m, "set I");
    check(dw.i == 1'b1 && m[3] && m[4], "I set, Q and X");
    l_in = 23'h400005;                 // L1, L3, L23
    repeat (2) @(posedge clk);
    check(!lam, "L disabled: no prompt L");
    send(m_cmd(MY_CRATE, 26, 30, 10, 0), 21);
    expect_resp(6, m, "enable L");
    check(lam, "prompt L with L enabled");
    read_op(0, 5, 2, 0, 0);
    send(m_cmd(MY_CRATE, 0, 5, 2, 0), 21);
    expect_resp(22, m, "read with L");
    check(m[5], "polled L in the response");
    send(m_cmd(MY_CRATE, 1, 30, 0, 0), 21);
    expect_resp(30, m, "read L");
    check(m[2:0] == 3'b101, "L read header 1 0 1");
    check(m[3] == 1'b1 && m[4] == 1'b1 && m[5] == 1'b1, "I, L enable, L");
    check(m[6 +: 24] == 24'h400005, $sformatf("L pattern %h", m[6 +: 24]));
    send(m_cmd(MY_CRATE, 24, 30, 10, 0), 21);
    expect_resp(6, m, "disable L");
    check(!lam, "L disabled again");
    send(m_cmd(MY_CRATE, 26, 30, 10, 0), 21);
    expect_resp(6, m, "enable L");
    s0 = crate.n_c;
    send(m_cmd(MY_CRATE, 26, 30, 11, 0), 21);
    expect_resp(6, m, "C cycle");
    check(crate.n_c == s0 + 1, "C on the dataway");
    s0 = crate.n_z;
    send(m_cmd(MY_CRATE, 26, 30, 8, 0), 21);
    expect_resp(6, m, "Z cycle");
    check(crate.n_z == s0 + 1 && dw.i == 1'b0 && !lam, "Z: Z cycle, I = 0, L disabled");
    send(m_cmd(MY_CRATE, 26, 30, 9, 0), 21);
    expect_resp(6, m, "set I");
    send(m_cmd(MY_CRATE, 24, 30, 9, 0), 21);
    expect_resp(6, m, "clear I");
    check(dw.i == 1'b0, "I cleared");
    send(m_cmd(MY_CRATE, 0, 30, 5, 0), 21);
    expect_resp(6, m, "unknown special");
    check(m[3] == 1'b0 && m[4] == 1'b0, "unknown special: Q = X = 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
