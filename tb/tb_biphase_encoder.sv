// tb_biphase_encoder: sends messages of every length the protocol uses with
// random contents and decodes the line with the independent line model.
// Checks the bits, the time the transmit enable is on ((2 + L) bits plus a
// half-bit termination, one bit if the line ended high), and `done`.
`timescale 1ns/1ps
module tb_biphase_encoder;
  import camac_serial_pkg::*;
  localparam int CPB = 8;

  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic start = 0, line, oe, busy, done;
  msg_t msg = '0;
  len_t len = '0;
  int checks = 0, failures = 0;

  biphase_encoder #(.CLKS_PER_BIT(CPB)) dut (
    .clk, .rst_n, .start, .msg, .len, .line, .oe, .busy, .done
  );

  logic mdl_out, mdl_oe;
  tb_line_model #(.CPB(CPB)) mdl (.clk, .line_in(line & oe), .line_out(mdl_out), .oe(mdl_oe));

  int oe_clks = 0, done_cnt = 0;
  always @(posedge clk) begin
    if (oe) oe_clks++;
    if (done) done_cnt++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic one(input msg_t m, input int l);
    msg_t got;
    longint unsigned ts;
    bit ok;
    int exp_clks, done0;
    logic lvl;
    lvl = 1'b0;
    for (int i = 0; i < l; i++) begin
      if (m[i]) lvl = ~lvl;
      if (i < l - 1) lvl = ~lvl;
    end
    exp_clks = (2 + l) * CPB + (lvl ? CPB : CPB / 2);
    oe_clks = 0;
    done0 = done_cnt;
    @(posedge clk);
    msg <= m;
    len <= len_t'(l);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    fork
      mdl.recv(got, l, 100, ts, ok);
    join
    wait (!busy);
    repeat (3) @(posedge clk);
    check(ok, $sformatf("len %0d: line format", l));
    for (int i = 0; i < l; i++) m[i] = m[i];
    check(got == (m & ((msg_t'(1) << l) - 1)), $sformatf("len %0d: bits %h got %h", l, m, got));
    check(oe_clks == exp_clks, $sformatf("len %0d: oe %0d clocks, expected %0d", l, oe_clks, exp_clks));
    check(done_cnt == done0 + 1, "done pulses once");
    check(line == 1'b0, "line returned to zero");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(!oe && !line, "idle: driver off");
    one(msg_t'(3'b110), 3);
    one(msg_t'(0), 21);
    one('1, 30);
    one('1, 6);
    for (int k = 0; k < 40; k++) begin
      int lens[6] = '{3, 6, 19, 21, 22, 27};
      one(msg_t'({$urandom, $urandom}), (k % 7 == 6) ? 30 : lens[k % 6]);
    end
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
