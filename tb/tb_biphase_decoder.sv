// tb_biphase_decoder: the independent line model sends messages, some back
// to back and some after a stretch of noise-free data that has no sync; the
// decoder's bits after each sync must equal the message, the sync must be
// reported once per message and the end of message must be seen. Also
// checks that a bit is delivered 3/4 bit + 2 clocks after its boundary,
// and, on a second decoder at 16 clocks per bit, that messages whose
// transitions are each moved by up to one clock (timing jitter) are still
// decoded.
`timescale 1ns/1ps
module tb_biphase_decoder;
  import camac_serial_pkg::*;
  localparam int CPB = 8;

  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic line, oe, sync, bit_valid, bit_data, msg_end;
  int checks = 0, failures = 0;

  tb_line_model #(.CPB(CPB)) mdl (.clk, .line_in(1'b0), .line_out(line), .oe);
  biphase_decoder #(.CLKS_PER_BIT(CPB)) dut (
    .clk, .rst_n, .line_in(line & oe), .sync, .bit_valid, .bit_data, .msg_end
  );

  // a second decoder at 16 clocks per bit for the jitter test
  logic line16, oe16, sync16, bv16, bd16, end16;
  tb_line_model #(.CPB(16)) mdl16 (.clk, .line_in(1'b0), .line_out(line16), .oe(oe16));
  biphase_decoder #(.CLKS_PER_BIT(16)) dut16 (
    .clk, .rst_n, .line_in(line16 & oe16), .sync(sync16), .bit_valid(bv16), .bit_data(bd16),
    .msg_end(end16)
  );
  msg_t got16;
  int   nbits16 = 0, nsync16 = 0;
  always @(posedge clk) begin
    if (sync16) begin
      nsync16++;
      nbits16 = 0;
      got16   = '0;
    end
    if (bv16) begin
      if (nbits16 < MSG_MAX) got16[nbits16] = bd16;
      nbits16++;
    end
  end

  msg_t got;
  int   nbits = 0, nsync = 0, nend = 0;
  longint unsigned t_sync = 0, t_first = 0;
  always @(posedge clk) begin
    if (sync) begin
      nsync++;
      nbits = 0;
      got   = '0;
      t_sync = mdl.cyc;
    end
    if (bit_valid) begin
      if (nbits == 0) t_first = mdl.cyc;
      if (nbits < MSG_MAX) got[nbits] = bit_data;
      nbits++;
    end
    if (msg_end) nend++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic one(input msg_t m, input int l, input bit gap);
    int s0, e0;
    msg_t mask;
    s0 = nsync;
    e0 = nend;
    mask = (msg_t'(1) << l) - 1;
    mdl.send(m, l);
    if (gap) repeat (4 * CPB) @(posedge clk);
    else repeat (2) @(posedge clk);
    check(nsync == s0 + 1, $sformatf("len %0d: one sync", l));
    check(nbits >= l, $sformatf("len %0d: %0d bits", l, nbits));
    check((got & mask) == (m & mask), $sformatf("len %0d: sent %h got %h", l, m & mask, got & mask));
    if (gap) check(nend > e0, "end of message seen");
    check(t_first - t_sync == longint'((3 * CPB) / 4), $sformatf("first bit %0d clocks after sync",
                                                            t_first - t_sync));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    one('1, 30, 1);
    one('0, 21, 1);
    one(msg_t'(3'b110), 3, 1);
    for (int k = 0; k < 40; k++) begin
      int lens[7] = '{3, 6, 19, 21, 22, 27, 30};
      one(msg_t'({$urandom, $urandom}), lens[k % 7], (k % 3) == 0);
    end
    // data that is only bits (no sync) must not produce a message
    begin
      int s0;
      s0 = nsync;
      mdl.oe <= 1'b1;
      for (int i = 0; i < 40; i++) begin
        mdl.line_out <= ~mdl.line_out;
        repeat (CPB / 2) @(posedge clk);
        if (i % 3 == 0) mdl.line_out <= ~mdl.line_out;
        repeat (CPB / 2) @(posedge clk);
      end
      mdl.line_out <= 1'b0;
      mdl.oe <= 1'b0;
      repeat (4 * CPB) @(posedge clk);
      check(nsync == s0, "no sync from data alone");
    end
    one(msg_t'(30'h2aaa_aaaa), 30, 1);
    // jitter: every transition moved by up to one clock, at 16 clocks per bit
    // (+-1/16 bit per edge, up to 1/8 bit between neighbouring edges)
    for (int k = 0; k < 40; k++) begin
      msg_t m;
      int s0;
      m = msg_t'({$urandom, $urandom});
      s0 = nsync16;
      mdl16.send_jittered(m, 30, 1);
      repeat (4 * 16) @(posedge clk);
      check(nsync16 == s0 + 1 && got16 == m, $sformatf("jittered message: sent %h got %h", m, got16));
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
