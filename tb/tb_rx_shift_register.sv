// tb_rx_shift_register: feeds bits directly, with the length answered from
// the header as a controller would (header 011 -> 3, 000 -> 21, 1xx -> 0).
// Checks the assembled word, the count, that `done` pulses exactly once at
// the right bit, that bits after `done` are ignored and that a zero length
// never completes.
`timescale 1ns/1ps
module tb_rx_shift_register;
  import camac_serial_pkg::*;

  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic sync = 0, bit_valid = 0, bit_data = 0, done;
  msg_t word;
  len_t count, len;
  int checks = 0, failures = 0, ndone = 0;

  always_comb begin
    if (word[0])      len = '0;
    else if (!word[1]) len = len_t'(21);
    else if (word[2]) len = len_t'(3);
    else              len = len_t'(19);
  end

  rx_shift_register dut (.clk, .rst_n, .sync, .bit_valid, .bit_data, .len, .word, .count, .done);

  always @(posedge clk) if (done) ndone++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic feed(input msg_t m, input int nb);
    @(posedge clk);
    sync <= 1'b1;
    @(posedge clk);
    sync <= 1'b0;
    for (int i = 0; i < nb; i++) begin
      repeat (2) @(posedge clk);
      bit_valid <= 1'b1;
      bit_data  <= m[i];
      @(posedge clk);
      bit_valid <= 1'b0;
    end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    msg_t m;
    int d0, exp_len;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 60; k++) begin
      m = msg_t'({$urandom, $urandom});
      if (k % 4 == 0) m[2:0] = 3'b110;       // short command (bit 0 first)
      if (k % 4 == 1) m[1:0] = 2'b00;        // command
      if (k % 4 == 2) m[2:0] = 3'b010;       // write data, 19 bits here
      if (k % 4 == 3) m[0]   = 1'b1;         // response: not taken
      exp_len = m[0] ? 0 : (!m[1] ? 21 : (m[2] ? 3 : 19));
      d0 = ndone;
      feed(m, 30);
      if (exp_len == 0) begin
        check(ndone == d0, "zero length never completes");
        check(count == len_t'(30), "all bits stored while waiting");
      end else begin
        check(ndone == d0 + 1, $sformatf("done once for length %0d", exp_len));
        check(count == len_t'(exp_len), $sformatf("count %0d for %0d", count, exp_len));
        check(word == (m & ((msg_t'(1) << exp_len) - 1)), "word holds the message, later bits ignored");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
