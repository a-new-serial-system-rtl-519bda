// tb_line_model: test-bench model of a unit on the serial party line,
// written from the line format alone (sync = two bit times high, bi-phase
// mark bits, termination) and independent of the RTL encoder/decoder.
// send() drives a message; recv() waits for a sync, samples every bit at a
// quarter and three quarters of its period, checks the boundary transitions
// and returns the bits and the clock cycle on which the sync began.
module tb_line_model
  import camac_serial_pkg::*;
#(
  parameter int unsigned CPB = camac_serial_pkg::DEF_CLKS_PER_BIT
) (
  input  logic clk,
  input  logic line_in,
  output logic line_out,
  output logic oe
);
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    line_out = 1'b0;
    oe       = 1'b0;
  end

  task automatic send(input msg_t m, input int len);
    logic lvl;
    @(posedge clk);
    oe <= 1'b1;
    line_out <= 1'b1;
    repeat (2 * CPB) @(posedge clk);
    lvl = 1'b1;
    for (int i = 0; i < len; i++) begin
      lvl = ~lvl;
      line_out <= lvl;
      repeat (CPB / 2) @(posedge clk);
      if (m[i]) begin
        lvl = ~lvl;
        line_out <= lvl;
      end
      repeat (CPB / 2) @(posedge clk);
    end
    if (lvl) begin
      repeat (CPB / 2) @(posedge clk);
      line_out <= 1'b0;
    end
    repeat (CPB / 2) @(posedge clk);
    oe <= 1'b0;
    line_out <= 1'b0;
  endtask

  // Same message with every transition moved by a random -J..+J clocks
  // (timing jitter from line dispersion). The waveform is first built clock
  // by clock, then each transition is shifted and the result is played.
  task automatic send_jittered(input msg_t m, input int len, input int J);
    logic lv[$];
    int   tr[$];
    logic lvl;
    int   t_new, k;
    lv.push_back(1'b0);
    for (int i = 0; i < 2 * int'(CPB); i++) lv.push_back(1'b1);
    lvl = 1'b1;
    for (int i = 0; i < len; i++) begin
      lvl = ~lvl;
      for (int c = 0; c < int'(CPB) / 2; c++) lv.push_back(lvl);
      if (m[i]) lvl = ~lvl;
      for (int c = 0; c < int'(CPB) / 2; c++) lv.push_back(lvl);
    end
    if (lvl) for (int c = 0; c < int'(CPB) / 2; c++) lv.push_back(1'b1);
    for (int c = 0; c < int'(CPB) / 2; c++) lv.push_back(1'b0);
    // transitions, each moved by up to J clocks
    for (int i = 1; i < lv.size(); i++)
      if (lv[i] != lv[i-1]) begin
        t_new = i + $urandom_range(0, 2 * J) - J;
        if (tr.size() > 0 && t_new <= tr[tr.size()-1]) t_new = tr[tr.size()-1] + 1;
        tr.push_back(t_new);
      end
    @(posedge clk);
    oe <= 1'b1;
    lvl = 1'b0;
    k = 0;
    for (int i = 0; i < lv.size() + J; i++) begin
      if (k < tr.size() && tr[k] == i) begin
        lvl = ~lvl;
        k++;
      end
      line_out <= lvl;
      @(posedge clk);
    end
    oe <= 1'b0;
    line_out <= 1'b0;
  endtask

  // returns ok = 0 on a timeout or a missing boundary transition
  task automatic recv(output msg_t m, input int len, input int max_wait,
                      output longint unsigned t_sync, output bit ok);
    int hi;
    int waited;
    logic prev_end, l1, l2;
    m = '0;
    ok = 1'b0;
    t_sync = 0;
    waited = 0;
    hi = 0;
    // find a high level at least 1.75 bits long followed by a falling edge
    while (1) begin
      @(posedge clk);
      waited++;
      if (waited > max_wait) return;
      if (line_in) begin
        if (hi == 0) t_sync = cyc;
        hi++;
      end else begin
        if (hi >= (2 * CPB - CPB / 4)) break;
        hi = 0;
      end
    end
    // this clock is the first clock of bit 0
    prev_end = 1'b1;
    for (int i = 0; i < len; i++) begin
      // sample at 1/4 and 3/4 of the bit; clock 0 of the bit is now
      repeat (CPB / 4) @(posedge clk);
      l1 = line_in;
      repeat (CPB / 2) @(posedge clk);
      l2 = line_in;
      repeat (CPB - CPB / 4 - CPB / 2) @(posedge clk);
      if (l1 == prev_end) return;   // no boundary transition
      m[i] = l1 ^ l2;
      prev_end = l2;
    end
    ok = 1'b1;
  endtask
endmodule
