// rx_shift_register: serial-to-parallel receive register for one message.
//
// `sync` clears the register and arms it. Each decoded bit is stored at the
// position given by the bit count (bit 0 = first bit on the line, so the
// word has the same layout as a transmitted message). The owner looks at the
// header (the first three bits) and answers with the message length on
// `len`; when the count reaches that length, and at least the header is in,
// `done` pulses for one clock and the register ignores further bits until
// the next sync. A length of zero means "not for me": the message is never
// completed. `word` and `count` stay valid after `done` until the next sync.
module rx_shift_register
  import camac_serial_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sync,
  input  logic bit_valid,
  input  logic bit_data,
  input  len_t len,
  output msg_t word,
  output len_t count,
  output logic done
);
  logic active;

  assign done = active && (count >= len_t'(LEN_SHORT)) && (count == len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word   <= '0;
      count  <= '0;
      active <= 1'b0;
    end else if (sync) begin
      word   <= '0;
      count  <= '0;
      active <= 1'b1;
    end else if (done) begin
      active <= 1'b0;
    end else if (active && bit_valid && count < len_t'(MSG_MAX)) begin
      word[count] <= bit_data;
      count       <= count + 1'b1;
    end
  end
endmodule
