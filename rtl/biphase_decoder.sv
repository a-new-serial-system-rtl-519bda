// biphase_decoder: recovers sync, bit clock and NRZ data from the bi-phase
// line, bit by bit, without a phase-locked loop.
//
// The received level is synchronised and its transitions detected. A sync is
// recognised when the line has been high for longer than any data pattern
// can keep it (SYNC_MIN clocks, 1.75 bit times); the falling edge that ends
// the sync is the first bit boundary and is reported by `sync`. After every
// boundary a window of three quarters of a bit is opened, the digital form
// of the one-shot of the published decoder: a transition inside it is a
// mid-bit transition and makes the bit a "one". When the window closes the
// bit is delivered on `bit_valid`/`bit_data`, and the next transition is
// taken as the next boundary. If no boundary arrives within IDLE_MAX clocks
// the message has ended and the decoder waits for the next sync. Any bits
// produced by the message terminator are left to the receiver, which knows
// the length of every message from its header.
//
// Distortion: a bit is read correctly while its mid-bit transition and the
// next boundary stay on their side of the 3/4 mark, that is while an edge
// moves by less than 1/4 bit relative to the boundary before it, less one
// clock of sampling error (under 2 clocks at 8 clocks per bit, under 4 at
// 16). A higher CLKS_PER_BIT buys jitter tolerance.
// Timing: `sync` comes 2 clocks (synchroniser) after the falling edge,
// each bit is delivered 3/4 of a bit time after its boundary, plus 2 clocks.
module biphase_decoder
  import camac_serial_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = camac_serial_pkg::DEF_CLKS_PER_BIT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic line_in,
  output logic sync,       // one clock: a new message starts
  output logic bit_valid,  // one clock: bit_data holds the next bit
  output logic bit_data,
  output logic msg_end     // one clock: no more boundaries, message over
);
  localparam int unsigned WINDOW   = (3 * CLKS_PER_BIT) / 4;
  localparam int unsigned SYNC_MIN = 2 * CLKS_PER_BIT - CLKS_PER_BIT / 4;
  localparam int unsigned IDLE_MAX = 2 * CLKS_PER_BIT - CLKS_PER_BIT / 4;
  localparam int unsigned CW       = $clog2(2 * CLKS_PER_BIT + 2);

  logic [2:0]    sync_ff;     // [0],[1] synchroniser, [2] previous level
  logic          lvl, edge_seen;
  logic [CW-1:0] high_cnt;
  logic          sync_armed;

  typedef enum logic [1:0] {D_IDLE, D_WINDOW, D_WAIT} state_t;
  state_t        state;
  logic [CW-1:0] t;
  logic          mid;

  assign lvl       = sync_ff[1];
  assign edge_seen = sync_ff[1] ^ sync_ff[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_ff    <= '0;
      high_cnt   <= '0;
      sync_armed <= 1'b0;
      state      <= D_IDLE;
      t          <= '0;
      mid        <= 1'b0;
      sync       <= 1'b0;
      bit_valid  <= 1'b0;
      bit_data   <= 1'b0;
      msg_end    <= 1'b0;
    end else begin
      sync_ff   <= {sync_ff[1:0], line_in};
      sync      <= 1'b0;
      bit_valid <= 1'b0;
      msg_end   <= 1'b0;

      // sync detector: measures the width of every high level
      if (!lvl)                          high_cnt <= '0;
      else if (high_cnt != CW'(SYNC_MIN)) high_cnt <= high_cnt + 1'b1;
      if (lvl && high_cnt == CW'(SYNC_MIN - 1)) sync_armed <= 1'b1;

      if (edge_seen && !lvl && sync_armed) begin
        // end of the sync pulse = first bit boundary
        sync_armed <= 1'b0;
        sync       <= 1'b1;
        state      <= D_WINDOW;
        t          <= '0;
        mid        <= 1'b0;
      end else begin
        unique case (state)
          D_IDLE: ;
          D_WINDOW: begin
            t <= t + 1'b1;
            if (edge_seen) mid <= 1'b1;
            if (t == CW'(WINDOW - 1)) begin
              bit_valid <= 1'b1;
              bit_data  <= mid | edge_seen;
              state     <= D_WAIT;
            end
          end
          D_WAIT: begin
            if (edge_seen) begin
              t     <= '0;
              mid   <= 1'b0;
              state <= D_WINDOW;
            end else if (t == CW'(IDLE_MAX)) begin
              msg_end <= 1'b1;
              state   <= D_IDLE;
            end else t <= t + 1'b1;
          end
          default: state <= D_IDLE;
        endcase
      end
    end
  end
endmodule
