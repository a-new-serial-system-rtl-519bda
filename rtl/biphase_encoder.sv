// biphase_encoder: parallel-to-serial converter and bi-phase line encoder.
//
// On `start` it takes a message (bit 0 is sent first) and its length and
// drives the line: first the sync, a positive pulse two bit times wide that
// no data pattern can produce, then every bit with a transition at its
// leading boundary and a second transition in its middle for a "one"
// (bi-phase mark; the first boundary is the falling edge that ends the sync).
// After the last bit it terminates: if the line is then high it stays high
// for half a bit and is returned to zero, and it is driven low for half a bit
// before the driver is released. `oe` is the transmit enable of the line
// driver; it is low outside a message so that the party line is free.
//
// Timing: one bit is CLKS_PER_BIT clocks (8 clocks of 25 ns = 200 ns). A
// message of L bits occupies the line for (2 + L) bit times plus the
// termination (half a bit, or a whole bit if the line ended high). `done`
// pulses for one clock when `oe` drops; `busy` is high from `start` to then.
// The line code, sync and termination follow the published design; the
// half-bit low drive before release is this design's choice.
module biphase_encoder
  import camac_serial_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = camac_serial_pkg::DEF_CLKS_PER_BIT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  msg_t msg,
  input  len_t len,
  output logic line,
  output logic oe,
  output logic busy,
  output logic done
);
  localparam int unsigned HALF = CLKS_PER_BIT / 2;
  localparam int unsigned CW   = $clog2(2 * CLKS_PER_BIT + 1);

  typedef enum logic [2:0] {S_IDLE, S_SYNC, S_BITS, S_TERM_HI, S_TERM_LO} state_t;
  state_t        state;
  logic [CW-1:0] ph;
  len_t          idx;
  len_t          last;
  msg_t          sh;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ph    <= '0;
      idx   <= '0;
      last  <= '0;
      sh    <= '0;
      line  <= 1'b0;
      oe    <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          sh    <= msg;
          last  <= len - 1'b1;
          idx   <= '0;
          ph    <= '0;
          line  <= 1'b1;          // sync pulse begins
          oe    <= 1'b1;
          state <= S_SYNC;
        end
        S_SYNC: begin
          if (ph == CW'(2 * CLKS_PER_BIT - 1)) begin
            ph    <= '0;
            line  <= 1'b0;        // first bit boundary
            state <= S_BITS;
          end else ph <= ph + 1'b1;
        end
        S_BITS: begin
          if (ph == CW'(HALF - 1) && sh[0]) line <= ~line;   // mid-bit "one"
          if (ph == CW'(CLKS_PER_BIT - 1)) begin
            ph <= '0;
            sh <= sh >> 1;
            if (idx == last) begin
              state <= line ? S_TERM_HI : S_TERM_LO;
            end else begin
              idx  <= idx + 1'b1;
              line <= ~line;       // next bit boundary
            end
          end else ph <= ph + 1'b1;
        end
        S_TERM_HI: begin          // stay high half a bit, then return to zero
          if (ph == CW'(HALF - 1)) begin
            ph    <= '0;
            line  <= 1'b0;
            state <= S_TERM_LO;
          end else ph <= ph + 1'b1;
        end
        S_TERM_LO: begin
          if (ph == CW'(HALF - 1)) begin
            ph    <= '0;
            oe    <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else ph <= ph + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("biphase_encoder: start while busy");
`endif
endmodule
