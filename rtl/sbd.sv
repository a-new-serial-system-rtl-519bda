// sbd: serial branch driver. A CAMAC module in the computer's crate that
// turns one dataway cycle of that crate into one dataway cycle in a remote
// crate on the serial branch.
//
// Programming model (this module's station N is `n_sel`):
//   F17 A(any)  load the 24-bit control word from W (clears the scan LAM)
//   F1  A(any)  read the control word back on R
//   F16 A(any)  write: remote operation with the data on W
//   F0  A(any)  read or dataless: remote operation, read data on R
// The control word holds crate, N, A, F of the remote operation, the data
// length D (16 or 24 bits) and five scan-mode bits (sbd_scan_unit).
//
// A remote operation: on F0/F16 the module raises HOLD, so that the crate
// controller of its own crate delays S1 and S2. It sends a CAMAC command
// message and, for a write function, a write data message with W. If the
// previous operation went to the same crate, N, A, F and D and got a
// response, the SCC is still addressed with that command, so the driver
// sends only the short command (read or control) or only the write data
// (write) - the single address block transfer. The transmit enable is then
// dropped and the driver waits for the response. On the response it latches
// Q, X and the read data, advances the control word by the scan mode, and
// releases HOLD; the dataway cycle then completes with Q and X of the remote
// crate (and R for F0). If no response arrives within TIMEOUT_CLKS clocks
// after transmission, it releases HOLD with Q = X = 0. The L bit of the
// response is not used. `lam` is the scan LAM: end of scan, or no Q / no X
// when LQ / LX is set.
//
// Timing: HOLD rises 1 clock after N and F0/F16 are seen; a new operation
// needs N to drop in between. The register layout of the control word, the
// timeout value and the clearing of the LAM by F17 are this design's choices.
module sbd
  import camac_serial_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = camac_serial_pkg::DEF_CLKS_PER_BIT,
  parameter int unsigned TIMEOUT_CLKS = 640     // 16 us at 40 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  // dataway of the computer's crate
  input  logic        n_sel,
  input  logic [3:0]  a,
  input  logic [4:0]  f,
  input  logic        s1,
  input  logic [24:1] w,
  output logic [24:1] r,
  output logic        q,
  output logic        x,
  output logic        hold,
  output logic        lam,
  // serial line
  input  logic        line_in,
  output logic        line_out,
  output logic        line_oe,
  // status
  output logic        timed_out,   // last remote operation got no response
  output logic        short_used   // last remote operation used the short form
);
  localparam int unsigned TW = $clog2(TIMEOUT_CLKS + 1);

  ctrl_word_t cw, next_cw;
  logic       scan_end, lam_req;
  logic       resp_q, resp_x;
  logic [24:1] rdata;

  // ---- scan logic -------------------------------------------------------------
  sbd_scan_unit u_scan (.cw, .q(resp_q), .x(resp_x), .next_cw, .scan_end, .lam_req);

  // ---- transmitter ------------------------------------------------------------
  logic tx_start, tx_busy, tx_done;
  msg_t tx_msg;
  len_t tx_len;

  biphase_encoder #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_enc (
    .clk, .rst_n, .start(tx_start), .msg(tx_msg), .len(tx_len),
    .line(line_out), .oe(line_oe), .busy(tx_busy), .done(tx_done)
  );

  // ---- receiver ---------------------------------------------------------------
  logic dec_sync, dec_valid, dec_bit, dec_end, rx_done;
  msg_t rx_word;
  len_t rx_count, rx_len;

  biphase_decoder #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_dec (
    .clk, .rst_n, .line_in,
    .sync(dec_sync), .bit_valid(dec_valid), .bit_data(dec_bit), .msg_end(dec_end)
  );

  rx_shift_register u_rx (
    .clk, .rst_n, .sync(dec_sync), .bit_valid(dec_valid), .bit_data(dec_bit),
    .len(rx_len), .word(rx_word), .count(rx_count), .done(rx_done)
  );

  // only responses are taken; the driver also hears its own commands
  always_comb begin
    if (!rx_word[POS_A])      rx_len = '0;
    else if (rx_word[POS_B])  rx_len = len_t'(LEN_SRESP);
    else if (rx_word[POS_C])  rx_len = len_t'(LEN_RD24);
    else                      rx_len = len_t'(LEN_RD16);
  end

  // ---- message builders -------------------------------------------------------
  function automatic msg_t cmd_msg(input ctrl_word_t c);
    msg_t m;
    m = '0;
    m[POS_C]          = c.d;
    m[POS_CRATE +: 4] = c.c;
    m[POS_F +: 5]     = c.f;
    m[POS_N +: 5]     = c.n;
    m[POS_SUB +: 4]   = c.a;
    return m;
  endfunction

  function automatic msg_t wdata_msg(input logic d, input logic [24:1] data);
    msg_t m;
    m = '0;
    m[POS_B]          = 1'b1;
    m[POS_WDATA +: 24] = d ? data : {8'h00, data[16:1]};
    return m;
  endfunction

  localparam msg_t SHORT_MSG = msg_t'(3'b110);   // A=0 B=1 C=1, bit 0 first

  // ---- sequencer --------------------------------------------------------------
  typedef enum logic [2:0] {B_IDLE, B_CMD, B_DATA, B_WAIT, B_DONE} state_t;
  state_t      state;
  logic [18:0] last_cmd;      // crate, N, A, F, D of the addressed SCC
  logic        last_valid;
  logic [24:1] wr_data;
  logic        is_write;
  logic [TW-1:0] tmo;
  logic        trigger, same;
  logic [18:0] cur_cmd;

  assign trigger  = n_sel && (f == 5'd0 || f == 5'd16) && state == B_IDLE;
  assign cur_cmd  = {cw.c, cw.n, cw.a, cw.f, cw.d};
  assign same     = last_valid && (last_cmd == cur_cmd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= B_IDLE;
      cw         <= '0;
      hold       <= 1'b0;
      lam        <= 1'b0;
      resp_q     <= 1'b0;
      resp_x     <= 1'b0;
      rdata      <= '0;
      last_cmd   <= '0;
      last_valid <= 1'b0;
      wr_data    <= '0;
      is_write   <= 1'b0;
      tmo        <= '0;
      tx_start   <= 1'b0;
      tx_msg     <= '0;
      tx_len     <= '0;
      timed_out  <= 1'b0;
      short_used <= 1'b0;
    end else begin
      tx_start <= 1'b0;
      // register access, strobed by S1
      if (n_sel && s1 && f == 5'd17) begin
        cw  <= ctrl_word_t'(w);
        lam <= 1'b0;
      end
      unique case (state)
        B_IDLE: if (trigger) begin
          hold     <= 1'b1;
          wr_data  <= w;
          is_write <= (f_class(cw.f) == FC_WRITE) && (cw.n != N_SPECIAL);
          tx_start <= 1'b1;
          short_used <= same;
          if (f_class(cw.f) == FC_WRITE && cw.n != N_SPECIAL) begin
            tx_msg <= same ? wdata_msg(cw.d, w) : cmd_msg(cw);
            tx_len <= same ? (cw.d ? len_t'(LEN_WR24) : len_t'(LEN_WR16)) : len_t'(LEN_CMD);
            state  <= same ? B_DATA : B_CMD;
          end else begin
            tx_msg <= same ? SHORT_MSG : cmd_msg(cw);
            tx_len <= same ? len_t'(LEN_SHORT) : len_t'(LEN_CMD);
            state  <= B_CMD;
          end
        end
        B_CMD: if (tx_done) begin
          if (is_write) begin
            tx_msg   <= wdata_msg(cw.d, wr_data);
            tx_len   <= cw.d ? len_t'(LEN_WR24) : len_t'(LEN_WR16);
            tx_start <= 1'b1;
            state    <= B_DATA;
          end else begin
            tmo   <= '0;
            state <= B_WAIT;
          end
        end
        B_DATA: if (tx_done) begin
          tmo   <= '0;
          state <= B_WAIT;
        end
        B_WAIT: begin
          if (rx_done) begin
            resp_q     <= rx_word[POS_Q];
            resp_x     <= rx_word[POS_X];
            rdata      <= rx_word[POS_C] ? rx_word[POS_RDATA +: 24]
                                         : {8'h00, rx_word[POS_RDATA +: 16]};
            last_cmd   <= cur_cmd;
            last_valid <= 1'b1;
            timed_out  <= 1'b0;
            state      <= B_DONE;
          end else if (tmo == TW'(TIMEOUT_CLKS - 1)) begin
            resp_q     <= 1'b0;
            resp_x     <= 1'b0;
            rdata      <= '0;
            last_valid <= 1'b0;
            timed_out  <= 1'b1;
            state      <= B_DONE;
          end else tmo <= tmo + 1'b1;
        end
        B_DONE: begin
          // apply the scan step once, with the Q and X just latched
          if (hold) begin
            cw   <= next_cw;
            if (lam_req) lam <= 1'b1;
            hold <= 1'b0;
          end
          if (!n_sel) state <= B_IDLE;
        end
        default: state <= B_IDLE;
      endcase
    end
  end

  // ---- dataway read side ------------------------------------------------------
  always_comb begin
    r = '0;
    q = 1'b0;
    x = 1'b0;
    if (n_sel) begin
      unique case (f)
        5'd1:    begin r = 24'(cw); q = 1'b1; x = 1'b1; end
        5'd17:   begin q = 1'b1; x = 1'b1; end
        5'd0:    begin r = rdata; q = resp_q; x = resp_x; end
        5'd16:   begin q = resp_q; x = resp_x; end
        default: ;
      endcase
    end
  end

  logic unused;
  assign unused = ^{a, rx_count, dec_end, tx_busy, scan_end};

`ifndef SYNTHESIS
  a_hold_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                (state == B_IDLE) |-> !hold)
    else $error("sbd: HOLD raised outside a remote operation");
  a_quiet_while_waiting: assert property (@(posedge clk) disable iff (!rst_n)
                                (state == B_WAIT) |-> !line_oe)
    else $error("sbd: driving the line while waiting for a response");
`endif
endmodule
