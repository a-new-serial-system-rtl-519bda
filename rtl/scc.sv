// scc: serial crate controller. It sits in a remote CAMAC crate, listens to
// the serial party line and runs the commands of the branch driver in its
// crate, answering every action with a response message.
//
// Receive path: the bi-phase decoder recovers sync, clock and data, and the
// receive register assembles the message; its header (A B C) tells the
// length. A CAMAC command whose crate field matches `crate_addr` addresses
// this controller and stores F, N, A and the word length D; a command to any
// other crate unaddresses it. The controller stays addressed, so that
//   - a write data message runs the stored write function again with new
//     data (single address write block transfer), and
//   - a short command repeats the stored read or control function (read
//     block transfer, repeat control).
// A read or control command runs at once; a write command waits for its
// write data message. Station number 30 selects the controller's own special
// commands (scc_special_decode): I and L-enable flip-flops, C and Z cycles
// and the read-back of all L lines.
//
// Execution: camac_cycle_gen runs a 1 us dataway cycle. Transmit path: a
// multiplexer chooses the read data (read response), the L register (L-read
// response) or nothing (short response) and the encoder sends it with the
// Q, X and gated-L status bits. `lam` is the prompt L: OR of the crate's L
// lines gated by the L-enable flip-flop. Reset acts as power-on: I = 0, L
// disabled, not addressed.
//
// Timing: the dataway cycle starts 2 clocks after the last bit of the
// command is decoded; the response sync starts 1 clock after the cycle. A
// special command that needs no dataway cycle is answered two bit times
// after it was decoded, so that the command's terminator has left the line.
// An addressed controller answers every message: write data when the stored
// function is not a write, and a short command when it is one, are refused
// with a short response with Q = X = 0. An unaddressed controller ignores
// write data and short commands; a command for a write function is answered
// only after its write data.
module scc
  import camac_serial_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = camac_serial_pkg::DEF_CLKS_PER_BIT,
  parameter int unsigned STEP_CLKS    = camac_serial_pkg::DEF_STEP_CLKS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] crate_addr,
  // serial line
  input  logic       line_in,
  output logic       line_out,
  output logic       line_oe,
  // dataway of the crate
  output dw_cmd_t    dw,
  input  dw_resp_t   dw_resp,
  // prompt L pair
  output logic       lam
);
  // ---- receive --------------------------------------------------------------
  logic dec_sync, dec_valid, dec_bit, dec_end;
  msg_t rx_word;
  len_t rx_count, rx_len;
  logic rx_done;

  biphase_decoder #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_dec (
    .clk, .rst_n, .line_in,
    .sync(dec_sync), .bit_valid(dec_valid), .bit_data(dec_bit), .msg_end(dec_end)
  );

  rx_shift_register u_rx (
    .clk, .rst_n, .sync(dec_sync), .bit_valid(dec_valid), .bit_data(dec_bit),
    .len(rx_len), .word(rx_word), .count(rx_count), .done(rx_done)
  );

  // stored command of the addressed state
  logic        addressed;
  logic [4:0]  st_f, st_n;
  logic [3:0]  st_a;
  logic        st_d;
  logic [24:1] st_w;

  // message length from the header; responses of other crates are not ours
  always_comb begin
    if (rx_word[POS_A])                          rx_len = '0;
    else if (!rx_word[POS_B])                    rx_len = len_t'(LEN_CMD);
    else if (!rx_word[POS_C])                    rx_len = st_d ? len_t'(LEN_WR24) : len_t'(LEN_WR16);
    else                                         rx_len = len_t'(LEN_SHORT);
  end

  // ---- special commands and dataway cycle -------------------------------------
  logic sp_special, sp_read_l, sp_set_i, sp_clr_i, sp_en_l, sp_dis_l, sp_c, sp_z, sp_valid;
  scc_special_decode u_sp (
    .n(st_n), .f(st_f), .a(st_a),
    .special(sp_special), .read_l(sp_read_l), .set_i(sp_set_i), .clr_i(sp_clr_i),
    .en_l(sp_en_l), .dis_l(sp_dis_l), .cycle_c(sp_c), .cycle_z(sp_z), .valid(sp_valid)
  );

  logic        cyc_start, cyc_c, cyc_z, cyc_busy, cyc_done, cyc_q, cyc_x;
  logic [24:1] cyc_r;
  dw_cmd_t     cyc_dw;

  camac_cycle_gen #(.STEP_CLKS(STEP_CLKS)) u_cyc (
    .clk, .rst_n, .start(cyc_start), .n(st_n), .a(st_a), .f(st_f), .w(st_w),
    .do_c(cyc_c), .do_z(cyc_z), .dw(cyc_dw), .dw_resp,
    .r(cyc_r), .q(cyc_q), .x(cyc_x), .busy(cyc_busy), .done(cyc_done)
  );

  logic i_ff, le_ff, l_gated;
  assign l_gated = le_ff && (|dw_resp.l);
  assign lam     = l_gated;

  always_comb begin
    dw   = cyc_dw;
    dw.i = i_ff;
  end

  // ---- transmit --------------------------------------------------------------
  logic tx_start, tx_busy, tx_done;
  msg_t tx_msg;
  len_t tx_len;

  biphase_encoder #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_enc (
    .clk, .rst_n, .start(tx_start), .msg(tx_msg), .len(tx_len),
    .line(line_out), .oe(line_oe), .busy(tx_busy), .done(tx_done)
  );

  function automatic msg_t build_resp(input logic b, input logic c, input logic s0,
                                      input logic s1, input logic s2, input logic [24:1] data);
    msg_t m;
    m             = '0;
    m[POS_A]      = 1'b1;
    m[POS_B]      = b;
    m[POS_C]      = c;
    m[POS_Q]      = s0;
    m[POS_X]      = s1;
    m[POS_L]      = s2;
    m[POS_RDATA +: 24] = data;
    return m;
  endfunction

  // ---- sequencer ---------------------------------------------------------------
  typedef enum logic [2:0] {C_IDLE, C_EXEC, C_CYCLE, C_GAP, C_TX} state_t;
  state_t state;
  localparam int unsigned GAP_CLKS = 2 * CLKS_PER_BIT;
  logic [$clog2(GAP_CLKS + 1)-1:0] gap;

  logic [3:0]  rx_crate;
  logic [4:0]  rx_f;
  assign rx_crate = rx_word[POS_CRATE +: 4];
  assign rx_f     = rx_word[POS_F +: 5];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= C_IDLE;
      addressed <= 1'b0;
      st_f      <= '0;
      st_n      <= '0;
      st_a      <= '0;
      st_d      <= 1'b0;
      st_w      <= '0;
      i_ff      <= 1'b0;
      le_ff     <= 1'b0;
      cyc_start <= 1'b0;
      cyc_c     <= 1'b0;
      cyc_z     <= 1'b0;
      tx_start  <= 1'b0;
      tx_msg    <= '0;
      tx_len    <= '0;
      gap       <= '0;
    end else begin
      cyc_start <= 1'b0;
      tx_start  <= 1'b0;
      unique case (state)
        C_IDLE: if (rx_done) begin
          if (!rx_word[POS_B]) begin
            // CAMAC command: address or unaddress
            if (rx_crate == crate_addr) begin
              addressed <= 1'b1;
              st_f      <= rx_f;
              st_n      <= rx_word[POS_N +: 5];
              st_a      <= rx_word[POS_SUB +: 4];
              st_d      <= rx_word[POS_C];
              if (f_class(rx_f) != FC_WRITE || rx_word[POS_N +: 5] == N_SPECIAL)
                state <= C_EXEC;
            end else addressed <= 1'b0;
          end else if (addressed && !rx_word[POS_C]) begin
            // write data for the stored write function
            if (f_class(st_f) == FC_WRITE && !sp_special) begin
              st_w  <= st_d ? rx_word[POS_WDATA +: 24] : {8'h00, rx_word[POS_WDATA +: 16]};
              state <= C_EXEC;
            end else begin
              // nothing to write with: refuse with Q = X = 0
              tx_msg <= build_resp(1'b1, 1'b0, 1'b0, 1'b0, l_gated, '0);
              tx_len <= len_t'(LEN_SRESP);
              gap    <= '0;
              state  <= C_GAP;
            end
          end else if (addressed) begin
            // short command: repeat the stored read or control function
            if (f_class(st_f) != FC_WRITE || sp_special) state <= C_EXEC;
            else begin
              // a write cannot be repeated without data: refuse
              tx_msg <= build_resp(1'b1, 1'b0, 1'b0, 1'b0, l_gated, '0);
              tx_len <= len_t'(LEN_SRESP);
              gap    <= '0;
              state  <= C_GAP;
            end
          end
        end
        C_EXEC: begin
          if (sp_special) begin
            if (sp_set_i) i_ff  <= 1'b1;
            if (sp_clr_i) i_ff  <= 1'b0;
            if (sp_en_l)  le_ff <= 1'b1;
            if (sp_dis_l) le_ff <= 1'b0;
            if (sp_c || sp_z) begin
              cyc_c     <= sp_c;
              cyc_z     <= sp_z;
              cyc_start <= 1'b1;
              state     <= C_CYCLE;
            end else begin
              if (sp_read_l) begin
                tx_msg <= build_resp(1'b0, 1'b1, i_ff, le_ff, l_gated, {1'b0, dw_resp.l});
                tx_len <= len_t'(LEN_RD24);
              end else begin
                tx_msg <= build_resp(1'b1, 1'b0, sp_valid, sp_valid, l_gated, '0);
                tx_len <= len_t'(LEN_SRESP);
              end
              gap   <= '0;
              state <= C_GAP;
            end
          end else begin
            cyc_c     <= 1'b0;
            cyc_z     <= 1'b0;
            cyc_start <= 1'b1;
            state     <= C_CYCLE;
          end
        end
        C_CYCLE: if (cyc_done) begin
          if (!sp_special && f_class(st_f) == FC_READ) begin
            tx_msg <= build_resp(1'b0, st_d, cyc_q, cyc_x, l_gated,
                                 st_d ? cyc_r : {8'h00, cyc_r[16:1]});
            tx_len <= st_d ? len_t'(LEN_RD24) : len_t'(LEN_RD16);
          end else begin
            tx_msg <= build_resp(1'b1, 1'b0, sp_special ? 1'b1 : cyc_q,
                                 sp_special ? 1'b1 : cyc_x, l_gated, '0);
            tx_len <= len_t'(LEN_SRESP);
          end
          tx_start <= 1'b1;
          state    <= C_TX;
        end
        C_GAP: begin             // let the command's terminator clear the line
          if (gap == $bits(gap)'(GAP_CLKS - 1)) begin
            tx_start <= 1'b1;
            state    <= C_TX;
          end else gap <= gap + 1'b1;
        end
        C_TX: if (tx_done) state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

  logic unused;
  assign unused = ^{rx_count, dec_end, cyc_busy, tx_busy};
endmodule
