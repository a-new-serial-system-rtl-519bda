// sbd_scan_unit: scan-mode logic of the serial branch driver. After every
// remote operation it works out the control word for the next one and
// whether a LAM must be raised.
//
// The five mode bits of the control word are LX, LQ, SC, SN, SA (mode
// number = the bits read as a binary number, SA least significant). The
// scanned fields form a counter with the subaddress innermost, then the
// station, then the crate; only fields whose scan bit is set take part:
//   A counts 0..15, N counts 1..23, C counts 0..15.
// When an enabled field is at its top it goes back to its bottom value and
// the next enabled field advances. When every enabled field is at its top
// the scan is over: the address is left unchanged and `scan_end` is raised.
// So mode 1 scans A of one module, mode 2 N in one crate, mode 4 C, mode 7
// every A of every N of every crate from the loaded start address, and
// mode 15 does the same with a LAM whenever a module gives no Q.
// `lam_req` = scan_end, or LQ and Q = 0, or LX and X = 0.
// The field ranges and the LQ/LX meaning follow the published mode table;
// which 22 of the 32 codes the original supported is not known, so all 32
// are implemented with the same rule. Purely combinational.
module sbd_scan_unit
  import camac_serial_pkg::*;
(
  input  ctrl_word_t cw,
  input  logic       q,
  input  logic       x,
  output ctrl_word_t next_cw,
  output logic       scan_end,
  output logic       lam_req
);
  localparam logic [3:0] A_TOP = 4'd15, A_BOT = 4'd0;
  localparam logic [4:0] N_TOP = 5'd23, N_BOT = 5'd1;
  localparam logic [3:0] C_TOP = 4'd15, C_BOT = 4'd0;

  always_comb begin
    logic carry;
    next_cw = cw;
    carry   = 1'b1;             // one step to add, innermost field first
    if (cw.mode.sa && carry) begin
      if (cw.a != A_TOP) begin next_cw.a = cw.a + 1'b1; carry = 1'b0; end
      else                     next_cw.a = A_BOT;
    end
    if (cw.mode.sn && carry) begin
      if (cw.n < N_TOP) begin next_cw.n = cw.n + 1'b1; carry = 1'b0; end
      else                    next_cw.n = N_BOT;
    end
    if (cw.mode.sc && carry) begin
      if (cw.c != C_TOP) begin next_cw.c = cw.c + 1'b1; carry = 1'b0; end
      else                     next_cw.c = C_BOT;
    end
    scan_end = (cw.mode.sa || cw.mode.sn || cw.mode.sc) && carry;
    if (scan_end) next_cw = cw;
    lam_req = scan_end || (cw.mode.lq && !q) || (cw.mode.lx && !x);
  end
endmodule
