// camac_serial_system: one serial CAMAC branch. A serial branch driver in
// the computer's crate and N_CRATES serial crate controllers, one per remote
// crate, share one twisted-pair party line; a second pair carries the OR of
// the controllers' prompt L signals.
//
// The party line is modelled digitally: every unit drives it only while its
// transmit enable is on, the bus is the OR of the enabled drivers, and with
// no driver on it the termination bias holds it at zero. The protocol has a
// single master (the driver) and only the addressed controller answers, so
// there is never more than one driver, which an assertion checks. Controller
// k has crate address k (crate addresses are 4 bits, up to 16 crates). Cable
// delay and the analog line are not modelled.
//
// Ports: the driver's side of the computer's dataway (sbd_*), each remote
// crate's dataway (crate_dw out, crate_resp in), the prompt L and, for
// observation, the line level.
module camac_serial_system
  import camac_serial_pkg::*;
#(
  parameter int unsigned N_CRATES     = 16,
  parameter int unsigned CLKS_PER_BIT = camac_serial_pkg::DEF_CLKS_PER_BIT,
  parameter int unsigned STEP_CLKS    = camac_serial_pkg::DEF_STEP_CLKS,
  parameter int unsigned TIMEOUT_CLKS = 640
) (
  input  logic        clk,
  input  logic        rst_n,
  // branch driver in the computer's crate
  input  logic        sbd_n,
  input  logic [3:0]  sbd_a,
  input  logic [4:0]  sbd_f,
  input  logic        sbd_s1,
  input  logic [24:1] sbd_w,
  output logic [24:1] sbd_r,
  output logic        sbd_q,
  output logic        sbd_x,
  output logic        sbd_hold,
  output logic        sbd_lam,
  output logic        sbd_timed_out,
  output logic        sbd_short_used,
  // remote crates
  output dw_cmd_t     crate_dw   [N_CRATES],
  input  dw_resp_t    crate_resp [N_CRATES],
  output logic        prompt_l,
  output logic        line
);
  logic                sbd_out, sbd_oe;
  logic [N_CRATES-1:0] scc_out, scc_oe, scc_lam;

  // party line: OR of the enabled drivers, biased to zero when none drives
  assign line     = (sbd_out & sbd_oe) | (|(scc_out & scc_oe));
  assign prompt_l = |scc_lam;

  sbd #(.CLKS_PER_BIT(CLKS_PER_BIT), .TIMEOUT_CLKS(TIMEOUT_CLKS)) u_sbd (
    .clk, .rst_n,
    .n_sel(sbd_n), .a(sbd_a), .f(sbd_f), .s1(sbd_s1), .w(sbd_w),
    .r(sbd_r), .q(sbd_q), .x(sbd_x), .hold(sbd_hold), .lam(sbd_lam),
    .line_in(line), .line_out(sbd_out), .line_oe(sbd_oe),
    .timed_out(sbd_timed_out), .short_used(sbd_short_used)
  );

  for (genvar k = 0; k < N_CRATES; k++) begin : g_crate
    scc #(.CLKS_PER_BIT(CLKS_PER_BIT), .STEP_CLKS(STEP_CLKS)) u_scc (
      .clk, .rst_n, .crate_addr(4'(k)),
      .line_in(line), .line_out(scc_out[k]), .line_oe(scc_oe[k]),
      .dw(crate_dw[k]), .dw_resp(crate_resp[k]), .lam(scc_lam[k])
    );
  end

`ifndef SYNTHESIS
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0({scc_oe, sbd_oe}))
    else $error("camac_serial_system: two drivers on the party line");
`endif
endmodule
