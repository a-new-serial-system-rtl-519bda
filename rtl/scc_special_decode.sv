// scc_special_decode: decodes the special commands that a serial crate
// controller executes itself (station number 30), the job of the field
// programmable logic array in the published controller.
//
// Code table (station N30; the published table lists these actions, the
// F/A codes are this design's choice, modelled on usual CAMAC controller
// conventions):
//   F1  A0   read the 23 L lines, the I flip-flop and the L-enable flip-flop
//   F24 A9   set I = 0          F26 A9   set I = 1
//   F24 A10  disable L          F26 A10  enable L
//   F26 A11  run a dataway cycle with C = 1
//   F26 A8   run a dataway cycle with Z = 1, set I = 0, disable L
// Any other code with N30 is accepted with no action and answered with
// X = 0. Purely combinational.
module scc_special_decode
  import camac_serial_pkg::*;
(
  input  logic [4:0] n,
  input  logic [4:0] f,
  input  logic [3:0] a,
  output logic       special,   // N30: handled by the controller itself
  output logic       read_l,
  output logic       set_i,
  output logic       clr_i,
  output logic       en_l,
  output logic       dis_l,
  output logic       cycle_c,
  output logic       cycle_z,
  output logic       valid      // a known special command
);
  always_comb begin
    special = (n == N_SPECIAL);
    read_l  = special && f == 5'd1  && a == 4'd0;
    clr_i   = special && ((f == 5'd24 && a == 4'd9) || (f == 5'd26 && a == 4'd8));
    set_i   = special && f == 5'd26 && a == 4'd9;
    dis_l   = special && ((f == 5'd24 && a == 4'd10) || (f == 5'd26 && a == 4'd8));
    en_l    = special && f == 5'd26 && a == 4'd10;
    cycle_c = special && f == 5'd26 && a == 4'd11;
    cycle_z = special && f == 5'd26 && a == 4'd8;
    valid   = read_l | set_i | clr_i | en_l | dis_l | cycle_c | cycle_z;
  end
endmodule
