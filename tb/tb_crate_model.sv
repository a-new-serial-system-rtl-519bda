// tb_crate_model: behavioural model of the modules of one remote CAMAC
// crate. Stations 1..N_MODULES are occupied. A read returns a pattern made
// from crate, station and subaddress (expected_read()), a write is recorded,
// and Q is 0 for subaddress 15 of even stations, so that "no Q" occurs.
// X is 1 for any function addressed to an occupied station. The L lines are
// driven from `l_in`. Counts the strobes and C/Z cycles it sees.
module tb_crate_model
  import camac_serial_pkg::*;
#(
  parameter int unsigned CRATE     = 0,
  parameter int unsigned N_MODULES = 23
) (
  input  logic                clk,
  input  dw_cmd_t             dw,
  input  logic [N_STATIONS:1] l_in,
  output dw_resp_t            resp
);
  int          n_s1 = 0, n_c = 0, n_z = 0, n_writes = 0, n_reads = 0;
  logic [4:0]  last_n  = '0;
  logic [3:0]  last_a  = '0;
  logic [4:0]  last_f  = '0;
  logic [24:1] last_w  = '0;
  logic        prev_s1 = 1'b0, prev_c = 1'b0, prev_z = 1'b0;

  function automatic logic [24:1] expected_read(input int crate, input int n, input int a);
    logic [10:0] h;
    h = 11'(crate * 77 + n * 13 + a * 5 + 3);
    return {4'(crate), 5'(n), 4'(a), h};
  endfunction

  function automatic logic expected_q(input int n, input int a);
    return !(a == 15 && (n % 2) == 0);
  endfunction

  always_comb begin
    int sel;
    sel  = 0;
    resp = '0;
    for (int s = 1; s <= int'(N_MODULES); s++)
      if (dw.n[s]) sel = s;
    if (sel != 0) begin
      resp.x = 1'b1;
      resp.q = expected_q(sel, int'(dw.a));
      if (f_class(dw.f) == FC_READ) resp.r = expected_read(CRATE, sel, int'(dw.a));
    end
    resp.l = l_in;
  end

  always @(posedge clk) begin
    prev_s1 <= dw.s1;
    prev_c  <= dw.c;
    prev_z  <= dw.z;
    if (dw.c && !prev_c) n_c++;
    if (dw.z && !prev_z) n_z++;
    if (dw.s1 && !prev_s1) begin
      n_s1++;
      for (int s = 1; s <= N_STATIONS; s++)
        if (dw.n[s]) begin
          last_n = 5'(s);
        end
      last_a = dw.a;
      last_f = dw.f;
      if (f_class(dw.f) == FC_WRITE) begin
        last_w = dw.w;
        n_writes++;
      end
      if (f_class(dw.f) == FC_READ) n_reads++;
    end
  end
endmodule
