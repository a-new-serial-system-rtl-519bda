// camac_cycle_gen: runs one CAMAC dataway cycle in the crate of a serial
// crate controller, generated from a count state as in the published
// controller rather than from discrete delays.
//
// The cycle is 10 count steps of STEP_CLKS clocks (100 ns each, 1 us in all):
//   steps 0-9  B, and N, A, F (and W for a write) are held on the dataway
//   steps 2-3  S1; R, Q and X are latched on the last clock of S1
//   steps 6-7  S2
//   steps 1-8  C or Z, when the cycle is a clear or initialise cycle
// A station number of 1..23 drives that station's N line, the broadcast
// number 28 drives all of them, any other number none. W is driven only for
// write functions. `done` pulses on the last clock of the cycle, with the
// latched R, Q, X valid from then until the next `start`.
// The 1 us cycle and the S1/S2 placement are the usual CAMAC dataway timing;
// the exact count states are this design's choice.
module camac_cycle_gen
  import camac_serial_pkg::*;
#(
  parameter int unsigned STEP_CLKS = camac_serial_pkg::DEF_STEP_CLKS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [4:0]  n,
  input  logic [3:0]  a,
  input  logic [4:0]  f,
  input  logic [24:1] w,
  input  logic        do_c,     // clear cycle: C with S2, no N/A/F
  input  logic        do_z,     // initialise cycle: Z with S2, no N/A/F
  output dw_cmd_t     dw,       // I is left at 0, the owner drives it
  input  dw_resp_t    dw_resp,
  output logic [24:1] r,
  output logic        q,
  output logic        x,
  output logic        busy,
  output logic        done
);
  localparam int unsigned STEPS = 10;
  localparam int unsigned SW    = $clog2(STEP_CLKS + 1);

  logic [SW-1:0] sub;
  logic [3:0]    step;
  logic [4:0]    n_r, f_r;
  logic [3:0]    a_r;
  logic [24:1]   w_r;
  logic          c_r, z_r;
  logic          last_clk;

  assign last_clk = (sub == SW'(STEP_CLKS - 1));
  assign done     = busy && last_clk && (step == 4'(STEPS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      sub  <= '0;
      step <= '0;
      n_r  <= '0;
      a_r  <= '0;
      f_r  <= '0;
      w_r  <= '0;
      c_r  <= 1'b0;
      z_r  <= 1'b0;
      r    <= '0;
      q    <= 1'b0;
      x    <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        sub  <= '0;
        step <= '0;
        n_r  <= n;
        a_r  <= a;
        f_r  <= f;
        w_r  <= w;
        c_r  <= do_c;
        z_r  <= do_z;
      end
    end else begin
      if (last_clk) begin
        sub <= '0;
        if (step == 4'(STEPS - 1)) busy <= 1'b0;
        else                       step <= step + 1'b1;
      end else sub <= sub + 1'b1;
      if (step == 4'd3 && last_clk) begin
        r <= dw_resp.r;
        q <= dw_resp.q;
        x <= dw_resp.x;
      end
    end
  end

  always_comb begin
    logic addr_cycle;
    dw         = '0;
    addr_cycle = busy && !c_r && !z_r;
    if (addr_cycle) begin
      for (int s = 1; s <= N_STATIONS; s++)
        dw.n[s] = (n_r == 5'(s)) || (n_r == N_BROADCAST);
      dw.a = a_r;
      dw.f = f_r;
      if (f_class(f_r) == FC_WRITE) dw.w = w_r;
    end
    dw.b  = busy;
    dw.s1 = busy && (step == 4'd2 || step == 4'd3);
    dw.s2 = busy && (step == 4'd6 || step == 4'd7);
    dw.c  = busy && c_r && step >= 4'd1 && step <= 4'd8;
    dw.z  = busy && z_r && step >= 4'd1 && step <= 4'd8;
  end
endmodule
