// dst4_postproc: output stage of the 13-point DST-IV engine.
//
// It captures the three rows produced by each of the six arrays (cap[r]),
// latches x_p(0) and T_a(0) (hold), and when out_en is 1 registers
//   T(k)   from the array rows (even k from arrays 0..2, odd k from 3..5):
//            A-half rows  oA = A*a + B*v,  C-half rows oC = C*c + B*v
//            even: T4 = oA0, T10 = oA1, T12 = oA2, T8 = oC1, T6 = -oC2, T2 = -oC0
//            odd : T9 = oA0, T3  = oA1, T1  = oA2, T5 = oC1, T7 = -oC2, T11 = -oC0
//   T_a(k) = T(k) - T_a(k-1),  k = 1..12
//   Y(k)   = sqrt(2/N) * ( x_p(0) sin((2k+1)alpha/2) + 2 T_a(k) cos((2k+1)alpha/2) )
// The sqrt(2/N) factor is the final scaling multiplier. The result is rounded
// to W_OUT-bit integers on the scale of the input samples.
//
// The recursion, the output formula and the place of the scaling multiplier
// follow the algorithm description. The index assignment of the rows above
// belongs to this design's corrected decomposition (each C-half output is taken
// from a row of the shared B product, as in the description, but with a
// different row pairing and signs).
module dst4_postproc
  import dst4_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    hold,
  input  logic [PES-1:0] cap,
  input  logic    out_en,
  input  acc_t    rows_in [NARR],
  input  xp_t     xp0,
  input  wide_t   ta0,
  output result_t y [N]
);

  acc_t  rr [NARR][PES];
  xp_t   xp0_r;
  wide_t ta0_r;

  wide_t oa [2][PES];
  wide_t oc [2][PES];
  wide_t t  [N];
  wide_t ta [N];
  result_t ny [N];
  logic signed [W_T+W_K+1:0] m1;
  logic signed [W_T+W_K+1:0] ys;
  logic signed [W_T+2*W_K+1:0] m2;
  logic signed [W_T+W_K+1:0] ysc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xp0_r <= '0;
      ta0_r <= '0;
      for (int j = 0; j < NARR; j++)
        for (int r = 0; r < PES; r++) rr[j][r] <= '0;
    end else begin
      if (hold) begin
        xp0_r <= xp0;
        ta0_r <= ta0;
      end
      for (int r = 0; r < PES; r++)
        if (cap[r])
          for (int j = 0; j < NARR; j++) rr[j][r] <= rows_in[j];
    end
  end

  always_comb begin
    for (int h = 0; h < 2; h++)
      for (int r = 0; r < PES; r++) begin
        oa[h][r] = wide_t'((rr[3*h][r]   + rr[3*h+1][r]) >>> FRAC);
        oc[h][r] = wide_t'((rr[3*h+2][r] + rr[3*h+1][r]) >>> FRAC);
      end
    t[0]  = '0;
    t[4]  = oa[0][0];  t[10] = oa[0][1];  t[12] = oa[0][2];
    t[8]  = oc[0][1];  t[6]  = -oc[0][2]; t[2]  = -oc[0][0];
    t[9]  = oa[1][0];  t[3]  = oa[1][1];  t[1]  = oa[1][2];
    t[5]  = oc[1][1];  t[7]  = -oc[1][2]; t[11] = -oc[1][0];

    ta[0] = ta0_r;
    for (int k = 1; k < N; k++) ta[k] = t[k] - ta[k-1];

    for (int k = 0; k < N; k++) begin
      m1  = (W_T+W_K+2)'(wide_t'(xp0_r) <<< GUARD) * SIN_TH[k]
          + (W_T+W_K+2)'(ta[k] <<< 1) * COS_TH[k];
      ys  = m1 >>> FRAC;
      m2  = ys * SCALE;
      ysc = (W_T+W_K+2)'(m2 >>> FRAC);
      ny[k] = result_t'((ysc + (W_T+W_K+2)'(1 <<< (GUARD-1))) >>> GUARD);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) y[k] <= '0;
    end else if (out_en) begin
      y <= ny;
    end
  end

endmodule
