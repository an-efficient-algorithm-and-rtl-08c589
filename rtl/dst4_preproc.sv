// dst4_preproc: input stage of the 13-point DST-IV engine.
//
// From the N input samples x(i) it computes
//   x_p(N-1) = x(N-1),  x_p(i) = (-1)^i x(i) + x_p(i+1)      (suffix sums)
//   x_C(i)   = x_p(i) cos(i*alpha)                            (weighted inputs)
//   T_a(0)   = sum_i (-1)^i x_p(i) sin(i*alpha)               (seed of the output recursion)
// and the folded pairs u(i) = x_C(i) + x_C(N-i) (used by even output indices)
// and d(i) = x_C(i) - x_C(N-i) (odd output indices), i = 1..6. These are
// permuted into the input vectors of the six arrays (the index sets {4,3,1} and
// {2,5,6} are the two cosets of the subgroup generated by 3 modulo 13, up to sign):
//   array 0 (A, even): a  = [ u4,  u3,  u1]
//   array 1 (B, even): v  = c - a
//   array 2 (C, even): c  = [ u2, -u5,  u6]
//   array 3 (A, odd) : a  = [ d4,  d3,  d1]
//   array 4 (B, odd) : v  = c - a
//   array 5 (C, odd) : c  = [ d2, -d5, -d6]
// All outputs are registered when `load` is 1 and held until the next load.
// x_C, the vectors and T_a(0) carry GUARD extra fractional bits.
//
// The x_p recursion, the x_C weighting, the pair sums/differences and the index
// sets follow the algorithm description. The (-1)^i factor inside T_a(0), the
// signs inside the vectors and the B-array input v = c - a are this design's
// corrected derivation; they were checked against the direct DST-IV definition.
module dst4_preproc
  import dst4_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  sample_t x    [N],
  output data_t   vec  [NARR][PES],
  output xp_t     xp0,
  output wide_t   ta0
);

  localparam int SH = FRAC - GUARD;

  xp_t   xp  [N];
  data_t xc  [N];
  data_t u   [N];
  data_t d   [N];
  data_t nv  [NARR][PES];
  logic signed [W_XP+W_K-1:0] pc, ps;
  logic signed [W_XP+W_K+3:0] acc;

  always_comb begin
    xp[N-1] = xp_t'(x[N-1]);
    for (int i = N-2; i >= 0; i--)
      xp[i] = ((i % 2) != 0) ? xp[i+1] - xp_t'(x[i]) : xp[i+1] + xp_t'(x[i]);

    acc = '0;
    for (int i = 0; i < N; i++) begin
      pc    = xp[i] * COS_I[i];
      xc[i] = data_t'(pc >>> SH);
      ps    = xp[i] * SIN_I[i];
      if ((i % 2) != 0) acc = acc - (W_XP+W_K+4)'(ps);
      else              acc = acc + (W_XP+W_K+4)'(ps);
    end

    for (int i = 0; i < N; i++) begin
      u[i] = '0;
      d[i] = '0;
    end
    for (int i = 1; i <= (N-1)/2; i++) begin
      u[i] = xc[i] + xc[N-i];
      d[i] = xc[i] - xc[N-i];
    end

    nv[0] = '{u[4], u[3], u[1]};
    nv[2] = '{u[2], -u[5], u[6]};
    nv[3] = '{d[4], d[3], d[1]};
    nv[5] = '{d[2], -d[5], -d[6]};
    for (int m = 0; m < PES; m++) begin
      nv[1][m] = nv[2][m] - nv[0][m];
      nv[4][m] = nv[5][m] - nv[3][m];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xp0 <= '0;
      ta0 <= '0;
      for (int j = 0; j < NARR; j++)
        for (int m = 0; m < PES; m++) vec[j][m] <= '0;
    end else if (load) begin
      xp0 <= xp[0];
      ta0 <= wide_t'(acc >>> SH);
      vec <= nv;
    end
  end

endmodule
