// dst4_pkg: word widths, fixed-point constants and the coefficient/sign tables
// shared by the 13-point DST-IV engine.
//
// Number formats. Samples are W_IN-bit signed integers. Every trigonometric
// constant is a signed integer equal to round(value * 2^FRAC). The datapath after
// the cos(i*alpha) weighting carries GUARD extra fractional bits, removed with
// rounding only at the output. alpha = pi/(2N).
//
//   COS_I[i]  = cos(i*alpha)                i = 0..12   (input weighting x_C)
//   SIN_I[i]  = sin(i*alpha)                i = 0..12   (T_a(0))
//   SIN_TH[k] = sin((2k+1)*alpha/2)         k = 0..12   (output rotation)
//   COS_TH[k] = cos((2k+1)*alpha/2)         k = 0..12
//   SCALE     = sqrt(2/N)                               (output multiplier)
//   s(m)      = 2*sin(2*m*alpha) = 2*sin(m*pi/13)
//
// Array coefficient streams. Array j multiplies a 3-vector by a 3x3 Hankel
// (quasi-band) matrix M with M[r][c] = (+/-) H[j][r+c]. The five stream values
// H[j][0..4] (scaled by 2^FRAC) are built from s(m) as follows, and
// SEQ[j][p][r] = 1 where M[r][col] = -H[j][r+col] for the column held by PE p+1
// (col = 2-p):
//   arrays 0/3 (A): H = +-(s5-s3),  -(s1+s6), (s2+s4), (s5-s3),  -(s1+s6)
//   arrays 1/4 (B): H = +-s5,       -s6,      s2,      s5,       -s6
//   arrays 2/5 (C): H = -+(s4+s5),  (s6-s3),  (s1-s2), -(s4+s5), (s6-s3)
// (upper sign: even-k half, arrays 0..2; lower sign: odd-k half, arrays 3..5).
// The polarity of H[j][2] is inverted with respect to the matrix entries so that
// every PE has at least one subtracting row and therefore every key bit matters.
package dst4_pkg;

  localparam int N      = 13;    // transform length (prime)
  localparam int W_IN   = 16;    // input sample width
  localparam int W_OUT  = 20;    // output sample width
  localparam int FRAC   = 18;    // fractional bits of all constants
  localparam int GUARD  = 4;     // extra fractional bits carried by the datapath
  localparam int W_XP   = 20;    // x_p: suffix sums of up to 13 samples
  localparam int W_K    = 20;    // twiddle constant width (|v| <= 1)
  localparam int W_D    = 26;    // array data width (x_C sums/differences with guard bits)
  localparam int W_C    = 22;    // array coefficient width (|v| < 4)
  localparam int W_Y    = W_D + W_C + 2;  // array accumulator width
  localparam int W_T    = 36;    // post-processing word width
  localparam int NARR   = 6;     // number of systolic arrays
  localparam int PES    = 3;     // processing elements per array
  localparam int NCOEF  = 2*PES - 1;  // coefficient stream length per array
  localparam int KEY_W  = NARR*PES;   // obfuscation key width

  typedef logic signed [W_IN-1:0]  sample_t;
  typedef logic signed [W_OUT-1:0] result_t;
  typedef logic signed [W_XP-1:0]  xp_t;
  typedef logic signed [W_D-1:0]   data_t;
  typedef logic signed [W_C-1:0]   coef_t;
  typedef logic signed [W_Y-1:0]   acc_t;
  typedef logic signed [W_T-1:0]   wide_t;

  typedef logic signed [W_K-1:0] k_t;
  localparam k_t COS_I  [N] = '{ 262144,  260233,  254527,  245109,  232117,  215740,  196218,
                                 173834,  148915,  121824,   92958,   62735,   31598};
  localparam k_t SIN_I  [N] = '{      0,   31598,   62735,   92958,  121824,  148915,  173834,
                                 196218,  215740,  232117,  245109,  254527,  260233};
  localparam k_t SIN_TH [N] = '{  15828,   47253,   77989,  107587,  135617,  161669,  185364,
                                 206355,  224338,  239049,  250274,  257850,  261666};
  localparam k_t COS_TH [N] = '{ 261666,  257850,  250274,  239049,  224338,  206355,  185364,
                                 161669,  135617,  107587,   77989,   47253,   15828};
  localparam k_t SCALE = 102821;

  // Coefficient streams, H[array][0..4], round(value * 2^FRAC).
  localparam coef_t H [NARR][NCOEF] = '{
    '{ 142551, -645936,  675129,  142551, -645936},  // 0: T1a
    '{ 490218, -520465,  243649,  490218, -520465},  // 1: T1b
    '{-921698,  172798, -118178, -921698,  172798},  // 2: T1c
    '{-142551, -645936,  675129,  142551, -645936},  // 3: T2a
    '{-490218, -520465,  243649,  490218, -520465},  // 4: T2b
    '{ 921698,  172798, -118178, -921698,  172798}   // 5: T2c
  };

  // Correct sign sequences SEQ[array][PE][row]: 1 = subtract in that row.
  typedef logic [PES-1:0][PES-1:0] seqset_t;    // [PE][row]
  localparam logic [NARR-1:0][PES-1:0][PES-1:0] SEQ = {
    {3'b010, 3'b010, 3'b001},    // 5: PE3, PE2, PE1
    {3'b010, 3'b010, 3'b001},    // 4
    {3'b010, 3'b010, 3'b001},    // 3
    {3'b100, 3'b010, 3'b001},    // 2
    {3'b100, 3'b010, 3'b001},    // 1
    {3'b100, 3'b010, 3'b001}     // 0
  };


  // Correct obfuscation key, bit 3*j+p belongs to PE p+1 of array j.
  // Array 0: K[0..2] = 0,1,0; array 1: K[3..5] = 1,1,0; arrays 2..5 chosen here.
  localparam logic [KEY_W-1:0] KEY_OK = {3'b001, 3'b100, 3'b101, 3'b110, 3'b011, 3'b010};

endpackage
