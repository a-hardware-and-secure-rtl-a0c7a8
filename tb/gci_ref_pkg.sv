// gci_ref_pkg: reference models used by the testbenches to work out expected
// values independently of the RTL: the Tausworthe and xorshift strategy
// generators written out from their published recurrences, the negation
// chaotic iteration bit by bit, the output permutation with its shift amounts
// written as plain numbers, and the strategy shaping of the three iteration
// modes. The seed expansion constants repeat the generators' documented
// seeding rule.
package gci_ref_pkg;

  // ------------------------------------------------------------ permutation
  function automatic logic [31:0] perm32(logic [31:0] x);
    logic [31:0] w;
    logic [63:0] p;
    int unsigned sh;
    sh = 4 + int'(x >> 28);
    w  = x ^ (x >> sh);
    p  = 64'(w) * 64'd811;
    w  = p[31:0];
    return w ^ (w >> 22);
  endfunction

  function automatic logic [63:0] perm64(logic [63:0] x);
    logic [63:0] w;
    logic [127:0] p;
    int unsigned sh;
    sh = 5 + int'(x >> 59);
    w  = x ^ (x >> sh);
    p  = 128'(w) * 128'd995;
    w  = p[63:0];
    return w ^ (w >> 43);
  endfunction

  // any power-of-two width n up to 128: shift field of log2(n)-1 bits
  function automatic logic [127:0] perm_n(logic [127:0] x, int n, int mult);
    logic [127:0] mask, w, p;
    int opb, sh;
    mask = (n == 128) ? '1 : ((128'd1 << n) - 1);
    opb  = $clog2(n) - 1;
    sh   = opb + int'(x >> (n - opb));
    w    = (x ^ (x >> sh)) & mask;
    p    = (w * 128'(mult)) & mask;
    return (p ^ (p >> ((2 * n + 2) / 3))) & mask;
  endfunction

  // ------------------------------------------------------------ NG iteration
  function automatic logic [63:0] gci_ng(logic [63:0] x, logic [63:0] s);
    logic [63:0] r;
    r = x;
    for (int i = 0; i < 64; i++) if (s[i] == 1'b1) r[i] = ~x[i];
    return r;
  endfunction

  // ------------------------------------------------------------ modes
  // mode 0 generalized, 1 unary, 2 parallel; lanes = n/8
  function automatic logic [63:0] shape(int mode, logic [63:0] s, int n);
    logic [63:0] r;
    r = '0;
    if (mode == 1) begin
      for (int l = 0; l < n / 8; l++) begin
        int k;
        k = int'((s >> (8 * l)) & 64'h7);
        r[8 * l + k] = 1'b1;
      end
    end else if (mode == 2) begin
      for (int i = 0; i < n; i++) r[i] = 1'b1;
    end else begin
      r = s;
      for (int i = n; i < 64; i++) r[i] = 1'b0;
    end
    return r;
  endfunction

  // ------------------------------------------------------------ LFSR113
  typedef struct { logic [31:0] z1, z2, z3, z4; } lfsr113_t;

  function automatic lfsr113_t lfsr113_seed(logic [31:0] seed);
    lfsr113_t st;
    st.z1 = (seed ^ 32'h1234_5678) | 32'h8000_0000;
    st.z2 = (seed ^ 32'h9ABC_DEF1) | 32'h8000_0000;
    st.z3 = (seed ^ 32'h2468_ACE0) | 32'h8000_0000;
    st.z4 = (seed ^ 32'h1357_9BDF) | 32'h8000_0000;
    return st;
  endfunction

  // advances st and returns the new output, like the C routine
  function automatic logic [31:0] lfsr113_next(ref lfsr113_t st);
    logic [31:0] b;
    b = ((st.z1 << 6) ^ st.z1) >> 13;  st.z1 = ((st.z1 & 32'd4294967294) << 18) ^ b;
    b = ((st.z2 << 2) ^ st.z2) >> 27;  st.z2 = ((st.z2 & 32'd4294967288) << 2)  ^ b;
    b = ((st.z3 << 13) ^ st.z3) >> 21; st.z3 = ((st.z3 & 32'd4294967280) << 7)  ^ b;
    b = ((st.z4 << 3) ^ st.z4) >> 12;  st.z4 = ((st.z4 & 32'd4294967168) << 13) ^ b;
    return st.z1 ^ st.z2 ^ st.z3 ^ st.z4;
  endfunction

  // ------------------------------------------------------------ Taus88
  typedef struct { logic [31:0] s1, s2, s3; } taus88_t;

  function automatic taus88_t taus88_seed(logic [31:0] seed);
    taus88_t st;
    st.s1 = (seed ^ 32'hC0FF_EE11) | 32'h8000_0000;
    st.s2 = (seed ^ 32'h0BAD_F00D) | 32'h8000_0000;
    st.s3 = (seed ^ 32'h7654_3210) | 32'h8000_0000;
    return st;
  endfunction

  function automatic logic [31:0] taus88_next(ref taus88_t st);
    logic [31:0] b;
    b = ((st.s1 << 13) ^ st.s1) >> 19; st.s1 = ((st.s1 & 32'd4294967294) << 12) ^ b;
    b = ((st.s2 << 2) ^ st.s2) >> 25;  st.s2 = ((st.s2 & 32'd4294967288) << 4)  ^ b;
    b = ((st.s3 << 3) ^ st.s3) >> 11;  st.s3 = ((st.s3 & 32'd4294967280) << 17) ^ b;
    return st.s1 ^ st.s2 ^ st.s3;
  endfunction

  // ------------------------------------------------------------ xorshift128+
  typedef struct { logic [63:0] s0, s1; } xs128_t;

  function automatic xs128_t xs128_seed(logic [31:0] seed);
    xs128_t st;
    st.s0 = (64'h9E37_79B9_7F4A_7C15 ^ {seed, seed})  | 64'h8000_0000_0000_0000;
    st.s1 = (64'hBF58_476D_1CE4_E5B9 ^ {~seed, seed}) | 64'h8000_0000_0000_0000;
    return st;
  endfunction

  function automatic logic [63:0] xs128_next(ref xs128_t st);
    logic [63:0] x, y;
    x = st.s0;
    y = st.s1;
    st.s0 = y;
    x = x ^ (x << 23);
    st.s1 = x ^ y ^ (x >> 18) ^ (y >> 5);
    return st.s1 + y;
  endfunction

  // ------------------------------------------------------------ reset seeds
  // the generators' reset state equals seeding with 0
  localparam logic [31:0] RESET_SEED = 32'd0;

endpackage
