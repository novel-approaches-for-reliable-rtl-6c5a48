// bch_tb_pkg: reference model for the BCH testbenches, written independently of the RTL.
//
// It builds GF(2^9) with the same primitive polynomial x^9 + x^4 + 1 (through log/antilog
// tables rather than shift-and-add), derives the generator polynomial of the 7-error
// correcting (511,448) code as the product of the minimal polynomials of alpha^1, alpha^3,
// ..., alpha^13, and encodes systematically: c(x) = d(x) x^63 + (d(x) x^63 mod g(x)).
package bch_tb_pkg;

  localparam int NN = 511;
  localparam int KK = 448;
  localparam int RR = NN - KK;   // 63 check bits

  int unsigned exp_t [1022];
  int unsigned log_t [512];
  logic [RR:0] gpoly;            // binary generator polynomial, degree 63
  bit          ready = 0;

  function automatic int unsigned fmul(int unsigned a, int unsigned b);
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic void init();
    int unsigned v;
    int unsigned poly [64];   // polynomial with GF(2^9) coefficients, index = power
    int          deg;
    bit          used [NN];
    if (ready) return;
    v = 1;
    for (int i = 0; i < 1022; i++) begin
      exp_t[i] = v;
      if (i < NN) log_t[v] = i;
      v = v << 1;
      if ((v & 512) != 0) v = v ^ 32'h211;   // x^9 = x^4 + 1
    end
    // generator = product of (x + alpha^e) over the cyclotomic cosets of 1,3,...,13
    foreach (poly[i]) poly[i] = 0;
    poly[0] = 1;
    deg = 0;
    foreach (used[i]) used[i] = 0;
    for (int j = 1; j <= 13; j += 2) begin
      int e;
      e = j;
      while (!used[e]) begin
        used[e] = 1;
        // poly *= (x + alpha^e)
        for (int i = deg + 1; i >= 1; i--) poly[i] = poly[i-1] ^ fmul(poly[i], exp_t[e]);
        poly[0] = fmul(poly[0], exp_t[e]);
        deg++;
        e = (2 * e) % NN;
      end
    end
    assert (deg == RR) else $error("generator degree %0d", deg);
    for (int i = 0; i <= RR; i++) begin
      assert (poly[i] <= 1) else $error("generator not binary");
      gpoly[i] = poly[i][0];
    end
    ready = 1;
  endfunction

  function automatic logic [NN-1:0] encode(logic [KK-1:0] d);
    logic [NN-1:0] c;
    logic [NN-1:0] r;
    c = {d, {RR{1'b0}}};
    r = c;
    for (int i = NN - 1; i >= RR; i--) begin
      if (r[i]) r[i -: RR+1] = r[i -: RR+1] ^ gpoly;
    end
    return c | NN'(r[RR-1:0]);
  endfunction

  function automatic logic [KK-1:0] rand_data();
    logic [KK-1:0] d;
    for (int i = 0; i < KK; i += 32) d[i +: 32] = $urandom;
    return d;
  endfunction

  // flip `n` distinct random bit positions
  function automatic logic [NN-1:0] add_errors(logic [NN-1:0] c, int n);
    logic [NN-1:0] e;
    int placed;
    e = '0;
    placed = 0;
    while (placed < n) begin
      int p;
      p = $urandom_range(NN - 1, 0);
      if (!e[p]) begin
        e[p] = 1'b1;
        placed++;
      end
    end
    return c ^ e;
  endfunction

  // syndrome s_j = r(alpha^j) for checking the syndrome block
  function automatic int unsigned syndrome(logic [NN-1:0] r, int j);
    int unsigned s;
    s = 0;
    for (int i = 0; i < NN; i++) if (r[i]) s = s ^ exp_t[(i * j) % NN];
    return s;
  endfunction

  // Lambda(x) = prod (1 + alpha^pos_i x), coefficients indexed by power (up to 8)
  function automatic void locator(input int pos [$], output int unsigned lam [9]);
    foreach (lam[i]) lam[i] = 0;
    lam[0] = 1;
    foreach (pos[k]) begin
      for (int i = 8; i >= 1; i--) lam[i] = lam[i] ^ fmul(lam[i-1], exp_t[pos[k]]);
    end
  endfunction

  // value of a polynomial with coefficients c[0..deg] at alpha^e
  function automatic int unsigned peval(input int unsigned c [9], input int deg, input int e);
    int unsigned v;
    v = 0;
    for (int i = 0; i <= deg; i++) v = v ^ fmul(c[i], exp_t[(i * e) % NN]);
    return v;
  endfunction

  // distinct random positions
  function automatic void rand_positions(input int n, output int pos [$]);
    pos = {};
    while (pos.size() < n) begin
      int p;
      p = $urandom_range(NN - 1, 0);
      if (!(p inside {pos})) pos.push_back(p);
    end
  endfunction

endpackage
