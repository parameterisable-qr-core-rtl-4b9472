// qr_pkg: shared types, floating-point operators and schedule functions of the
// linear QR-RLS array.
//
// Floating point: the cells work on a simple binary floating-point format of
// 1 sign bit, EXP_W exponent bits (bias 2^(EXP_W-1)-1) and MAN_W fraction bits
// with a hidden leading one. The default 8/23 split is the IEEE-754 single
// precision layout, so words can be read with any single-precision converter.
// To keep the operators lo: an exponent field of zero is the value zero
// (no subnormals), there is no infinity or NaN (an overflowing result saturates
// to the largest magnitude) and every result is truncated, not rounded. The
// operators are combinational; the cells add the pipeline latency around them.
//
// Schedule: an N = 2M+1 input triangular array has cells (r,c), 1 <= r <= c <= N.
// Cell (r,r) is a boundary cell (the last one, (N,N), is the output multiplier),
// the others are internal cells. The folded linear mapping puts every boundary
// operation on one boundary processor and cell (r,c), c>r, on internal
// processor k = d if d <= M, else 2M+1-d, with d = c-r. Cell (r,c) of update n
// runs at cycle n*T + L*(r+c-2), T = N, L = the cell latency. Because L and T
// share no factor, every processor runs exactly one cell in each of the T slots
// (cycle mod T) of a period. The functions below give, for a processor and a
// slot, the cell it runs; the cells turn them into constant lookup tables.
package qr_pkg;

  // ---------------------------------------------------------------- format
  localparam int EXP_W = 8;
  localparam int MAN_W = 23;
  localparam int FP_W  = 1 + EXP_W + MAN_W;
  localparam int BIAS  = (1 << (EXP_W - 1)) - 1;

  typedef logic [FP_W-1:0] fp_t;

  localparam fp_t FP_ZERO = '0;
  localparam fp_t FP_ONE  = {1'b0, EXP_W'(BIAS), MAN_W'(0)};
  localparam fp_t FP_MAX  = {1'b0, {(EXP_W-1){1'b1}}, 1'b0, {MAN_W{1'b1}}};

  function automatic logic fp_is_zero(fp_t a);
    return a[FP_W-2 -: EXP_W] == '0;
  endfunction

  function automatic fp_t fp_neg(fp_t a);
    if (fp_is_zero(a)) return FP_ZERO;
    return {~a[FP_W-1], a[FP_W-2:0]};
  endfunction

  // Pack sign, unbiased-offset exponent and fraction, handling under/overflow.
  function automatic fp_t fp_pack(logic s, int e, logic [MAN_W-1:0] f);
    if (e <= 0) return FP_ZERO;
    if (e >= (1 << EXP_W) - 1) return {s, FP_MAX[FP_W-2:0]};
    return {s, EXP_W'(e), f};
  endfunction

  function automatic fp_t fp_mul(fp_t a, fp_t b);
    logic [MAN_W:0]       ma, mb;
    logic [2*MAN_W+1:0]   p;
    int                   e;
    logic [MAN_W-1:0]     f;
    if (fp_is_zero(a) || fp_is_zero(b)) return FP_ZERO;
    ma = {1'b1, a[MAN_W-1:0]};
    mb = {1'b1, b[MAN_W-1:0]};
    p  = ma * mb;
    e  = int'(a[FP_W-2 -: EXP_W]) + int'(b[FP_W-2 -: EXP_W]) - BIAS;
    if (p[2*MAN_W+1]) begin
      f = p[2*MAN_W -: MAN_W];
      e = e + 1;
    end else begin
      f = p[2*MAN_W-1 -: MAN_W];
    end
    return fp_pack(a[FP_W-1] ^ b[FP_W-1], e, f);
  endfunction

  // a + b with three guard bits during alignment, truncated result.
  function automatic fp_t fp_add(fp_t a, fp_t b);
    localparam int W = MAN_W + 4;          // hidden one + fraction + 3 guard bits
    fp_t              hi, lo;
    logic [W:0]       mhi, mlo, sum;   // one extra bit for the carry
    int               ehi, d, lz;
    if (fp_is_zero(a)) return b;
    if (fp_is_zero(b)) return a;
    if (a[FP_W-2:0] >= b[FP_W-2:0]) begin
      hi = a; lo = b;
    end else begin
      hi = b; lo = a;
    end
    ehi   = int'(hi[FP_W-2 -: EXP_W]);
    d      = ehi - int'(lo[FP_W-2 -: EXP_W]);
    mhi   = {2'b01, hi[MAN_W-1:0], 3'b000};
    mlo = {2'b01, lo[MAN_W-1:0], 3'b000};
    mlo = (d > W) ? '0 : (mlo >> d);
    if (hi[FP_W-1] == lo[FP_W-1]) begin
      sum = mhi + mlo;
      if (sum[W]) begin
        sum  = sum >> 1;
        ehi = ehi + 1;
      end
    end else begin
      sum = mhi - mlo;
      if (sum == '0) return FP_ZERO;
      lz = 0;
      for (int i = W - 1; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      sum  = sum << lz;
      ehi = ehi - lz;
    end
    return fp_pack(hi[FP_W-1], ehi, sum[W-2 -: MAN_W]);
  endfunction

  function automatic fp_t fp_sub(fp_t a, fp_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  // a / b; b == 0 gives zero (callers guard against it).
  function automatic fp_t fp_div(fp_t a, fp_t b);
    logic [2*MAN_W+1:0] num, q;
    logic [MAN_W:0]     mb;
    int                 e;
    logic [MAN_W-1:0]   f;
    if (fp_is_zero(a) || fp_is_zero(b)) return FP_ZERO;
    num = {1'b1, a[MAN_W-1:0], {(MAN_W+1){1'b0}}};
    mb  = {1'b1, b[MAN_W-1:0]};
    q   = num / {{(MAN_W+1){1'b0}}, mb};
    e   = int'(a[FP_W-2 -: EXP_W]) - int'(b[FP_W-2 -: EXP_W]) + BIAS;
    if (q[MAN_W+1]) begin
      f = q[MAN_W:1];
    end else begin
      f = q[MAN_W-1:0];
      e = e - 1;
    end
    return fp_pack(a[FP_W-1] ^ b[FP_W-1], e, f);
  endfunction

  // beta^2 * a with beta^2 = 1 - 2^-k: a shift and a subtraction, no multiplier.
  // k = 0 means no forgetting (beta = 1).
  function automatic fp_t fp_forget(fp_t a, int k);
    int e;
    if (k == 0 || fp_is_zero(a)) return a;
    e = int'(a[FP_W-2 -: EXP_W]) - k;
    if (e <= 0) return a;
    return fp_sub(a, {a[FP_W-1], EXP_W'(e), a[MAN_W-1:0]});
  endfunction

  // ---------------------------------------------------------------- schedule
  // Where a cell takes an operand from, seen from the processor that runs it.
  // LEFT of internal processor 1 is the boundary processor.
  typedef enum logic [1:0] {SRC_EXT, SRC_LEFT, SRC_RIGHT, SRC_SELF} src_e;

  typedef struct packed {
    logic [7:0] row;      // r of cell (r,c)
    logic [7:0] col;      // c of cell (r,c)
    logic       side_b;   // internal cell with c-r > M (mirrored half)
    src_e       x_src;    // where x comes from
    src_e       ab_src;   // where the rotation parameters come from
  } cell_t;

  // Processor of cell (r,c): 0 = boundary processor, 1..M = internal ones.
  function automatic int proc_of(int r, int c, int m);
    int d;
    d = c - r;
    if (d == 0) return 0;
    return (d <= m) ? d : 2 * m + 1 - d;
  endfunction

  // Cell that processor k runs in slot s (cycle mod T) for array size m, latency l.
  function automatic cell_t cell_at(int k, int s, int m, int l);
    int    n;
    cell_t cl;
    n    = 2 * m + 1;
    cl = '0;
    for (int r = 1; r <= n; r++) begin
      for (int c = r; c <= n; c++) begin
        if (proc_of(r, c, m) == k && ((l * (r + c - 2)) % n) == s) begin
          cl.row    = 8'(r);
          cl.col    = 8'(c);
          cl.side_b = (c - r) > m;
          if (r == 1) cl.x_src = SRC_EXT;
          else if (k == 0) cl.x_src = SRC_RIGHT;
          else if (!cl.side_b) cl.x_src = (k == m) ? SRC_SELF : SRC_RIGHT;
          else cl.x_src = SRC_LEFT;
          if (k == 0) cl.ab_src = SRC_SELF;
          else if (!cl.side_b) cl.ab_src = SRC_LEFT;
          else cl.ab_src = (k == m) ? SRC_SELF : SRC_RIGHT;
        end
      end
    end
    return cl;
  endfunction

  // What a processor hands to its neighbours L_IC cycles after an operation:
  // the rotated x and the rotation parameters a, b of one QR update.
  typedef struct packed {
    logic v;   // the operation belonged to a valid (non-bubble) update
    fp_t  x;
    fp_t  a;
    fp_t  b;
  } tok_t;

  function automatic int gcd(int a, int b);
    int t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

endpackage
