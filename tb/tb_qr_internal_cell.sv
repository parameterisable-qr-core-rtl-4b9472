// tb_qr_internal_cell: the internal processors alone, for the 7-input example
// (M = 3, T = 7, L_IC = 3). Processors K = 1, 2 and 3 are instantiated side by
// side, each with its own random neighbours and input-scheduler operands. For
// every cycle the testbench works out which cell (r,c) the processor runs,
// where that cell takes x and a, b from (input scheduler for row 1; right / left
// neighbour in the unfolded half; left / right in the mirrored half; its own
// output across the fold for K = M), and predicts in double precision the
// token that must appear L_IC cycles later: x_out = x - a*r, a, b and the
// valid flag. It keeps its own copy of every stored r, updated only by valid
// operations, so the R memories and their write-back are checked too.
module tb_qr_internal_cell;
  import qr_pkg::*;
  import qr_tb_pkg::*;
  localparam int M = 3, L_IC = 3, N = 2 * M + 1, T = N, SW = $clog2(T);
  localparam int NCYC = 500;
  localparam real TOL = 1.0e-4;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic [SW-1:0] slot = '0;
  int checks [M+1];
  int failures [M+1];
  int uses [M+1][4];     // per processor: ext, left, right, self operand uses
  bit done [M+1];

  for (genvar k = 1; k <= M; k++) begin : g_k
    fp_t  ext_x_a, ext_x_b;
    logic ext_v_a, ext_v_b;
    tok_t tok_l, tok_r;
    tok_t tok_o [1];
    fp_t  ext_x [N];
    logic ext_v [N];
    logic phase = 1'b0;

    // the processor reads element K+1 in the unfolded half, 2M+2-K in the
    // mirrored half; all other elements carry junk
    always_comb begin
      for (int c = 0; c < N; c++) begin
        ext_x[c] = r2f(0.125);
        ext_v[c] = 1'b0;
      end
      ext_x[k] = ext_x_a;           ext_v[k] = ext_v_a;
      ext_x[2*M+1-k] = ext_x_b;     ext_v[2*M+1-k] = ext_v_b;
    end

    qr_internal_cell #(.M(M), .L_IC(L_IC), .J(k)) dut (
      .clk, .rst_n, .base(slot), .phase, .ext_x, .ext_v,
      .tok_l, .tok_r, .tok_o
    );

    real  rmod [T];
    real  px [NCYC], pa [NCYC], pb [NCYC];
    logic pv [NCYC];

    function automatic real rnd01();
      return (rnd() + 1.0) / 2.0;
    endfunction

    initial begin
      int   r0, c0, s;
      bit   sideb;
      real  x, a, b, rr;
      logic v;
      checks[k] = 0; failures[k] = 0; done[k] = 0;
      for (int i = 0; i < 4; i++) uses[k][i] = 0;
      for (int i = 0; i < T; i++) rmod[i] = 0.0;
      ext_x_a = '0; ext_x_b = '0; ext_v_a = 0; ext_v_b = 0; tok_l = '0; tok_r = '0;
      @(posedge rst_n);
      @(negedge clk);
      for (int t = 0; t < NCYC; t++) begin
        s = t % T;
        // cell of this processor in slot s
        r0 = 0; c0 = 0;
        for (int r = 1; r <= N; r++)
          for (int c = r + 1; c <= N; c++)
            if ((c - r == k || c - r == 2 * M + 1 - k) && (L_IC * (r + c - 2)) % T == s) begin
              r0 = r; c0 = c;
            end
        sideb = (c0 - r0) > M;
        ext_x_a = r2f(rnd()); ext_v_a = ($urandom_range(0, 5) != 0);
        ext_x_b = r2f(rnd()); ext_v_b = ($urandom_range(0, 5) != 0);
        tok_l = '{v: ($urandom_range(0, 5) != 0), x: r2f(rnd()), a: r2f(rnd01()), b: r2f(0.9 * rnd01())};
        tok_r = '{v: ($urandom_range(0, 5) != 0), x: r2f(rnd()), a: r2f(rnd01()), b: r2f(0.9 * rnd01())};
        if (r0 == 1) begin
          x = f2r(sideb ? ext_x_b : ext_x_a); v = sideb ? ext_v_b : ext_v_a;
          uses[k][0]++;
        end else if (!sideb && k < M) begin
          x = f2r(tok_r.x); v = tok_r.v; uses[k][2]++;
        end else if (!sideb) begin
          x = f2r(tok_o[0].x); v = tok_o[0].v; uses[k][3]++;
        end else begin
          x = f2r(tok_l.x); v = tok_l.v; uses[k][1]++;
        end
        if (!sideb) begin
          a = f2r(tok_l.a); b = f2r(tok_l.b);
        end else if (k < M) begin
          a = f2r(tok_r.a); b = f2r(tok_r.b);
        end else begin
          a = f2r(tok_o[0].a); b = f2r(tok_o[0].b);
        end
        slot = SW'(s);
        px[t] = x - a * rmod[s];
        rr    = rmod[s] + b * px[t];
        if (v) rmod[s] = rr;
        pa[t] = a; pb[t] = b; pv[t] = v;
        if (t >= L_IC) begin
          int u;
          u = t - L_IC;
          checks[k]++;
          if (tok_o[0].v != pv[u] || (pv[u] && (!close(f2r(tok_o[0].x), px[u], TOL) ||
              !close(f2r(tok_o[0].a), pa[u], TOL) || !close(f2r(tok_o[0].b), pb[u], TOL)))) begin
            failures[k]++;
            $display("FAIL: K=%0d cycle %0d v %0b/%0b x %g/%g", k, t, tok_o[0].v, pv[u],
                     f2r(tok_o[0].x), px[u]);
          end
        end
        @(negedge clk);
      end
      done[k] = 1;
    end
  end

  initial begin
    int c, f;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    wait (done[1] && done[2] && done[3]);
    c = 0; f = 0;
    for (int k = 1; k <= M; k++) begin c += checks[k]; f += failures[k]; end
    // every operand route must have been used: ext, left, right (K<M), self (K=M)
    c++;
    if (uses[1][0] == 0 || uses[2][1] == 0 || uses[1][2] == 0 || uses[M][3] == 0) begin
      f++;
      $display("FAIL: an operand route was never used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
