// tb_qr_boundary_cell: the boundary processor alone, for a 5-input array
// (M = 2, T = 5) with L_IC = 2 and beta^2 = 1 - 2^-3. The testbench plays
// internal processor 1 and the input scheduler: every cycle it drives random
// operands (about one in six of them invalid) and predicts in double precision
// what the processor must output L_IC cycles later: a = x, b, the valid flag
// and, in the slot of the output multiplier, the residual delta * x. It keeps
// its own D value per row and its own record of delta_out, fed to the row
// that runs 2*L_IC cycles later. The first row-1 input is zero, which gives a
// zero pivot (D' = 0).
module tb_qr_boundary_cell;
  import qr_pkg::*;
  import qr_tb_pkg::*;
  localparam int M = 2, L_IC = 2, FS = 3, N = 2 * M + 1, T = N, SW = $clog2(T);
  localparam int NCYC = 400;
  localparam real TOL = 1.0e-4;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [SW-1:0] slot;
  fp_t  ext_x, e_o;
  logic ext_v, e_v;
  tok_t tok_r;
  tok_t tok_o [1];
  logic phase = 1'b0;
  int   checks = 0, failures = 0, n_zero = 0, n_res = 0, n_bubble = 0;

  qr_boundary_cell #(.M(M), .L_IC(L_IC), .FORGET_SHIFT(FS)) dut (
    .clk, .rst_n, .base(slot), .phase, .ext_x, .ext_v, .tok_r, .tok_o, .e_o, .e_v);

  real  dmod [N + 1];
  real  dlt  [NCYC];      // delta_out of the operation started in each cycle
  real  ea [NCYC], eb [NCYC], ee [NCYC];
  logic ev [NCYC], evr [NCYC];

  // row of the boundary operation in a slot: 2*L_IC*(r-1) = slot (mod T)
  function automatic int row_at(int s);
    for (int r = 1; r <= N; r++) if ((2 * L_IC * (r - 1)) % T == s) return r;
    return 0;
  endfunction

  initial begin
    real beta2, x, dl, dn, b, dout;
    bit  first = 1'b1;
    int  r;
    beta2 = 1.0 - pow2(-FS);
    for (int i = 0; i <= N; i++) dmod[i] = 0.0;
    rst_n = 1'b0; slot = '0; ext_x = '0; ext_v = 1'b0; tok_r = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NCYC; t++) begin
      slot  = SW'(t % T);
      r     = row_at(t % T);
      ext_x = r2f(first ? 0.0 : rnd());
      ext_v = (t >= 2 * L_IC) && ($urandom_range(0, 5) != 0);
      tok_r = '{v: (t >= 2 * L_IC) && ($urandom_range(0, 5) != 0),
                x: r2f(rnd()), a: r2f(rnd()), b: r2f(rnd())};
      if (r == 1 && ext_v) first = 1'b0;
      x  = f2r((r == 1) ? ext_x : tok_r.x);
      ev[t] = (r == 1) ? ext_v : tok_r.v;
      if (!ev[t]) n_bubble++;
      dl = (r == 1) ? 1.0 : ((t >= 2 * L_IC) ? dlt[t - 2 * L_IC] : 0.0);
      dn = beta2 * dmod[r] + dl * x * x;
      if (dn == 0.0) begin
        b = 0.0; dout = dl;
        if (ev[t] && r < N) n_zero++;
      end else begin
        b = dl * x / dn; dout = dl * beta2 * dmod[r] / dn;
      end
      if (ev[t] && r < N) dmod[r] = dn;
      dlt[t] = dout;
      ea[t]  = x; eb[t] = b; ee[t] = dl * x;
      evr[t] = (r == N);
      // outputs of the operation started L_IC cycles ago
      if (t >= L_IC) begin
        int u;
        u = t - L_IC;
        checks++;
        if (tok_o[0].v != (ev[u] && !evr[u]) || e_v != (ev[u] && evr[u])) begin
          failures++;
          $display("FAIL: cycle %0d valid flags %0b %0b", t, tok_o[0].v, e_v);
        end else if (tok_o[0].v && (!close(f2r(tok_o[0].a), ea[u], TOL) ||
                                 !close(f2r(tok_o[0].b), eb[u], TOL))) begin
          failures++;
          $display("FAIL: cycle %0d a %g/%g b %g/%g", t, f2r(tok_o[0].a), ea[u], f2r(tok_o[0].b), eb[u]);
        end else if (e_v) begin
          n_res++;
          if (!close(f2r(e_o), ee[u], TOL)) begin
            failures++;
            $display("FAIL: cycle %0d residual %g want %g", t, f2r(e_o), ee[u]);
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_zero == 0 || n_res == 0 || n_bubble == 0) begin
      failures++;
      $display("FAIL: zero pivots %0d residuals %0d bubbles %0d", n_zero, n_res, n_bubble);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
