// qr_array_harness: stimulus, reference model and checker for qr_linear_array.
//
// Drives NUPD input vectors (with a bubble every 5th period) into the array,
// runs the same squared-Givens QR-RLS update sequentially in double precision
// on the same inputs, and compares every residual the array produces, both its
// value and the cycle it appears in (1 + 4*M*N_IC*L_IC + N_IC*(L_IC-1) + 1
// cycles after the vector
// was accepted). y is a fixed linear combination of the x inputs plus small
// noise, so the residuals shrink as the filter converges. The first vector has
// x_1 = 0, which gives a zero pivot in the first boundary operation.
// Mechanisms counted (each must happen at least once): bubbles, zero pivots,
// an accepted vector while earlier updates are still in the array, and cycles
// in which every processor runs a valid operation (busy = M+1).
// Ends with the TB_RESULT line and $finish; a watchdog ends a hung run.
module qr_array_harness #(
  parameter int M            = 3,
  parameter int L_IC         = 3,
  parameter int N_IC         = 1,
  parameter int FORGET_SHIFT = 7,
  parameter int NUPD         = 40,
  parameter bit STANDALONE   = 1,    // 0: report through `finished` instead of ending
  localparam int N = 2 * M + 1,
  localparam int T_QR = N_IC * N,
  localparam int P = M / N_IC
) (
  input  logic         clk,
  output logic         rst_n,
  input  logic         in_ready,
  output logic         in_valid,
  output qr_pkg::fp_t  in_x [N],
  input  logic         out_valid,
  input  qr_pkg::fp_t  out_e,
  input  int           busy
);
  import qr_pkg::*;
  import qr_tb_pkg::*;

  localparam int LATENCY = 1 + 4 * M * N_IC * L_IC + N_IC * (L_IC - 1) + 1;
  localparam real TOL    = 1.0e-4;

  int checks = 0, failures = 0;
  bit finished = 1'b0;
  int n_bubble = 0, n_zero_pivot = 0, n_overlap = 0, n_full_busy = 0;
  int n_accepted = 0, n_out = 0;
  longint cycle = 0;

  // reference state
  real D [N];
  real R [N][N];
  real beta2;
  real exp_e [$];
  longint exp_t [$];
  real wtrue [N];

  // one QR update of the triangular array, sequentially; returns the residual
  function automatic real ref_update(real xin [N]);
    real x [N];
    real dl, dn, b, dout, xb;
    x  = xin;
    dl = 1.0;
    for (int r = 0; r < N - 1; r++) begin
      xb = x[r];
      dn = beta2 * D[r] + dl * xb * xb;
      if (dn == 0.0) begin
        b = 0.0; dout = dl; n_zero_pivot++;
      end else begin
        b = dl * xb / dn; dout = dl * beta2 * D[r] / dn;
      end
      D[r] = dn;
      for (int c = r + 1; c < N; c++) begin
        x[c]    = x[c] - xb * R[r][c];
        R[r][c] = R[r][c] + b * x[c];
      end
      dl = dout;
    end
    return dl * x[N-1];
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    real xv [N];
    beta2 = (FORGET_SHIFT == 0) ? 1.0 : 1.0 - pow2(-FORGET_SHIFT);
    for (int i = 0; i < N; i++) begin
      D[i] = 0.0;
      for (int j = 0; j < N; j++) R[i][j] = 0.0;
      wtrue[i] = rnd();
    end
    rst_n    = 1'b0;
    in_valid = 1'b0;
    for (int i = 0; i < N; i++) in_x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int u = 0; u < NUPD; u++) begin
      // wait for the input slot
      do @(negedge clk); while (!in_ready);
      if (u % 5 == 4) begin
        in_valid = 1'b0;
        n_bubble++;
      end else begin
        real y;
        y = 0.0;
        for (int i = 0; i < N - 1; i++) begin
          xv[i] = (u == 0 && i == 0) ? 0.0 : rnd();
          y = y + wtrue[i] * xv[i];
        end
        xv[N-1] = y + 0.01 * rnd();
        for (int i = 0; i < N; i++) begin
          in_x[i] = r2f(xv[i]);
          xv[i]   = f2r(in_x[i]);       // model sees the quantised inputs
        end
        in_valid = 1'b1;
        if (exp_e.size() > 0) n_overlap++;
        exp_e.push_back(ref_update(xv));
        exp_t.push_back(cycle + LATENCY);
        n_accepted++;
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
    // drain
    while (exp_e.size() > 0 && cycle < 64'(NUPD * T_QR + 4 * LATENCY)) @(negedge clk);
    if (exp_e.size() > 0) begin
      failures++;
      $display("FAIL: %0d residuals missing", exp_e.size());
    end
    repeat (2 * T_QR) @(negedge clk);
    checks++;
    if (n_bubble == 0)     begin failures++; $display("FAIL: no bubble"); end
    checks++;
    if (n_zero_pivot == 0) begin failures++; $display("FAIL: no zero pivot"); end
    checks++;
    if (n_overlap == 0)    begin failures++; $display("FAIL: no overlapping updates"); end
    checks++;
    if (n_full_busy == 0)  begin failures++; $display("FAIL: never all processors busy"); end
    $display("mechanisms: bubbles=%0d zero_pivots=%0d overlapped_inputs=%0d full_busy_cycles=%0d residuals=%0d",
             n_bubble, n_zero_pivot, n_overlap, n_full_busy, n_out);
    finished = 1'b1;
    if (STANDALONE) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  always @(posedge clk) begin
    if (rst_n && busy == P + 1) n_full_busy++;
    if (rst_n && out_valid) begin
      n_out++;
      checks++;
      if (exp_e.size() == 0) begin
        failures++;
        $display("FAIL: unexpected residual at cycle %0d", cycle);
      end else begin
        real want, got, err;
        longint t;
        want = exp_e.pop_front();
        t    = exp_t.pop_front();
        got  = f2r(out_e);
        err  = (got > want) ? got - want : want - got;
        if (err > TOL * (1.0 + (want < 0.0 ? -want : want)) || t != cycle) begin
          failures++;
          $display("FAIL: residual %0d got %f want %f at cycle %0d (expected %0d)",
                   n_out, got, want, cycle, t);
        end
      end
    end
  end

  initial begin
    #(64'd10 * (64'(NUPD) * T_QR + 64'd8 * LATENCY + 64'd100));
    if (!finished) begin
      failures++;
      $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule
