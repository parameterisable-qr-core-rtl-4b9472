// tb_qr_input_sched: feeds one random vector (or a bubble) per period of the
// 7-input, L_IC = 3 example and checks that element c of the vector captured
// at the end of period p appears on ext_x[c-1], with its valid flag, exactly
// in cycle (p+1)*T + L_IC*(c-1) - the cycle its top-row cell runs - even when
// that lies two periods later.
module tb_qr_input_sched;
  import qr_pkg::*;
  localparam int M = 3, L_IC = 3, N = 2 * M + 1, T = N;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, capture, in_valid;
  fp_t  in_x [N];
  fp_t  ext_x [N];
  logic ext_v [N];
  int   checks = 0, failures = 0;
  int   cyc;

  qr_input_sched #(.M(M), .L_IC(L_IC)) dut (.*);

  // history of captured vectors, by period
  fp_t  hist_x [64][N];
  logic hist_v [64];

  initial begin
    rst_n = 1'b0; capture = 1'b0; in_valid = 1'b0;
    for (int c = 0; c < N; c++) in_x[c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // cyc counts cycles from 0; a period p spans cycles p*T .. p*T+T-1 and its
    // last cycle captures the vector of update p+1
    for (cyc = 0; cyc < 40 * T; cyc++) begin
      @(negedge clk);
      // check outputs of this cycle
      for (int c = 0; c < N; c++) begin
        int s, upd;
        s = cyc - L_IC * c;             // start cycle of the update using it now
        if (s >= T && s % T == 0) begin
          upd = s / T;
          checks++;
          if (ext_v[c] != hist_v[upd] || (hist_v[upd] && ext_x[c] != hist_x[upd][c])) begin
            failures++;
            $display("FAIL: cycle %0d element %0d update %0d", cyc, c, upd);
          end
        end
      end
      capture = (cyc % T == T - 1);
      if (capture) begin
        int upd;
        upd = cyc / T + 1;
        in_valid = ($urandom_range(0, 3) != 0);
        for (int c = 0; c < N; c++) in_x[c] = fp_t'($urandom());
        hist_v[upd] = in_valid;
        hist_x[upd] = in_x;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
