// tb_qr_sparse_linear: end-to-end test of the sparse linear array, in which
// each internal processor runs N_IC columns of the folded array. Three
// configurations: M = 4, N_IC = 2, L_IC = 2 (9 inputs, 2 internal processors,
// T_QR = 18); M = 6, N_IC = 3, L_IC = 3 (13 inputs, 2 internal processors,
// T_QR = 39); and the 45-input sparse linear array with N_IC = 2 (M = 22,
// 11 internal processors, T_QR = 90, L_IC = 4). Each runs 40 update periods
// (80 for the large one) against the double-precision model
// in qr_array_harness, which also checks the residual latency
// 1 + 4*M*N_IC*L_IC + N_IC*(L_IC-1) + 1 and that every internal processor and
// the boundary processor were busy together in some cycle.
module tb_qr_sparse_linear;
  import qr_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int done_cnt = 0;

  for (genvar cfg = 0; cfg < 3; cfg++) begin : g_cfg
    localparam int M    = (cfg == 0) ? 4 : (cfg == 1) ? 6 : 22;
    localparam int N_IC = (cfg == 0) ? 2 : (cfg == 1) ? 3 : 2;
    localparam int L_IC = (cfg == 0) ? 2 : (cfg == 1) ? 3 : 4;
    localparam int NUPD = (cfg == 2) ? 80 : 40;
    localparam int N = 2 * M + 1, P = M / N_IC;

    logic rst_n, in_ready, in_valid, out_valid;
    fp_t  in_x [N];
    fp_t  out_e;
    int   busy;

    qr_linear_array #(.M(M), .L_IC(L_IC), .N_IC(N_IC)) dut (.*);

    logic busy_v [P+1];
    assign busy_v[0] = dut.u_bc.v;
    for (genvar k = 1; k <= P; k++) begin : g_busy
      assign busy_v[k] = dut.g_ic[k].u_ic.v;
    end
    always_comb begin
      busy = 0;
      for (int k = 0; k <= P; k++) busy += int'(busy_v[k]);
    end

    qr_array_harness #(.M(M), .L_IC(L_IC), .N_IC(N_IC), .NUPD(NUPD), .STANDALONE(0)) h (.*);
  end

  initial begin
    wait (g_cfg[0].h.finished && g_cfg[1].h.finished && g_cfg[2].h.finished);
    $display("TB_RESULT checks=%0d failures=%0d",
             g_cfg[0].h.checks + g_cfg[1].h.checks + g_cfg[2].h.checks,
             g_cfg[0].h.failures + g_cfg[1].h.failures + g_cfg[2].h.failures);
    $finish;
  end

  // watchdog over all three runs
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
