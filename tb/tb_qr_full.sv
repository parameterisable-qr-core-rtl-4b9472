// tb_qr_full: the linear QR array at its default size (45 inputs, M = 22,
// L_IC = 4, T_QR = 45) through 120 update periods, with residuals checked
// against a double-precision model (see qr_array_harness).
module tb_qr_full;
  import qr_pkg::*;
  localparam int M = 22, L_IC = 4, N = 2 * M + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, in_ready, in_valid, out_valid;
  fp_t  in_x [N];
  fp_t  out_e;
  int   busy;

  qr_linear_array dut (.*);

  logic busy_v [M+1];
  assign busy_v[0] = dut.u_bc.v;
  for (genvar k = 1; k <= M; k++) begin : g_busy
    assign busy_v[k] = dut.g_ic[k].u_ic.v;
  end
  always_comb begin
    busy = 0;
    for (int k = 0; k <= M; k++) busy += int'(busy_v[k]);
  end

  qr_array_harness #(.M(M), .L_IC(L_IC), .NUPD(120)) h (.*);
endmodule
