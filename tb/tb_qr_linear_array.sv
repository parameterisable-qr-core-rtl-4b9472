// tb_qr_linear_array: end-to-end test of the linear QR array at the 7-input,
// L_IC = 3 example size (T_QR = 7), 60 update periods. Stimulus, reference
// model and checks are in qr_array_harness; this module adds the clock and
// counts how many processors run a valid operation in each cycle.
module tb_qr_linear_array;
  import qr_pkg::*;
  localparam int M = 3, L_IC = 3, N = 2 * M + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, in_ready, in_valid, out_valid;
  fp_t  in_x [N];
  fp_t  out_e;
  int   busy;

  qr_linear_array #(.M(M), .L_IC(L_IC)) dut (.*);

  logic busy_v [M+1];
  assign busy_v[0] = dut.u_bc.v;
  for (genvar k = 1; k <= M; k++) begin : g_busy
    assign busy_v[k] = dut.g_ic[k].u_ic.v;
  end
  always_comb begin
    busy = 0;
    for (int k = 0; k <= M; k++) busy += int'(busy_v[k]);
  end

  qr_array_harness #(.M(M), .L_IC(L_IC), .NUPD(60)) h (.*);
endmodule
