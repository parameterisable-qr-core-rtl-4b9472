// qr_linear_array: linear QR-RLS core for N = 2M+1 inputs (top level).
//
// Adaptive filtering by recursive least squares, solved by QR decomposition
// with squared Givens rotations. The N-input triangular QR array, (N^2+N)/2
// cells, is folded onto a line of processors: one boundary processor that
// runs every boundary cell (and the output multiplier) and M/N_IC internal
// processors, each running N_IC columns of the folded array (two diagonals of
// the triangle per column). Processors talk only to their neighbours.
//   N_IC = 1 (default): the linear array. All M+1 processors are busy on every
//     cycle and a new QR update starts every T_QR = 2M+1 cycles. Each cell has
//     the latency L_IC (the boundary cell 2*L_IC for delta); because L_IC and
//     T_QR share no factor, the operations of successive updates interleave
//     without collision, so the latency costs no throughput, only delay.
//   N_IC > 1: the sparse linear array, T_QR = N_IC*(2M+1). The internal
//     processors stay fully busy; the boundary processor works one cycle in
//     N_IC. L_IC is then the wavefront step of the unreduced schedule (see
//     qr_internal_cell for the resulting latencies).
//
// Interface: in_ready is high one cycle in every T_QR; an input vector
// in_x[0..N-1] = (x_1 .. x_2M, y) with in_valid high is accepted in that cycle.
// A cycle with in_ready high and in_valid low inserts a bubble: that update
// leaves the stored R, u and D values unchanged and yields no residual. For
// each accepted vector, out_valid pulses with the a-posteriori residual out_e
// = delta * (rotated y), 1 + 4*M*N_IC*L_IC + N_IC*(L_IC-1)+1 cycles after the
// accepting edge (1 + L_IC*(4M+1) for the linear array). The stored R and u
// (one value per internal cell) remain inside the processors; weights are
// found from them by back-substitution outside this core. Reset is
// synchronous, active low, and clears R, u and D. The input handshake and
// bubbles are this design's own; the processor line, its links and T_QR
// follow the published architecture.
module qr_linear_array #(
  parameter int M            = 22,
  parameter int L_IC         = 4,
  parameter int N_IC         = 1,
  parameter int FORGET_SHIFT = 7,
  localparam int N    = 2 * M + 1,
  localparam int T    = N,
  localparam int SW   = $clog2(T),
  localparam int PHW  = (N_IC > 1) ? $clog2(N_IC) : 1,
  localparam int P    = M / N_IC,       // internal processors
  localparam int NTAP = 2 * N_IC - 1
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         in_ready,
  input  logic         in_valid,
  input  qr_pkg::fp_t  in_x [N],
  output logic         out_valid,
  output qr_pkg::fp_t  out_e
);
  import qr_pkg::*;

  logic [SW-1:0]  base;
  logic [PHW-1:0] phase;
  fp_t            ext_x [N];
  logic           ext_v [N];
  tok_t           tok   [P+1][NTAP];   // tok[0]: boundary, tok[j]: internal j

  qr_schedule_ctrl #(.M(M), .L_IC(L_IC), .N_IC(N_IC)) u_ctrl (
    .clk, .rst_n, .base, .phase, .last_slot(in_ready)
  );

  qr_input_sched #(.M(M), .L_IC(L_IC), .N_IC(N_IC)) u_in (
    .clk, .rst_n, .capture(in_ready), .in_valid, .in_x, .ext_x, .ext_v
  );

  qr_boundary_cell #(.M(M), .L_IC(L_IC), .N_IC(N_IC), .FORGET_SHIFT(FORGET_SHIFT)) u_bc (
    .clk, .rst_n, .base, .phase,
    .ext_x(ext_x[0]), .ext_v(ext_v[0]),
    .tok_r(tok[1][N_IC-1]), .tok_o(tok[0]),
    .e_o(out_e), .e_v(out_valid)
  );

  for (genvar j = 1; j <= P; j++) begin : g_ic
    tok_t left, right;
    if (j == 1) begin : g_l_bc
      assign left = tok[0][N_IC-1];
    end else begin : g_l_ic
      assign left = tok[j-1][0];
    end
    if (j < P) begin : g_r
      assign right = tok[j+1][NTAP-1];
    end else begin : g_end
      assign right = '0;
    end
    qr_internal_cell #(.M(M), .L_IC(L_IC), .N_IC(N_IC), .J(j)) u_ic (
      .clk, .rst_n, .base, .phase, .ext_x, .ext_v,
      .tok_l(left), .tok_r(right), .tok_o(tok[j])
    );
  end

endmodule
