// qr_boundary_cell: boundary-cell processor of the linear QR array.
//
// One processor runs every boundary operation of the N = 2M+1 input triangular
// array using the squared Givens rotation (SGR), which needs no square root.
// For rows r = 1..N-1 it keeps the weight D_r of that row in a local memory
// (one entry per slot) and computes, from the input x and the incoming delta:
//     D'        = beta^2 * D + delta * x^2
//     a         = x
//     b         = delta * x / D'
//     delta_out = delta * beta^2 * D / D'
// where beta^2 = 1 - 2^-FORGET_SHIFT is a shift and a subtraction. If D' is
// zero the rotation is the identity: b = 0 and delta_out = delta. In the slot
// of cell (N,N) it works as the output multiplier and forms the a-posteriori
// residual e = delta * x, the delta being the one left after the last rotation.
// Row 1 takes x from the input scheduler and delta = 1; every other row takes
// x from internal processor 1 and delta from its own delta_out of the
// previous boundary operation.
//
// Schedule: boundary operations run in phase 0 of each base slot, one every
// N_IC cycles (every cycle in the plain linear array, N_IC = 1); in other
// phases the processor idles. The row of each base slot is a constant table.
//
// Timing: a, b and the residual leave P_LAT = N_IC*(L_IC-1)+1 cycles after
// the operation starts (L_IC for the linear array) and then pass a delay line;
// tok_o[i] is the token i cycles later still, and each consumer picks the tap
// at which its operation starts. delta_out is delayed by 2*N_IC*L_IC cycles,
// twice the cell latency of the linear array, so it arrives with the next
// boundary operation. D' is written back P_LAT cycles after the operation.
// The arithmetic is combinational, followed by the pipeline registers, which
// a synthesis tool can retime into it. Invalid (bubble) operations change no
// stored value and produce invalid outputs. Reset clears the D memory.
// The SGR equations, the latency relations and the single boundary processor
// follow the published architecture; the number format, the zero-pivot rule
// and running the output multiplier in this processor are this design's own.
module qr_boundary_cell #(
  parameter int M            = 22,
  parameter int L_IC         = 4,
  parameter int N_IC         = 1,
  parameter int FORGET_SHIFT = 7,
  localparam int N     = 2 * M + 1,
  localparam int T     = N,
  localparam int SW    = $clog2(T),
  localparam int PHW   = (N_IC > 1) ? $clog2(N_IC) : 1,
  localparam int P_LAT = N_IC * (L_IC - 1) + 1,
  localparam int NTAP  = 2 * N_IC - 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [SW-1:0]  base,
  input  logic [PHW-1:0] phase,
  // row 1 input from the input scheduler (element 1)
  input  qr_pkg::fp_t    ext_x,
  input  logic           ext_v,
  // token of internal processor 1, at the tap where this processor reads it
  input  qr_pkg::tok_t   tok_r,
  // own token line: rotation parameters for internal processor 1
  output qr_pkg::tok_t   tok_o [NTAP],
  // a-posteriori residual
  output qr_pkg::fp_t    e_o,
  output logic           e_v
);
  import qr_pkg::*;

  // constant table: which row this processor runs in each base slot
  logic [7:0] row_tab [T];
  for (genvar s = 0; s < T; s++) begin : g_tab
    localparam cell_t C = cell_at(0, s, M, L_IC);
    assign row_tab[s] = C.row;
  end

  fp_t  d_mem [T];
  fp_t  dly_pipe [2*N_IC*L_IC];    // delta_out delay line
  tok_t out_pipe [P_LAT + NTAP - 1];
  fp_t  e_pipe   [P_LAT];
  logic ev_pipe  [P_LAT];
  logic          wb_en   [P_LAT];
  logic [SW-1:0] wb_addr [P_LAT];
  fp_t           wb_data [P_LAT];

  logic [7:0] row;
  fp_t  x, dl, d_old, d_fg, d_new, b, dout, e;
  logic v, act, last_row;

  always_comb begin
    act      = (phase == '0);
    row      = row_tab[base];
    last_row = (row == 8'(N));
    x        = (row == 8'd1) ? ext_x : tok_r.x;
    v        = act && ((row == 8'd1) ? ext_v : tok_r.v);
    dl       = (row == 8'd1) ? FP_ONE : dly_pipe[2*N_IC*L_IC-1];
    d_old    = d_mem[base];
    d_fg     = fp_forget(d_old, FORGET_SHIFT);
    d_new    = fp_add(d_fg, fp_mul(dl, fp_mul(x, x)));
    if (fp_is_zero(d_new)) begin
      b    = FP_ZERO;
      dout = dl;
    end else begin
      b    = fp_div(fp_mul(dl, x), d_new);
      dout = fp_div(fp_mul(dl, d_fg), d_new);
    end
    e = fp_mul(dl, x);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < T; i++) d_mem[i] <= FP_ZERO;
      for (int i = 0; i < P_LAT + NTAP - 1; i++) out_pipe[i] <= '0;
      for (int i = 0; i < P_LAT; i++) begin
        ev_pipe[i] <= 1'b0;
        wb_en[i]   <= 1'b0;
      end
    end else begin
      out_pipe[0] <= '{v: v && !last_row, x: FP_ZERO, a: x, b: b};
      e_pipe[0]   <= e;
      ev_pipe[0]  <= v && last_row;
      wb_en[0]    <= v && !last_row;
      wb_addr[0]  <= base;
      wb_data[0]  <= d_new;
      for (int i = 1; i < P_LAT + NTAP - 1; i++) out_pipe[i] <= out_pipe[i-1];
      for (int i = 1; i < P_LAT; i++) begin
        e_pipe[i]   <= e_pipe[i-1];
        ev_pipe[i]  <= ev_pipe[i-1];
        wb_en[i]    <= wb_en[i-1];
        wb_addr[i]  <= wb_addr[i-1];
        wb_data[i]  <= wb_data[i-1];
      end
      if (wb_en[P_LAT-1]) d_mem[wb_addr[P_LAT-1]] <= wb_data[P_LAT-1];
    end
  end

  // delta line has no reset: its value is only used by rows 2..N, which the
  // schedule always reaches after it has been filled
  always_ff @(posedge clk) begin
    dly_pipe[0] <= dout;
    for (int i = 1; i < 2 * N_IC * L_IC; i++) dly_pipe[i] <= dly_pipe[i-1];
  end

  for (genvar i = 0; i < NTAP; i++) begin : g_tap
    assign tok_o[i] = out_pipe[P_LAT - 1 + i];
  end
  assign e_o = e_pipe[P_LAT-1];
  assign e_v = ev_pipe[P_LAT-1];

endmodule
