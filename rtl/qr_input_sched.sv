// qr_input_sched: input data scheduler of the linear QR array.
//
// The array takes a whole input vector (2M auxiliary inputs x_1..x_2M and the
// primary input y as element N = 2M+1) once per update period T_QR, but the
// cells of the first row of the triangular array use its elements at different
// times: element c of update n is consumed at cycle
//     n*T_QR + N_IC*L_IC*(c-1) + phase(c)
// where phase(c) is the column position, within its internal processor, of
// the processor-array column that holds cell (1,c) (always 0 when N_IC = 1).
// That can lie several periods after the vector arrived. This block holds the
// last DEPTH vectors in a circular buffer and presents, for every element c,
// the vector that is due, so that the top-row cell of column c finds its input
// on ext_x[c-1] exactly in its slot. Element c is always read a fixed number
// of periods Q(c) after its vector was captured, so each output is a fixed
// selection of one buffer entry relative to the write pointer.
//
// Interface: capture (from the schedule controller, high in the last slot of a
// period) stores in_x/in_valid; in_valid low marks the update as a bubble, and
// its cells leave their stored values alone. ext_x/ext_v are meaningful only
// in the slot where the corresponding cell runs. Reset clears the valid flags.
// The buffer organisation is this design's own; the architecture only asks
// that every input reach its cell in the scheduled cycle.
module qr_input_sched #(
  parameter int M    = 22,
  parameter int L_IC = 4,
  parameter int N_IC = 1,
  localparam int N     = 2 * M + 1,
  localparam int T_QR  = N_IC * N,
  localparam int DEPTH = (N_IC * L_IC * (N - 1) + N_IC) / T_QR + 1,
  localparam int PW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            capture,
  input  logic            in_valid,
  input  qr_pkg::fp_t     in_x  [N],
  output qr_pkg::fp_t     ext_x [N],
  output logic            ext_v [N]
);

  qr_pkg::fp_t   buf_x [DEPTH][N];
  logic          buf_v [DEPTH];
  logic [PW-1:0] wp;   // entry of the update running in the current period

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0;
      for (int i = 0; i < DEPTH; i++) buf_v[i] <= 1'b0;
    end else if (capture) begin
      automatic logic [PW-1:0] nxt = (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      wp          <= nxt;
      buf_v[nxt]  <= in_valid;
      buf_x[nxt]  <= in_x;
    end
  end

  for (genvar c = 0; c < N; c++) begin : g_col
    // processor-array column of cell (1,c+1) and its phase
    localparam int K  = qr_pkg::proc_of(1, c + 1, M);
    localparam int PH = (K == 0) ? 0 : (K - 1) % N_IC;
    localparam int Q  = (N_IC * L_IC * c + PH) / T_QR;   // periods after capture
    logic [PW-1:0] rp;
    always_comb begin
      rp = (int'(wp) >= Q) ? PW'(int'(wp) - Q) : PW'(int'(wp) + DEPTH - Q);
      ext_x[c] = buf_x[rp][c];
      ext_v[c] = buf_v[rp];
    end
  end

endmodule
