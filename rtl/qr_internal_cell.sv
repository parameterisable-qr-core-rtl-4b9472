// qr_internal_cell: internal-cell processor J of the linear QR array.
//
// The internal operations of the folded triangular array form M columns:
// column k holds the cells (r,c) with c-r = k (the "A" half) and
// c-r = 2M+1-k (the mirrored "B" half). Processor J runs the N_IC columns
// k = (J-1)*N_IC+1 .. J*N_IC, one operation per clock cycle: column
// (J-1)*N_IC+1+phase in each cycle (N_IC = 1 for the plain linear array,
// N_IC > 1 for the sparse linear array). For every cell it keeps one element
// of R or u in a local memory, one entry per slot, and applies the squared
// Givens rotation with two multiplications:
//     x_out = x - a * r
//     r'    = r + b * x_out
// passing a and b on unchanged.
//
// Operand multiplexers: cells of row 1 take x from the input scheduler. In
// the A half x comes from column k+1 and a, b from column k-1 (the boundary
// processor for k = 1); in the B half the data flow the other way. Column M,
// where the array is folded, takes the operand that crosses the fold from its
// own output. A neighbouring column is either in this processor (another
// phase) or in the neighbouring processor. The choice for every slot is a
// constant table built from qr_pkg::cell_at.
//
// Timing: every output token leaves P_LAT = N_IC*(L_IC-1)+1 cycles after the
// operation starts (L_IC for the linear array) and then passes a delay line;
// tok_o[i] is the token i cycles later still. A consumer in phase pc reading a
// producer in phase pp starts N_IC*L_IC + pc - pp cycles after it, so it reads
// tap pc - pp + N_IC - 1: N_IC-1 for its own column and for the boundary
// processor, N_IC and N_IC-2 for the neighbouring columns inside the
// processor, 0 and 2*N_IC-2 for the neighbouring processors (tok_l, tok_r).
// r' is written back P_LAT cycles after the operation, before the cell runs
// again. The arithmetic is combinational, followed by the pipeline registers.
// Invalid (bubble) operations change no stored value. Reset clears R.
// The cell equations, the fold, the local links and the column assignment
// follow the published architecture; the exact timing of the sparse variant
// (P_LAT and the tap delays) is this design's own.
module qr_internal_cell #(
  parameter int M    = 22,
  parameter int L_IC = 4,
  parameter int N_IC = 1,
  parameter int J    = 1,
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
  input  qr_pkg::fp_t    ext_x [N],   // row-1 inputs from the input scheduler
  input  logic           ext_v [N],
  input  qr_pkg::tok_t   tok_l,       // left neighbour at the tap this one reads
  input  qr_pkg::tok_t   tok_r,       // right neighbour at the tap this one reads
  output qr_pkg::tok_t   tok_o [NTAP]
);
  import qr_pkg::*;

  // operand selection per (phase, base slot)
  typedef enum logic [2:0] {OP_EXT, OP_LEFT, OP_RIGHT, OP_OWN} opsel_e;

  logic [7:0] col_tab  [N_IC][T];
  opsel_e     xsel_tab [N_IC][T];
  opsel_e     absel_tab[N_IC][T];
  int         xtap_tab [N_IC][T];
  int         abtap_tab[N_IC][T];

  // operand route of a virtual source as seen from phase p
  function automatic opsel_e route(src_e s, int p);
    case (s)
      SRC_EXT:   return OP_EXT;
      SRC_LEFT:  return (p == 0) ? OP_LEFT : OP_OWN;
      SRC_RIGHT: return (p == N_IC - 1) ? OP_RIGHT : OP_OWN;
      default:   return OP_OWN;
    endcase
  endfunction

  function automatic int tap(src_e s, int p);
    case (s)
      SRC_LEFT:  return (p == 0) ? 0 : N_IC;
      SRC_RIGHT: return (p == N_IC - 1) ? 0 : N_IC - 2;
      default:   return N_IC - 1;
    endcase
  endfunction

  for (genvar p = 0; p < N_IC; p++) begin : g_ph
    for (genvar s = 0; s < T; s++) begin : g_tab
      localparam cell_t C = cell_at((J - 1) * N_IC + 1 + p, s, M, L_IC);
      assign col_tab[p][s]   = C.col;
      assign xsel_tab[p][s]  = route(C.x_src, p);
      assign absel_tab[p][s] = route(C.ab_src, p);
      assign xtap_tab[p][s]  = tap(C.x_src, p);
      assign abtap_tab[p][s] = tap(C.ab_src, p);
    end
  end

  fp_t           r_mem [N_IC][T];
  tok_t          out_pipe [P_LAT + NTAP - 1];
  logic          wb_en   [P_LAT];
  logic [SW-1:0] wb_addr [P_LAT];
  logic [PHW-1:0] wb_ph  [P_LAT];
  fp_t           wb_data [P_LAT];

  tok_t xs, abs_;
  fp_t  x, a, b, r_old, x_out, r_new;
  logic v;

  always_comb begin
    unique case (xsel_tab[phase][base])
      OP_EXT: begin
        xs   = '0;
        xs.x = ext_x[int'(col_tab[phase][base]) - 1];
        xs.v = ext_v[int'(col_tab[phase][base]) - 1];
      end
      OP_LEFT:  xs = tok_l;
      OP_RIGHT: xs = tok_r;
      default:  xs = tok_o[xtap_tab[phase][base]];
    endcase
    unique case (absel_tab[phase][base])
      OP_LEFT:  abs_ = tok_l;
      OP_RIGHT: abs_ = tok_r;
      default:  abs_ = tok_o[abtap_tab[phase][base]];
    endcase
    x     = xs.x;
    v     = xs.v;
    a     = abs_.a;
    b     = abs_.b;
    r_old = r_mem[phase][base];
    x_out = fp_sub(x, fp_mul(a, r_old));
    r_new = fp_add(r_old, fp_mul(b, x_out));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < N_IC; p++)
        for (int i = 0; i < T; i++) r_mem[p][i] <= FP_ZERO;
      for (int i = 0; i < P_LAT + NTAP - 1; i++) out_pipe[i] <= '0;
      for (int i = 0; i < P_LAT; i++) wb_en[i] <= 1'b0;
    end else begin
      out_pipe[0] <= '{v: v, x: x_out, a: a, b: b};
      wb_en[0]    <= v;
      wb_addr[0]  <= base;
      wb_ph[0]    <= phase;
      wb_data[0]  <= r_new;
      for (int i = 1; i < P_LAT + NTAP - 1; i++) out_pipe[i] <= out_pipe[i-1];
      for (int i = 1; i < P_LAT; i++) begin
        wb_en[i]    <= wb_en[i-1];
        wb_addr[i]  <= wb_addr[i-1];
        wb_ph[i]    <= wb_ph[i-1];
        wb_data[i]  <= wb_data[i-1];
      end
      if (wb_en[P_LAT-1]) r_mem[wb_ph[P_LAT-1]][wb_addr[P_LAT-1]] <= wb_data[P_LAT-1];
    end
  end

  for (genvar i = 0; i < NTAP; i++) begin : g_tap
    assign tok_o[i] = out_pipe[P_LAT - 1 + i];
  end

endmodule
