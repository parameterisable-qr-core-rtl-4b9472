// qr_schedule_ctrl: schedule controller of the linear QR array.
//
// The array repeats one fixed pattern every T_QR = N_IC*(2M+1) clock cycles
// (N_IC = 1 for the plain linear array, more for the sparse linear array, in
// which each internal processor runs N_IC columns of operations). The slot of
// a cycle, cycle mod T_QR, is counted as a pair: phase = slot mod N_IC, the
// column of operations an internal processor works on in this cycle, and
// base = slot div N_IC, the slot of the unreduced linear schedule. Every
// processor looks up the cell it runs from (base, phase). last_slot marks the
// final cycle of each period; the input scheduler captures the vector of the
// next QR update then.
//
// Following the retiming rule of the architecture, the wavefront step L_IC
// must share no factor with 2M+1 and must be below it (so that a stored value
// is written back before its cell runs again); N_IC must divide M. All three
// are checked at elaboration. Reset (synchronous, active low) returns to
// slot 0.
module qr_schedule_ctrl #(
  parameter int M    = 22,
  parameter int L_IC = 4,
  parameter int N_IC = 1,
  localparam int T   = 2 * M + 1,
  localparam int SW  = $clog2(T),
  localparam int PHW = (N_IC > 1) ? $clog2(N_IC) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic [SW-1:0]  base,
  output logic [PHW-1:0] phase,
  output logic           last_slot
);

  if (qr_pkg::gcd(L_IC, T) != 1) begin : g_bad_coprime
    $error("L_IC must be relatively prime to 2M+1");
  end
  if (L_IC < 1 || L_IC >= T) begin : g_bad_range
    $error("L_IC must lie in 1 .. 2M");
  end
  if (N_IC < 1 || M % N_IC != 0) begin : g_bad_nic
    $error("N_IC must divide M");
  end

  logic phase_last;
  assign phase_last = (phase == PHW'(N_IC - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      base  <= '0;
      phase <= '0;
    end else begin
      phase <= phase_last ? '0 : phase + 1'b1;
      if (phase_last) base <= (base == SW'(T - 1)) ? '0 : base + 1'b1;
    end
  end

  assign last_slot = phase_last && (base == SW'(T - 1));

endmodule
