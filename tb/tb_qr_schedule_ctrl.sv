// tb_qr_schedule_ctrl: checks that (base, phase) count through the
// T_QR = N_IC*(2M+1) slots of a period in order (phase fastest) and wrap, that
// last_slot marks the final slot only, and that reset returns to slot 0. Two
// controllers: the 7-input linear example (M = 3, L_IC = 3, N_IC = 1, T_QR = 7)
// and a sparse one (M = 3, N_IC = 3, T_QR = 21).
module tb_qr_schedule_ctrl;
  localparam int M = 3, L_IC = 3, T = 2 * M + 1, SW = $clog2(T);
  localparam int NS = 3, TS = NS * T;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, last_slot;
  logic [SW-1:0] slot, base_s;
  logic [1:0]    phase_s;
  logic          phase, last_s;
  int checks = 0, failures = 0;

  qr_schedule_ctrl #(.M(M), .L_IC(L_IC)) dut (.clk, .rst_n, .base(slot), .phase, .last_slot);
  qr_schedule_ctrl #(.M(M), .L_IC(L_IC), .N_IC(NS)) dut_s (
    .clk, .rst_n, .base(base_s), .phase(phase_s), .last_slot(last_s));

  task automatic check_run(int cycles);
    int want, want_s;
    want = 0;
    want_s = 0;
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      checks += 2;
      if (int'(slot) != want || phase != 1'b0 || last_slot != (want == T - 1)) begin
        failures++;
        $display("FAIL: cycle %0d slot %0d last %0b, want %0d", i, slot, last_slot, want);
      end
      if (int'(base_s) * NS + int'(phase_s) != want_s || last_s != (want_s == TS - 1)) begin
        failures++;
        $display("FAIL: cycle %0d base %0d phase %0d last %0b, want slot %0d",
                 i, base_s, phase_s, last_s, want_s);
      end
      want = (want + 1) % T;
      want_s = (want_s + 1) % TS;
    end
  endtask

  initial begin
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    check_run(2 * TS + 3);
    rst_n <= 1'b0;        // reset in the middle of a period
    @(posedge clk);
    rst_n <= 1'b1;
    check_run(TS + 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
