// tb_lms_tap: checks the LMS tap cell (weight update 2^-MU_SHIFT*e*b and
// tap product) against integer arithmetic, including weight saturation,
// and repeats one update until a known weight is reached.
module tb_lms_tap;
  import lattice_ref_pkg::*;
  localparam int MU = lattice_pkg::MU_SHIFT_DEF;

  logic signed [23:0] w_in, w_out;
  logic signed [15:0] e_prev, b_old, b_cur;
  logic signed [39:0] prod;
  int checks = 0, failures = 0;
  bit done = 0;

  lms_tap dut (.w_in, .e_prev, .b_old, .b_cur, .w_out, .prod);

  task automatic apply(longint wi, longint e, longint bo, longint bc);
    longint we, pe;
    w_in = 24'(wi); e_prev = 16'(e); b_old = 16'(bo); b_cur = 16'(bc);
    #1;
    tap(wi, e, bo, bc, MU, we, pe);
    checks++;
    if (longint'(w_out) != we || longint'(prod) != pe) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH w=%0d e=%0d bo=%0d bc=%0d: got w=%0d p=%0d, want w=%0d p=%0d",
                 wi, e, bo, bc, w_out, prod, we, pe);
    end
  endtask

  initial begin
    #1000000;
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    longint w;
    apply(0, 0, 0, 0);
    apply(4194304, 0, 1234, 16384);          // w = 1.0, no update: prod = 1.0*0.5
    apply(8388607, 32767, 32767, 100);       // saturates at +max
    apply(-8388608, -32768, 32767, -100);    // saturates at -max
    apply(0, -1, 1, 5);                       // update truncates to -1
    // Update e = 0.5, b = 0.5: 2^-MU * 0.25 = 2^(20-MU) in Q2.22 per step.
    w = 0;
    for (int i = 0; i < 16; i++) begin
      w_in = 24'(w); e_prev = 16384; b_old = 16384; b_cur = 32767;
      #1;
      w = longint'(w_out);
    end
    checks++;
    if (w != 16 * (longint'(1) <<< (20 - MU))) begin
      failures++;
      $display("MISMATCH after 16 updates: w=%0d", w);
    end
    repeat (20000) begin
      apply(longint'($signed(24'($urandom))), longint'($signed(16'($urandom))),
            longint'($signed(16'($urandom))), longint'($signed(16'($urandom))));
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
