// tb_fold_ctrl: checks the folding controller for K = 1, 2 (default), 3
// and 4. Random in_valid traffic; a cycle-level model built from the
// accept times predicts busy, slot, first/last pass, in_ready and
// out_valid: a sample accepted in cycle A occupies passes 0..K-1 in cycles
// A+1..A+K and yields out_valid in cycle A+K+1. Also checks that
// back-to-back traffic reaches one sample per K cycles.
module tb_fold_ctrl;
  localparam int NK = 4;
  localparam int KS [NK] = '{1, 2, 3, 4};
  localparam int CYCLES = 4000;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  int cycle = 0;
  int checks = 0, failures = 0;
  bit done = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 2000) @(posedge clk);
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  for (genvar g = 0; g < NK; g++) begin : g_k
    localparam int K = KS[g];
    localparam int SW = (K > 1) ? $clog2(K) : 1;
    logic in_ready, accept, busy, first_pass, last_pass, out_valid;
    logic [SW-1:0] slot;
    int last_acc = -1000, prev_acc = -1000;
    int accepts = 0;

    if (K == 2) begin : g_def
      fold_ctrl dut (.clk, .rst_n, .in_valid, .in_ready, .accept, .busy, .slot,
                     .first_pass, .last_pass, .out_valid);
    end else begin : g_par
      fold_ctrl #(.K(K)) dut (.clk, .rst_n, .in_valid, .in_ready, .accept, .busy, .slot,
                              .first_pass, .last_pass, .out_valid);
    end

    always @(negedge clk) if (rst_n) begin
      bit exp_busy, exp_ready, exp_ov;
      int exp_slot;
      exp_busy = (cycle >= last_acc + 1) && (cycle <= last_acc + K);
      exp_slot = exp_busy ? cycle - last_acc - 1 : 0;
      exp_ready = !exp_busy || exp_slot == K - 1;
      exp_ov = (cycle == last_acc + K + 1) || (cycle == prev_acc + K + 1);
      checks++;
      if (busy !== exp_busy || (exp_busy && int'(slot) != exp_slot) ||
          in_ready !== exp_ready || out_valid !== exp_ov ||
          first_pass !== (exp_busy && exp_slot == 0) ||
          last_pass !== (exp_busy && exp_slot == K - 1) ||
          accept !== (in_valid && exp_ready)) begin
        failures++;
        if (failures < 10)
          $display("K=%0d cycle %0d: busy=%b slot=%0d ready=%b ov=%b, want %b %0d %b %b",
                   K, cycle, busy, slot, in_ready, out_valid, exp_busy, exp_slot,
                   exp_ready, exp_ov);
      end
      if (in_valid && exp_ready) begin
        prev_acc = last_acc;
        last_acc = cycle;
        accepts++;
      end
    end
  end

  // Throughput: with in_valid held high, K=g accepts one sample per K cycles.
  int acc_before [NK];

  initial begin
    in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Phase 1: random traffic.
    for (int i = 0; i < CYCLES; i++) begin
      @(posedge clk);
      cycle++;
      in_valid <= ($urandom_range(0, 2) != 0);
    end
    // Phase 2: saturated traffic for 120 cycles.
    @(posedge clk); cycle++;
    in_valid <= 1;
    @(posedge clk); cycle++;
    acc_before[0] = g_k[0].accepts; acc_before[1] = g_k[1].accepts;
    acc_before[2] = g_k[2].accepts; acc_before[3] = g_k[3].accepts;
    repeat (120) begin @(posedge clk); cycle++; end
    #1;
    checks++;
    if (g_k[0].accepts - acc_before[0] != 120 || g_k[1].accepts - acc_before[1] != 60 ||
        g_k[2].accepts - acc_before[2] != 40 || g_k[3].accepts - acc_before[3] != 30) begin
      failures++;
      $display("throughput wrong: %0d %0d %0d %0d accepts in 120 cycles",
               g_k[0].accepts - acc_before[0], g_k[1].accepts - acc_before[1],
               g_k[2].accepts - acc_before[2], g_k[3].accepts - acc_before[3]);
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
