// tb_folded_lattice_lms: end-to-end test of the folded adaptive lattice LMS
// noise canceller at its default size (8 taps, folding factor K = 2).
//
// Stimulus: synthetic ECG at 360 samples/s plus 50 Hz mains interference
// on the primary input d; a 50 Hz reference of another amplitude and phase
// on x. The reflection coefficients are loaded first. Every output is
// compared with the unfolded reference model (bit exact). The test also
// checks the timing (out_valid K+1 cycles after the sample is accepted,
// one sample per K cycles when the input is saturated) and that the
// interference is cancelled: the noise left in e must be at least 20 dB
// below the noise in d over the second half of the run.
//
// Mechanisms counted, each must occur: back-to-back samples, input stall
// (in_valid while in_ready is low), idle gaps, pass-to-pass carry through
// the folding registers, coefficient writes, weight changes, and a
// coefficient write ignored because it arrived while busy.
module tb_folded_lattice_lms;
  import lattice_ref_pkg::*;

  localparam int TAPS = lattice_pkg::TAPS_DEF;
  localparam int K    = lattice_pkg::FOLD_DEF;
  localparam int MU   = lattice_pkg::MU_SHIFT_DEF;
  localparam int NSAMP = 3000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic signed [15:0] x_in = 0, d_in = 0;
  logic k_we = 0;
  logic [$clog2(TAPS)-1:0] k_addr = 0;
  logic signed [15:0] k_data = 0;
  logic out_valid;
  logic signed [15:0] y_out, e_out;

  folded_lattice_lms dut (.clk, .rst_n, .in_valid, .in_ready, .x_in, .d_in,
                          .k_we, .k_addr, .k_data, .out_valid, .y_out, .e_out);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit done = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_b2b = 0, n_stall = 0, n_gap = 0, n_carry = 0, n_kload = 0, n_wchange = 0,
      n_kignored = 0;

  lattice_ref ref_m;
  longint exp_y [$], exp_e [$], ecg_q [$], d_q [$];
  int acc_cycle [$];
  int last_accept = -100;
  real pn_in = 0.0, pn_out = 0.0, ps = 0.0;
  int nout = 0;

  initial begin
    repeat (NSAMP * K * 3 + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor accepted samples, stalls and the pass-to-pass registers.
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (dut.busy && !dut.first_pass) n_carry++;
    if (in_valid && in_ready) begin
      if (cycle - last_accept == K) n_b2b++;
      else if (cycle - last_accept > K + 1) n_gap++;
      last_accept = cycle;
      acc_cycle.push_back(cycle);
    end
    if (k_we && dut.busy) n_kignored++;
    else if (k_we) n_kload++;
  end

  // Check outputs against the reference model and the latency.
  always @(posedge clk) if (rst_n && out_valid) begin
    longint ye, ee, ecg, d;
    int a;
    ye = exp_y.pop_front(); ee = exp_e.pop_front();
    ecg = ecg_q.pop_front(); d = d_q.pop_front();
    a = acc_cycle.pop_front();
    checks++;
    if (longint'(y_out) != ye || longint'(e_out) != ee) begin
      failures++;
      if (failures < 10)
        $display("sample %0d: y=%0d e=%0d, want y=%0d e=%0d", nout, y_out, e_out, ye, ee);
    end
    checks++;
    if (cycle - a != K + 1) begin
      failures++;
      if (failures < 10) $display("sample %0d: latency %0d cycles, want %0d", nout, cycle - a, K + 1);
    end
    if (nout >= NSAMP / 2) begin
      pn_in  += real'((d - ecg) * (d - ecg));
      pn_out += real'((longint'(e_out) - ecg) * (longint'(e_out) - ecg));
      ps     += real'(ecg * ecg);
    end
    nout++;
  end

  // Stimulus changes on the falling edge (each task starts and ends there);
  // the design samples on the rising edge. A sample is taken at the first
  // rising edge with in_ready high.
  task automatic send(longint x, longint d, longint ecg);
    longint y, e;
    in_valid = 1; x_in = 16'(x); d_in = 16'(d);
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
    ref_m.step(x, d, y, e);
    exp_y.push_back(y); exp_e.push_back(e);
    ecg_q.push_back(ecg); d_q.push_back(d);
  endtask

  // A write while the filter is busy is ignored by the design.
  task automatic load_k(int m, longint v);
    k_we = 1; k_addr = $clog2(TAPS)'(m); k_data = 16'(v);
    if (!dut.busy) ref_m.k[m] = v;
    @(negedge clk);
    k_we = 0;
  endtask

  // Reflection coefficients: k_1 near cos(w0) of the 50 Hz reference, then
  // decreasing values of alternating sign.
  localparam longint KVALS [8] = '{20000, -9000, 5000, -3000, 2000, -1200, 800, -500};

  initial begin
    longint w_prev [TAPS];
    longint x, d, ecg;
    ref_m = new(TAPS, MU);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int m = 0; m < TAPS; m++) load_k(m, KVALS[m % 8]);
    for (int n = 0; n < NSAMP; n++) begin
      ecg = to_q15(ecg_sample(n));
      d   = clamp(ecg + to_q15(pli_sample(n, 50.0, 0.20, 0.7)), DMIN, DMAX);
      x   = to_q15(pli_sample(n, 50.0, 0.45, 0.0));
      // Mostly back-to-back; sometimes an idle gap, sometimes a coefficient
      // write that arrives while the filter is busy (and must be ignored).
      if (n % 97 == 5) repeat ($urandom_range(2, 5)) @(negedge clk);
      send(x, d, ecg);
      if (n % 211 == 7 && K > 1) load_k(n % TAPS, 12345);  // busy: ignored
      if (n % 50 == 0) begin
        for (int j = 0; j < TAPS; j++) w_prev[j] = longint'(dut.u_wbank.mem[j]);
      end
      if (n % 50 == 2) begin
        for (int j = 0; j < TAPS; j++) if (longint'(dut.u_wbank.mem[j]) != w_prev[j]) n_wchange++;
      end
    end
    in_valid = 0;
    repeat (K + 4) @(posedge clk);

    checks++;
    if (nout != NSAMP) begin
      failures++;
      $display("got %0d outputs, want %0d", nout, NSAMP);
    end
    begin
      real red;
      red = 10.0 * $log10(pn_in / (pn_out + 1.0));
      $display("interference power reduced by %0.1f dB; SNR in %0.1f dB, out %0.1f dB",
               red, 10.0 * $log10(ps / pn_in), 10.0 * $log10(ps / (pn_out + 1.0)));
      checks++;
      if (red < 20.0) begin
        failures++;
        $display("interference not cancelled well enough");
      end
    end
    $display("mechanisms: back_to_back=%0d stall=%0d idle_gap=%0d pass_carry=%0d k_load=%0d k_ignored=%0d weight_change=%0d",
             n_b2b, n_stall, n_gap, n_carry, n_kload, n_kignored, n_wchange);
    checks++;
    if (n_b2b == 0 || n_stall == 0 || n_gap == 0 || (K > 1 && n_carry == 0) || n_kload == 0 ||
        (K > 1 && n_kignored == 0) || n_wchange == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
