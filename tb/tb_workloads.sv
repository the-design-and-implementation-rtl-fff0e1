// tb_workloads: runs the filter sizes evaluated for the folded lattice LMS
// filter besides the default (8 taps, K = 2): 8 taps with K = 4, and 16 and
// 32 taps with K = 2 and K = 4. Each size is an lms_bench instance with the
// same ECG-plus-interference stimulus, checked against the unfolded
// reference model sample by sample.
module tb_workloads;
  localparam int NB = 5;
  bit done [NB];
  int checks [NB], failures [NB];
  int total_checks, total_failures;

  lms_bench #(.TAPS(8),  .K(4), .NSAMP(2000)) b8k4  (.done(done[0]), .checks(checks[0]), .failures(failures[0]));
  lms_bench #(.TAPS(16), .K(2), .NSAMP(2000)) b16k2 (.done(done[1]), .checks(checks[1]), .failures(failures[1]));
  lms_bench #(.TAPS(16), .K(4), .NSAMP(2000)) b16k4 (.done(done[2]), .checks(checks[2]), .failures(failures[2]));
  lms_bench #(.TAPS(32), .K(2), .NSAMP(2000)) b32k2 (.done(done[3]), .checks(checks[3]), .failures(failures[3]));
  lms_bench #(.TAPS(32), .K(4), .NSAMP(2000)) b32k4 (.done(done[4]), .checks(checks[4]), .failures(failures[4]));

  function automatic bit all_done();
    foreach (done[i]) if (!done[i]) return 0;
    return 1;
  endfunction

  task automatic report(int extra_failures);
    total_checks = 0; total_failures = extra_failures;
    foreach (checks[i]) begin
      total_checks += checks[i];
      total_failures += failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  endtask

  initial begin
    // Watchdog: 2000 samples at K = 4 need about 8000 cycles of 10 ns.
    #2000000;
    $display("watchdog expired");
    report(1);
  end

  initial begin
    do #100; while (!all_done());
    report(0);
  end
endmodule
