// tb_lattice_stage: checks the lattice order-update stage against integer
// arithmetic: corner values (full-scale inputs, k = -1, saturation in both
// directions) and 20000 random vectors.
module tb_lattice_stage;
  import lattice_ref_pkg::*;

  logic signed [15:0] f_in, b_del, k, f_out, b_out;
  int checks = 0, failures = 0;
  bit done = 0;

  lattice_stage dut (.f_in, .b_del, .k, .f_out, .b_out);

  task automatic apply(longint fi, longint bi, longint ki);
    longint fe, be;
    f_in = 16'(fi); b_del = 16'(bi); k = 16'(ki);
    #1;
    stage(fi, bi, ki, fe, be);
    checks++;
    if (longint'(f_out) != fe || longint'(b_out) != be) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH f_in=%0d b_del=%0d k=%0d: got f=%0d b=%0d, want f=%0d b=%0d",
                 fi, bi, ki, f_out, b_out, fe, be);
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
    apply(0, 0, 0);
    apply(1000, -2000, 0);
    apply(16384, 16384, 16384);        // 0.5 - 0.25
    apply(32767, -32768, 32767);        // saturates high
    apply(-32768, 32767, 32767);        // saturates low
    apply(-32768, -32768, -32768);      // k = -1: f = -1 - 1 -> saturates
    apply(32767, 32767, -32768);
    apply(-1, -1, 1);                   // truncation toward minus infinity
    apply(12345, -321, -16384);
    repeat (20000) begin
      apply(longint'($signed(16'($urandom))), longint'($signed(16'($urandom))),
            longint'($signed(16'($urandom))));
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
