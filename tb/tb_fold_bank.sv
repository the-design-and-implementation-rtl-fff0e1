// tb_fold_bank: checks the slot-addressed register bank (LANES = 4, K = 2,
// the default of an 8-tap filter folded by 2) against an array model:
// reset to zero, slot reads, slot writes, single-entry configuration
// writes and their priority over a slot write to the same entry.
module tb_fold_bank;
  localparam int W = 16, LANES = 4, K = 2, N = LANES * K;

  logic clk = 0, rst_n = 0;
  logic [0:0] slot;
  logic signed [LANES-1:0][W-1:0] rd_data, wr_data;
  logic we, cfg_we;
  logic [2:0] cfg_addr;
  logic signed [W-1:0] cfg_data;
  logic signed [W-1:0] model [N];
  int checks = 0, failures = 0;
  bit done = 0;

  always #5 clk = ~clk;

  fold_bank dut (.clk, .rst_n, .slot, .rd_data, .we, .wr_data, .cfg_we, .cfg_addr, .cfg_data);

  initial begin
    repeat (20000) @(posedge clk);
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check_read();
    for (int l = 0; l < LANES; l++) begin
      checks++;
      if (rd_data[l] !== model[int'(slot) * LANES + l]) begin
        failures++;
        if (failures < 10)
          $display("slot %0d lane %0d: got %0d want %0d", slot, l, rd_data[l],
                   model[int'(slot) * LANES + l]);
      end
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    we = 0; cfg_we = 0; slot = 0; wr_data = '0; cfg_addr = 0; cfg_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    slot = 0; #1 check_read();
    slot = 1; #1 check_read();
    repeat (5000) begin
      @(negedge clk);
      slot = 1'($urandom);
      we = $urandom_range(0, 1) == 1;
      cfg_we = $urandom_range(0, 3) == 0;
      cfg_addr = 3'($urandom);
      cfg_data = 16'($urandom);
      for (int l = 0; l < LANES; l++) wr_data[l] = 16'($urandom);
      #1 check_read();
      @(posedge clk);
      if (we) for (int l = 0; l < LANES; l++) model[int'(slot) * LANES + l] = wr_data[l];
      if (cfg_we) model[cfg_addr] = cfg_data;
    end
    @(negedge clk);
    we = 0; cfg_we = 0;
    slot = 0; #1 check_read();
    slot = 1; #1 check_read();
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
