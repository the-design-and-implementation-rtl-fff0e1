// fold_ctrl: time-slot controller of the folded filter.
//
// With folding factor K, each lane of hardware performs K operations of the
// unfolded lattice, one per clock cycle, so a sample period is K cycles
// long. This controller accepts a sample, then steps a slot counter
// 0..K-1 (one "pass" per cycle) and flags the first and last pass. A new
// sample may be accepted during the last pass of the current one, so
// back-to-back samples are processed at one sample every K cycles.
//
// Handshake (this implementation's choice; the source gives none):
//   in_valid/in_ready : a sample is taken in the cycle both are high
//                       (accept). in_ready is high when idle or in the last
//                       pass.
// Timing: accept in cycle A; passes 0..K-1 in cycles A+1..A+K; out_valid is
// high for one cycle in cycle A+K+1, when the result registers hold the
// sample's output.
module fold_ctrl #(
  parameter int unsigned K = lattice_pkg::FOLD_DEF,
  localparam int unsigned SLOT_W = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  output logic                 accept,
  output logic                 busy,
  output logic [SLOT_W-1:0]    slot,
  output logic                 first_pass,
  output logic                 last_pass,
  output logic                 out_valid
);
  localparam logic [SLOT_W-1:0] LAST = SLOT_W'(K - 1);

  initial begin
    assert (K >= 1) else $error("fold_ctrl: K must be at least 1");
  end

  assign first_pass = busy && (slot == '0);
  assign last_pass  = busy && (slot == LAST);
  assign in_ready   = !busy || (slot == LAST);
  assign accept     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      slot      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= last_pass;
      if (busy && slot != LAST) begin
        slot <= slot + 1'b1;
      end else begin
        busy <= accept;
        slot <= '0;
      end
    end
  end

  // The slot counter never leaves 0..K-1.
  a_slot_range: assert property (@(posedge clk) disable iff (!rst_n) slot <= LAST);
  // Once started, a sample runs all K passes without a gap.
  a_no_gap: assert property (@(posedge clk) disable iff (!rst_n)
                             (busy && slot != LAST) |=> busy);
endmodule
