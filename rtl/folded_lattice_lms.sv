// folded_lattice_lms: folded adaptive lattice LMS noise canceller.
//
// Adaptive noise cancellation for ECG: the primary input d(p) is the ECG
// corrupted by power-line interference (PLI); the reference input x(p) is
// a signal correlated with the interference. A lattice predictor turns x
// into backward prediction errors b_0..b_{TAPS-1} (b_0 = f_0 = x), which
// are mutually decorrelated; an LMS-adapted linear combiner estimates the
// interference y(p) = sum_j w_j(p) b_j(p), and the cleaned ECG is the error
// e(p) = d(p) - y(p), which also drives the weight update
// w_j(p+1) = w_j(p) + 2*mu*e(p)*b_j(p).
//
// Folding. The unfolded filter has one lattice stage (two multipliers, two
// adders) and one LMS tap per order. Here only LANES = TAPS/K stage+tap
// cells exist, chained combinationally, and each is reused K times per
// sample: in pass c (c = 0..K-1) lane l computes lattice stage
// m = c*LANES + l + 1 and the tap on b_{m-1}. The forward and backward
// errors leaving the last lane are held in two registers (ra_f, ra_b) and
// enter the first lane in the next pass, in place of x; these are the two
// registers the register-allocation of the source's folding procedure
// arrives at. Per-stage state (delayed backward errors, weights,
// reflection coefficients) lives in fold_bank register banks addressed by
// the pass number. Tap products are summed over the passes in an
// accumulator; after the last pass y and e are registered.
//
// Structure, equations and folding follow the source design. This
// implementation's own choices: fixed-point formats (lattice_pkg),
// power-of-two step size, saturation, the valid/ready sample handshake,
// reflection coefficients loaded through a write port (the source does not
// give an update rule for them), and that the stage in the last slot, whose
// f and b outputs no tap uses, is still computed so that all lanes are alike.
// The LMS update of sample p is applied while sample p+1 is filtered (the
// lms_tap cell forms w(p+1) and uses it at once), so the arithmetic equals
// the sample-by-sample LMS filter exactly.
//
// Interface:
//   in_valid/in_ready, x_in, d_in : one sample pair, taken when both high.
//   k_we, k_addr, k_data           : write reflection coefficient k_{addr+1}
//                                    (Q1.15). Write only while idle.
//   out_valid, y_out, e_out        : noise estimate y(p) and cleaned ECG
//                                    e(p), valid for one cycle.
// Timing: a sample accepted in cycle A gives out_valid in cycle A+K+1;
// samples can be accepted every K cycles.
module folded_lattice_lms #(
  parameter int unsigned TAPS     = lattice_pkg::TAPS_DEF,
  parameter int unsigned K        = lattice_pkg::FOLD_DEF,
  parameter int unsigned DW       = lattice_pkg::DATA_W,
  parameter int unsigned FB       = lattice_pkg::DATA_FB,
  parameter int unsigned WW       = lattice_pkg::WEIGHT_W,
  parameter int unsigned WFB      = lattice_pkg::WEIGHT_FB,
  parameter int unsigned MU_SHIFT = lattice_pkg::MU_SHIFT_DEF,
  localparam int unsigned ADDR_W = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // samples
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] x_in,
  input  logic signed [DW-1:0] d_in,
  // reflection coefficient load
  input  logic                 k_we,
  input  logic [ADDR_W-1:0]    k_addr,
  input  logic signed [DW-1:0] k_data,
  // results
  output logic                 out_valid,
  output logic signed [DW-1:0] y_out,
  output logic signed [DW-1:0] e_out
);
  localparam int unsigned LANES  = TAPS / K;
  localparam int unsigned SLOT_W = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned PRW    = WW + DW;                       // tap product
  localparam int unsigned ACCW   = PRW + $clog2(TAPS) + 1;        // sum of TAPS
  localparam int unsigned YW     = ACCW - WFB;                    // y before saturation

  initial begin
    assert (TAPS % K == 0) else $error("folded_lattice_lms: TAPS must be a multiple of K");
  end

  // ---------------------------------------------------------------- control
  logic              accept, busy, first_pass, last_pass, ctrl_out_valid;
  logic [SLOT_W-1:0] slot;

  fold_ctrl #(.K(K)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .accept, .busy, .slot,
    .first_pass, .last_pass, .out_valid(ctrl_out_valid)
  );
  assign out_valid = ctrl_out_valid;

  // Input sample registers.
  logic signed [DW-1:0] x_reg, d_reg;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_reg <= '0;
      d_reg <= '0;
    end else if (accept) begin
      x_reg <= x_in;
      d_reg <= d_in;
    end
  end

  // --------------------------------------------------------- state banks
  logic signed [LANES-1:0][DW-1:0] k_rd, bdel_rd, bdel_wr;
  logic signed [LANES-1:0][WW-1:0] w_rd, w_wr;
  logic signed [LANES-1:0][DW-1:0] k_unused_wr;

  assign k_unused_wr = '0;

  // Reflection coefficients k_1..k_TAPS (entry m-1 holds k_m).
  fold_bank #(.W(DW), .LANES(LANES), .K(K)) u_kbank (
    .clk, .rst_n, .slot, .rd_data(k_rd), .we(1'b0), .wr_data(k_unused_wr),
    .cfg_we(k_we && !busy), .cfg_addr(k_addr), .cfg_data(k_data)
  );

  // Delayed backward errors b_0(p-1)..b_{TAPS-1}(p-1).
  fold_bank #(.W(DW), .LANES(LANES), .K(K)) u_bbank (
    .clk, .rst_n, .slot, .rd_data(bdel_rd), .we(busy), .wr_data(bdel_wr),
    .cfg_we(1'b0), .cfg_addr('0), .cfg_data('0)
  );

  // LMS weights w_0..w_{TAPS-1}.
  fold_bank #(.W(WW), .LANES(LANES), .K(K)) u_wbank (
    .clk, .rst_n, .slot, .rd_data(w_rd), .we(busy), .wr_data(w_wr),
    .cfg_we(1'b0), .cfg_addr('0), .cfg_data('0)
  );

  // ------------------------------------------------------ folded datapath
  logic signed [DW-1:0] ra_f, ra_b;          // pass-to-pass registers
  logic signed [DW-1:0] e_prev;              // e(p-1) for the weight update
  logic signed [DW-1:0] f_chain [LANES+1];
  logic signed [DW-1:0] b_chain [LANES+1];
  logic signed [PRW-1:0] prod [LANES];

  assign f_chain[0] = first_pass ? x_reg : ra_f;
  assign b_chain[0] = first_pass ? x_reg : ra_b;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    lattice_stage #(.DW(DW), .FB(FB)) u_stage (
      .f_in(f_chain[l]), .b_del(bdel_rd[l]), .k(k_rd[l]),
      .f_out(f_chain[l+1]), .b_out(b_chain[l+1])
    );
    lms_tap #(.DW(DW), .FB(FB), .WW(WW), .WFB(WFB), .MU_SHIFT(MU_SHIFT)) u_tap (
      .w_in(w_rd[l]), .e_prev, .b_old(bdel_rd[l]), .b_cur(b_chain[l]),
      .w_out(w_wr[l]), .prod(prod[l])
    );
    assign bdel_wr[l] = b_chain[l];
  end

  // Sum of this pass's tap products, added to the running accumulator.
  logic signed [ACCW-1:0] pass_sum, acc, acc_next;
  always_comb begin
    pass_sum = '0;
    for (int l = 0; l < LANES; l++) pass_sum += ACCW'(prod[l]);
    acc_next = (first_pass ? '0 : acc) + pass_sum;
  end

  // Output stage: y = sum >> WFB (saturated), e = d - y (saturated).
  localparam logic signed [YW-1:0] YMAX = YW'((2**(DW-1)) - 1);
  localparam logic signed [YW-1:0] YMIN = -YW'(2**(DW-1));
  logic signed [YW-1:0]   y_wide;
  logic signed [DW-1:0]   y_sat, e_sat;
  logic signed [DW:0]     e_wide;
  always_comb begin
    y_wide = YW'(acc_next >>> WFB);
    if (y_wide > YMAX)      y_sat = DW'(YMAX);
    else if (y_wide < YMIN) y_sat = DW'(YMIN);
    else                    y_sat = DW'(y_wide);
    e_wide = (DW+1)'(d_reg) - (DW+1)'(y_sat);
    if (e_wide > (DW+1)'(YMAX))      e_sat = DW'(YMAX);
    else if (e_wide < (DW+1)'(YMIN)) e_sat = DW'(YMIN);
    else                             e_sat = DW'(e_wide);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra_f   <= '0;
      ra_b   <= '0;
      acc    <= '0;
      e_prev <= '0;
      y_out  <= '0;
      e_out  <= '0;
    end else if (busy) begin
      ra_f <= f_chain[LANES];
      ra_b <= b_chain[LANES];
      acc  <= acc_next;
      if (last_pass) begin
        y_out  <= y_sat;
        e_out  <= e_sat;
        e_prev <= e_sat;
      end
    end
  end
endmodule
