// lms_tap: one tap of the lattice joint process estimator with its LMS
// weight update.
//
// The tap weight w_j multiplies the backward prediction error b_j. The
// update is the LMS rule w_j(p+1) = w_j(p) + 2*mu*e(p)*b_j(p), with the
// step 2*mu a power of two, 2^-MU_SHIFT. The cell is used one sample later
// than the error it learns from: it receives e(p-1) and the stored
// b_j(p-1), forms the new weight w_j(p), and multiplies it with the current
// b_j(p). The weights applied to sample p are therefore exactly the LMS
// weights w(p); no delayed-LMS approximation is made. The LMS equations are
// the source design's; the power-of-two step, the truncation of the update
// and the saturation of the weight are this implementation's choices.
//
// Interface: purely combinational.
//   w_in   : stored weight w_j(p-1), signed Q(WW-WFB).WFB
//   e_prev : error e(p-1), signed Q(DW-FB).FB
//   b_old  : b_j(p-1); b_cur : b_j(p)
//   w_out  : w_j(p), to be written back; prod : w_j(p)*b_j(p), full
//            precision, WFB+FB fraction bits.
module lms_tap #(
  parameter int unsigned DW       = lattice_pkg::DATA_W,
  parameter int unsigned FB       = lattice_pkg::DATA_FB,
  parameter int unsigned WW       = lattice_pkg::WEIGHT_W,
  parameter int unsigned WFB      = lattice_pkg::WEIGHT_FB,
  parameter int unsigned MU_SHIFT = lattice_pkg::MU_SHIFT_DEF
) (
  input  logic signed [WW-1:0]    w_in,
  input  logic signed [DW-1:0]    e_prev,
  input  logic signed [DW-1:0]    b_old,
  input  logic signed [DW-1:0]    b_cur,
  output logic signed [WW-1:0]    w_out,
  output logic signed [WW+DW-1:0] prod
);
  localparam int unsigned PW = 2*DW;                 // e*b product width
  localparam int unsigned US = 2*FB + MU_SHIFT - WFB; // product -> weight scale
  localparam int unsigned SUMW = ((WW > PW) ? WW : PW) + 1;
  localparam int unsigned PRW = WW + DW;

  localparam logic signed [SUMW-1:0] MAXW = SUMW'((2**(WW-1)) - 1);
  localparam logic signed [SUMW-1:0] MINW = -SUMW'(2**(WW-1));

  initial begin
    assert (2*FB + MU_SHIFT >= WFB)
      else $error("lms_tap: weight fraction bits exceed update precision");
  end

  logic signed [PW-1:0]   eb;
  logic signed [SUMW-1:0] w_sum;

  always_comb begin
    eb    = PW'(e_prev) * PW'(b_old);
    w_sum = SUMW'(w_in) + SUMW'(eb >>> US);
    if (w_sum > MAXW)      w_out = WW'(MAXW);
    else if (w_sum < MINW) w_out = WW'(MINW);
    else                   w_out = WW'(w_sum);
    prod  = PRW'(w_out) * PRW'(b_cur);
  end
endmodule
