// lattice_stage: one stage of the lattice predictor (order update).
//
// Computes, for stage m with reflection coefficient k_m,
//   f_m(p) = f_{m-1}(p)   - k_m * b_{m-1}(p-1)
//   b_m(p) = b_{m-1}(p-1) - k_m * f_{m-1}(p)
// with two multipliers and two subtractors, which is the multiplier/adder
// pair that the folded architecture time-shares. The equations are the
// source design's; the number format is this implementation's: all words
// are signed Q(DW-FB).FB, each product is truncated (arithmetic shift by FB)
// and each result saturates to DW bits instead of wrapping.
//
// Interface: purely combinational. f_in = f_{m-1}(p), b_del = b_{m-1}(p-1),
// k = k_m; f_out = f_m(p), b_out = b_m(p).
module lattice_stage #(
  parameter int unsigned DW = lattice_pkg::DATA_W,
  parameter int unsigned FB = lattice_pkg::DATA_FB
) (
  input  logic signed [DW-1:0] f_in,
  input  logic signed [DW-1:0] b_del,
  input  logic signed [DW-1:0] k,
  output logic signed [DW-1:0] f_out,
  output logic signed [DW-1:0] b_out
);
  // Width of a difference before saturation: the shifted product needs
  // 2*DW-FB bits, one more for the subtraction.
  localparam int unsigned SW = 2*DW - FB + 1;
  localparam int unsigned PW = 2*DW;

  localparam logic signed [SW-1:0] MAXV = SW'((2**(DW-1)) - 1);
  localparam logic signed [SW-1:0] MINV = -SW'(2**(DW-1));

  function automatic logic signed [DW-1:0] sat(input logic signed [SW-1:0] v);
    if (v > MAXV)      return DW'(MAXV);
    else if (v < MINV) return DW'(MINV);
    else               return DW'(v);
  endfunction

  logic signed [PW-1:0]   prod_kb, prod_kf;
  logic signed [SW-1:0]   f_wide, b_wide;

  always_comb begin
    prod_kb = PW'(k) * PW'(b_del);
    prod_kf = PW'(k) * PW'(f_in);
    f_wide  = SW'(f_in)  - SW'(prod_kb >>> FB);
    b_wide  = SW'(b_del) - SW'(prod_kf >>> FB);
    f_out   = sat(f_wide);
    b_out   = sat(b_wide);
  end
endmodule
