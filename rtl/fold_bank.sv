// fold_bank: folded register allocation for one per-stage variable.
//
// The unfolded lattice keeps one register per stage for each stage variable
// (the delayed backward error b_{m-1}(p-1), the tap weight w_{m-1}, the
// reflection coefficient k_m). In the folded filter the N = LANES*K values
// are grouped by time slot: in slot c the LANES lanes work on stages
// c*LANES .. c*LANES+LANES-1, so the bank presents exactly those entries on
// rd_data and, when we is high, writes wr_data back to the same entries at
// the clock edge. Entry c*LANES+l is read by lane l in slot c. A second,
// single-entry port (cfg_*) writes any one entry, for loading the
// reflection coefficients; it takes priority over the slot port.
//
// The grouping by slot follows the folding schedule of the source; the
// exact register layout is this implementation's own. All entries reset to
// zero (asynchronous, active-low reset). Reads are combinational.
module fold_bank #(
  parameter int unsigned W     = lattice_pkg::DATA_W,
  parameter int unsigned LANES = lattice_pkg::TAPS_DEF / lattice_pkg::FOLD_DEF,
  parameter int unsigned K     = lattice_pkg::FOLD_DEF,
  localparam int unsigned N = LANES * K,
  localparam int unsigned SLOT_W = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned ADDR_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [SLOT_W-1:0]             slot,
  output logic signed [LANES-1:0][W-1:0] rd_data,
  input  logic                          we,
  input  logic signed [LANES-1:0][W-1:0] wr_data,
  input  logic                          cfg_we,
  input  logic [ADDR_W-1:0]             cfg_addr,
  input  logic signed [W-1:0]           cfg_data
);

  logic signed [W-1:0] mem [N];

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      rd_data[l] = mem[int'(slot) * LANES + l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) mem[i] <= '0;
    end else begin
      if (we) begin
        for (int l = 0; l < LANES; l++) mem[int'(slot) * LANES + l] <= wr_data[l];
      end
      if (cfg_we && int'(cfg_addr) < N) mem[cfg_addr] <= cfg_data;
    end
  end

  a_slot_range: assert property (@(posedge clk) disable iff (!rst_n) we |-> int'(slot) < K);
endmodule
