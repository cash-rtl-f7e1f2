// cash_cdp: cacheline deadness predictor (CDP).
//
// ENTRIES (1024) two-bit saturating counters indexed by the low line-address
// bits. The pattern simulator trains it: a line evicted from the simulator
// without reuse counts up, a reused line counts down. A line is predicted
// dead (not worth caching) when its counter's upper bit is set. Three
// combinational lookup ports serve the controller: placing a line arriving
// from the L2, the migration decision at P1 issue, and placing a held line.
// Counters reset to zero (predict live). Table size and counter width follow
// the description; indexing and the threshold are this design's choice.
module cash_cdp
  import cash_pkg::*;
#(
  parameter int unsigned ENTRIES = 1024
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       tr_valid,
  input  logic [$clog2(ENTRIES)-1:0] tr_sig,
  input  logic                       tr_dead,
  input  laddr_t                     q_laddr [3],
  output logic                       q_dead  [3]
);
  localparam int unsigned SB = $clog2(ENTRIES);
  logic [1:0] ctr [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ENTRIES; k++) ctr[k] <= '0;
    end else if (tr_valid) begin
      if (tr_dead && ctr[tr_sig] != 2'd3)  ctr[tr_sig] <= ctr[tr_sig] + 1'b1;
      if (!tr_dead && ctr[tr_sig] != 2'd0) ctr[tr_sig] <= ctr[tr_sig] - 1'b1;
    end
  end

  always_comb
    for (int p = 0; p < 3; p++) q_dead[p] = ctr[q_laddr[p][SB-1:0]][1];
endmodule
