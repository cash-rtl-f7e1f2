// cash_pattern_sim: access pattern simulator that trains the deadness (CDP)
// and write-intensity (CWP) predictors.
//
// A small shadow tag store observes every L1 access (line address, read or
// write) and reports what happened to lines after they were brought in:
//   * read part, SETS (32) sets x RD_WAYS (6) ways, LRU, sees every access.
//     The first re-reference of a tracked line emits rd_train with dead=0;
//     a line evicted from it without any re-reference emits dead=1.
//   * write part, SETS sets x WR_WAYS (2) ways, LRU, sees stores only. A store
//     that hits emits wr_train with wi=1; a line evicted without a second
//     store emits wi=0.
// Each event carries the victim's or the hit line's signature, the low
// SIG_BITS of its line address (the index of the 1024-entry predictor
// tables). The set is the low line-address bits; full line addresses are kept
// as tags. Events appear in the cycle after the access. Dimensions follow
// the description; the event rules, LRU replacement and signature are this
// design's reading of an APM-style pattern simulator.
module cash_pattern_sim
  import cash_pkg::*;
#(
  parameter int unsigned SETS     = 32,
  parameter int unsigned RD_WAYS  = 6,
  parameter int unsigned WR_WAYS  = 2,
  parameter int unsigned SIG_BITS = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                acc_valid,
  input  laddr_t              acc_laddr,
  input  logic                acc_write,
  output logic                rd_train_valid,
  output logic [SIG_BITS-1:0] rd_train_sig,
  output logic                rd_train_dead,
  output logic                wr_train_valid,
  output logic [SIG_BITS-1:0] wr_train_sig,
  output logic                wr_train_wi
);
  localparam int unsigned IB = $clog2(SETS);
  localparam int unsigned RA = $clog2(RD_WAYS);
  localparam int unsigned WA = (WR_WAYS > 1) ? $clog2(WR_WAYS) : 1;

  typedef struct packed {
    logic   valid;
    logic   reused;
    laddr_t laddr;
  } pent_t;

  pent_t          rd  [SETS][RD_WAYS];
  logic [RA-1:0]  rage[SETS][RD_WAYS];
  pent_t          wr  [SETS][WR_WAYS];
  logic [WA-1:0]  wage[SETS][WR_WAYS];

  logic [IB-1:0] s;
  assign s = acc_laddr[IB-1:0];

  // ---- read part lookup -----------------------------------------------------
  logic          r_hit, r_vfree;
  int unsigned   r_way, r_vic;
  always_comb begin
    r_hit = 1'b0; r_way = 0; r_vfree = 1'b0; r_vic = 0;
    for (int w = 0; w < RD_WAYS; w++) begin
      if (rd[s][w].valid && rd[s][w].laddr == acc_laddr) begin
        r_hit = 1'b1; r_way = w;
      end
    end
    for (int w = RD_WAYS - 1; w >= 0; w--)
      if (rage[s][w] == RA'(RD_WAYS - 1)) r_vic = w;
    for (int w = RD_WAYS - 1; w >= 0; w--)
      if (!rd[s][w].valid) begin
        r_vic = w; r_vfree = 1'b1;
      end
  end

  // ---- write part lookup ----------------------------------------------------
  logic          w_hit;
  int unsigned   w_way, w_vic;
  always_comb begin
    w_hit = 1'b0; w_way = 0; w_vic = 0;
    for (int w = 0; w < WR_WAYS; w++)
      if (wr[s][w].valid && wr[s][w].laddr == acc_laddr) begin
        w_hit = 1'b1; w_way = w;
      end
    for (int w = WR_WAYS - 1; w >= 0; w--)
      if (wage[s][w] == WA'(WR_WAYS - 1)) w_vic = w;
    for (int w = WR_WAYS - 1; w >= 0; w--)
      if (!wr[s][w].valid) w_vic = w;
  end

  int unsigned r_use, w_use;
  assign r_use = r_hit ? r_way : r_vic;
  assign w_use = w_hit ? w_way : w_vic;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SETS; i++) begin
        for (int w = 0; w < RD_WAYS; w++) begin
          rd[i][w]   <= '0;
          rage[i][w] <= RA'(w);
        end
        for (int w = 0; w < WR_WAYS; w++) begin
          wr[i][w]   <= '0;
          wage[i][w] <= WA'(w);
        end
      end
      rd_train_valid <= 1'b0; rd_train_sig <= '0; rd_train_dead <= 1'b0;
      wr_train_valid <= 1'b0; wr_train_sig <= '0; wr_train_wi   <= 1'b0;
    end else begin
      rd_train_valid <= 1'b0;
      wr_train_valid <= 1'b0;
      if (acc_valid) begin
        // read part: every access
        for (int w = 0; w < RD_WAYS; w++)
          if (rage[s][w] < rage[s][r_use]) rage[s][w] <= rage[s][w] + 1'b1;
        rage[s][r_use] <= '0;
        if (r_hit) begin
          rd[s][r_use].reused <= 1'b1;
          if (!rd[s][r_use].reused) begin
            rd_train_valid <= 1'b1;
            rd_train_dead  <= 1'b0;
            rd_train_sig   <= acc_laddr[SIG_BITS-1:0];
          end
        end else begin
          rd[s][r_use] <= '{valid: 1'b1, reused: 1'b0, laddr: acc_laddr};
          if (!r_vfree && !rd[s][r_use].reused) begin
            rd_train_valid <= 1'b1;
            rd_train_dead  <= 1'b1;
            rd_train_sig   <= rd[s][r_use].laddr[SIG_BITS-1:0];
          end
        end
        // write part: stores only
        if (acc_write) begin
          for (int w = 0; w < WR_WAYS; w++)
            if (wage[s][w] < wage[s][w_use]) wage[s][w] <= wage[s][w] + 1'b1;
          wage[s][w_use] <= '0;
          if (w_hit) begin
            wr[s][w_use].reused <= 1'b1;
            wr_train_valid <= 1'b1;
            wr_train_wi    <= 1'b1;
            wr_train_sig   <= acc_laddr[SIG_BITS-1:0];
          end else begin
            wr[s][w_use] <= '{valid: 1'b1, reused: 1'b0, laddr: acc_laddr};
            if (wr[s][w_use].valid && !wr[s][w_use].reused) begin
              wr_train_valid <= 1'b1;
              wr_train_wi    <= 1'b0;
              wr_train_sig   <= wr[s][w_use].laddr[SIG_BITS-1:0];
            end
          end
        end
      end
    end
  end
endmodule
