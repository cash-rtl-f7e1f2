// cash_ccp: cacheline criticality predictor (CCP).
//
// Learns which cache lines are read by critical loads, i.e. loads whose
// global slack is below the latency of the STTRAM partition (THRESH = 8).
//
// Post-commit buffer: every committed instruction is written into a buffer
// of two halves of HALF entries. When the half being filled is full, filling
// moves to the other half and the full half is analysed. If at commit time
// the half to be filled is still full (awaiting or under analysis) the
// instruction is simply not recorded (cm_dropped pulses); commit never stalls.
//
// Slack analysis, one instruction per cycle: each instruction contributes a
// Dispatch, Execute and Commit node. Edges used: D(i-1)->D(i) weight 1,
// D(i)->E(i) weight 1, E(producer)->E(i) weight lat(producer),
// E(i)->C(i) weight lat(i), C(i-1)->C(i) weight 1. A forward pass computes the
// as-soon-as-possible time of every node; the last commit time is the
// deadline; a backward pass computes as-late-as-possible times of the E nodes.
// Slack(E) = ALAP - ASAP. Analysing a half takes 2*HALF cycles.
//
// Predictor table: TABLE_ENTRIES (2048) saturating counters indexed by the
// low line-address bits. A critical load adds CTR_INC (8), a non-critical one
// subtracts 1; a line is predicted critical when its counter is at least
// CTR_INC. Three combinational lookup ports serve the controller.
//
// Table size, threshold and the two-half sampling buffer follow the
// description. The buffer size, the exact edge set and weights, and the
// counter constants (taken from the Fields et al. criticality predictor) are
// this design's own choices.
module cash_ccp
  import cash_pkg::*;
#(
  parameter int unsigned TABLE_ENTRIES = 2048,
  parameter int unsigned HALF          = 32,
  parameter int unsigned THRESH        = 8,
  parameter int unsigned CTR_BITS      = 6,
  parameter int unsigned CTR_INC       = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cm_valid,
  input  commit_rec_t cm_rec,
  output logic        cm_dropped,
  input  laddr_t      q_laddr [3],
  output logic        q_crit  [3],
  output logic        train_valid,   // one load classified this cycle
  output logic        train_crit,
  output laddr_t      train_laddr
);
  localparam int unsigned TIDX = $clog2(TABLE_ENTRIES);
  localparam int unsigned HB   = $clog2(HALF);
  typedef logic [15:0] time_t;

  commit_rec_t buf_q [2][HALF];
  logic [HB:0] cnt   [2];
  logic        full  [2];
  logic        fh;                    // half being filled

  logic [CTR_BITS-1:0] ctr [TABLE_ENTRIES];

  typedef enum logic [1:0] {S_IDLE, S_FWD, S_BWD} st_e;
  st_e         st;
  logic        ph;                    // half under analysis
  logic [HB:0] i;
  time_t       asap_e [HALF];
  time_t       bound  [HALF];
  time_t       prev_d, prev_c, alap_c_next, deadline;

  // ---- combinational pieces of the passes ---------------------------------
  commit_rec_t r;
  time_t a_d, a_e, a_c, dep_t, l_c, l_e, slack;
  logic [HB-1:0] ii, pidx;
  logic has_dep;
  always_comb begin
    ii      = i[HB-1:0];
    r       = buf_q[ph][ii];
    has_dep = (r.dep != 0) && ({{(16-6){1'b0}}, r.dep} <= time_t'(ii));
    pidx    = ii - HB'(r.dep);
    // forward
    a_d   = (ii == 0) ? time_t'(0) : prev_d + 1'b1;
    dep_t = asap_e[pidx] + time_t'(buf_q[ph][pidx].lat);
    a_e   = a_d + 1'b1;
    if (has_dep && dep_t > a_e) a_e = dep_t;
    a_c   = a_e + time_t'(r.lat);
    if (ii != 0 && prev_c + 1'b1 > a_c) a_c = prev_c + 1'b1;
    // backward
    l_c   = (ii == HB'(HALF - 1)) ? deadline : alap_c_next - 1'b1;
    l_e   = l_c - time_t'(r.lat);
    if (bound[ii] < l_e) l_e = bound[ii];
    slack = l_e - asap_e[ii];
  end

  assign train_valid = (st == S_BWD) && r.is_load;
  assign train_crit  = slack < time_t'(THRESH);
  assign train_laddr = r.laddr;

  // ---- commit side ----------------------------------------------------------
  assign cm_dropped = cm_valid && full[fh];

  logic release_h;
  assign release_h = (st == S_BWD) && (ii == 0);

  always_ff @(posedge clk) begin
    if (cm_valid && !full[fh]) buf_q[fh][cnt[fh][HB-1:0]] <= cm_rec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fh <= 1'b0;
      for (int h = 0; h < 2; h++) begin
        cnt[h]  <= '0;
        full[h] <= 1'b0;
      end
    end else begin
      if (release_h) begin
        full[ph] <= 1'b0;
        cnt[ph]  <= '0;
      end
      if (cm_valid && !full[fh]) begin
        cnt[fh] <= cnt[fh] + 1'b1;
        if (cnt[fh] == (HB+1)'(HALF - 1)) begin
          full[fh] <= 1'b1;
          fh       <= ~fh;
        end
      end
    end
  end

  // ---- slack analysis -------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      ph <= 1'b0;
      i  <= '0;
      prev_d <= '0; prev_c <= '0; alap_c_next <= '0; deadline <= '0;
      for (int k = 0; k < HALF; k++) begin
        asap_e[k] <= '0;
        bound[k]  <= '1;
      end
    end else begin
      unique case (st)
        S_IDLE: begin
          if (full[0] || full[1]) begin
            ph <= full[0] ? 1'b0 : 1'b1;
            // prefer the half filled earlier: the one not being filled now
            if (full[0] && full[1]) ph <= fh;
            i  <= '0;
            st <= S_FWD;
          end
        end
        S_FWD: begin
          asap_e[ii] <= a_e;
          bound[ii]  <= '1;
          prev_d     <= a_d;
          prev_c     <= a_c;
          if (ii == HB'(HALF - 1)) begin
            deadline <= a_c;
            st       <= S_BWD;
          end else begin
            i <= i + 1'b1;
          end
        end
        S_BWD: begin
          alap_c_next <= l_c;
          if (has_dep && (l_e - time_t'(buf_q[ph][pidx].lat)) < bound[pidx])
            bound[pidx] <= l_e - time_t'(buf_q[ph][pidx].lat);
          if (ii == 0) st <= S_IDLE;
          else         i  <= i - 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ---- predictor table -------------------------------------------------------
  logic [TIDX-1:0] tix;
  assign tix = r.laddr[TIDX-1:0];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TABLE_ENTRIES; k++) ctr[k] <= '0;
    end else if (train_valid) begin
      if (train_crit)
        ctr[tix] <= (ctr[tix] > CTR_BITS'((1 << CTR_BITS) - 1 - CTR_INC)) ? '1 : ctr[tix] + CTR_BITS'(CTR_INC);
      else if (ctr[tix] != 0)
        ctr[tix] <= ctr[tix] - 1'b1;
    end
  end

  always_comb
    for (int p = 0; p < 3; p++)
      q_crit[p] = ctr[q_laddr[p][TIDX-1:0]] >= CTR_BITS'(CTR_INC);
endmodule
