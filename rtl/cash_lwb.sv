// cash_lwb: line write buffer (LWB) of the hybrid L1 data cache.
//
// Every line that is to be written into either partition is staged here
// until a write port of its destination partition is free: lines arriving
// from the L2 and lines migrating from P1 to P0. Each of the ENTRIES (20)
// entries holds a line address, the line contents, the destination
// partition (P0/P1) and a status (waiting for port / writing), as in the
// description.
//
// Interface and timing (all single cycle unless noted):
//   push0/push1  two lines can be staged per cycle; the caller must check
//                free_cnt first (a push with no free entry is lost).
//   lk_*         combinational search of waiting entries by line address
//                for the controller's lookup; wm_* then updates one word of
//                the entry that hit (a store hitting the buffer).
//   chk_*        second search port, used before placing a line to avoid
//                staging the same line twice.
//   p0_fill_*    the oldest-index waiting P0 entry is written into P0 every
//                cycle (P0 has a dedicated fill port) and freed at once.
//   p1_req_*     a waiting P1 entry is offered; when p1_grant is high it
//                turns to "writing" and is freed by p1_ack (the STTRAM write
//                acknowledge, 105 cycles later).
// A line from the L2 whose P1 search is still running is staged "held"
// (push_hold): it is neither searched nor written until rs_* says whether
// to keep it and where to write it, or to discard it. This state is this
// design's addition to the two statuses of the description.
// A store hitting an entry that leaves for P0 or P1 in the same cycle is
// merged into the outgoing line. Entry selection by lowest index is this design's
// own choice.
module cash_lwb
  import cash_pkg::*;
#(
  parameter int unsigned ENTRIES = 20
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] push_valid,
  input  laddr_t     push_laddr [2],
  input  line_t      push_line  [2],
  input  dest_e      push_dest  [2],
  input  logic       push_hold,        // push0 waits for a decision (see rs_*)
  output logic [4:0] push0_idx,        // entry that push0 takes
  input  logic       rs_valid,         // decision for a held entry
  input  logic [4:0] rs_idx,
  input  logic       rs_keep,          // 1: write it to rs_dest, 0: discard
  input  dest_e      rs_dest,
  output logic [5:0] free_cnt,
  input  laddr_t     lk_laddr,
  output logic       lk_hit,
  output logic [4:0] lk_idx,
  output line_t      lk_line,
  input  logic       wm_valid,
  input  logic [4:0] wm_idx,
  input  woff_t      wm_woff,
  input  word_t      wm_wdata,
  input  laddr_t     chk_laddr,
  output logic       chk_hit,
  output logic       p0_fill_valid,
  output laddr_t     p0_fill_laddr,
  output line_t      p0_fill_line,
  output logic       p1_req_valid,
  output logic [4:0] p1_req_idx,
  output laddr_t     p1_req_laddr,
  output line_t      p1_req_line,
  input  logic       p1_grant,
  input  logic       p1_ack_valid,
  input  logic [4:0] p1_ack_idx
);
  typedef enum logic [1:0] {E_FREE = 2'd0, E_WAIT = 2'd1, E_WRITING = 2'd2, E_HOLD = 2'd3} est_e;
  typedef struct packed {
    est_e   st;
    dest_e  dest;
    laddr_t laddr;
  } ent_t;

  ent_t  ent  [ENTRIES];
  line_t line [ENTRIES];

  // ---- searches -----------------------------------------------------------
  always_comb begin
    lk_hit  = 1'b0;
    lk_idx  = '0;
    chk_hit = 1'b0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (ent[i].st == E_WAIT && ent[i].laddr == lk_laddr) begin
        lk_hit = 1'b1;
        lk_idx = 5'(i);
      end
      if (ent[i].st != E_FREE && ent[i].laddr == chk_laddr) chk_hit = 1'b1;
    end
    lk_line = line[lk_idx];
  end

  // ---- free entries and drain selection -----------------------------------
  logic [4:0] fr0, fr1, d0;
  logic       fr0_ok, fr1_ok;
  always_comb begin
    free_cnt = '0;
    fr0 = '0; fr1 = '0; fr0_ok = 1'b0; fr1_ok = 1'b0;
    d0 = '0; p0_fill_valid = 1'b0;
    p1_req_valid = 1'b0; p1_req_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (ent[i].st == E_FREE) begin
        free_cnt = free_cnt + 1'b1;
        fr1 = fr0; fr1_ok = fr0_ok;
        fr0 = 5'(i); fr0_ok = 1'b1;
      end
      if (ent[i].st == E_WAIT && ent[i].dest == DEST_P0) begin
        d0 = 5'(i);
        p0_fill_valid = 1'b1;
      end
      if (ent[i].st == E_WAIT && ent[i].dest == DEST_P1) begin
        p1_req_idx = 5'(i);
        p1_req_valid = 1'b1;
      end
    end
    p0_fill_laddr = ent[d0].laddr;
    p0_fill_line  = (wm_valid && wm_idx == d0) ? line_merge(line[d0], wm_woff, wm_wdata) : line[d0];
    p1_req_laddr  = ent[p1_req_idx].laddr;
    p1_req_line   = (wm_valid && wm_idx == p1_req_idx) ? line_merge(line[p1_req_idx], wm_woff, wm_wdata)
                                                      : line[p1_req_idx];
  end

  // ---- state --------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (wm_valid) line[wm_idx][wm_woff*WORD_BITS +: WORD_BITS] <= wm_wdata;
    if (push_valid[0] && fr0_ok) line[fr0] <= push_line[0];
    if (push_valid[1]) begin
      if (push_valid[0] && fr1_ok) line[fr1] <= push_line[1];
      else if (!push_valid[0] && fr0_ok) line[fr0] <= push_line[1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '{st: E_FREE, dest: DEST_P0, laddr: '0};
    end else begin
      if (p0_fill_valid) ent[d0].st <= E_FREE;
      if (p1_grant && p1_req_valid) ent[p1_req_idx].st <= E_WRITING;
      if (p1_ack_valid) ent[p1_ack_idx].st <= E_FREE;
      if (rs_valid) begin
        ent[rs_idx].st   <= rs_keep ? E_WAIT : E_FREE;
        ent[rs_idx].dest <= rs_dest;
      end
      if (push_valid[0] && fr0_ok)
        ent[fr0] <= '{st: push_hold ? E_HOLD : E_WAIT, dest: push_dest[0], laddr: push_laddr[0]};
      if (push_valid[1]) begin
        if (push_valid[0] && fr1_ok)
          ent[fr1] <= '{st: E_WAIT, dest: push_dest[1], laddr: push_laddr[1]};
        else if (!push_valid[0] && fr0_ok)
          ent[fr0] <= '{st: E_WAIT, dest: push_dest[1], laddr: push_laddr[1]};
      end
    end
  end

  // A write acknowledge must refer to an entry that is being written.
  assign push0_idx = fr0;

  a_rs_held: assert property (@(posedge clk) disable iff (!rst_n)
    rs_valid |-> ent[rs_idx].st == E_HOLD);
  a_ack_writing: assert property (@(posedge clk) disable iff (!rst_n)
    p1_ack_valid |-> ent[p1_ack_idx].st == E_WRITING);
endmodule
