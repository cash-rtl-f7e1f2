// cash_controller: hybrid cache controller of the split SRAM/STTRAM L1 data
// cache, holding the status holding register (SHR).
//
// Each core request (read or write) or prefetch occupies one of SHR_ENTRIES
// (16) SHR entries with its type, word address, word value (store data, or
// the read result once known), the P0 status and the P1 status. A request is
// accepted only when an SHR entry and a line write buffer (LWB) entry are
// free (and the L2 queue cannot overflow); otherwise req_ready is low and the
// core waits.
//
// Access flow for an accepted request:
//   * In the cycle of acceptance the LWB is searched. A hit serves the request
//     from the LWB (a store updates the staged line) and no partition is
//     searched.
//   * Otherwise P0 is searched (result 3 cycles later) and the request joins
//     the ordered queue for P1's single port, so both partitions are searched
//     in parallel.
//   * A P0 hit serves the request; the P1 search is aborted (dropped from the
//     queue, or its outcome ignored). A read hit in P0 is answered in the
//     cycle the P0 result appears, i.e. 3 cycles after acceptance.
//   * A P0 miss of a read or prefetch sends a line fetch to the L2 at once,
//     without waiting for P1; a demand read miss also trains the prefetcher.
//   * A P1 hit serves the request and, if a fetch is outstanding, sends an
//     abort to the L2 (the L2 then answers the fetch with "aborted").
//     On a P1 hit the line migrates to P0 when it is predicted not dead and
//     either critical, or written while predicted write-intensive; the line
//     is then invalidated in P1 and staged in the LWB for P0 (a store's word
//     is merged in). A store that hits P1 without migrating updates P1.
//   * A line returned by the L2 answers the read and is placed: dead lines
//     bypass the L1, critical ones go to P0, write-intensive ones bypass,
//     all others go to P1. Placement goes through the LWB and is skipped when
//     the LWB is full or when a later store to the same line has been
//     accepted. A line that arrives before its P1 search has finished is held
//     in the LWB and placed (or discarded, on a P1 hit) when P1 answers, so
//     P0 and P1 stay exclusive.
//   * The L1 is write-through and no-write-allocate: every store is queued to
//     the L2 in the cycle it is accepted; a store that misses allocates
//     nothing. Lines evicted from either partition are discarded.
// Queues to the L2 and to P1 keep the order of acceptance so that no read
// overtakes an earlier store to the same address. Responses (read data or
// store acknowledge) leave on resp_*, one per cycle, tagged with req_tag.
//
// The access, placement and migration rules follow the description. The
// request/response handshakes, the abort-acknowledge protocol with the L2,
// the port arbitration (P1 lookups before LWB writes unless fewer than four
// LWB entries are free) and the stale-line rules are this design's choices.
module cash_controller
  import cash_pkg::*;
#(
  parameter int unsigned SHR_ENTRIES = 16,
  parameter int unsigned L2Q_DEPTH   = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  // core interface
  input  logic         req_valid,
  output logic         req_ready,
  input  logic         req_write,
  input  logic [7:0]   req_tag,
  input  waddr_t       req_waddr,
  input  word_t        req_wdata,
  output logic         resp_valid,
  output logic [7:0]   resp_tag,
  output logic         resp_write,
  output word_t        resp_rdata,
  output resp_src_e    resp_src,
  // L2 interface
  output logic         l2_req_valid,
  output l2_req_t      l2_req,
  input  logic         l2_req_ready,
  output logic         l2_abort_valid,
  output logic [3:0]   l2_abort_id,
  input  logic         l2_resp_valid,
  input  logic [3:0]   l2_resp_id,
  input  logic         l2_resp_aborted,
  input  line_t        l2_resp_line,
  // P0 lookup port
  output logic         p0_lk_valid,
  output logic [3:0]   p0_lk_id,
  output waddr_t       p0_lk_waddr,
  output logic         p0_lk_write,
  output word_t        p0_lk_wdata,
  input  logic         p0_res_valid,
  input  logic [3:0]   p0_res_id,
  input  logic         p0_res_hit,
  input  word_t        p0_res_rdata,
  // P1 port
  output logic         p1_op_valid,
  input  logic         p1_op_ready,
  output logic         p1_op_write_line,
  output logic [3:0]   p1_op_id,
  output waddr_t       p1_op_waddr,
  output logic         p1_op_is_write,
  output logic         p1_op_migrate,
  output word_t        p1_op_wdata,
  output line_t        p1_op_line,
  output logic [4:0]   p1_op_lwb,
  input  logic         p1_rd_valid,
  input  logic [3:0]   p1_rd_id,
  input  logic         p1_rd_hit,
  input  line_t        p1_rd_line,
  // line write buffer
  output logic [1:0]   lwb_push_valid,
  output laddr_t       lwb_push_laddr [2],
  output line_t        lwb_push_line  [2],
  output dest_e        lwb_push_dest  [2],
  output logic         lwb_push_hold,
  input  logic [4:0]   lwb_push0_idx,
  output logic         lwb_rs_valid,
  output logic [4:0]   lwb_rs_idx,
  output logic         lwb_rs_keep,
  output dest_e        lwb_rs_dest,
  input  logic [5:0]   lwb_free_cnt,
  output laddr_t       lwb_lk_laddr,
  input  logic         lwb_lk_hit,
  input  logic [4:0]   lwb_lk_idx,
  input  line_t        lwb_lk_line,
  output logic         lwb_wm_valid,
  output logic [4:0]   lwb_wm_idx,
  output woff_t        lwb_wm_woff,
  output word_t        lwb_wm_wdata,
  output laddr_t       lwb_chk_laddr,
  input  logic         lwb_chk_hit,
  input  logic         lwb_p1_req_valid,
  input  logic [4:0]   lwb_p1_req_idx,
  input  laddr_t       lwb_p1_req_laddr,
  input  line_t        lwb_p1_req_line,
  output logic         lwb_p1_grant,
  // predictors: port 0 placement, port 1 migration, port 2 held placement
  output laddr_t       pred_laddr [3],
  input  logic         pred_crit  [3],
  input  logic         pred_dead  [3],
  input  logic         pred_wi    [3],
  // pattern simulator feed
  output logic         ps_valid,
  output laddr_t       ps_laddr,
  output logic         ps_write,
  // prefetcher
  output logic         pft_valid,
  output laddr_t       pft_laddr,
  input  logic         pf_valid,
  input  laddr_t       pf_laddr,
  output logic         pf_take,
  // statistics
  output cash_events_t ev
);
  localparam int unsigned SB = $clog2(SHR_ENTRIES);

  typedef enum logic [1:0] {P0_IDLE, P0_SEARCH, P0_HIT, P0_MISS} p0_st_e;
  typedef enum logic [2:0] {P1_NONE, P1_WAIT, P1_SEARCH, P1_HIT, P1_MISS, P1_ABORT} p1_st_e;

  typedef struct packed {
    logic      valid;
    req_type_e typ;
    logic [7:0] tag;
    waddr_t    waddr;
    word_t     data;
    p0_st_e    p0;
    p1_st_e    p1;
    logic      p1_inq;      // waiting in the P1 queue
    logic      p1_out;      // P1 search issued, outcome not yet back
    logic      mig;         // the issued P1 search migrates on a hit
    logic      l2_out;      // L2 fetch outstanding
    logic      abort_sent;
    logic      done;        // served (data known / store finished)
    logic      resp_pend;   // response still to be sent
    logic      stale;       // do not place the fetched line
    logic      held;        // fetched line held in the LWB until P1 answers
    logic [4:0] hidx;       // its LWB entry
    resp_src_e src;
  } shr_t;

  shr_t shr [SHR_ENTRIES];

  function automatic laddr_t la(waddr_t a);
    return a[WADDR_BITS-1:WOFF_BITS];
  endfunction
  function automatic woff_t wo(waddr_t a);
    return a[WOFF_BITS-1:0];
  endfunction

  // ---- occupancy --------------------------------------------------------------
  logic [SB-1:0] free_idx;
  logic          free_ok;
  logic [SB:0]   used;
  logic [SHR_ENTRIES-1:0] retire;
  always_comb begin
    free_ok = 1'b0; free_idx = '0; used = '0;
    for (int e = SHR_ENTRIES - 1; e >= 0; e--) begin
      if (!shr[e].valid) begin
        free_ok = 1'b1; free_idx = SB'(e);
      end else used = used + 1'b1;
      retire[e] = shr[e].valid && shr[e].done && !shr[e].resp_pend && !shr[e].p1_inq &&
                  !shr[e].p1_out && !shr[e].l2_out && shr[e].p0 != P0_SEARCH && !shr[e].held;
    end
  end

  // ---- L2 request queue ---------------------------------------------------------
  logic [1:0]  l2q_push;
  l2_req_t     l2q_in [2];
  logic [$clog2(L2Q_DEPTH+1)-1:0] l2q_cnt;
  logic [$bits(l2_req_t)-1:0] l2q_in_bits [2];
  logic [$bits(l2_req_t)-1:0] l2q_out_bits;
  assign l2q_in_bits[0] = l2q_in[0];
  assign l2q_in_bits[1] = l2q_in[1];
  assign l2_req = l2q_out_bits;

  cash_fifo #(.WIDTH($bits(l2_req_t)), .DEPTH(L2Q_DEPTH)) u_l2q (
    .clk, .rst_n, .push_valid(l2q_push), .push_data(l2q_in_bits),
    .pop_valid(l2_req_valid), .pop_data(l2q_out_bits), .pop_ready(l2_req_ready),
    .count(l2q_cnt));

  // ---- allocation ----------------------------------------------------------------
  logic   space, alloc, alloc_pf, alloc_wr;
  waddr_t alloc_waddr;
  assign space    = free_ok && (lwb_free_cnt != 0) &&
                    (32'(l2q_cnt) + 32'(used) + 1 <= L2Q_DEPTH);
  assign req_ready = space;
  assign alloc    = space && (req_valid || pf_valid);
  assign alloc_pf = space && !req_valid && pf_valid;
  assign alloc_wr = space && req_valid && req_write;
  assign pf_take  = alloc_pf;
  assign alloc_waddr  = alloc_pf ? {pf_laddr, WOFF_BITS'(0)} : req_waddr;
  assign lwb_lk_laddr = la(alloc_waddr);
  logic alloc_lwb_hit;
  assign alloc_lwb_hit = alloc && lwb_lk_hit;

  assign lwb_wm_valid = alloc_wr && lwb_lk_hit;
  assign lwb_wm_idx   = lwb_lk_idx;
  assign lwb_wm_woff  = wo(req_waddr);
  assign lwb_wm_wdata = req_wdata;

  assign p0_lk_valid = alloc && !lwb_lk_hit;
  assign p0_lk_id    = 4'(free_idx);
  assign p0_lk_waddr = alloc_waddr;
  assign p0_lk_write = alloc_wr;
  assign p0_lk_wdata = req_wdata;

  assign ps_valid = alloc && !alloc_pf;
  assign ps_laddr = la(req_waddr);
  assign ps_write = req_write;

  // ---- P1 queue (order of acceptance) -----------------------------------------
  logic [1:0]    p1q_push;
  logic [SB-1:0] p1q_in [2];
  logic          p1q_valid, p1q_pop;
  logic [SB-1:0] p1q_head;
  assign p1q_push  = {1'b0, p0_lk_valid};
  assign p1q_in[0] = free_idx;
  assign p1q_in[1] = free_idx;
  cash_fifo #(.WIDTH(SB), .DEPTH(SHR_ENTRIES)) u_p1q (
    .clk, .rst_n, .push_valid(p1q_push), .push_data(p1q_in),
    .pop_valid(p1q_valid), .pop_data(p1q_head), .pop_ready(p1q_pop), .count());

  // ---- P1 port arbitration -----------------------------------------------------
  logic head_live, issue_lk, issue_wr;
  assign head_live = p1q_valid && shr[p1q_head].p1 == P1_WAIT;
  always_comb begin
    issue_lk = 1'b0; issue_wr = 1'b0;
    if (p1_op_ready) begin
      if (lwb_p1_req_valid && (lwb_free_cnt < 4 || !head_live)) issue_wr = 1'b1;
      else if (head_live) issue_lk = 1'b1;
    end
  end
  // aborted heads leave the queue without using the port
  assign p1q_pop = p1q_valid && (!head_live || issue_lk);

  assign pred_laddr[1] = la(shr[p1q_head].waddr);
  logic mig_now;
  assign mig_now = shr[p1q_head].typ != REQ_PREFETCH && !pred_dead[1] &&
                   ((shr[p1q_head].typ == REQ_WRITE && pred_wi[1]) || pred_crit[1]);

  assign p1_op_valid      = issue_lk || issue_wr;
  assign p1_op_write_line = issue_wr;
  assign p1_op_id         = 4'(p1q_head);
  assign p1_op_waddr      = issue_wr ? {lwb_p1_req_laddr, WOFF_BITS'(0)} : shr[p1q_head].waddr;
  assign p1_op_is_write   = shr[p1q_head].typ == REQ_WRITE;
  assign p1_op_migrate    = mig_now;
  assign p1_op_wdata      = shr[p1q_head].data;
  assign p1_op_line       = lwb_p1_req_line;
  assign p1_op_lwb        = lwb_p1_req_idx;
  assign lwb_p1_grant     = issue_wr;

  // ---- P0 outcome ------------------------------------------------------------------
  shr_t p0e;
  logic p0_ok, p0_direct;
  assign p0e       = shr[p0_res_id];
  assign p0_ok     = p0_res_valid && p0e.valid && p0e.p0 == P0_SEARCH;
  assign p0_direct = p0_ok && p0_res_hit && p0e.typ == REQ_READ && !p0e.done;
  logic p0_fetch;
  assign p0_fetch  = p0_ok && !p0_res_hit && p0e.typ != REQ_WRITE && !p0e.done;
  assign pft_valid = p0_fetch && p0e.typ == REQ_READ;
  assign pft_laddr = la(p0e.waddr);

  // a line already being fetched by another entry is not placed twice
  logic dup_fetch;
  always_comb begin
    dup_fetch = 1'b0;
    for (int e = 0; e < SHR_ENTRIES; e++)
      if (shr[e].valid && shr[e].l2_out && !shr[e].stale && shr[e].typ != REQ_WRITE &&
          la(shr[e].waddr) == la(p0e.waddr))
        dup_fetch = 1'b1;
  end

  always_comb begin
    l2q_push = {alloc_wr, p0_fetch};
    l2q_in[0] = '{kind: L2_FETCH, id: p0_res_id, waddr: p0e.waddr, wdata: '0};
    l2q_in[1] = '{kind: L2_WRITE, id: 4'(free_idx), waddr: req_waddr, wdata: req_wdata};
  end

  // ---- P1 outcome ------------------------------------------------------------------
  shr_t p1e;
  logic p1_ok, p1_mig_push;
  assign p1e   = shr[p1_rd_id];
  assign p1_ok = p1_rd_valid && p1e.valid && p1e.p1_out;
  assign p1_mig_push = p1_ok && p1_rd_hit && p1e.mig && !p1e.stale &&
                       !(alloc_wr && la(req_waddr) == la(p1e.waddr));
  assign l2_abort_valid = p1_ok && p1_rd_hit && p1e.p1 == P1_SEARCH && p1e.l2_out && !p1e.abort_sent;
  assign l2_abort_id    = p1_rd_id;

  // ---- L2 outcome ------------------------------------------------------------------
  shr_t l2e;
  logic l2_ok, l2_data, l2_place;
  dest_e place_dest;
  logic place_bypass_dead, place_bypass_wi;
  assign l2e     = shr[l2_resp_id];
  assign l2_ok   = l2_resp_valid && l2e.valid && l2e.l2_out;
  assign l2_data = l2_ok && !l2_resp_aborted;
  assign pred_laddr[0] = la(l2e.waddr);
  assign lwb_chk_laddr = la(l2e.waddr);
  logic l2_may_place, l2_hold;
  logic l2_fresh;
  assign l2_fresh     = l2_data && !l2e.stale && !lwb_chk_hit && l2e.typ != REQ_WRITE &&
                        !(alloc_wr && la(req_waddr) == la(l2e.waddr));
  assign l2_may_place = l2_fresh && l2e.p1 == P1_MISS;
  // P1 not searched yet: hold the line in the LWB until its P1 outcome
  assign l2_hold      = l2_fresh && (l2e.p1 == P1_WAIT || l2e.p1 == P1_SEARCH) &&
                        lwb_free_cnt != 0;

  // ---- decision for a held line when its P1 outcome arrives ---------------------
  logic rs_bypass_dead, rs_bypass_wi;
  assign pred_laddr[2] = la(p1e.waddr);
  assign lwb_rs_valid  = p1_ok && p1e.held;
  assign lwb_rs_idx    = p1e.hidx;
  assign rs_bypass_dead = lwb_rs_valid && !p1_rd_hit && !p1e.stale && pred_dead[2];
  assign rs_bypass_wi   = lwb_rs_valid && !p1_rd_hit && !p1e.stale && !pred_dead[2] &&
                          !pred_crit[2] && pred_wi[2];
  assign lwb_rs_keep   = !p1_rd_hit && !p1e.stale && !pred_dead[2] &&
                         (pred_crit[2] || !pred_wi[2]) &&
                         !(alloc_wr && la(req_waddr) == la(p1e.waddr));
  assign lwb_rs_dest   = pred_crit[2] ? DEST_P0 : DEST_P1;
  assign place_bypass_dead = l2_may_place && pred_dead[0];
  assign place_bypass_wi   = l2_may_place && !pred_dead[0] && !pred_crit[0] && pred_wi[0];
  assign place_dest        = pred_crit[0] ? DEST_P0 : DEST_P1;
  assign l2_place          = l2_may_place && !place_bypass_dead && !place_bypass_wi;

  // ---- LWB pushes --------------------------------------------------------------------
  always_comb begin
    lwb_push_valid    = {p1_mig_push && (lwb_free_cnt > (l2_place ? 6'd1 : 6'd0)),
                         (l2_place || l2_hold) && lwb_free_cnt != 0};
    lwb_push_hold     = l2_hold;
    lwb_push_laddr[0] = la(l2e.waddr);
    lwb_push_line[0]  = l2_resp_line;
    lwb_push_dest[0]  = place_dest;
    lwb_push_laddr[1] = la(p1e.waddr);
    lwb_push_line[1]  = (p1e.typ == REQ_WRITE) ? line_merge(p1_rd_line, wo(p1e.waddr), p1e.data)
                                               : p1_rd_line;
    lwb_push_dest[1]  = DEST_P0;
  end

  // ---- response selection ------------------------------------------------------------
  logic          pend_ok;
  logic [SB-1:0] pend_idx;
  always_comb begin
    pend_ok = 1'b0; pend_idx = '0;
    for (int e = SHR_ENTRIES - 1; e >= 0; e--)
      if (shr[e].valid && shr[e].resp_pend) begin
        pend_ok = 1'b1; pend_idx = SB'(e);
      end
  end
  logic pend_sel;
  assign pend_sel   = pend_ok && !p0_direct;
  assign resp_valid = p0_direct || pend_ok;
  assign resp_tag   = p0_direct ? p0e.tag : shr[pend_idx].tag;
  assign resp_write = p0_direct ? 1'b0 : shr[pend_idx].typ == REQ_WRITE;
  assign resp_rdata = p0_direct ? p0_res_rdata : shr[pend_idx].data;
  assign resp_src   = p0_direct ? SRC_P0 : shr[pend_idx].src;

  // ---- SHR update --------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < SHR_ENTRIES; e++) shr[e] <= '0;
    end else begin
      for (int e = 0; e < SHR_ENTRIES; e++)
        if (retire[e]) shr[e].valid <= 1'b0;

      if (pend_sel) shr[pend_idx].resp_pend <= 1'b0;

      // a store makes earlier fetches and migrations of its line stale
      if (alloc_wr)
        for (int e = 0; e < SHR_ENTRIES; e++)
          if (shr[e].valid && la(shr[e].waddr) == la(req_waddr) &&
              (shr[e].l2_out || shr[e].p0 == P0_SEARCH || shr[e].p1_out || shr[e].p1_inq))
            shr[e].stale <= 1'b1;

      // P0 outcome
      if (p0_ok) begin
        if (p0_res_hit) begin
          shr[p0_res_id].p0 <= P0_HIT;
          if (p0e.p1 == P1_WAIT || p0e.p1 == P1_SEARCH) shr[p0_res_id].p1 <= P1_ABORT;
          if (!p0e.done) begin
            shr[p0_res_id].done <= 1'b1;
            shr[p0_res_id].src  <= SRC_P0;
            if (p0e.typ == REQ_WRITE) shr[p0_res_id].resp_pend <= 1'b1;
          end
        end else begin
          shr[p0_res_id].p0 <= P0_MISS;
          if (p0_fetch) begin
            shr[p0_res_id].l2_out <= 1'b1;
            if (dup_fetch) shr[p0_res_id].stale <= 1'b1;
          end
          if (p0e.typ == REQ_WRITE && (p0e.p1 == P1_HIT || p0e.p1 == P1_MISS) && !p0e.done) begin
            shr[p0_res_id].done      <= 1'b1;
            shr[p0_res_id].resp_pend <= 1'b1;
          end
        end
      end

      // P1 issue
      if (issue_lk) begin
        shr[p1q_head].p1     <= P1_SEARCH;
        shr[p1q_head].p1_inq <= 1'b0;
        shr[p1q_head].p1_out <= 1'b1;
        shr[p1q_head].mig    <= mig_now;
      end else if (p1q_pop) begin
        shr[p1q_head].p1_inq <= 1'b0;
      end

      // P1 outcome
      if (p1_ok) begin
        shr[p1_rd_id].p1_out <= 1'b0;
        shr[p1_rd_id].held   <= 1'b0;
        if (p1e.p1 == P1_SEARCH) begin
          shr[p1_rd_id].p1 <= p1_rd_hit ? P1_HIT : P1_MISS;
          if (l2_abort_valid) shr[p1_rd_id].abort_sent <= 1'b1;
          if (p1_rd_hit && !p1e.done) begin
            shr[p1_rd_id].done      <= 1'b1;
            shr[p1_rd_id].src       <= SRC_P1;
            shr[p1_rd_id].resp_pend <= p1e.typ != REQ_PREFETCH;
            if (p1e.typ != REQ_WRITE) shr[p1_rd_id].data <= line_word(p1_rd_line, wo(p1e.waddr));
          end
          if (!p1_rd_hit && p1e.typ == REQ_WRITE && p1e.p0 == P0_MISS && !p1e.done) begin
            shr[p1_rd_id].done      <= 1'b1;
            shr[p1_rd_id].src       <= SRC_WRITE;
            shr[p1_rd_id].resp_pend <= 1'b1;
          end
        end
      end

      // L2 outcome
      if (l2_ok) begin
        shr[l2_resp_id].l2_out <= 1'b0;
        if (l2_data) begin
          if (!l2e.done) begin
            shr[l2_resp_id].done      <= 1'b1;
            shr[l2_resp_id].src       <= SRC_L2;
            shr[l2_resp_id].resp_pend <= l2e.typ == REQ_READ;
            shr[l2_resp_id].data      <= line_word(l2_resp_line, wo(l2e.waddr));
          end
          if (l2_hold) begin
            shr[l2_resp_id].held <= 1'b1;
            shr[l2_resp_id].hidx <= lwb_push0_idx;
          end else if (l2e.p1 == P1_WAIT || l2e.p1 == P1_SEARCH) begin
            // P1 not searched yet and no room to hold: the line may live in
            // P1, so it is not placed
            shr[l2_resp_id].p1 <= P1_ABORT;
          end
        end
      end

      // new entry (a free entry is never the target of the outcomes above)
      if (alloc) begin
        shr[free_idx] <= '{
          valid:      1'b1,
          typ:        alloc_pf ? REQ_PREFETCH : (req_write ? REQ_WRITE : REQ_READ),
          tag:        req_tag,
          waddr:      alloc_waddr,
          data:       alloc_wr ? req_wdata :
                      (lwb_lk_hit ? line_word(lwb_lk_line, wo(alloc_waddr)) : '0),
          p0:         lwb_lk_hit ? P0_IDLE : P0_SEARCH,
          p1:         lwb_lk_hit ? P1_NONE : P1_WAIT,
          p1_inq:     !lwb_lk_hit,
          p1_out:     1'b0,
          mig:        1'b0,
          l2_out:     1'b0,
          abort_sent: 1'b0,
          done:       lwb_lk_hit,
          resp_pend:  lwb_lk_hit && !alloc_pf,
          stale:      1'b0,
          held:       1'b0,
          hidx:       '0,
          src:        SRC_LWB
        };
      end
    end
  end

  // ---- statistics --------------------------------------------------------------------
  always_comb begin
    ev = '0;
    ev.core_stall    = req_valid && !req_ready;
    ev.lwb_hit       = alloc_lwb_hit;
    ev.p0_hit        = p0_ok && p0_res_hit;
    ev.p1_hit        = p1_ok && p1_rd_hit && p1e.p1 == P1_SEARCH;
    ev.p1_abort      = p0_ok && p0_res_hit && (p0e.p1 == P1_WAIT || p0e.p1 == P1_SEARCH);
    ev.l2_abort      = l2_abort_valid;
    ev.l2_fill       = l2_data;
    ev.place_p0      = (l2_place && place_dest == DEST_P0 && lwb_free_cnt != 0) ||
                       (lwb_rs_valid && lwb_rs_keep && lwb_rs_dest == DEST_P0);
    ev.place_p1      = (l2_place && place_dest == DEST_P1 && lwb_free_cnt != 0) ||
                       (lwb_rs_valid && lwb_rs_keep && lwb_rs_dest == DEST_P1);
    ev.bypass_dead   = place_bypass_dead || rs_bypass_dead;
    ev.bypass_wi     = place_bypass_wi || rs_bypass_wi;
    ev.place_drop    = (l2_place && lwb_free_cnt == 0) ||
                       (l2_fresh && (l2e.p1 == P1_WAIT || l2e.p1 == P1_SEARCH) &&
                        lwb_free_cnt == 0) ||
                       (p1_mig_push && !lwb_push_valid[1]);
    ev.migrate       = lwb_push_valid[1];
    ev.prefetch      = alloc_pf;
    ev.write_through = alloc_wr;
  end

  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n)
    alloc |-> !shr[free_idx].valid);
endmodule
