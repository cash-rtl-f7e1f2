// cash_top: criticality-aware split hybrid (CASH) L1 data cache.
//
// An L1 data cache split into a small, fast SRAM partition P0 (16 KB,
// 3 cycles) for lines read by critical loads and a larger STTRAM partition
// P1 (32 KB, 8-cycle read, 105-cycle write) for lines read by delay-tolerant
// loads. The two partitions hold disjoint lines. A controller with a 16-entry
// status holding register serves the core, searches P0, P1 and the 20-entry
// line write buffer in parallel, talks to the L2, and places or migrates lines
// using three predictors: criticality (CCP, trained from committed
// instructions), deadness (CDP) and write-intensity (CWP), the latter two
// trained by a pattern simulator watching the access stream. A stride
// prefetcher proposes lines on read misses in P0.
//
// Interfaces:
//   core    req_valid/req_ready handshake; req_write, req_tag, word address,
//           store data. One response per read or store on resp_* (tag,
//           data, source). A read hit in P0 answers 3 cycles after acceptance.
//   commit  one committed instruction per cycle (commit_rec_t) for the
//           criticality predictor; never back-pressured.
//   L2      ordered request stream (line fetch / write-through word) with a
//           ready handshake; abort pulses for fetches made redundant by a
//           P1 hit; every fetch gets exactly one response, with data or
//           flagged aborted.
//   ev      one-cycle pulses for each cache mechanism (statistics).
// Sizes and latencies are module defaults taken from the description; the
// handshakes are this design's own.
module cash_top
  import cash_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
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
  input  logic         commit_valid,
  input  commit_rec_t  commit_rec,
  output logic         commit_dropped,
  output logic         l2_req_valid,
  output l2_req_t      l2_req,
  input  logic         l2_req_ready,
  output logic         l2_abort_valid,
  output logic [3:0]   l2_abort_id,
  input  logic         l2_resp_valid,
  input  logic [3:0]   l2_resp_id,
  input  logic         l2_resp_aborted,
  input  line_t        l2_resp_line,
  output cash_events_t ev
);
  // P0
  logic p0_lk_valid, p0_lk_write, p0_res_valid, p0_res_hit;
  logic [3:0] p0_lk_id, p0_res_id;
  waddr_t p0_lk_waddr;
  word_t  p0_lk_wdata, p0_res_rdata;
  logic   p0_fill_valid;
  laddr_t p0_fill_laddr;
  line_t  p0_fill_line;
  // P1
  logic p1_op_valid, p1_op_ready, p1_op_write_line, p1_op_is_write, p1_op_migrate;
  logic [3:0] p1_op_id, p1_rd_id;
  waddr_t p1_op_waddr;
  word_t  p1_op_wdata;
  line_t  p1_op_line, p1_rd_line;
  logic [4:0] p1_op_lwb, p1_ack_lwb;
  logic p1_rd_valid, p1_rd_hit, p1_ack_valid;
  // LWB
  logic [1:0] lwb_push_valid;
  laddr_t lwb_push_laddr [2];
  line_t  lwb_push_line  [2];
  dest_e  lwb_push_dest  [2];
  logic [5:0] lwb_free_cnt;
  laddr_t lwb_lk_laddr, lwb_chk_laddr, lwb_p1_req_laddr;
  logic lwb_lk_hit, lwb_chk_hit, lwb_wm_valid, lwb_p1_req_valid, lwb_p1_grant;
  logic [4:0] lwb_lk_idx, lwb_wm_idx, lwb_p1_req_idx;
  line_t lwb_lk_line, lwb_p1_req_line;
  woff_t lwb_wm_woff;
  word_t lwb_wm_wdata;
  // predictors
  laddr_t pred_laddr [3];
  logic pred_crit [3], pred_dead [3], pred_wi [3];
  logic lwb_push_hold, lwb_rs_valid, lwb_rs_keep;
  logic [4:0] lwb_push0_idx, lwb_rs_idx;
  dest_e lwb_rs_dest;
  logic ps_valid, ps_write;
  laddr_t ps_laddr;
  logic rd_tr_valid, rd_tr_dead, wr_tr_valid, wr_tr_wi;
  logic [9:0] rd_tr_sig, wr_tr_sig;
  // prefetcher
  logic pft_valid, pf_valid, pf_take;
  laddr_t pft_laddr, pf_laddr;

  cash_controller u_ctrl (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_write, .req_tag, .req_waddr, .req_wdata,
    .resp_valid, .resp_tag, .resp_write, .resp_rdata, .resp_src,
    .l2_req_valid, .l2_req, .l2_req_ready, .l2_abort_valid, .l2_abort_id,
    .l2_resp_valid, .l2_resp_id, .l2_resp_aborted, .l2_resp_line,
    .p0_lk_valid, .p0_lk_id, .p0_lk_waddr, .p0_lk_write, .p0_lk_wdata,
    .p0_res_valid, .p0_res_id, .p0_res_hit, .p0_res_rdata,
    .p1_op_valid, .p1_op_ready, .p1_op_write_line, .p1_op_id, .p1_op_waddr,
    .p1_op_is_write, .p1_op_migrate, .p1_op_wdata, .p1_op_line, .p1_op_lwb,
    .p1_rd_valid, .p1_rd_id, .p1_rd_hit, .p1_rd_line,
    .lwb_push_valid, .lwb_push_laddr, .lwb_push_line, .lwb_push_dest, .lwb_free_cnt,
    .lwb_push_hold, .lwb_push0_idx, .lwb_rs_valid, .lwb_rs_idx, .lwb_rs_keep, .lwb_rs_dest,
    .lwb_lk_laddr, .lwb_lk_hit, .lwb_lk_idx, .lwb_lk_line,
    .lwb_wm_valid, .lwb_wm_idx, .lwb_wm_woff, .lwb_wm_wdata,
    .lwb_chk_laddr, .lwb_chk_hit,
    .lwb_p1_req_valid, .lwb_p1_req_idx, .lwb_p1_req_laddr, .lwb_p1_req_line, .lwb_p1_grant,
    .pred_laddr, .pred_crit, .pred_dead, .pred_wi,
    .ps_valid, .ps_laddr, .ps_write,
    .pft_valid, .pft_laddr, .pf_valid, .pf_laddr, .pf_take,
    .ev);

  cash_p0_sram u_p0 (
    .clk, .rst_n,
    .lk_valid(p0_lk_valid), .lk_id(p0_lk_id), .lk_waddr(p0_lk_waddr),
    .lk_write(p0_lk_write), .lk_wdata(p0_lk_wdata),
    .res_valid(p0_res_valid), .res_id(p0_res_id), .res_hit(p0_res_hit), .res_rdata(p0_res_rdata),
    .fill_valid(p0_fill_valid), .fill_laddr(p0_fill_laddr), .fill_line(p0_fill_line));

  cash_p1_sttram u_p1 (
    .clk, .rst_n,
    .op_valid(p1_op_valid), .op_ready(p1_op_ready), .op_write_line(p1_op_write_line),
    .op_id(p1_op_id), .op_waddr(p1_op_waddr), .op_is_write(p1_op_is_write),
    .op_migrate(p1_op_migrate), .op_wdata(p1_op_wdata), .op_line(p1_op_line), .op_lwb(p1_op_lwb),
    .rd_valid(p1_rd_valid), .rd_id(p1_rd_id), .rd_hit(p1_rd_hit), .rd_line(p1_rd_line),
    .wr_ack_valid(p1_ack_valid), .wr_ack_lwb(p1_ack_lwb));

  cash_lwb u_lwb (
    .clk, .rst_n,
    .push_valid(lwb_push_valid), .push_laddr(lwb_push_laddr), .push_line(lwb_push_line),
    .push_dest(lwb_push_dest), .free_cnt(lwb_free_cnt),
    .push_hold(lwb_push_hold), .push0_idx(lwb_push0_idx),
    .rs_valid(lwb_rs_valid), .rs_idx(lwb_rs_idx), .rs_keep(lwb_rs_keep), .rs_dest(lwb_rs_dest),
    .lk_laddr(lwb_lk_laddr), .lk_hit(lwb_lk_hit), .lk_idx(lwb_lk_idx), .lk_line(lwb_lk_line),
    .wm_valid(lwb_wm_valid), .wm_idx(lwb_wm_idx), .wm_woff(lwb_wm_woff), .wm_wdata(lwb_wm_wdata),
    .chk_laddr(lwb_chk_laddr), .chk_hit(lwb_chk_hit),
    .p0_fill_valid, .p0_fill_laddr, .p0_fill_line,
    .p1_req_valid(lwb_p1_req_valid), .p1_req_idx(lwb_p1_req_idx),
    .p1_req_laddr(lwb_p1_req_laddr), .p1_req_line(lwb_p1_req_line),
    .p1_grant(lwb_p1_grant), .p1_ack_valid(p1_ack_valid), .p1_ack_idx(p1_ack_lwb));

  cash_ccp u_ccp (
    .clk, .rst_n, .cm_valid(commit_valid), .cm_rec(commit_rec), .cm_dropped(commit_dropped),
    .q_laddr(pred_laddr), .q_crit(pred_crit),
    .train_valid(), .train_crit(), .train_laddr());

  cash_pattern_sim u_ps (
    .clk, .rst_n, .acc_valid(ps_valid), .acc_laddr(ps_laddr), .acc_write(ps_write),
    .rd_train_valid(rd_tr_valid), .rd_train_sig(rd_tr_sig), .rd_train_dead(rd_tr_dead),
    .wr_train_valid(wr_tr_valid), .wr_train_sig(wr_tr_sig), .wr_train_wi(wr_tr_wi));

  cash_cdp u_cdp (
    .clk, .rst_n, .tr_valid(rd_tr_valid), .tr_sig(rd_tr_sig), .tr_dead(rd_tr_dead),
    .q_laddr(pred_laddr), .q_dead(pred_dead));

  cash_cwp u_cwp (
    .clk, .rst_n, .tr_valid(wr_tr_valid), .tr_sig(wr_tr_sig), .tr_wi(wr_tr_wi),
    .q_laddr(pred_laddr), .q_wi(pred_wi));

  cash_prefetcher u_pf (
    .clk, .rst_n, .tr_valid(pft_valid), .tr_laddr(pft_laddr),
    .pf_valid, .pf_laddr, .pf_take);
endmodule
