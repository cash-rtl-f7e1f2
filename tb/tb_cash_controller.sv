// tb_cash_controller: directed self-checking test of the hybrid cache
// controller's placement and migration policies. The controller is wired to
// the real P0, P1 and line write buffer and to the behavioural L2; the three
// predictor outputs are forced by the testbench so that each branch of the
// placement rule (dead: bypass; critical: P0; write-intensive: bypass;
// otherwise P1) and of the migration rule (P1 hit, not dead, and critical or
// a store to a write-intensive line) can be exercised on its own. Each case
// checks where the next access to the line is served from, the value read
// and, for P0, the 3-cycle latency; every store must reach the L2.
module tb_cash_controller;
  import cash_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_ready, req_write = 0;
  logic [7:0] req_tag = 0;
  waddr_t req_waddr = '0;
  word_t req_wdata = '0;
  logic resp_valid, resp_write;
  logic [7:0] resp_tag;
  word_t resp_rdata;
  resp_src_e resp_src;
  logic l2_req_valid, l2_req_ready, l2_abort_valid, l2_resp_valid, l2_resp_aborted;
  l2_req_t l2_req;
  logic [3:0] l2_abort_id, l2_resp_id;
  line_t l2_resp_line;
  logic p0_lk_valid, p0_lk_write, p0_res_valid, p0_res_hit;
  logic [3:0] p0_lk_id, p0_res_id;
  waddr_t p0_lk_waddr;
  word_t p0_lk_wdata, p0_res_rdata;
  logic p0_fill_valid;
  laddr_t p0_fill_laddr;
  line_t p0_fill_line;
  logic p1_op_valid, p1_op_ready, p1_op_write_line, p1_op_is_write, p1_op_migrate;
  logic [3:0] p1_op_id, p1_rd_id;
  waddr_t p1_op_waddr;
  word_t p1_op_wdata;
  line_t p1_op_line, p1_rd_line;
  logic [4:0] p1_op_lwb, p1_ack_lwb;
  logic p1_rd_valid, p1_rd_hit, p1_ack_valid;
  logic [1:0] lwb_push_valid;
  laddr_t lwb_push_laddr [2];
  line_t lwb_push_line [2];
  dest_e lwb_push_dest [2];
  logic [5:0] lwb_free_cnt;
  laddr_t lwb_lk_laddr, lwb_chk_laddr, lwb_p1_req_laddr;
  logic lwb_lk_hit, lwb_chk_hit, lwb_wm_valid, lwb_p1_req_valid, lwb_p1_grant;
  logic [4:0] lwb_lk_idx, lwb_wm_idx, lwb_p1_req_idx;
  line_t lwb_lk_line, lwb_p1_req_line;
  woff_t lwb_wm_woff;
  word_t lwb_wm_wdata;
  logic lwb_push_hold, lwb_rs_valid, lwb_rs_keep;
  logic [4:0] lwb_push0_idx, lwb_rs_idx;
  dest_e lwb_rs_dest;
  laddr_t pred_laddr [3];
  logic pred_crit [3], pred_dead [3], pred_wi [3];
  logic ps_valid, ps_write, pft_valid, pf_take;
  laddr_t ps_laddr, pft_laddr;
  logic pf_valid = 0;
  laddr_t pf_laddr = '0;
  cash_events_t ev;
  int unsigned l2_fetches, l2_writes, l2_aborts;

  logic crit = 0, dead = 0, wi = 0;
  always_comb for (int p = 0; p < 3; p++) begin
    pred_crit[p] = crit; pred_dead[p] = dead; pred_wi[p] = wi;
  end

  cash_controller dut (.*);
  cash_p0_sram u_p0 (.clk, .rst_n, .lk_valid(p0_lk_valid), .lk_id(p0_lk_id), .lk_waddr(p0_lk_waddr),
    .lk_write(p0_lk_write), .lk_wdata(p0_lk_wdata), .res_valid(p0_res_valid), .res_id(p0_res_id),
    .res_hit(p0_res_hit), .res_rdata(p0_res_rdata), .fill_valid(p0_fill_valid),
    .fill_laddr(p0_fill_laddr), .fill_line(p0_fill_line));
  cash_p1_sttram u_p1 (.clk, .rst_n, .op_valid(p1_op_valid), .op_ready(p1_op_ready),
    .op_write_line(p1_op_write_line), .op_id(p1_op_id), .op_waddr(p1_op_waddr),
    .op_is_write(p1_op_is_write), .op_migrate(p1_op_migrate), .op_wdata(p1_op_wdata),
    .op_line(p1_op_line), .op_lwb(p1_op_lwb), .rd_valid(p1_rd_valid), .rd_id(p1_rd_id),
    .rd_hit(p1_rd_hit), .rd_line(p1_rd_line), .wr_ack_valid(p1_ack_valid), .wr_ack_lwb(p1_ack_lwb));
  cash_lwb u_lwb (.clk, .rst_n, .push_valid(lwb_push_valid), .push_laddr(lwb_push_laddr),
    .push_line(lwb_push_line), .push_dest(lwb_push_dest), .free_cnt(lwb_free_cnt),
    .push_hold(lwb_push_hold), .push0_idx(lwb_push0_idx), .rs_valid(lwb_rs_valid),
    .rs_idx(lwb_rs_idx), .rs_keep(lwb_rs_keep), .rs_dest(lwb_rs_dest),
    .lk_laddr(lwb_lk_laddr), .lk_hit(lwb_lk_hit), .lk_idx(lwb_lk_idx), .lk_line(lwb_lk_line),
    .wm_valid(lwb_wm_valid), .wm_idx(lwb_wm_idx), .wm_woff(lwb_wm_woff), .wm_wdata(lwb_wm_wdata),
    .chk_laddr(lwb_chk_laddr), .chk_hit(lwb_chk_hit), .p0_fill_valid, .p0_fill_laddr, .p0_fill_line,
    .p1_req_valid(lwb_p1_req_valid), .p1_req_idx(lwb_p1_req_idx), .p1_req_laddr(lwb_p1_req_laddr),
    .p1_req_line(lwb_p1_req_line), .p1_grant(lwb_p1_grant), .p1_ack_valid(p1_ack_valid),
    .p1_ack_idx(p1_ack_lwb));
  cash_l2_model u_l2 (.clk, .rst_n, .req_valid(l2_req_valid), .req(l2_req), .req_ready(l2_req_ready),
    .abort_valid(l2_abort_valid), .abort_id(l2_abort_id), .resp_valid(l2_resp_valid),
    .resp_id(l2_resp_id), .resp_aborted(l2_resp_aborted), .resp_line(l2_resp_line),
    .fetches(l2_fetches), .writes(l2_writes), .aborts(l2_aborts));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(negedge clk) cyc <= cyc + 1;
  int n_mig = 0, n_pp0 = 0, n_pp1 = 0, n_bd = 0, n_bw = 0;
  always @(negedge clk) if (rst_n) begin
    n_mig += int'(ev.migrate); n_pp0 += int'(ev.place_p0); n_pp1 += int'(ev.place_p1);
    n_bd += int'(ev.bypass_dead); n_bw += int'(ev.bypass_wi);
  end

  function automatic word_t init_word(waddr_t a);
    return {32'(a) * 32'h9E37_79B1, 3'b101, a};
  endfunction
  word_t img [waddr_t];
  function automatic word_t expv(waddr_t a);
    return img.exists(a) ? img[a] : init_word(a);
  endfunction

  // one request, waits for its response
  task automatic access(logic wr, waddr_t a, word_t d, resp_src_e want, string what);
    int t0;
    @(negedge clk);
    req_valid = 1; req_write = wr; req_waddr = a; req_wdata = d; req_tag = req_tag + 1;
    while (!req_ready) @(negedge clk);
    t0 = cyc;
    if (wr) img[a] = d;
    @(negedge clk); req_valid = 0;
    while (!resp_valid && cyc < t0 + 200) @(negedge clk);
    checks++;
    if (!resp_valid || resp_tag != req_tag || resp_write != wr || resp_src != want ||
        (!wr && resp_rdata != expv(a)) || (want == SRC_P0 && !wr && cyc - t0 != 3)) begin
      failures++;
      $display("FAIL: %s: src %s (want %s) data %h (want %h) after %0d cycles", what, resp_src.name(),
               want.name(), resp_rdata, expv(a), cyc - t0);
    end
    repeat (150) @(negedge clk);   // let placements and STTRAM writes finish
  endtask

  function automatic waddr_t A(int line, int w);
    return {laddr_t'(26'h3000 + 40 * line), 3'(w)};
  endfunction

  int wt0;
  initial begin
    for (int p = 0; p < 3; p++) pred_laddr[p] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // 1: neither dead, critical nor write-intensive: placed in P1
    access(0, A(1, 0), 0, SRC_L2, "first read");
    access(0, A(1, 3), 0, SRC_P1, "line placed in P1");
    // 2: critical now: the P1 hit migrates the line to P0
    crit = 1;
    access(0, A(1, 5), 0, SRC_P1, "P1 hit of critical line");
    access(0, A(1, 5), 0, SRC_P0, "migrated line in P0");
    // 3: critical at arrival: placed in P0
    access(0, A(2, 1), 0, SRC_L2, "critical fetch");
    access(0, A(2, 2), 0, SRC_P0, "critical line placed in P0");
    // 4: dead: bypassed even when critical
    dead = 1;
    access(0, A(3, 0), 0, SRC_L2, "dead fetch");
    access(0, A(3, 0), 0, SRC_L2, "dead line bypassed");
    // 5: write-intensive, not critical: bypassed
    dead = 0; crit = 0; wi = 1;
    access(0, A(4, 0), 0, SRC_L2, "write-intensive fetch");
    access(0, A(4, 0), 0, SRC_L2, "write-intensive line bypassed");
    // 6: store to a write-intensive line in P1 migrates it, with the new word
    wi = 0;
    access(0, A(5, 0), 0, SRC_L2, "fetch into P1");
    wi = 1;
    wt0 = int'(l2_writes);
    access(1, A(5, 2), 64'h0123_4567_89ab_cdef, SRC_P1, "store hit in P1, write-intensive");
    access(0, A(5, 2), 0, SRC_P0, "stored word in migrated line");
    checks++;
    if (int'(l2_writes) != wt0 + 1) begin failures++; $display("FAIL: store not written through"); end
    // 7: store to a line in P1 that stays there
    wi = 0;
    access(0, A(6, 0), 0, SRC_L2, "fetch into P1");
    access(1, A(6, 1), 64'hfeed_face_cafe_beef, SRC_P1, "store hit in P1, stays");
    access(0, A(6, 1), 0, SRC_P1, "stored word in P1");
    // 8: dead line in P1 is not migrated even when critical
    access(0, A(7, 0), 0, SRC_L2, "fetch into P1");
    dead = 1; crit = 1;
    access(0, A(7, 4), 0, SRC_P1, "P1 hit of dead critical line");
    access(0, A(7, 4), 0, SRC_P1, "dead line not migrated");
    // 9: store hit in P0 and a store that misses everywhere
    dead = 0;
    access(1, A(2, 6), 64'h1111_2222_3333_4444, SRC_P0, "store hit in P0");
    access(0, A(2, 6), 0, SRC_P0, "stored word in P0");
    access(1, A(9, 6), 64'h5555_6666_7777_8888, SRC_WRITE, "store miss");
    access(0, A(9, 6), 0, SRC_L2, "store miss did not allocate");
    checks++;
    if (n_mig != 2 || n_pp0 < 1 || n_pp1 < 4 || n_bd < 2 || n_bw < 2) begin
      failures++;
      $display("FAIL: events migrate %0d place_p0 %0d place_p1 %0d bypass_dead %0d bypass_wi %0d",
               n_mig, n_pp0, n_pp1, n_bd, n_bw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
