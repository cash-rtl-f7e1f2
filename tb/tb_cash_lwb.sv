// tb_cash_lwb: self-checking test of the line write buffer (20 entries).
// Checks two pushes per cycle, the free count, that a P0-bound line leaves
// for P0 the next cycle, that a waiting line is found by the lookup and a
// store updates it (also when it leaves in the same cycle), that a P1-bound
// line is offered to P1, stops being searchable once granted and frees on
// the write acknowledge, that a held line is invisible to lookups until it is
// kept or discarded, and that the buffer reports full after 20 lines.
// Inputs are driven and outputs sampled on the falling edge.
module tb_cash_lwb;
  import cash_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] push_valid = 0;
  laddr_t push_laddr [2];
  line_t  push_line [2];
  dest_e  push_dest [2];
  logic push_hold = 0, rs_valid = 0, rs_keep = 0;
  logic [4:0] push0_idx, rs_idx = 0;
  dest_e rs_dest = DEST_P1;
  logic [5:0] free_cnt;
  laddr_t lk_laddr = '0, chk_laddr = '0, p0_fill_laddr, p1_req_laddr;
  logic lk_hit, chk_hit, wm_valid = 0, p0_fill_valid, p1_req_valid, p1_grant = 0, p1_ack_valid = 0;
  logic [4:0] lk_idx, wm_idx = 0, p1_req_idx, p1_ack_idx = 0;
  line_t lk_line, p0_fill_line, p1_req_line;
  woff_t wm_woff = 0;
  word_t wm_wdata = 0;
  int checks = 0, failures = 0;

  cash_lwb dut (.*);

  function automatic line_t mkline(laddr_t l);
    line_t r;
    for (int w = 0; w < WORDS_PER_LINE; w++) r[w*WORD_BITS +: WORD_BITS] = {32'(l), 32'(w) + 32'h100};
    return r;
  endfunction
  task automatic check(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [4:0] p1idx, hidx;
  initial begin
    push_laddr[0] = '0; push_laddr[1] = '0; push_line[0] = '0; push_line[1] = '0;
    push_dest[0] = DEST_P0; push_dest[1] = DEST_P0;
    repeat (2) @(negedge clk); rst_n = 1;
    check(free_cnt == 20, "empty buffer has 20 free entries");
    // line 0x11 for P1 and line 0x22 for P0 in one cycle
    push_valid = 2'b11;
    push_laddr[0] = 26'h11; push_line[0] = mkline(26'h11); push_dest[0] = DEST_P1;
    push_laddr[1] = 26'h22; push_line[1] = mkline(26'h22); push_dest[1] = DEST_P0;
    @(negedge clk); push_valid = 0;
    check(free_cnt == 18, "two pushes in one cycle");
    check(p0_fill_valid && p0_fill_laddr == 26'h22 && p0_fill_line == mkline(26'h22), "P0 line offered to P0");
    @(negedge clk);
    check(!p0_fill_valid && free_cnt == 19, "P0 line written and freed in one cycle");
    lk_laddr = 26'h11;
    #1;
    check(lk_hit && lk_line == mkline(26'h11), "waiting line found");
    wm_valid = 1; wm_idx = lk_idx; wm_woff = 3'd4; wm_wdata = 64'hfeed;
    @(negedge clk); wm_valid = 0;
    #1;
    check(lk_line == line_merge(mkline(26'h11), 3'd4, 64'hfeed), "store updates the staged line");
    check(p1_req_valid && p1_req_laddr == 26'h11, "P1 line offered to P1");
    p1idx = p1_req_idx;
    p1_grant = 1;
    @(negedge clk); p1_grant = 0;
    #1;
    check(!lk_hit && chk_hit == 1'b0, "line being written is not searched (lookup)");
    chk_laddr = 26'h11; #1;
    check(chk_hit, "line being written is seen by the duplicate check");
    check(free_cnt == 19, "entry busy while written");
    p1_ack_valid = 1; p1_ack_idx = p1idx;
    @(negedge clk); p1_ack_valid = 0;
    check(free_cnt == 20, "write acknowledge frees the entry");
    // held line
    push_valid = 2'b01; push_hold = 1; push_laddr[0] = 26'h33; push_line[0] = mkline(26'h33);
    #1 hidx = push0_idx;
    @(negedge clk); push_valid = 0; push_hold = 0;
    lk_laddr = 26'h33; chk_laddr = 26'h33; #1;
    check(!lk_hit && chk_hit && !p1_req_valid && !p0_fill_valid, "held line invisible and not written");
    rs_valid = 1; rs_idx = hidx; rs_keep = 1; rs_dest = DEST_P0;
    @(negedge clk); rs_valid = 0;
    check(p0_fill_valid && p0_fill_laddr == 26'h33, "kept held line goes to its destination");
    @(negedge clk);
    push_valid = 2'b01; push_hold = 1; push_laddr[0] = 26'h44;
    #1 hidx = push0_idx;
    @(negedge clk); push_valid = 0; push_hold = 0;
    rs_valid = 1; rs_idx = hidx; rs_keep = 0;
    @(negedge clk); rs_valid = 0;
    check(free_cnt == 20, "discarded held line frees its entry");
    // fill it up
    for (int i = 0; i < 10; i++) begin
      push_valid = 2'b11;
      push_laddr[0] = laddr_t'(26'h100 + 2 * i); push_dest[0] = DEST_P1;
      push_laddr[1] = laddr_t'(26'h101 + 2 * i); push_dest[1] = DEST_P1;
      @(negedge clk);
    end
    push_valid = 0;
    check(free_cnt == 0, "buffer full after 20 lines");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
