// tb_cash_ccp: self-checking test of the cacheline criticality predictor with
// its default sizes (2048-entry table, post-commit buffer halves of 32).
// For random blocks of 32 committed instructions the testbench computes the
// global slack of every load itself (as-soon-as-possible and as-late-as-
// possible schedules over the D/E/C graph described in cash_ccp) and checks
// the predictor's classification of each load, in its backward-pass order,
// and that a block is analysed within 2*32 cycles plus one. It then checks
// that a line loaded by a critical chain is predicted critical and a line
// loaded only by slack-rich loads is not, and that commits arriving while
// both halves are occupied are dropped.
module tb_cash_ccp;
  import cash_pkg::*;
  localparam int HALF = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cm_valid = 0, cm_dropped;
  commit_rec_t cm_rec = '0;
  laddr_t q_laddr [3];
  logic q_crit [3];
  logic train_valid, train_crit;
  laddr_t train_laddr;
  int checks = 0, failures = 0;

  cash_ccp dut (.*);

  commit_rec_t blk [HALF];
  logic   exp_crit [$];
  laddr_t exp_la [$];
  int     got = 0;

  // reference slack computation
  task automatic reference();
    int ad [HALF], ae [HALF], ac [HALF], le [HALF], lc [HALF], T;
    for (int i = 0; i < HALF; i++) begin
      ad[i] = (i == 0) ? 0 : ad[i-1] + 1;
      ae[i] = ad[i] + 1;
      if (blk[i].dep != 0 && int'(blk[i].dep) <= i) begin
        int p = i - int'(blk[i].dep);
        if (ae[p] + int'(blk[p].lat) > ae[i]) ae[i] = ae[p] + int'(blk[p].lat);
      end
      ac[i] = ae[i] + int'(blk[i].lat);
      if (i > 0 && ac[i-1] + 1 > ac[i]) ac[i] = ac[i-1] + 1;
    end
    T = ac[HALF-1];
    for (int i = HALF - 1; i >= 0; i--) begin
      lc[i] = (i == HALF - 1) ? T : lc[i+1] - 1;
      le[i] = lc[i] - int'(blk[i].lat);
      for (int c = i + 1; c < HALF; c++)
        if (blk[c].dep != 0 && int'(blk[c].dep) <= c && c - int'(blk[c].dep) == i)
          if (le[c] - int'(blk[i].lat) < le[i]) le[i] = le[c] - int'(blk[i].lat);
      if (blk[i].is_load) begin
        exp_crit.push_back((le[i] - ae[i]) < 8);
        exp_la.push_back(blk[i].laddr);
      end
    end
  endtask

  always @(negedge clk) if (rst_n && train_valid) begin
    checks++;
    got++;
    if (exp_crit.size() == 0) begin
      failures++; $display("FAIL: unexpected training");
    end else begin
      logic c; laddr_t l;
      c = exp_crit.pop_front(); l = exp_la.pop_front();
      if (c != train_crit || l != train_laddr) begin
        failures++; $display("FAIL: load of line %h classified %b, expected %b", train_laddr, train_crit, c);
      end
    end
  end

  task automatic send_block();
    for (int i = 0; i < HALF; i++) begin
      @(negedge clk); cm_valid = 1; cm_rec = blk[i];
    end
    @(negedge clk); cm_valid = 0;
  endtask

  int ncrit = 0, drops = 0;
  always @(negedge clk) if (cm_dropped) drops++;

  initial begin
    q_laddr[0] = 26'h777; q_laddr[1] = 26'h555; q_laddr[2] = 26'h0;
    repeat (2) @(negedge clk); rst_n = 1;
    // random blocks
    for (int b = 0; b < 20; b++) begin
      for (int i = 0; i < HALF; i++)
        blk[i] = '{is_load: ($urandom_range(0, 1) == 1), laddr: laddr_t'($urandom_range(0, 4095)),
                   lat: 8'($urandom_range(1, 30)), dep: 6'($urandom_range(0, 7))};
      reference();
      foreach (exp_crit[k]) ncrit += int'(exp_crit[k]);
      send_block();
      repeat (2 * HALF + 1) @(negedge clk);
      checks++;
      if (exp_crit.size() != 0) begin
        failures++; $display("FAIL: block %0d not analysed in time", b);
        exp_crit.delete(); exp_la.delete();
      end
    end
    checks++;
    if (ncrit == 0) begin failures++; $display("FAIL: no critical load generated"); end
    // a critical chain on line 0x777, slack-rich loads on line 0x555
    for (int i = 0; i < HALF; i++)
      blk[i] = (i % 4 == 0) ? '{is_load: 1'b1, laddr: 26'h777, lat: 8'd20, dep: 6'd4}
                            : '{is_load: (i % 4 == 1), laddr: 26'h555, lat: 8'd2, dep: 6'd0};
    reference();
    send_block();
    repeat (2 * HALF + 2) @(negedge clk);
    checks++;
    if (!q_crit[0] || q_crit[1]) begin
      failures++; $display("FAIL: prediction chain line %b, slack-rich line %b", q_crit[0], q_crit[1]);
    end
    // continuous commits overrun the two halves
    exp_crit.delete(); exp_la.delete();
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); cm_valid = 1; cm_rec = '{is_load: 1'b0, laddr: '0, lat: 8'd1, dep: 6'd0};
    end
    @(negedge clk); cm_valid = 0;
    checks++;
    if (drops == 0) begin failures++; $display("FAIL: no commit dropped"); end
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
