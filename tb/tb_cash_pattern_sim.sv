// tb_cash_pattern_sim: self-checking test of the access pattern simulator
// (32 sets, 6-way read part, 2-way write part). A reference model in the
// testbench (per-set LRU lists) predicts every training event: the first
// reuse of a tracked line (live), eviction of an unreused line (dead), a
// store hitting the write part (write-intensive) and eviction of a line
// stored to only once (not write-intensive). Random accesses to lines of
// four sets are compared event by event, one cycle after each access.
module tb_cash_pattern_sim;
  import cash_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic acc_valid = 0, acc_write = 0;
  laddr_t acc_laddr = '0;
  logic rd_train_valid, rd_train_dead, wr_train_valid, wr_train_wi;
  logic [9:0] rd_train_sig, wr_train_sig;
  int checks = 0, failures = 0;

  cash_pattern_sim dut (.*);

  typedef struct { laddr_t l; logic reused; } ent_t;
  ent_t rdl [32][$];
  ent_t wrl [32][$];

  int n_live = 0, n_dead = 0, n_wi = 0, n_nwi = 0;

  task automatic access(laddr_t l, logic wr);
    logic erv = 0, ed = 0, ewv = 0, ew = 0;
    laddr_t rsig = '0, wsig = '0;
    int s = int'(l[4:0]);
    int f = -1;
    ent_t e;
    foreach (rdl[s][k]) if (rdl[s][k].l == l) f = k;
    if (f >= 0) begin
      e = rdl[s][f];
      rdl[s].delete(f);
      if (!e.reused) begin erv = 1; ed = 0; rsig = l; end
      e.reused = 1;
      rdl[s].push_front(e);
    end else begin
      if (rdl[s].size() == 6) begin
        e = rdl[s].pop_back();
        if (!e.reused) begin erv = 1; ed = 1; rsig = e.l; end
      end
      rdl[s].push_front('{l: l, reused: 1'b0});
    end
    if (wr) begin
      f = -1;
      foreach (wrl[s][k]) if (wrl[s][k].l == l) f = k;
      if (f >= 0) begin
        e = wrl[s][f];
        wrl[s].delete(f);
        ewv = 1; ew = 1; wsig = l;
        e.reused = 1;
        wrl[s].push_front(e);
      end else begin
        if (wrl[s].size() == 2) begin
          e = wrl[s].pop_back();
          if (!e.reused) begin ewv = 1; ew = 0; wsig = e.l; end
        end
        wrl[s].push_front('{l: l, reused: 1'b0});
      end
    end
    @(negedge clk); acc_valid = 1; acc_laddr = l; acc_write = wr;
    @(negedge clk); acc_valid = 0;
    checks++;
    if (rd_train_valid != erv || (erv && (rd_train_dead != ed || rd_train_sig != rsig[9:0])) ||
        wr_train_valid != ewv || (ewv && (wr_train_wi != ew || wr_train_sig != wsig[9:0]))) begin
      failures++;
      $display("FAIL: access %h %b: rd %b/%b/%h want %b/%b/%h, wr %b/%b/%h want %b/%b/%h", l, wr,
               rd_train_valid, rd_train_dead, rd_train_sig, erv, ed, rsig[9:0],
               wr_train_valid, wr_train_wi, wr_train_sig, ewv, ew, wsig[9:0]);
    end
    if (erv) begin if (ed) n_dead++; else n_live++; end
    if (ewv) begin if (ew) n_wi++; else n_nwi++; end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      laddr_t l;
      l = laddr_t'(($urandom_range(0, 11) << 5) | ($urandom_range(0, 3) * 9));
      access(l, $urandom_range(0, 3) == 0);
    end
    checks++;
    if (n_live == 0 || n_dead == 0 || n_wi == 0 || n_nwi == 0) begin
      failures++; $display("FAIL: event kinds %0d %0d %0d %0d", n_live, n_dead, n_wi, n_nwi);
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
