// tb_cash_prefetcher: self-checking test of the L1 stride prefetcher. A
// reference model (last miss, last stride) predicts, after every training
// miss, whether a prefetch is proposed and for which line; proposals must
// stay until taken or replaced. Streams with strides of +1, +3 and -2 lines
// and random misses are applied.
module tb_cash_prefetcher;
  import cash_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tr_valid = 0, pf_valid, pf_take = 0;
  laddr_t tr_laddr = '0, pf_laddr;
  int checks = 0, failures = 0;

  cash_prefetcher dut (.*);

  laddr_t last = '0, stride = '0, exp_l = '0;
  logic have = 0, exp_v = 0;
  int nprop = 0;

  task automatic miss(laddr_t l);
    laddr_t cs = l - last;
    if (have && cs != 0) begin
      if (cs == stride) begin exp_v = 1; exp_l = l + cs; nprop++; end
      stride = cs;
    end
    last = l; have = 1;
    @(negedge clk); tr_valid = 1; tr_laddr = l;
    @(negedge clk); tr_valid = 0;
    checks++;
    if (pf_valid != exp_v || (exp_v && pf_laddr != exp_l)) begin
      failures++; $display("FAIL: after miss %h: proposal %b %h, expected %b %h", l, pf_valid, pf_laddr, exp_v, exp_l);
    end
    if ($urandom_range(0, 2) == 0) begin
      pf_take = 1; @(negedge clk); pf_take = 0; exp_v = 0;
      checks++;
      if (pf_valid) begin failures++; $display("FAIL: taken proposal still valid"); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      laddr_t b;
      int st;
      b = laddr_t'($urandom_range(0, 1 << 20));
      st = (r % 3 == 0) ? 1 : (r % 3 == 1) ? 3 : -2;
      for (int i = 0; i < 6; i++) miss(b + laddr_t'(st * i));
      for (int i = 0; i < 3; i++) miss(laddr_t'($urandom_range(0, 1 << 20)));
    end
    checks++;
    if (nprop == 0) begin failures++; $display("FAIL: no proposal"); end
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
