// tb_cash_cwp: self-checking test of the write-intensity predictor (1024 two-bit
// counters). Random training events are applied to a few indices; a
// reference copy of the counters in the testbench predicts the three lookup
// ports after every event (write-intensive when the counter is 2 or 3). Saturation at
// both ends and aliasing of line addresses that share the low 10 bits are
// covered.
module tb_cash_cwp;
  import cash_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tr_valid = 0, tr_wi = 0;
  logic [9:0] tr_sig = '0;
  laddr_t q_laddr [3];
  logic q_wi [3];
  int checks = 0, failures = 0;
  int ref_c [1024];

  cash_cwp dut (.*);

  initial begin
    for (int k = 0; k < 1024; k++) ref_c[k] = 0;
    for (int p = 0; p < 3; p++) q_laddr[p] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int s;
      logic d;
      s = $urandom_range(0, 5) * 97;
      d = $urandom_range(0, 2) != 0;
      tr_valid = ($urandom_range(0, 3) != 0); tr_sig = 10'(s); tr_wi = d;
      if (tr_valid) begin
        if (d && ref_c[s] < 3) ref_c[s]++;
        if (!d && ref_c[s] > 0) ref_c[s]--;
      end
      @(negedge clk);
      tr_valid = 0;
      for (int p = 0; p < 3; p++) begin
        int t;
        t = $urandom_range(0, 5) * 97;
        q_laddr[p] = laddr_t'({$urandom_range(0, 1000), 10'(t)});
        #1;
        checks++;
        if (q_wi[p] != (ref_c[t] >= 2)) begin
          failures++; $display("FAIL: port %0d index %0d predicted %b, counter %0d", p, t, q_wi[p], ref_c[t]);
        end
      end
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
