// tb_cash_p0_sram: self-checking test of the SRAM partition P0 at its default
// size (32 sets x 8 ways). Checks that a lookup answers exactly 3 cycles later,
// that lookups are pipelined (one per cycle), that a filled line hits with
// its data, that a store hit updates one word, that a refill of a present
// line overwrites it in place, and that a ninth line in a set evicts the
// oldest one. Inputs are driven and outputs sampled on the falling edge.
module tb_cash_p0_sram;
  import cash_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic lk_valid = 0, lk_write = 0, res_valid, res_hit, fill_valid = 0;
  logic [3:0] lk_id = 0, res_id;
  waddr_t lk_waddr = '0;
  word_t lk_wdata = '0, res_rdata;
  laddr_t fill_laddr = '0;
  line_t fill_line = '0;
  int checks = 0, failures = 0;

  cash_p0_sram dut (.*);

  function automatic line_t mkline(laddr_t l);
    line_t r;
    for (int w = 0; w < WORDS_PER_LINE; w++) r[w*WORD_BITS +: WORD_BITS] = {32'(l), 32'(w) ^ 32'h5a5a0000};
    return r;
  endfunction

  task automatic fill(laddr_t l);
    @(negedge clk); fill_valid = 1; fill_laddr = l; fill_line = mkline(l);
    @(negedge clk); fill_valid = 0;
  endtask

  // one lookup; checks that nothing answers before LAT and the answer at LAT
  task automatic look(waddr_t a, logic wr, word_t d, logic exp_hit, word_t exp_d, logic [3:0] id);
    @(negedge clk); lk_valid = 1; lk_waddr = a; lk_write = wr; lk_wdata = d; lk_id = id;
    @(negedge clk); lk_valid = 0;
    for (int t = 1; t < 3; t++) begin
      checks++; if (res_valid) begin failures++; $display("FAIL: early result"); end
      @(negedge clk);
    end
    checks++;
    if (!res_valid || res_id != id || res_hit != exp_hit || (exp_hit && !wr && res_rdata != exp_d)) begin
      failures++;
      $display("FAIL: lookup %h: valid %b id %0d hit %b data %h (want hit %b %h)", a, res_valid, res_id, res_hit, res_rdata, exp_hit, exp_d);
    end
  endtask

  laddr_t L;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    L = 26'h0123_45;
    look({L, 3'd2}, 0, 0, 0, 0, 4'd1);                      // empty: miss
    fill(L);
    look({L, 3'd2}, 0, 0, 1, mkline(L)[2*64 +: 64], 4'd2);  // hit
    look({L, 3'd5}, 1, 64'hdead_beef_0000_0001, 1, 0, 4'd3);// store hit
    look({L, 3'd5}, 0, 0, 1, 64'hdead_beef_0000_0001, 4'd4);
    look({L, 3'd4}, 0, 0, 1, mkline(L)[4*64 +: 64], 4'd5);
    fill(L);                                                 // refill in place
    look({L, 3'd5}, 0, 0, 1, mkline(L)[5*64 +: 64], 4'd6);
    // fill 8 more lines of the same set: the first line is evicted
    for (int i = 1; i <= 8; i++) fill(L + laddr_t'(32 * i));
    look({L, 3'd0}, 0, 0, 0, 0, 4'd7);
    look({L + laddr_t'(32 * 2), 3'd1}, 0, 0, 1, mkline(L + laddr_t'(64))[1*64 +: 64], 4'd8);
    look({L + laddr_t'(32 * 8), 3'd7}, 0, 0, 1, mkline(L + laddr_t'(256))[7*64 +: 64], 4'd9);
    // pipelined: four lookups on consecutive cycles answer on consecutive cycles
    @(negedge clk);
    for (int i = 0; i < 7; i++) begin
      if (i >= 3) begin
        int j;
        j = i - 3;
        checks++;
        if (!res_valid || res_id != 4'(j) || !res_hit || res_rdata != mkline(L + laddr_t'(32 * (j + 2)))[3*64 +: 64]) begin
          failures++; $display("FAIL: pipelined result %0d", j);
        end
      end
      lk_valid = (i < 4); lk_write = 0; lk_id = 4'(i); lk_waddr = {L + laddr_t'(32 * (i + 2)), 3'd3};
      @(negedge clk);
    end
    lk_valid = 0;
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
