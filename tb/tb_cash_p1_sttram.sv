// tb_cash_p1_sttram: self-checking test of the STTRAM partition P1 at its
// default size and timing. Checks: the port accepts one operation every 4
// cycles; a lookup answers exactly 8 cycles after issue; a line write is
// acknowledged exactly 105 cycles after issue with its buffer index; a hit
// returns the line; a store hit without migration updates the word; a hit
// with migration invalidates the line. Inputs are driven and outputs sampled
// on the falling edge.
module tb_cash_p1_sttram;
  import cash_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic op_valid = 0, op_ready, op_write_line = 0, op_is_write = 0, op_migrate = 0;
  logic [3:0] op_id = 0, rd_id;
  waddr_t op_waddr = '0;
  word_t op_wdata = '0;
  line_t op_line = '0, rd_line;
  logic [4:0] op_lwb = 0, wr_ack_lwb;
  logic rd_valid, rd_hit, wr_ack_valid;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(negedge clk) cyc <= cyc + 1;

  cash_p1_sttram dut (.*);

  function automatic line_t mkline(laddr_t l);
    line_t r;
    for (int w = 0; w < WORDS_PER_LINE; w++) r[w*WORD_BITS +: WORD_BITS] = {32'(l) ^ 32'hc3c3_0000, 32'(w)};
    return r;
  endfunction

  // issue one operation; returns the cycle it was accepted
  task automatic issue(logic wl, waddr_t a, logic wr, logic mig, word_t d, line_t ln, logic [4:0] lwb,
                       logic [3:0] id, output int at);
    @(negedge clk);
    op_valid = 1; op_write_line = wl; op_waddr = a; op_is_write = wr; op_migrate = mig;
    op_wdata = d; op_line = ln; op_lwb = lwb; op_id = id;
    while (!op_ready) @(negedge clk);
    at = cyc;
    @(negedge clk);
    op_valid = 0;
  endtask

  // wait for the lookup answer and check it and its timing
  task automatic expect_rd(int at, logic [3:0] id, logic hit, line_t ln);
    while (!rd_valid && cyc < at + 20) @(negedge clk);
    checks++;
    if (!rd_valid || cyc - at != 8 || rd_id != id || rd_hit != hit || (hit && rd_line != ln)) begin
      failures++;
      $display("FAIL: lookup id %0d after %0d cycles hit %b (want %b)", rd_id, cyc - at, rd_hit, hit);
    end
  endtask

  int ack_at [32];
  int ack_seen = 0;
  always @(negedge clk) if (wr_ack_valid) begin
    checks++;
    ack_seen++;
    if (cyc - ack_at[wr_ack_lwb] != 105) begin
      failures++; $display("FAIL: write ack of %0d after %0d cycles", wr_ack_lwb, cyc - ack_at[wr_ack_lwb]);
    end
  end

  int t0, t1, t2;
  laddr_t A, B;
  line_t  exp_line;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    A = 26'h0abc; B = 26'h1abc;
    issue(0, {A, 3'd1}, 0, 0, 0, 0, 0, 4'd3, t0);
    expect_rd(t0, 4'd3, 0, 0);
    issue(1, {A, 3'd0}, 0, 0, 0, mkline(A), 5'd7, 0, t1);
    ack_at[7] = t1;
    issue(1, {B, 3'd0}, 0, 0, 0, mkline(B), 5'd9, 0, t2);
    ack_at[9] = t2;
    checks++;
    if (t2 - t1 != 4) begin failures++; $display("FAIL: issue interval %0d", t2 - t1); end
    issue(0, {A, 3'd2}, 0, 0, 0, 0, 0, 4'd4, t0);
    checks++;
    if (t0 - t2 != 4) begin failures++; $display("FAIL: issue interval %0d", t0 - t2); end
    expect_rd(t0, 4'd4, 1, mkline(A));
    // store hit, no migration: word 6 of A changes
    issue(0, {A, 3'd6}, 1, 0, 64'h1234_5678_9abc_def0, 0, 0, 4'd5, t0);
    expect_rd(t0, 4'd5, 1, mkline(A));
    exp_line = line_merge(mkline(A), 3'd6, 64'h1234_5678_9abc_def0);
    issue(0, {A, 3'd0}, 0, 1, 0, 0, 0, 4'd6, t0);  // hit with migration
    expect_rd(t0, 4'd6, 1, exp_line);
    issue(0, {A, 3'd0}, 0, 0, 0, 0, 0, 4'd7, t0);  // now gone
    expect_rd(t0, 4'd7, 0, 0);
    issue(0, {B, 3'd5}, 0, 0, 0, 0, 0, 4'd8, t0);
    expect_rd(t0, 4'd8, 1, mkline(B));
    repeat (130) @(negedge clk);
    checks++;
    if (ack_seen != 2) begin failures++; $display("FAIL: %0d write acks", ack_seen); end
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
