// tb_cash_top: end-to-end self-checking test of the CASH L1 data cache at its
// default sizes, against a behavioural L2 (cash_l2_model).
//
// The core side issues reads and stores in four phases: a reused working set
// (hits in both partitions, migration), a strided stream over an aliasing
// region (prefetches, dead-line bypass), repeated stores to a few lines and
// reads of lines sharing their predictor index (write-intensive migration
// and bypass), then a burst to fill the SHR and the line write buffer. A
// commit stream in parallel marks the loads of 16 lines of the working set
// as critical (a chain of dependent long-latency loads) and the rest as
// slack-rich, so the criticality predictor learns those lines.
// Requests and responses are driven and sampled on the falling clock edge.
// Checks: every read returns the value of the reference memory image at the
// time it was accepted; every request is answered exactly once; a read
// served by P0 answers exactly 3 cycles after acceptance, one served by P1
// no earlier than 8 cycles, one served by the L2 no earlier than 15; and each
// mechanism of the design is seen at least once. Stores are never issued to
// a word with a read in flight, so the expected value is unambiguous.
module tb_cash_top;
  import cash_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, req_write;
  logic [7:0] req_tag;
  waddr_t req_waddr;
  word_t  req_wdata;
  logic resp_valid, resp_write;
  logic [7:0] resp_tag;
  word_t resp_rdata;
  resp_src_e resp_src;
  logic commit_valid, commit_dropped;
  commit_rec_t commit_rec;
  logic l2_req_valid, l2_req_ready, l2_abort_valid, l2_resp_valid, l2_resp_aborted;
  l2_req_t l2_req;
  logic [3:0] l2_abort_id, l2_resp_id;
  line_t l2_resp_line;
  cash_events_t ev;
  int unsigned l2_fetches, l2_writes, l2_aborts;

  cash_top dut (.*);

  cash_l2_model u_l2 (
    .clk, .rst_n, .req_valid(l2_req_valid), .req(l2_req), .req_ready(l2_req_ready),
    .abort_valid(l2_abort_valid), .abort_id(l2_abort_id),
    .resp_valid(l2_resp_valid), .resp_id(l2_resp_id), .resp_aborted(l2_resp_aborted),
    .resp_line(l2_resp_line), .fetches(l2_fetches), .writes(l2_writes), .aborts(l2_aborts));

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- reference image --------------------------------------------------------
  function automatic word_t init_word(waddr_t a);
    return {32'(a) * 32'h9E37_79B1, 3'b101, a};
  endfunction
  word_t ref_img [waddr_t];
  function automatic word_t ref_rd(waddr_t a);
    return ref_img.exists(a) ? ref_img[a] : init_word(a);
  endfunction

  // ---- outstanding requests ----------------------------------------------------
  logic   out_v   [256];
  logic   out_w   [256];
  word_t  out_exp [256];
  waddr_t out_a   [256];
  longint out_t   [256];
  int     rd_inflight [waddr_t];
  int     outstanding = 0;
  logic [7:0] next_tag = 0;

  // ---- mechanism counters ----------------------------------------------------------
  int n_stall, n_lwb, n_p0, n_p1, n_p1ab, n_l2ab, n_fill, n_pp0, n_pp1, n_bd, n_bw, n_drop,
      n_mig, n_pf, n_wt, n_ccpdrop;
  int n_resp_p0, n_resp_p1, n_resp_l2, n_resp_lwb;

  // ---- request generation ------------------------------------------------------------
  int phase = 0;
  int k = 0;
  function automatic waddr_t wa(laddr_t l, int w);
    return {l, WOFF_BITS'(w)};
  endfunction

  task automatic gen(output logic wr, output waddr_t a, output word_t d);
    int r = $urandom_range(0, 99);
    d = {$urandom, $urandom};
    unique case (phase)
      0: begin  // working set of 64 lines
        a  = wa(laddr_t'(26'h100 + $urandom_range(0, 63)), $urandom_range(0, 7));
        wr = (r < 20);
      end
      1: begin  // stride of 64 lines: one pattern-simulator set, 16 predictor indices
        a  = wa(laddr_t'(26'h4000 + 64 * k), 0);
        wr = 1'b0;
      end
      2: begin  // stores to 8 lines after reading them once, then aliases
        if (k < 8)        begin a = wa(laddr_t'(26'h800 + k), 1); wr = 1'b0; end
        else if (k < 400) begin a = wa(laddr_t'(26'h800 + (k % 8)), k % 8); wr = 1'b1; end
        else              begin a = wa(laddr_t'(26'h800 + 1024 * (1 + (k - 400) / 8) + (k % 8)), 2); wr = 1'b0; end
      end
      default: begin  // burst over many fresh lines
        a  = wa(laddr_t'(26'h20000 + k), $urandom_range(0, 7));
        wr = 1'b0;
      end
    endcase
    if (wr && rd_inflight.exists(a) && rd_inflight[a] > 0) wr = 1'b0;
  endtask

  logic hold;
  initial begin
    req_valid = 1'b0; req_write = 1'b0; req_tag = '0; req_waddr = '0; req_wdata = '0;
    hold = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (400) @(posedge clk);   // let the criticality predictor learn first
    for (phase = 0; phase < 4; phase++) begin
      int n;
      n = (phase == 0) ? 3000 : (phase == 1) ? 600 : (phase == 2) ? 480 : 6000;
      for (k = 0; k < n; k++) begin
        logic wr; waddr_t a; word_t d;
        gen(wr, a, d);
        while (out_v[next_tag]) @(negedge clk);
        @(negedge clk);
        req_valid = 1'b1; req_write = wr; req_waddr = a; req_wdata = d; req_tag = next_tag;
        while (!req_ready) @(negedge clk);
        // accepted at the coming rising edge
        out_v[next_tag]  = 1'b1;
        out_w[next_tag]  = wr;
        out_a[next_tag]  = a;
        out_t[next_tag]  = cyc;
        if (wr) ref_img[a] = d;
        out_exp[next_tag] = ref_rd(a);
        if (!wr) rd_inflight[a] = rd_inflight.exists(a) ? rd_inflight[a] + 1 : 1;
        outstanding++;
        next_tag++;
        if ((phase == 0 && $urandom_range(0, 3) == 0) || out_v[next_tag]) begin
          @(negedge clk);
          req_valid = 1'b0;
        end
      end
    end
    @(negedge clk);
    req_valid = 1'b0;
    // drain
    for (int t = 0; t < 3000 && outstanding != 0; t++) @(posedge clk);
    checks++;
    if (outstanding != 0) begin
      failures++;
      $display("FAIL: %0d requests never answered", outstanding);
    end
    report();
  end

  // ---- response checking --------------------------------------------------------------
  always @(negedge clk) if (rst_n && resp_valid) begin
    longint lat;
    lat = cyc - out_t[resp_tag];
    checks++;
    if (!out_v[resp_tag] || out_w[resp_tag] != resp_write) begin
      failures++;
      $display("FAIL: unexpected response tag %0d", resp_tag);
    end else begin
      out_v[resp_tag] = 1'b0;
      outstanding--;
      if (!resp_write) begin
        rd_inflight[out_a[resp_tag]]--;
        checks++;
        if (resp_rdata != out_exp[resp_tag]) begin
          failures++;
          $display("FAIL: read %h src %s got %h expected %h", out_a[resp_tag], resp_src.name(),
                   resp_rdata, out_exp[resp_tag]);
        end
        checks++;
        unique case (resp_src)
          SRC_P0:  begin n_resp_p0++;  if (lat != 3)  begin failures++; $display("FAIL: P0 latency %0d", lat); end end
          SRC_P1:  begin n_resp_p1++;  if (lat < 8)   begin failures++; $display("FAIL: P1 latency %0d", lat); end end
          SRC_L2:  begin n_resp_l2++;  if (lat < 15)  begin failures++; $display("FAIL: L2 latency %0d", lat); end end
          SRC_LWB: begin n_resp_lwb++; if (lat < 1)   begin failures++; $display("FAIL: LWB latency %0d", lat); end end
          default: begin failures++; $display("FAIL: read answered as store"); end
        endcase
      end
    end
  end

  // ---- commit stream: a chain of critical loads on lines 0x100..0x10F ------------------
  int cm_k = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      commit_valid <= 1'b0;
      commit_rec   <= '0;
    end else begin
      commit_rec_t c;
      cm_k <= cm_k + 1;
      if (cm_k % 4 == 0) c = '{is_load: 1'b1, laddr: laddr_t'(26'h100 + (cm_k / 4) % 16), lat: 8'd20, dep: 6'd4};
      else if (cm_k % 4 == 1) c = '{is_load: 1'b1, laddr: laddr_t'(26'h110 + $urandom_range(0, 47)), lat: 8'd4, dep: 6'd0};
      else c = '{is_load: 1'b0, laddr: '0, lat: 8'd1, dep: 6'(cm_k % 4 == 2 ? 1 : 0)};
      commit_valid <= 1'b1;
      commit_rec   <= c;
    end
  end

  always @(posedge clk) if (rst_n) begin
    n_stall += int'(ev.core_stall); n_lwb += int'(ev.lwb_hit); n_p0 += int'(ev.p0_hit);
    n_p1 += int'(ev.p1_hit); n_p1ab += int'(ev.p1_abort); n_l2ab += int'(ev.l2_abort);
    n_fill += int'(ev.l2_fill); n_pp0 += int'(ev.place_p0); n_pp1 += int'(ev.place_p1);
    n_bd += int'(ev.bypass_dead); n_bw += int'(ev.bypass_wi); n_drop += int'(ev.place_drop);
    n_mig += int'(ev.migrate); n_pf += int'(ev.prefetch); n_wt += int'(ev.write_through);
    n_ccpdrop += int'(commit_dropped);
  end

  task automatic seen(string name, int n);
    checks++;
    $display("  %-22s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism '%s' never happened", name);
    end
  endtask

  task automatic report();
    $display("mechanisms:");
    seen("core stall", n_stall);      seen("LWB hit", n_lwb);
    seen("P0 hit", n_p0);             seen("P1 hit", n_p1);
    seen("P1 lookup aborted", n_p1ab); seen("L2 abort", n_l2ab);
    seen("L2 fill", n_fill);          seen("place in P0", n_pp0);
    seen("place in P1", n_pp1);       seen("bypass dead", n_bd);
    seen("bypass write-intensive", n_bw); seen("placement dropped", n_drop);
    seen("P1->P0 migration", n_mig);  seen("prefetch", n_pf);
    seen("write-through", n_wt);      seen("commit not sampled", n_ccpdrop);
    seen("read served by P0", n_resp_p0); seen("read served by P1", n_resp_p1);
    seen("read served by L2", n_resp_l2); seen("read served by LWB", n_resp_lwb);
    $display("L2: %0d fetches, %0d writes, %0d aborts; %0d cycles", l2_fetches, l2_writes, l2_aborts, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    for (int t = 0; t < 256; t++) out_v[t] = 1'b0;
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
