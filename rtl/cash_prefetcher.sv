// cash_prefetcher: L1 data prefetcher, trained on demand reads that miss P0.
//
// A single-stream stride detector: it remembers the last missing line
// address and the last stride. When a new miss repeats the previous non-zero
// stride (a stride of one line is a sequential stream), it proposes the next
// line along that stride. The proposal is held in pf_* until the controller
// takes it (pf_take) or a newer proposal replaces it. Latency: a proposal
// appears in the cycle after the training miss.
// The description only says that stride and stream prefetchers are used and
// that the L1 prefetcher is exercised on read requests that miss P0; the
// single-entry stride detector is this design's own, simplest reading.
module cash_prefetcher
  import cash_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   tr_valid,     // demand read missed in P0
  input  laddr_t tr_laddr,
  output logic   pf_valid,
  output laddr_t pf_laddr,
  input  logic   pf_take
);
  laddr_t last;
  laddr_t stride;
  logic   have_last;
  laddr_t cur_stride;
  assign cur_stride = tr_laddr - last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last      <= '0;
      stride    <= '0;
      have_last <= 1'b0;
      pf_valid  <= 1'b0;
      pf_laddr  <= '0;
    end else begin
      if (pf_take) pf_valid <= 1'b0;
      if (tr_valid) begin
        last      <= tr_laddr;
        have_last <= 1'b1;
        if (have_last && cur_stride != 0) begin
          stride <= cur_stride;
          if (cur_stride == stride) begin
            pf_valid <= 1'b1;
            pf_laddr <= tr_laddr + cur_stride;
          end
        end
      end
    end
  end
endmodule
