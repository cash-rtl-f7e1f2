// cash_l2_model: behavioural model of the private L2 cache seen by the CASH
// L1 (testbench only, not synthesizable). It holds the whole memory image:
// a word never written reads as init_word(address). Requests are taken in
// order, one per cycle: a store updates the image at once; a line fetch is
// answered LAT cycles later (12 by default, the L2 latency of the evaluated
// system) with the line as it was when the fetch was taken, or flagged
// aborted if an abort for that fetch arrived first. Responses leave in order.
module cash_l2_model
  import cash_pkg::*;
#(
  parameter int unsigned LAT = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  input  l2_req_t    req,
  output logic       req_ready,
  input  logic       abort_valid,
  input  logic [3:0] abort_id,
  output logic       resp_valid,
  output logic [3:0] resp_id,
  output logic       resp_aborted,
  output line_t      resp_line,
  output int unsigned fetches,
  output int unsigned writes,
  output int unsigned aborts
);
  function automatic word_t init_word(waddr_t a);
    return {32'(a) * 32'h9E37_79B1, 3'b101, a};
  endfunction

  word_t image [waddr_t];

  function automatic word_t rd(waddr_t a);
    return image.exists(a) ? image[a] : init_word(a);
  endfunction

  typedef struct {
    logic [3:0] id;
    longint     due;
    logic       aborted;
    line_t      line;
  } pend_t;
  pend_t  q [$];
  longint now;

  assign req_ready = 1'b1;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now <= 0;
      resp_valid <= 1'b0; resp_id <= '0; resp_aborted <= 1'b0; resp_line <= '0;
      fetches <= 0; writes <= 0; aborts <= 0;
      q.delete();
    end else begin
      now <= now + 1;
      if (abort_valid) begin
        foreach (q[k]) if (q[k].id == abort_id && !q[k].aborted) q[k].aborted = 1'b1;
        aborts <= aborts + 1;
      end
      resp_valid <= 1'b0;
      if (q.size() != 0 && q[0].due <= now) begin
        resp_valid   <= 1'b1;
        resp_id      <= q[0].id;
        resp_aborted <= q[0].aborted;
        resp_line    <= q[0].line;
        void'(q.pop_front());
      end
      if (req_valid) begin
        if (req.kind == L2_WRITE) begin
          image[req.waddr] = req.wdata;
          writes <= writes + 1;
        end else begin
          pend_t p;
          p.id = req.id;
          p.due = now + longint'(LAT);
          p.aborted = 1'b0;
          for (int w = 0; w < WORDS_PER_LINE; w++)
            p.line[w*WORD_BITS +: WORD_BITS] = rd({req.waddr[WADDR_BITS-1:WOFF_BITS], WOFF_BITS'(w)});
          q.push_back(p);
          fetches <= fetches + 1;
        end
      end
    end
  end
endmodule
