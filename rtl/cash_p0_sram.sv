// cash_p0_sram: the SRAM partition P0 of the hybrid L1 data cache.
//
// A small, fast set-associative array (default 16 KB, 8-way, 64-byte lines,
// 3-cycle access) that holds lines likely to be read by critical loads.
// It has two ports so that it can take two accesses per cycle, the
// 0.5 cycle/access bandwidth of the description:
//   * lookup port: one word read or word write per cycle from the controller.
//     Tags are compared in the cycle the request is presented; a write that
//     hits updates the word at the end of that cycle. The outcome
//     (hit, read word) appears on res_* exactly LAT cycles after the request,
//     carrying the request's id. Lookups are fully pipelined.
//   * fill port: writes a whole line from the line write buffer in one
//     cycle. A line already present is overwritten in place; otherwise an
//     invalid way is used, else the set's round-robin victim. Evicted lines
//     are simply dropped, the L1 being write-through.
// The capacity, associativity and latency follow the description; the
// two-port organisation, the round-robin replacement and the line size are
// this design's own choices.
module cash_p0_sram
  import cash_pkg::*;
#(
  parameter int unsigned SETS = 32,   // 16 KB / (8 ways * 64 B)
  parameter int unsigned WAYS = 8,
  parameter int unsigned LAT  = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  // lookup port
  input  logic       lk_valid,
  input  logic [3:0] lk_id,
  input  waddr_t     lk_waddr,
  input  logic       lk_write,
  input  word_t      lk_wdata,
  output logic       res_valid,
  output logic [3:0] res_id,
  output logic       res_hit,
  output word_t      res_rdata,
  // line fill port
  input  logic       fill_valid,
  input  laddr_t     fill_laddr,
  input  line_t      fill_line
);
  localparam int unsigned IDX_BITS = $clog2(SETS);
  localparam int unsigned WAY_BITS = $clog2(WAYS);
  typedef logic [IDX_BITS-1:0] idx_t;
  typedef logic [WAY_BITS-1:0] way_t;

  laddr_t tags  [SETS][WAYS];
  logic   vld   [SETS][WAYS];
  way_t   rr    [SETS];
  line_t  data  [SETS*WAYS];

  typedef struct packed {
    logic       valid;
    logic [3:0] id;
    logic       hit;
    word_t      rdata;
  } stage_t;
  stage_t pipe [LAT];

  // ---- lookup tag compare -------------------------------------------------
  laddr_t lk_laddr;
  idx_t   lk_idx;
  logic   lk_hit;
  way_t   lk_way;
  always_comb begin
    lk_laddr = lk_waddr[WADDR_BITS-1:WOFF_BITS];
    lk_idx   = lk_laddr[IDX_BITS-1:0];
    lk_hit   = 1'b0;
    lk_way   = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld[lk_idx][w] && tags[lk_idx][w] == lk_laddr) begin
        lk_hit = 1'b1;
        lk_way = way_t'(w);
      end
  end

  // ---- fill way choice ----------------------------------------------------
  idx_t fl_idx;
  way_t fl_way;
  logic fl_found, fl_free;
  always_comb begin
    fl_idx   = fill_laddr[IDX_BITS-1:0];
    fl_found = 1'b0;
    fl_free  = 1'b0;
    fl_way   = rr[fl_idx];
    for (int w = WAYS - 1; w >= 0; w--)
      if (!vld[fl_idx][w] && !fl_found) begin
        fl_way  = way_t'(w);
        fl_free = 1'b1;
      end
    for (int w = 0; w < WAYS; w++)
      if (vld[fl_idx][w] && tags[fl_idx][w] == fill_laddr) begin
        fl_way   = way_t'(w);
        fl_found = 1'b1;
      end
  end

  // ---- arrays -------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (lk_valid && lk_write && lk_hit)
      data[{lk_idx, lk_way}][lk_waddr[WOFF_BITS-1:0]*WORD_BITS +: WORD_BITS] <= lk_wdata;
    if (fill_valid)
      data[{fl_idx, fl_way}] <= fill_line;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          vld[s][w]  <= 1'b0;
          tags[s][w] <= '0;
        end
      end
    end else if (fill_valid) begin
      vld[fl_idx][fl_way]  <= 1'b1;
      tags[fl_idx][fl_way] <= fill_laddr;
      if (!fl_found && !fl_free) rr[fl_idx] <= rr[fl_idx] + 1'b1;
    end
  end

  // ---- result pipeline ----------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < LAT; s++) pipe[s] <= '0;
    end else begin
      pipe[0].valid <= lk_valid;
      pipe[0].id    <= lk_id;
      pipe[0].hit   <= lk_hit;
      pipe[0].rdata <= line_word(data[{lk_idx, lk_way}], lk_waddr[WOFF_BITS-1:0]);
      for (int s = 1; s < LAT; s++) pipe[s] <= pipe[s-1];
    end
  end

  assign res_valid = pipe[LAT-1].valid;
  assign res_id    = pipe[LAT-1].id;
  assign res_hit   = pipe[LAT-1].hit;
  assign res_rdata = pipe[LAT-1].rdata;
endmodule
