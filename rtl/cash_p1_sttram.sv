// cash_p1_sttram: the STTRAM partition P1 of the hybrid L1 data cache.
//
// A larger, slower set-associative array (default 32 KB, 8-way, 64-byte
// lines) that holds lines read mostly by delay-tolerant loads. It models the
// timing of a low-current long-latency STTRAM bank: a single port that accepts
// one operation every II cycles (4), reads that deliver their outcome RD_LAT
// cycles (8) after issue, and line writes that are acknowledged WR_LAT cycles
// (105) after issue. The storage itself is a plain synchronous array; the
// magnetic cells are not modelled.
//
// Operations (op_valid is accepted when op_ready is high):
//   OP_LOOKUP     word access for the controller. On a hit with op_migrate set
//                 the line is invalidated (it moves to P0); on a hit of a
//                 write without op_migrate the word is written. rd_* returns
//                 hit and the line as it was before the access, RD_LAT cycles
//                 later, tagged with op_id.
//   OP_WRITE_LINE installs a line from the line write buffer (in place if
//                 present, else an invalid way, else round-robin victim);
//                 wr_ack_* pulses WR_LAT cycles later with op_lwb.
// The array is updated at issue, so later operations already see the new
// contents; the latencies only shape when results are reported. Partition
// size, associativity, latencies and issue intervals follow the
// description; the single shared port and the rest are this design's choices.
module cash_p1_sttram
  import cash_pkg::*;
#(
  parameter int unsigned SETS   = 64,   // 32 KB / (8 ways * 64 B)
  parameter int unsigned WAYS   = 8,
  parameter int unsigned RD_LAT = 8,
  parameter int unsigned WR_LAT = 105,
  parameter int unsigned II     = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       op_valid,
  output logic       op_ready,
  input  logic       op_write_line,   // 0: OP_LOOKUP, 1: OP_WRITE_LINE
  input  logic [3:0] op_id,
  input  waddr_t     op_waddr,        // lookup: word address; write line: line address in upper bits
  input  logic       op_is_write,
  input  logic       op_migrate,
  input  word_t      op_wdata,
  input  line_t      op_line,
  input  logic [4:0] op_lwb,
  output logic       rd_valid,
  output logic [3:0] rd_id,
  output logic       rd_hit,
  output line_t      rd_line,
  output logic       wr_ack_valid,
  output logic [4:0] wr_ack_lwb
);
  localparam int unsigned IDX_BITS = $clog2(SETS);
  localparam int unsigned WAY_BITS = $clog2(WAYS);
  typedef logic [IDX_BITS-1:0] idx_t;
  typedef logic [WAY_BITS-1:0] way_t;

  laddr_t tags [SETS][WAYS];
  logic   vld  [SETS][WAYS];
  way_t   rr   [SETS];
  line_t  data [SETS*WAYS];

  logic [$clog2(II+1)-1:0] busy;
  assign op_ready = (busy == 0);
  logic fire;
  assign fire = op_valid && op_ready;

  laddr_t la;
  idx_t   ix;
  logic   hit, free_found;
  way_t   hway, fway, way;
  always_comb begin
    la  = op_waddr[WADDR_BITS-1:WOFF_BITS];
    ix  = la[IDX_BITS-1:0];
    hit = 1'b0;
    hway = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld[ix][w] && tags[ix][w] == la) begin
        hit  = 1'b1;
        hway = way_t'(w);
      end
    free_found = 1'b0;
    fway = rr[ix];
    for (int w = WAYS - 1; w >= 0; w--)
      if (!vld[ix][w]) begin
        fway = way_t'(w);
        free_found = 1'b1;
      end
    way = hit ? hway : fway;
  end

  always_ff @(posedge clk) begin
    if (fire && op_write_line)
      data[{ix, way}] <= op_line;
    else if (fire && hit && op_is_write && !op_migrate)
      data[{ix, way}][op_waddr[WOFF_BITS-1:0]*WORD_BITS +: WORD_BITS] <= op_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          vld[s][w]  <= 1'b0;
          tags[s][w] <= '0;
        end
      end
    end else begin
      if (fire) busy <= ($bits(busy))'(II - 1);
      else if (busy != 0) busy <= busy - 1'b1;
      if (fire && op_write_line) begin
        vld[ix][way]  <= 1'b1;
        tags[ix][way] <= la;
        if (!hit && !free_found) rr[ix] <= rr[ix] + 1'b1;
      end else if (fire && hit && op_migrate) begin
        vld[ix][way] <= 1'b0;
      end
    end
  end

  // ---- read result delay line ----------------------------------------------
  typedef struct packed {
    logic       valid;
    logic [3:0] id;
    logic       hit;
    line_t      line;
  } rd_stage_t;
  rd_stage_t rpipe [RD_LAT];

  // ---- write acknowledge delay line ----------------------------------------
  typedef struct packed {
    logic       valid;
    logic [4:0] lwb;
  } wr_stage_t;
  wr_stage_t wpipe [WR_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < RD_LAT; s++) rpipe[s] <= '0;
      for (int s = 0; s < WR_LAT; s++) wpipe[s] <= '0;
    end else begin
      rpipe[0].valid <= fire && !op_write_line;
      rpipe[0].id    <= op_id;
      rpipe[0].hit   <= hit;
      rpipe[0].line  <= data[{ix, way}];
      for (int s = 1; s < RD_LAT; s++) rpipe[s] <= rpipe[s-1];
      wpipe[0].valid <= fire && op_write_line;
      wpipe[0].lwb   <= op_lwb;
      for (int s = 1; s < WR_LAT; s++) wpipe[s] <= wpipe[s-1];
    end
  end

  assign rd_valid     = rpipe[RD_LAT-1].valid;
  assign rd_id        = rpipe[RD_LAT-1].id;
  assign rd_hit       = rpipe[RD_LAT-1].hit;
  assign rd_line      = rpipe[RD_LAT-1].line;
  assign wr_ack_valid = wpipe[WR_LAT-1].valid;
  assign wr_ack_lwb   = wpipe[WR_LAT-1].lwb;
endmodule
