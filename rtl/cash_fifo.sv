// cash_fifo: synchronous first-in first-out queue with two push ports.
//
// Up to two entries can be written per cycle (push_valid[0] is older than
// push_valid[1]) and one read. The head is visible on pop_data whenever
// pop_valid is high; pop_ready removes it at the clock edge. count gives the
// occupancy; the user must not push into a full queue (an assertion checks
// this). Used for the controller's ordered queues towards the L2 and towards
// the STTRAM partition's single port.
module cash_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [1:0]               push_valid,
  input  logic [WIDTH-1:0]         push_data [2],
  output logic                     pop_valid,
  output logic [WIDTH-1:0]         pop_data,
  input  logic                     pop_ready,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AB = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AB-1:0] rd, wr;

  assign pop_valid = (count != 0);
  assign pop_data  = mem[rd];

  logic pop;
  assign pop = pop_valid && pop_ready;

  function automatic logic [AB-1:0] inc(logic [AB-1:0] p);
    return (p == AB'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push_valid[0]) mem[wr] <= push_data[0];
    if (push_valid[1]) mem[push_valid[0] ? inc(wr) : wr] <= push_data[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; count <= '0;
    end else begin
      if (pop) rd <= inc(rd);
      case (push_valid)
        2'b01, 2'b10: wr <= inc(wr);
        2'b11:        wr <= inc(inc(wr));
        default:      ;
      endcase
      count <= count + ($bits(count))'(push_valid[0]) + ($bits(count))'(push_valid[1])
                     - ($bits(count))'(pop);
    end
  end

  int unsigned nxt;
  assign nxt = int'(count) + int'(push_valid[0]) + int'(push_valid[1]) - int'(pop);
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) nxt <= DEPTH);
endmodule
