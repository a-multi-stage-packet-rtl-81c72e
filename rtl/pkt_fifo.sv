// pkt_fifo: synchronous first-in first-out queue of whole packets.
//
// Used for the input-module queues FIFO(i,r) and for every NoC router input
// buffer (depth BD). One push and one pop per clock; both may happen in the
// same cycle, including on a full queue when a pop frees the slot. The head
// packet is shown on rd_pkt whenever empty is low (first-word fall-through).
// count reports the occupancy. A circular array with read and write pointers;
// DEPTH need not be a power of two. Pushing when full and not popping, or
// popping when empty, is an error caught by assertions. Reset empties it.
module pkt_fifo
  import clos_udn_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  packet_t                wr_pkt,
  input  logic                   pop,
  output packet_t                rd_pkt,
  output logic                   empty,
  output logic                   full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  packet_t         mem [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty  = (count == 0);
  assign full   = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign rd_pkt = mem[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= incr(wr_ptr);
      if (pop)  rd_ptr <= incr(rd_ptr);
      count <= count + ($clog2(DEPTH+1))'(push) - ($clog2(DEPTH+1))'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= wr_pkt;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
