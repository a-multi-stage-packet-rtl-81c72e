// rr_dispatch_scheduler: input scheduler of one FIFO(i,h) of an input module.
//
// Holds a round-robin pointer naming the LI(i,r) link (and so the central
// module CM(r)) on which the FIFO may send its head-of-line packet during the
// current time slot. The pointer resets to INIT and advances by one position
// at the end of every time slot (slot_end high), wrapping at M. Giving the M
// schedulers of an input module distinct INIT values keeps their pointers
// distinct forever, so no two FIFOs ever pick the same link. The pointer moves
// whether or not the FIFO sent anything, as the dispatching scheme prescribes.
module rr_dispatch_scheduler #(
  parameter int M    = 8,  // number of LI links / central modules
  parameter int INIT = 0   // reset value of the pointer
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           slot_end,
  output logic [(M > 1 ? $clog2(M) : 1)-1:0] link_sel
);

  localparam int LW = (M > 1) ? $clog2(M) : 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        link_sel <= LW'(INIT % M);
    else if (slot_end) link_sel <= (link_sel == LW'(M - 1)) ? '0 : link_sel + 1'b1;
  end

endmodule
