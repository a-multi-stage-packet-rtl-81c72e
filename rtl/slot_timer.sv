// slot_timer: time-slot generator for the internal speedup of the switch.
//
// The whole switch is clocked at the NoC fabric rate. The central-module
// routers forward one packet per hop on every clock, whereas input ports,
// LI links, LC links and output ports move at most one packet per time slot.
// A time slot is SP clocks: slot_tick marks its first clock (the only clock in
// which LI/LC links and ports transfer) and slot_end its last (when
// per-slot state such as dispatch pointers advances). With SP = 1 both are
// high on every clock.
module slot_timer #(
  parameter int SP = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic slot_tick,
  output logic slot_end
);

  localparam int CW = (SP > 1) ? $clog2(SP) : 1;

  logic [CW-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      phase <= '0;
    else if (phase == CW'(SP - 1))   phase <= '0;
    else                             phase <= phase + 1'b1;
  end

  assign slot_tick = (phase == '0);
  assign slot_end  = (phase == CW'(SP - 1));

endmodule
