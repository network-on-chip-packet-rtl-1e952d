// inst_prio: instantaneous priority of a waiting packet (Equation 1 of the
// DHARA scheme): P_i = P_p + (S >> D).
//
// P_p is the packet priority from the header, S the packet's residual slack
// and D the divider index (0, 1 or 2 give S, S/2, S/4), which sets how much
// weight timeliness gets. Lower P_i wins arbitration. A slack of 127 marks a
// packet with timeliness disabled; for such a packet the slack term is left
// out and P_i = P_p (this reading of the value 127 is a design choice).
// Purely combinational: one adder and one shifter.
module inst_prio
  import dhara_pkg::*;
(
  input  logic [PRIO_W-1:0]  prio,
  input  logic [SLACK_W-1:0] slack,
  input  logic [1:0]         div_idx,
  output logic [PI_W-1:0]    prio_i
);

  logic [SLACK_W-1:0] shifted;

  always_comb begin
    shifted = (slack == SLACK_OFF) ? '0 : (slack >> div_idx);
    prio_i  = PI_W'(prio) + PI_W'(shifted);
  end

endmodule
