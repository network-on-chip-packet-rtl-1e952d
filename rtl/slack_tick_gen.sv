// slack_tick_gen: the router's slack-interrupt generator.
//
// A free-running CNT_W-bit counter counts clock cycles. The scale pointer
// selects the counter bit at which it "overflows": the interrupt is raised in
// the cycle in which bits [scale_ptr:0] are all ones, so it arrives once
// every 2^(scale_ptr+1) cycles (scale_ptr = 0 gives one every 2 cycles,
// scale_ptr = 7 one every 256 cycles). The period formula follows the design
// description; the scale pointer is a static value chosen at design time and
// is fed in as a port so a router can tie it to a parameter.
//
// Interface: slack_tick is a one-cycle pulse decoded combinationally from
// the counter. The first pulse comes 2^(scale_ptr+1) cycles after reset.
// The counter is cleared by the active-low synchronous reset.
module slack_tick_gen #(
  parameter int unsigned CNT_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(CNT_W)-1:0] scale_ptr,
  output logic                     slack_tick
);

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] mask;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  // mask has ones in bits [scale_ptr:0]
  always_comb begin
    for (int unsigned b = 0; b < CNT_W; b++)
      mask[b] = (b <= 32'(scale_ptr));
  end

  assign slack_tick = rst_n && ((cnt & mask) == mask);

endmodule
