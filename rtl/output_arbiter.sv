// output_arbiter: arbitration unit of one router output port, with the
// decision logic of selective packet splitting (SPS) and priority forwarding.
//
// Arbitration: when the output is free, it is given to the requesting input
// with the lowest effective (instantaneous) priority value. Ties are broken
// round-robin, starting after the last input served. The grant is a
// one-cycle pulse; the winner becomes the owner until it pulses release.
// A new grant is issued at the earliest one cycle after a release.
//
// Splitting: while the output is owned, if another input requests it with a
// strictly lower priority value than the owner's, split is raised towards
// the owner (which then closes its packet with a SPLIT flit and releases).
//
// Priority forwarding: among the inputs that are blocked on this output
// (requesting it without owning it, or owning it while the downstream buffer
// refuses flits) the lowest priority value is registered onto the link's
// dedicated pf channel, so the downstream router can raise the priority of
// the packet that is in the way. One cycle of latency per hop.
//
// What the arbiter compares (instantaneous priority, lower wins) follows the
// scheme; the per-output parallel arbiters, round-robin ties and the exact
// pf condition are this design's choices.
module output_arbiter
  import dhara_pkg::*;
#(
  parameter int unsigned NIN = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NIN-1:0]          req,
  input  logic [NIN-1:0][PI_W-1:0] prio,
  input  logic [NIN-1:0]          release_i,
  input  logic [NIN-1:0]          stalled_i,
  output logic [NIN-1:0]          grant,
  output logic                    owner_valid,
  output logic [$clog2(NIN)-1:0]  owner_idx,
  output logic                    split,
  output logic                    pf_valid,
  output logic [PI_W-1:0]         pf_prio
);

  localparam int unsigned IW = $clog2(NIN);

  logic [IW-1:0] rr_ptr;
  logic          win_valid;
  logic [IW-1:0] win_idx;
  logic [PI_W-1:0] win_prio;
  logic          pf_v_d;
  logic [PI_W-1:0] pf_p_d;

  always_comb begin
    win_valid = 1'b0;
    win_idx   = '0;
    win_prio  = '1;
    for (int unsigned k = 0; k < NIN; k++) begin
      int unsigned i;
      i = 32'(rr_ptr) + k;
      if (i >= NIN) i -= NIN;
      if (req[i] && (!win_valid || prio[i] < win_prio)) begin
        win_valid = 1'b1;
        win_idx   = IW'(i);
        win_prio  = prio[i];
      end
    end

    grant = '0;
    if (!owner_valid && win_valid) grant[win_idx] = 1'b1;

    split = owner_valid && win_valid &&
            (win_prio < prio[owner_idx]);

    pf_v_d = 1'b0;
    pf_p_d = '1;
    for (int unsigned i = 0; i < NIN; i++) begin
      if (req[i] || (owner_valid && IW'(i) == owner_idx && stalled_i[i])) begin
        if (!pf_v_d || prio[i] < pf_p_d) pf_p_d = prio[i];
        pf_v_d = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      owner_valid <= 1'b0;
      owner_idx   <= '0;
      rr_ptr      <= '0;
      pf_valid    <= 1'b0;
      pf_prio     <= '0;
    end else begin
      pf_valid <= pf_v_d;
      pf_prio  <= pf_p_d;
      if (owner_valid) begin
        if (release_i[owner_idx]) owner_valid <= 1'b0;
      end else if (win_valid) begin
        owner_valid <= 1'b1;
        owner_idx   <= win_idx;
        rr_ptr      <= (win_idx == IW'(NIN-1)) ? '0 : win_idx + 1'b1;
      end
    end
  end

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(grant));

endmodule
