// dhara_router: five-port wormhole router (east, west, north, south, local)
// with priority arbitration, Priority Forwarded Packet Splitting and DHARA
// slack awareness.
//
// Each input port buffers flits, tracks the residual slack of its headers
// and requests the output chosen by XY routing. Each output has its own
// arbiter that grants the lowest instantaneous priority P_i = P_p + (S >> D),
// asks the current owner to split its packet when a more urgent request
// arrives, and forwards the priority of blocked requesters downstream on the
// link's pf channel. A crossbar connects each owned output to its owner.
// One slack-interrupt generator per router paces the slack decrements.
//
// Parameters: X, Y (router position), DEPTH (flits per input buffer),
// SCALE_PTR (slack-interrupt every 2^(SCALE_PTR+1) cycles), DIV_IDX (D of
// Equation 1). Flow control is valid/ready per link: a flit moves when
// valid and ready are both high; ready only reflects buffer space. A header
// needs about three cycles to cross an idle router (load, request, grant),
// then one flit per cycle follows. ev_split and ev_boost flag, per input
// port, a split and a priority-forwarding boost in force, for observation.
module dhara_router
  import dhara_pkg::*;
#(
  parameter int unsigned X         = 0,
  parameter int unsigned Y         = 0,
  parameter int unsigned DEPTH     = 8,
  parameter int unsigned SCALE_PTR = 7,
  parameter int unsigned DIV_IDX   = 0,
  parameter int unsigned CNT_W     = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  link_t [NPORTS-1:0]  in_link,
  output logic  [NPORTS-1:0]  in_ready,
  output link_t [NPORTS-1:0]  out_link,
  input  logic  [NPORTS-1:0]  out_ready,
  output logic  [NPORTS-1:0]  ev_split,
  output logic  [NPORTS-1:0]  ev_boost
);

  localparam int unsigned IW = $clog2(NPORTS);

  logic slack_tick;
  slack_tick_gen #(.CNT_W(CNT_W)) u_tick (
    .clk, .rst_n,
    .scale_ptr ($clog2(CNT_W)'(SCALE_PTR)),
    .slack_tick
  );

  logic  [NPORTS-1:0]           ip_req, ip_grant, ip_split, ip_release, ip_valid,
                                ip_ready, ip_stalled;
  port_e                        ip_port  [NPORTS];
  logic  [NPORTS-1:0][PI_W-1:0] ip_prio;
  flit_t                        ip_flit  [NPORTS];

  // per output
  logic [NPORTS-1:0][NPORTS-1:0] arb_req, arb_grant;
  logic [NPORTS-1:0]             arb_owner_v, arb_split, arb_pf_v;
  logic [NPORTS-1:0][IW-1:0]     arb_owner;
  logic [NPORTS-1:0][PI_W-1:0]   arb_pf_p;

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    input_port #(.DEPTH(DEPTH), .X(X), .Y(Y)) u_ip (
      .clk, .rst_n, .slack_tick,
      .div_idx     (2'(DIV_IDX)),
      .in_valid    (in_link[i].valid),
      .in_flit     (in_link[i].flit),
      .in_ready    (in_ready[i]),
      .pf_in_valid (in_link[i].pf_valid),
      .pf_in_prio  (in_link[i].pf_prio),
      .req         (ip_req[i]),
      .req_port    (ip_port[i]),
      .eff_prio    (ip_prio[i]),
      .grant       (ip_grant[i]),
      .split       (ip_split[i]),
      .release_o   (ip_release[i]),
      .split_done  (ev_split[i]),
      .out_valid   (ip_valid[i]),
      .out_flit    (ip_flit[i]),
      .out_ready   (ip_ready[i]),
      .stalled     (ip_stalled[i]),
      .boosted     (ev_boost[i])
    );
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    for (genvar i = 0; i < NPORTS; i++) begin : g_req
      assign arb_req[o][i] = ip_req[i] && (ip_port[i] == port_e'(o));
    end
    output_arbiter #(.NIN(NPORTS)) u_arb (
      .clk, .rst_n,
      .req         (arb_req[o]),
      .prio        (ip_prio),
      .release_i   (ip_release),
      .stalled_i   (ip_stalled),
      .grant       (arb_grant[o]),
      .owner_valid (arb_owner_v[o]),
      .owner_idx   (arb_owner[o]),
      .split       (arb_split[o]),
      .pf_valid    (arb_pf_v[o]),
      .pf_prio     (arb_pf_p[o])
    );
  end

  // Crossbar and the signals back to the input ports
  always_comb begin
    ip_grant = '0;
    ip_split = '0;
    ip_ready = '0;
    for (int unsigned o = 0; o < NPORTS; o++) begin
      ip_grant |= arb_grant[o];
      out_link[o].valid    = arb_owner_v[o] && ip_valid[arb_owner[o]];
      out_link[o].flit     = ip_flit[arb_owner[o]];
      out_link[o].pf_valid = arb_pf_v[o];
      out_link[o].pf_prio  = arb_pf_p[o];
      if (arb_owner_v[o]) begin
        ip_split[arb_owner[o]] = arb_split[o];
        ip_ready[arb_owner[o]] = out_ready[o];
      end
    end
  end

endmodule
