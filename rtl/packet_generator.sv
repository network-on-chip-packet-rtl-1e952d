// packet_generator: periodic traffic source attached to a router's local
// port, with slack insertion.
//
// It holds FLOWS independent flows, each preset (cfg) with destination,
// packet priority, slack, payload size and release period. Every flow has a
// period timer; each time it expires a packet of that flow is released and
// counted as pending (up to 255). When the generator is not sending, it
// picks the pending flow with the lowest priority value (ties: lowest flow
// index) and sends its packet: one HEAD carrying destination, source
// (X, Y), priority and the preset slack, then cfg.size payload flits, the
// last one a TAIL. Payload words are {flow[3:0], sequence[11:0],
// flit index[15:0]} so a receiver can check order and completeness.
//
// Timing: the first release of a flow happens cfg.period cycles after the
// flow is enabled; one flit per cycle leaves while ready is high. The
// pending counter, the selection order and the payload format are this
// design's choices; preset priority, size, destination and slack follow the
// evaluation set-up of the scheme.
module packet_generator
  import dhara_pkg::*;
#(
  parameter int unsigned X     = 0,
  parameter int unsigned Y     = 0,
  parameter int unsigned FLOWS = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  flow_cfg_t [FLOWS-1:0] cfg,
  output logic                 valid,
  output flit_t                flit,
  input  logic                 ready,
  output logic [FLOWS-1:0]     released
);

  localparam int unsigned FW = (FLOWS > 1) ? $clog2(FLOWS) : 1;

  logic [FLOWS-1:0][15:0] timer;
  logic [FLOWS-1:0][7:0]  pending;
  logic [FLOWS-1:0][11:0] seq;

  logic          busy;
  logic [FW-1:0] cur;
  logic [7:0]    idx;       // 0 = header, 1..size = payload
  logic          sel_valid;
  logic [FW-1:0] sel;

  always_comb begin
    for (int unsigned f = 0; f < FLOWS; f++)
      released[f] = cfg[f].enable && (timer[f] >= cfg[f].period - 16'd1);
  end

  always_comb begin
    sel_valid = 1'b0;
    sel       = '0;
    for (int unsigned f = 0; f < FLOWS; f++) begin
      if (pending[f] != '0 &&
          (!sel_valid || cfg[f].prio < cfg[sel].prio)) begin
        sel_valid = 1'b1;
        sel       = FW'(f);
      end
    end
  end

  header_t hdr;
  always_comb begin
    hdr       = '0;
    hdr.dst_x = cfg[cur].dst_x;
    hdr.dst_y = cfg[cur].dst_y;
    hdr.src_x = COORD_W'(X);
    hdr.src_y = COORD_W'(Y);
    hdr.prio  = cfg[cur].prio;
    hdr.slack = cfg[cur].slack;
    valid = busy;
    if (idx == '0)
      flit = '{ftype: FT_HEAD, data: DATA_W'(hdr)};
    else
      flit = '{ftype: (idx >= cfg[cur].size) ? FT_TAIL : FT_BODY,
               data:  {4'(cur), seq[cur], 16'(idx - 8'd1)}};
  end

  logic start;
  assign start = !busy && sel_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      timer   <= '0;
      pending <= '0;
      seq     <= '0;
      busy    <= 1'b0;
      cur     <= '0;
      idx     <= '0;
    end else begin
      for (int unsigned f = 0; f < FLOWS; f++) begin
        logic inc, dec;
        inc = released[f] && pending[f] != 8'hff;
        dec = start && sel == FW'(f);
        if (!cfg[f].enable)  timer[f] <= '0;
        else if (released[f]) timer[f] <= '0;
        else                 timer[f] <= timer[f] + 16'd1;
        pending[f] <= pending[f] + 8'(inc) - 8'(dec);
      end
      if (start) begin
        busy <= 1'b1;
        cur  <= sel;
        idx  <= '0;
      end else if (busy && ready) begin
        if (idx != '0 && idx >= cfg[cur].size) begin
          busy     <= 1'b0;
          seq[cur] <= seq[cur] + 12'd1;
        end
        idx <= idx + 8'd1;
      end
    end
  end

endmodule
