// tb_dhara_noc: end-to-end run of the full 4 x 4 mesh at its default
// parameters (scale pointer 7, divider index 0), with random periodic
// traffic: every node runs two flows to random destinations, sixteen
// priority levels, 4..24 payload flits, slack 20 (as in the evaluation set-up
// of the scheme) except a few flows with slack 127. The ejection ports
// stall at random so that back-pressure reaches into the mesh.
//
// Every packet is followed from its injection to its ejection. A packet may
// arrive in several fragments (after splits); each fragment must start with
// a HEAD addressed to the ejecting node and its payload words must continue
// the packet's flit index without gap or repeat. After the traffic stops and
// the mesh drains, every injected packet must have arrived complete, exactly
// once. The run also counts how often each mechanism acted and fails if any
// never did: slack decrement (a header arriving with less slack than it was
// given), packet splitting, priority-forwarding boosts, arbitration
// conflicts resolved against the packet priority by slack, and back-pressure
// at injection. Lateness against the no-load latency plus slack is reported.
module tb_dhara_noc;
  import dhara_pkg::*;
  localparam int W = 4, H = 4, N = W * H, FLOWS = 4, CYCLES = 40000;
  logic clk = 0, rst_n = 0;
  flow_cfg_t [N-1:0][FLOWS-1:0] cfg;
  logic  [N-1:0] ej_valid, ej_ready, inj_valid, inj_ready;
  flit_t [N-1:0] ej_flit, inj_flit;
  logic  [N-1:0][NPORTS-1:0] ev_split, ev_boost;
  logic  [N-1:0][FLOWS-1:0] released;
  int checks = 0, failures = 0;

  dhara_noc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // packet key: src node, flow, sequence number
  function automatic int key(int src, int flow, int seq);
    return (src * FLOWS + flow) * 4096 + seq;
  endfunction

  int inj_cnt = 0, done_cnt = 0;
  int next_idx[int];       // next expected payload index per packet in flight
  int inj_time[int];
  int ej_src[N];           // source of the fragment being received per node
  bit ej_in[N];
  int n_split = 0, n_boost = 0, n_decr = 0, n_stall = 0, n_late = 0, n_frag = 0;
  int cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int n = 0; n < N; n++) begin
      n_split += $countones(ev_split[n]);
      n_boost += $countones(ev_boost[n]);
      if (inj_valid[n] && !inj_ready[n]) n_stall++;
      // injection: a packet is registered when its first payload flit leaves
      // the generator (payload index 0), counted when its TAIL leaves
      if (inj_valid[n] && inj_ready[n] && inj_flit[n].ftype != FT_HEAD) begin
        if (inj_flit[n].data[15:0] == 16'd0) begin
          int k;
          k = key(n, int'(inj_flit[n].data[31:28]), int'(inj_flit[n].data[27:16]));
          next_idx[k] = 0;
          inj_time[k] = cyc;
        end
        if (inj_flit[n].ftype == FT_TAIL) inj_cnt++;
      end
      // ejection
      if (ej_valid[n] && ej_ready[n]) begin
        flit_t fl; fl = ej_flit[n];
        case (fl.ftype)
          FT_HEAD: begin
            header_t hd; hd = header_t'(fl.data);
            check(!ej_in[n], "HEAD inside a fragment");
            check(int'(hd.dst_x) == n % W && int'(hd.dst_y) == n / W,
                  $sformatf("node %0d got a packet for (%0d,%0d)", n, hd.dst_x, hd.dst_y));
            if (hd.slack != 7'd127 && hd.slack < 7'd20) n_decr++;
            ej_src[n] = int'(hd.src_y) * W + int'(hd.src_x);
            ej_in[n] = 1;
            n_frag++;
          end
          FT_SPLIT: begin
            check(ej_in[n], "SPLIT outside a fragment");
            ej_in[n] = 0;
          end
          default: begin
            int k, f, s, i;
            f = int'(fl.data[31:28]); s = int'(fl.data[27:16]); i = int'(fl.data[15:0]);
            k = key(ej_src[n], f, s);
            check(ej_in[n], "payload outside a fragment");
            if (!next_idx.exists(k)) begin
              check(0, $sformatf("node %0d: unknown packet src %0d flow %0d seq %0d", n, ej_src[n], f, s));
            end else begin
              check(next_idx[k] == i, $sformatf("packet %0d: index %0d, expected %0d", k, i, next_idx[k]));
              next_idx[k] = i + 1;
              if (fl.ftype == FT_TAIL) begin
                int src, fl_lat, nominal;
                src = ej_src[n];
                check(i + 1 == int'(cfg[src][f].size), "payload count");
                // no-load latency: 3 cycles per router on the path + payload
                nominal = 3 * (1 + ((src % W > n % W) ? src % W - n % W : n % W - src % W)
                                 + ((src / W > n / W) ? src / W - n / W : n / W - src / W))
                          + int'(cfg[src][f].size) + 1;
                fl_lat = cyc - inj_time[k];
                if (cfg[src][f].slack != 7'd127 &&
                    fl_lat > nominal + (int'(cfg[src][f].slack) << 8)) n_late++;
                next_idx.delete(k);
                ej_in[n] = 0;
                done_cnt++;
              end
            end
          end
        endcase
      end
    end
  end

  always @(negedge clk) for (int n = 0; n < N; n++) ej_ready[n] <= ($urandom_range(0, 9) != 0);

  // slack-over-priority decisions: a grant going to a packet of worse packet
  // priority than another one waiting for the same output
  int n_slack_win = 0;
  for (genvar n = 0; n < N; n++) begin : g_mon
    logic [NPORTS-1:0][PRIO_W-1:0] hp;
    for (genvar i = 0; i < NPORTS; i++) begin : g_i
      assign hp[i] = dut.g_y[n / W].g_x[n % W].u_router.g_in[i].u_ip.hdr_reg.prio;
    end
    for (genvar o = 0; o < NPORTS; o++) begin : g_o
      always @(posedge clk) if (rst_n && dut.g_y[n / W].g_x[n % W].u_router.arb_grant[o] != '0) begin
        int w; bit other;
        w = 0;
        for (int i = 0; i < NPORTS; i++)
          if (dut.g_y[n / W].g_x[n % W].u_router.arb_grant[o][i]) w = i;
        other = 0;
        for (int i = 0; i < NPORTS; i++)
          if (dut.g_y[n / W].g_x[n % W].u_router.arb_req[o][i] && i != w && hp[i] < hp[w]) other = 1;
        if (other) n_slack_win++;
      end
    end
  end

  initial begin
    cfg = '0;
    for (int n = 0; n < N; n++)
      for (int f = 0; f < 2; f++) begin
        int d;
        do d = $urandom_range(0, N - 1); while (d == n);
        cfg[n][f].enable = 1;
        cfg[n][f].dst_x  = 4'(d % W);
        cfg[n][f].dst_y  = 4'(d / W);
        cfg[n][f].prio   = 6'(1 + ((n + 7 * f) % 16));
        cfg[n][f].slack  = (n % 5 == 4 && f == 1) ? 7'd127 : 7'd20;
        cfg[n][f].size   = 8'($urandom_range(4, 24));
        cfg[n][f].period = 16'($urandom_range(150, 400));
      end
    for (int n = 0; n < N; n++) begin ej_in[n] = 0; ej_src[n] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (CYCLES) @(posedge clk);
    #1;
    for (int n = 0; n < N; n++) for (int f = 0; f < FLOWS; f++) cfg[n][f].enable = 0;
    // drain: wait until the generators are idle and nothing is in flight
    begin
      int quiet = 0;
      while (quiet < 600) begin
        @(posedge clk);
        if (ej_valid == '0 && inj_valid == '0) quiet++; else quiet = 0;
      end
    end
    #1;
    check(inj_cnt > 0 && done_cnt == inj_cnt,
          $sformatf("%0d packets injected, %0d delivered", inj_cnt, done_cnt));
    check(next_idx.num() == 0, $sformatf("%0d packets incomplete", next_idx.num()));
    $display("packets %0d, fragments %0d, splits %0d, boost-cycles %0d, slack-decremented headers %0d",
             done_cnt, n_frag, n_split, n_boost, n_decr);
    $display("slack-over-priority grants %0d, injection stall cycles %0d, late packets %0d",
             n_slack_win, n_stall, n_late);
    check(n_split > 0, "packet splitting happened");
    check(n_boost > 0, "priority forwarding boost happened");
    check(n_decr > 0, "slack decrement happened");
    check(n_slack_win > 0, "slack overrode packet priority in arbitration");
    check(n_stall > 0, "injection back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
