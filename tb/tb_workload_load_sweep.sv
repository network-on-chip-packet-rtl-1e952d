// tb_workload_load_sweep: random-traffic workload on the full 4 x 4 mesh at
// its default parameters (scale pointer 7, divider index 0), swept over four
// load levels in the ratio 0.6 : 0.67 : 0.83 : 1.1. At every level the same
// sixteen flows run twice: once with slack 20 on every packet (slack-aware
// arbitration) and once with slack 127 (timeliness not tracked, so the
// routers arbitrate on the packet priority alone, with splitting and
// forwarding still active).
//
// Traffic: one flow per node, packet priorities 1..16 in a fixed random
// order over the nodes, random destinations, 16..64 payload flits. A flow's
// period is its no-load latency times a common factor, so every flow offers
// the same share of load: period = no-load latency x 1.5 / level (the scale
// is a choice of this testbench, the same at every level; the two upper
// levels saturate some links). Latency is counted from the release of a
// packet, so it includes the time it queues in its generator.
//
// Checked: every packet arrives complete, in order and once. Reported per
// run: packets, splits, and per packet priority the average and maximum
// latency and the number of late packets (latency above the no-load latency
// plus slack 20 times 256 cycles).
module tb_workload_load_sweep;
  import dhara_pkg::*;
  localparam int W = 4, H = 4, N = W * H, FLOWS = 4, CYCLES = 30000;
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
    repeat (8 * (CYCLES + 20000)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic int key(int src, int flow, int seq);
    return (src * FLOWS + flow) * 4096 + seq;
  endfunction

  int hops[N];
  int nominal[N];
  int next_idx[int], rel_time[int];
  int rel_q[N][$];            // release times of packets not yet injected
  int ej_src[N]; bit ej_in[N];
  int cyc = 0, inj_cnt = 0, done_cnt = 0, n_split = 0;
  longint lat_sum[17]; int lat_max[17], lat_n[17], late[17];
  bit slack_on;

  always @(posedge clk) begin
    if (!rst_n) cyc = 0;
    else begin
      cyc++;
      for (int n = 0; n < N; n++) begin
        n_split += $countones(ev_split[n]);
        if (released[n][0]) rel_q[n].push_back(cyc);
        if (inj_valid[n] && inj_ready[n] && inj_flit[n].ftype != FT_HEAD &&
            inj_flit[n].data[15:0] == 16'd0) begin
          int k;
          k = key(n, 0, int'(inj_flit[n].data[27:16]));
          next_idx[k] = 0;
          rel_time[k] = (rel_q[n].size() > 0) ? rel_q[n].pop_front() : cyc;
          inj_cnt++;
        end
        if (ej_valid[n] && ej_ready[n]) begin
          flit_t fl; fl = ej_flit[n];
          if (fl.ftype == FT_HEAD) begin
            header_t hd; hd = header_t'(fl.data);
            check(!ej_in[n] && int'(hd.dst_x) == n % W && int'(hd.dst_y) == n / W, "fragment start");
            ej_src[n] = int'(hd.src_y) * W + int'(hd.src_x);
            ej_in[n] = 1;
          end else if (fl.ftype == FT_SPLIT) begin
            ej_in[n] = 0;
          end else begin
            int k, i, src;
            src = ej_src[n];
            k = key(src, int'(fl.data[31:28]), int'(fl.data[27:16]));
            i = int'(fl.data[15:0]);
            if (!next_idx.exists(k)) check(0, "unknown packet");
            else begin
              check(next_idx[k] == i, "payload order");
              next_idx[k] = i + 1;
              if (fl.ftype == FT_TAIL) begin
                int p, lat;
                p = int'(cfg[src][0].prio);
                lat = cyc - rel_time[k];
                lat_sum[p] += lat; lat_n[p]++;
                if (lat > lat_max[p]) lat_max[p] = lat;
                if (lat > nominal[src] + 20 * 256) late[p]++;
                check(i + 1 == int'(cfg[src][0].size), "payload count");
                next_idx.delete(k);
                ej_in[n] = 0;
                done_cnt++;
              end
            end
          end
        end
      end
    end
  end

  assign ej_ready = '1;

  int prio_of[N], dst_of[N], size_of[N];
  real levels[4] = '{0.6, 0.67, 0.83, 1.1};

  task automatic run(real v, bit with_slack);
    int quiet;
    string line;
    rst_n = 0;
    cfg = '0;
    for (int n = 0; n < N; n++) begin
      cfg[n][0].enable = 1;
      cfg[n][0].dst_x  = 4'(dst_of[n] % W);
      cfg[n][0].dst_y  = 4'(dst_of[n] / W);
      cfg[n][0].prio   = 6'(prio_of[n]);
      cfg[n][0].slack  = with_slack ? 7'd20 : 7'd127;
      cfg[n][0].size   = 8'(size_of[n]);
      cfg[n][0].period = 16'(int'(real'(nominal[n]) * 1.5 / v));
      ej_in[n] = 0; rel_q[n].delete();
    end
    next_idx.delete(); rel_time.delete();
    inj_cnt = 0; done_cnt = 0; n_split = 0;
    for (int p = 0; p <= 16; p++) begin lat_sum[p] = 0; lat_max[p] = 0; lat_n[p] = 0; late[p] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (CYCLES) @(posedge clk);
    #1;
    for (int n = 0; n < N; n++) cfg[n][0].enable = 0;
    quiet = 0;
    while (quiet < 600) begin
      @(posedge clk);
      if (ej_valid == '0 && inj_valid == '0) quiet++; else quiet = 0;
    end
    #1;
    check(inj_cnt > 0 && done_cnt == inj_cnt && next_idx.num() == 0,
          $sformatf("%0d injected, %0d delivered", inj_cnt, done_cnt));
    $display("load %0.2f, slack %s: %0d packets, %0d splits", v, with_slack ? "20 " : "off",
             done_cnt, n_split);
    line = "  prio avg/max/late:";
    for (int p = 1; p <= 16; p++)
      line = {line, $sformatf(" %0d:%0d/%0d/%0d", p,
              (lat_n[p] > 0) ? int'(lat_sum[p] / lat_n[p]) : 0, lat_max[p], late[p])};
    $display("%s", line);
  endtask

  initial begin
    int perm[16];
    for (int i = 0; i < 16; i++) perm[i] = i + 1;
    perm.shuffle();
    for (int n = 0; n < N; n++) begin
      int d;
      prio_of[n] = perm[n];
      do d = $urandom_range(0, N - 1); while (d == n);
      dst_of[n] = d;
      size_of[n] = $urandom_range(16, 64);
      hops[n] = ((n % W > d % W) ? n % W - d % W : d % W - n % W) +
                ((n / W > d / W) ? n / W - d / W : d / W - n / W);
      nominal[n] = 3 * (hops[n] + 1) + size_of[n] + 1;
    end
    foreach (levels[l]) begin
      run(levels[l], 0);
      run(levels[l], 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
