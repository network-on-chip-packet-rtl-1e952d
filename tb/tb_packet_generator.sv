// tb_packet_generator: a generator at (2,3) with three flows and a randomly
// stalling ready. Every packet leaving is parsed and checked: header fields
// against the flow's settings, payload count, sequence numbers and flit
// indices, TAIL on the last flit only. Release pulses are checked to come
// exactly every period, the number of packets sent per flow against the
// releases, and, with flows 0 and 1 released in the same cycle, that the one
// with the lower priority value is sent first.
module tb_packet_generator;
  import dhara_pkg::*;
  localparam int FLOWS = 3;
  logic clk = 0, rst_n = 0;
  flow_cfg_t [FLOWS-1:0] cfg;
  logic valid, ready;
  flit_t flit;
  logic [FLOWS-1:0] released;
  int checks = 0, failures = 0;

  packet_generator #(.X(2), .Y(3), .FLOWS(FLOWS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  int rel_cnt[FLOWS], sent[FLOWS], last_rel[FLOWS];
  int cyc = 0;
  bit in_pkt = 0; int cur_f = 0, n_pl = 0;
  int first_order[$];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int f = 0; f < FLOWS; f++) if (released[f]) begin
      if (rel_cnt[f] == 0) check(cyc == int'(cfg[f].period), $sformatf("flow %0d first release at %0d", f, cyc));
      else check(cyc - last_rel[f] == int'(cfg[f].period), $sformatf("flow %0d release gap %0d", f, cyc - last_rel[f]));
      last_rel[f] = cyc; rel_cnt[f]++;
    end
    if (valid && ready) begin
      if (!in_pkt) begin
        header_t h;
        h = header_t'(flit.data);
        check(flit.ftype == FT_HEAD, "packet starts with a HEAD");
        cur_f = -1;
        for (int f = 0; f < FLOWS; f++) if (cfg[f].prio == h.prio) cur_f = f;
        check(cur_f >= 0 && h.dst_x == cfg[cur_f].dst_x && h.dst_y == cfg[cur_f].dst_y &&
              h.slack == cfg[cur_f].slack && h.src_x == 4'd2 && h.src_y == 4'd3, "header fields");
        if (cur_f < 0) cur_f = 0;
        if (first_order.size() < 2) first_order.push_back(cur_f);
        in_pkt = 1; n_pl = 0;
      end else begin
        bit last;
        last = (n_pl + 1 == int'(cfg[cur_f].size));
        check(flit.ftype == (last ? FT_TAIL : FT_BODY), "payload flit type");
        check(flit.data == {4'(cur_f), 12'(sent[cur_f]), 16'(n_pl)},
              $sformatf("payload word %h", flit.data));
        n_pl++;
        if (last) begin in_pkt = 0; sent[cur_f]++; end
      end
    end
  end

  always @(negedge clk) ready <= ($urandom_range(0, 3) != 0);

  initial begin
    cfg = '0;
    cfg[0] = '{enable: 1, dst_x: 4'd0, dst_y: 4'd1, prio: 6'd7, slack: 7'd20, size: 8'd4,  period: 16'd60};
    cfg[1] = '{enable: 1, dst_x: 4'd3, dst_y: 4'd0, prio: 6'd2, slack: 7'd127, size: 8'd1, period: 16'd60};
    cfg[2] = '{enable: 1, dst_x: 4'd1, dst_y: 4'd2, prio: 6'd11, slack: 7'd5, size: 8'd9, period: 16'd61};
    for (int f = 0; f < FLOWS; f++) begin rel_cnt[f] = 0; sent[f] = 0; end
    ready = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (3000) @(posedge clk);
    #1;
    cfg[0].enable = 0; cfg[1].enable = 0; cfg[2].enable = 0;
    repeat (200) @(posedge clk);
    #1;
    for (int f = 0; f < FLOWS; f++)
      check(sent[f] == rel_cnt[f] && sent[f] > 10,
            $sformatf("flow %0d: %0d released, %0d sent", f, rel_cnt[f], sent[f]));
    check(first_order.size() == 2 && first_order[0] == 1 && first_order[1] == 0,
          "lower priority value sent first");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
