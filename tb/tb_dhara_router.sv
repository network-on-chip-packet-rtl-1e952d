// tb_dhara_router: directed tests of one router at (1,1), default
// parameters. Flits leaving the east output are collected and compared with
// the expected sequence.
//  1. Slack-aware arbitration: the east output is held by an urgent packet C
//     while packets A (priority 2, slack 20) and B (priority 10, slack 5)
//     queue for it. When C finishes, B (P_i 15) must go before A (P_i 22).
//  2. Selective packet splitting: a low-priority packet L owns the east
//     output and has sent its header and two payload flits when an urgent
//     packet H arrives: L must be closed by a SPLIT flit, H must pass whole,
//     then L resumes behind a new header.
//  3. Priority forwarding: with the east neighbour refusing flits, the east
//     link must carry the priority of the blocked packet; a priority
//     forwarded into the west input must boost the packet waiting there.
//  4. Latency: a lone header must appear at the output 3 cycles after it is
//     written into an idle router.
//  5. A second router with scale pointer 0 (a slack-interrupt every 2
//     cycles) and divider index 2: A and B from test 1 wait 60 cycles behind
//     C, so both slacks run out; A (P_i 2) must now go before B (P_i 10) and
//     leave with slack 0. A third packet E with slack 127 waits as long and
//     must leave with slack 127.
module tb_dhara_router;
  import dhara_pkg::*;
  logic clk = 0, rst_n = 0;
  link_t [NPORTS-1:0] in_link;
  logic  [NPORTS-1:0] in_ready, out_ready, ev_split, ev_boost;
  link_t [NPORTS-1:0] out_link;
  int checks = 0, failures = 0;
  flit_t east[$];
  int n_split = 0, n_boost = 0;

  dhara_router #(.X(1), .Y(1)) dut (.*);

  link_t [NPORTS-1:0] in2, out2;
  logic  [NPORTS-1:0] in2_ready, out2_ready, ev2_split, ev2_boost;
  flit_t east2[$];
  dhara_router #(.X(1), .Y(1), .SCALE_PTR(0), .DIV_IDX(2)) dut2 (
    .clk, .rst_n, .in_link (in2), .in_ready (in2_ready), .out_link (out2),
    .out_ready (out2_ready), .ev_split (ev2_split), .ev_boost (ev2_boost));
  always @(posedge clk)
    if (out2[P_EAST].valid && out2_ready[P_EAST]) east2.push_back(out2[P_EAST].flit);

  task automatic put2(int p, flit_t f);
    in2[p].valid = 1; in2[p].flit = f;
    @(posedge clk);
    while (!in2_ready[p]) @(posedge clk);
    #1 in2[p].valid = 0;
  endtask

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (out_link[P_EAST].valid && out_ready[P_EAST]) east.push_back(out_link[P_EAST].flit);
    n_split += $countones(ev_split);
    n_boost += $countones(ev_boost);
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic flit_t head(int dx, int dy, int prio, int slack);
    header_t h;
    h = '0; h.dst_x = 4'(dx); h.dst_y = 4'(dy); h.prio = 6'(prio); h.slack = 7'(slack);
    return '{ftype: FT_HEAD, data: DATA_W'(h)};
  endfunction

  function automatic flit_t pl(int tag, bit last);
    return '{ftype: last ? FT_TAIL : FT_BODY, data: 32'(tag)};
  endfunction

  task automatic put(int p, flit_t f);
    in_link[p].valid = 1; in_link[p].flit = f;
    @(posedge clk);
    while (!in_ready[p]) @(posedge clk);
    #1 in_link[p].valid = 0;
  endtask

  function automatic int hprio(flit_t f);
    header_t h; h = header_t'(f.data); return int'(h.prio);
  endfunction

  initial begin
    in_link = '0;
    out_ready = '1;
    in2 = '0;
    out2_ready = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // ---- 4: latency of a lone header, then its payload
    begin
      int t0, t1;
      in_link[P_WEST].valid = 1; in_link[P_WEST].flit = head(3, 1, 4, 10);
      @(posedge clk); t0 = $time; #1 in_link[P_WEST].valid = 0;
      while (!(out_link[P_EAST].valid)) begin @(posedge clk); #1; end
      t1 = $time;
      check((t1 - t0) / 10 == 2, $sformatf("header crossed in %0d cycles after write", (t1 - t0) / 10 + 1));
      put(P_WEST, pl(1, 1));
      repeat (3) @(posedge clk); #1;
      check(east.size() == 2 && east[1] == pl(1, 1), "lone packet delivered");
      east.delete();
    end

    // ---- 1: slack-aware arbitration
    out_ready[P_EAST] = 0;
    put(P_LOCAL, head(2, 1, 0, 0));
    put(P_LOCAL, pl(100, 0));
    put(P_LOCAL, pl(101, 1));
    repeat (4) @(posedge clk); #1;
    put(P_WEST,  head(3, 1, 2, 20));
    put(P_WEST,  pl(200, 1));
    put(P_SOUTH, head(3, 2, 10, 5));
    put(P_SOUTH, pl(300, 1));
    repeat (4) @(posedge clk); #1;
    check(out_link[P_EAST].pf_valid && out_link[P_EAST].pf_prio == 8'd0,
          $sformatf("forwarded priority %0d while stalled, expected 0", out_link[P_EAST].pf_prio));
    out_ready[P_EAST] = 1;
    repeat (20) @(posedge clk); #1;
    check(east.size() == 7, $sformatf("%0d flits, expected 7", east.size()));
    if (east.size() == 7) begin
      check(hprio(east[0]) == 0, "C first");
      check(hprio(east[3]) == 10 && east[4] == pl(300, 1), "B (P_i 15) before A (P_i 22)");
      check(hprio(east[5]) == 2 && east[6] == pl(200, 1), "A last");
    end
    east.delete();

    // ---- 2: split
    put(P_LOCAL, head(3, 1, 30, 127));
    put(P_LOCAL, pl(400, 0));
    put(P_LOCAL, pl(401, 0));
    repeat (6) @(posedge clk); #1;
    check(east.size() == 3, "L header and two payload flits out");
    put(P_NORTH, head(2, 0, 1, 127));
    put(P_NORTH, pl(500, 0));
    put(P_NORTH, pl(501, 1));
    repeat (8) @(posedge clk); #1;
    put(P_LOCAL, pl(402, 0));
    put(P_LOCAL, pl(403, 1));
    repeat (10) @(posedge clk); #1;
    check(east.size() == 10, $sformatf("%0d flits after split, expected 10", east.size()));
    if (east.size() == 10) begin
      check(east[3].ftype == FT_SPLIT, "SPLIT flit closes L");
      check(east[4].ftype == FT_HEAD && hprio(east[4]) == 1 && east[6] == pl(501, 1), "H passes whole");
      check(east[7].ftype == FT_HEAD && hprio(east[7]) == 30, "L resumes behind a new header");
      check(east[8] == pl(402, 0) && east[9] == pl(403, 1), "rest of L");
    end
    check(n_split == 1, $sformatf("%0d splits, expected 1", n_split));
    east.delete();

    // ---- 3: forwarded priority boosts the waiting packet at the west input
    out_ready[P_EAST] = 0;
    put(P_WEST, head(3, 1, 40, 127));
    put(P_WEST, pl(600, 1));
    repeat (4) @(posedge clk); #1;
    in_link[P_WEST].pf_valid = 1; in_link[P_WEST].pf_prio = 8'd2;
    repeat (3) @(posedge clk); #1;
    check(n_boost > 0, "forwarded priority boosted the west input");
    check(out_link[P_EAST].pf_valid && out_link[P_EAST].pf_prio == 8'd2,
          "boosted priority passed on downstream");
    in_link[P_WEST].pf_valid = 0;
    out_ready[P_EAST] = 1;
    repeat (6) @(posedge clk); #1;
    check(east.size() == 2, "boosted packet delivered");

    // ---- 5: fast slack-interrupts and divider index 2
    out2_ready[P_EAST] = 0;
    put2(P_LOCAL, head(2, 1, 0, 0));
    put2(P_LOCAL, pl(700, 1));
    put2(P_WEST,  head(3, 1, 2, 20));
    put2(P_WEST,  pl(800, 1));
    put2(P_SOUTH, head(3, 2, 10, 5));
    put2(P_SOUTH, pl(900, 1));
    put2(P_NORTH, head(2, 0, 20, 127));
    put2(P_NORTH, pl(950, 1));
    repeat (60) @(posedge clk); #1;
    out2_ready[P_EAST] = 1;
    repeat (20) @(posedge clk); #1;
    check(east2.size() == 8, $sformatf("%0d flits from the second router, expected 8", east2.size()));
    if (east2.size() == 8) begin
      header_t ha;
      ha = header_t'(east2[2].data);
      check(ha.prio == 6'd2 && ha.slack == 7'd0, $sformatf("A second, slack %0d (expected prio 2 slack 0, got prio %0d)", ha.slack, ha.prio));
      check(hprio(east2[4]) == 10, "B third");
      ha = header_t'(east2[6].data);
      check(ha.prio == 6'd20 && ha.slack == 7'd127, "slack 127 left untouched");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
