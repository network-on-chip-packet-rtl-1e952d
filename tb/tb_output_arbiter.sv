// tb_output_arbiter: random requests, priorities, releases and stalls
// against a reference model of one output. The model grants a free output to
// the lowest priority value (ties: first input at or after the round-robin
// pointer), asks the owner to split whenever a requester has a strictly
// lower value, and registers the lowest value among blocked inputs onto the
// forwarding channel. Grant, owner, split and the forwarding channel are
// compared every cycle. A directed case checks the round-robin tie-break.
module tb_output_arbiter;
  import dhara_pkg::*;
  localparam int NIN = 5;
  logic clk = 0, rst_n = 0;
  logic [NIN-1:0] req = '0, release_i = '0, stalled_i = '0;
  logic [NIN-1:0][PI_W-1:0] prio = '0;
  logic [NIN-1:0] grant;
  logic owner_valid, split, pf_valid;
  logic [2:0] owner_idx;
  logic [PI_W-1:0] pf_prio;
  int checks = 0, failures = 0;
  int splits = 0, grants = 0;

  output_arbiter #(.NIN(NIN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  bit m_owner_v; int m_owner; int m_rr;
  bit m_pf_v; int m_pf;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    m_owner_v = 0; m_owner = 0; m_rr = 0; m_pf_v = 0; m_pf = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      int win, wp; bit wv; bit exp_split; bit pv; int pp;
      // stimulus for this cycle
      for (int i = 0; i < NIN; i++) begin
        req[i]  = !(m_owner_v && m_owner == i) && ($urandom_range(0, 2) == 0);
        prio[i] = PI_W'($urandom_range(0, (c < 10000) ? 3 : 60));
        stalled_i[i] = $urandom_range(0, 1);
      end
      release_i = '0;
      if (m_owner_v && $urandom_range(0, 3) == 0) release_i[m_owner] = 1'b1;
      #1;
      // model
      wv = 0; win = 0; wp = 0;
      for (int k = 0; k < NIN; k++) begin
        int i; i = (m_rr + k) % NIN;
        if (req[i] && (!wv || prio[i] < wp)) begin wv = 1; win = i; wp = prio[i]; end
      end
      exp_split = m_owner_v && wv && wp < prio[m_owner];
      check(grant == ((!m_owner_v && wv) ? NIN'(1 << win) : '0),
            $sformatf("grant %b, model winner %0d valid %0d", grant, win, wv && !m_owner_v));
      check(owner_valid == m_owner_v && (!m_owner_v || owner_idx == 3'(m_owner)), "owner");
      check(split == exp_split, $sformatf("split %0b expected %0b", split, exp_split));
      check(pf_valid == m_pf_v && (!m_pf_v || pf_prio == PI_W'(m_pf)), "forwarded priority");
      splits += int'(split); grants += int'(grant != 0);
      pv = 0; pp = 0;
      for (int i = 0; i < NIN; i++)
        if (req[i] || (m_owner_v && m_owner == i && stalled_i[i])) begin
          if (!pv || prio[i] < pp) pp = prio[i];
          pv = 1;
        end
      @(posedge clk);
      m_pf_v = pv; m_pf = pp;
      if (m_owner_v) begin
        if (release_i[m_owner]) m_owner_v = 0;
      end else if (wv) begin
        m_owner_v = 1; m_owner = win; m_rr = (win + 1) % NIN;
      end
      #1;
    end
    check(splits > 100 && grants > 100, $sformatf("%0d splits %0d grants", splits, grants));
    // directed round-robin: all inputs equal priority, release at once
    req = '0; release_i = '0;
    if (m_owner_v) begin
      release_i[m_owner] = 1; @(posedge clk); #1 release_i = '0;
    end
    begin
      int order[$];
      for (int r = 0; r < 2 * NIN; r++) begin
        for (int i = 0; i < NIN; i++) begin req[i] = 1; prio[i] = 8'd7; end
        #1;
        for (int i = 0; i < NIN; i++) if (grant[i]) order.push_back(i);
        @(posedge clk); #1;
        req = '0; release_i = '0; release_i[owner_idx] = 1;
        @(posedge clk); #1 release_i = '0;
      end
      check(order.size() == 2 * NIN, "one grant per round");
      for (int k = 1; k < order.size(); k++)
        check(order[k] == (order[k-1] + 1) % NIN, $sformatf("round-robin order %p", order));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
