// tb_input_port: directed tests of one input port at router (1,1).
//  1. A packet to (3,1) waits without a grant while slack ticks arrive: the
//     request must name the east output, its priority must fall from
//     P_p + S by one per tick, and after the grant the port must send a
//     HEAD carrying the decremented slack, then the payload and a TAIL, and
//     release the output on the TAIL.
//  2. A packet is split after two payload flits: a SPLIT flit must close
//     it, the port must request again, and after a new grant send a new
//     HEAD followed by the rest of the payload.
//  3. A forwarded priority lower than the port's own must replace it.
//  4. With the output refusing flits the port must report itself stalled.
//  5. A SPLIT flit arriving from upstream must end the packet here: it is
//     passed on and the output is released.
module tb_input_port;
  import dhara_pkg::*;
  logic clk = 0, rst_n = 0;
  logic slack_tick = 0;
  logic [1:0] div_idx = 0;
  logic in_valid = 0;
  flit_t in_flit;
  logic in_ready;
  logic pf_in_valid = 0;
  logic [PI_W-1:0] pf_in_prio = 0;
  logic req;
  port_e req_port;
  logic [PI_W-1:0] eff_prio;
  logic grant = 0, split = 0;
  logic release_o, split_done, out_valid, out_ready = 1, stalled, boosted;
  flit_t out_flit;
  int checks = 0, failures = 0;
  flit_t got[$];
  int releases = 0;

  input_port #(.DEPTH(8), .X(1), .Y(1)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (out_valid && out_ready) got.push_back(out_flit);
    if (release_o) releases++;
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

  task automatic send(flit_t f);
    in_flit = f; in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  function automatic flit_t mk_head(int dx, int dy, int prio, int slack);
    header_t h;
    h = '0; h.dst_x = 4'(dx); h.dst_y = 4'(dy); h.prio = 6'(prio); h.slack = 7'(slack);
    h.src_x = 4'd1; h.src_y = 4'd1;
    return '{ftype: FT_HEAD, data: DATA_W'(h)};
  endfunction

  task automatic do_grant();
    wait (req);
    #1 grant = 1; @(posedge clk); #1 grant = 0;
  endtask

  header_t h;

  initial begin
    in_flit = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // ---- 1: wait with slack decrements
    send(mk_head(3, 1, 5, 20));
    send('{ftype: FT_BODY, data: 32'hA0});
    send('{ftype: FT_TAIL, data: 32'hA1});
    repeat (2) @(posedge clk); #1;
    check(req && req_port == P_EAST, "request for east output");
    check(eff_prio == 8'd25, $sformatf("initial P_i %0d, expected 25", eff_prio));
    for (int k = 0; k < 6; k++) begin
      slack_tick = 1; @(posedge clk); #1 slack_tick = 0; @(posedge clk); #1;
    end
    check(eff_prio == 8'd19, $sformatf("P_i after 6 ticks %0d, expected 19", eff_prio));
    do_grant();
    repeat (6) @(posedge clk); #1;
    check(got.size() == 3, $sformatf("%0d flits out, expected 3", got.size()));
    if (got.size() == 3) begin
      h = header_t'(got[0].data);
      check(got[0].ftype == FT_HEAD && h.slack == 7'd14 && h.prio == 6'd5 && h.dst_x == 4'd3,
            $sformatf("forwarded header slack %0d prio %0d", h.slack, h.prio));
      check(got[1] == '{ftype: FT_BODY, data: 32'hA0}, "body flit");
      check(got[2] == '{ftype: FT_TAIL, data: 32'hA1}, "tail flit");
    end
    check(releases == 1 && !req, "released once after tail");
    got.delete(); releases = 0;

    // ---- 2: split
    send(mk_head(1, 3, 9, 127));
    for (int k = 0; k < 4; k++)
      send('{ftype: (k == 3) ? FT_TAIL : FT_BODY, data: 32'(16 + k)});
    do_grant();
    check(eff_prio == 8'd9, "slack 127 leaves P_i = P_p");
    wait (got.size() == 3);          // HEAD + two payload flits
    #1 split = 1;
    @(posedge clk); #1 split = 0;
    check(got.size() == 4 && got[3].ftype == FT_SPLIT, "SPLIT flit closes the packet");
    check(releases == 1, "output released by the split");
    @(posedge clk); #1;
    check(req && req_port == P_NORTH, "split packet requests again");
    do_grant();
    repeat (6) @(posedge clk); #1;
    check(got.size() == 7, $sformatf("%0d flits after resume, expected 7", got.size()));
    if (got.size() == 7) begin
      h = header_t'(got[4].data);
      check(got[4].ftype == FT_HEAD && h.dst_y == 4'd3 && h.prio == 6'd9 && h.slack == 7'd127,
            "regenerated header");
      check(got[5] == '{ftype: FT_BODY, data: 32'd18} && got[6] == '{ftype: FT_TAIL, data: 32'd19},
            "remaining payload");
    end
    got.delete(); releases = 0;

    // ---- 3 and 4: priority forwarding and stall
    send(mk_head(0, 1, 30, 10));
    send('{ftype: FT_TAIL, data: 32'hB0});
    repeat (2) @(posedge clk); #1;
    check(eff_prio == 8'd40 && !boosted, "own P_i 40");
    pf_in_valid = 1; pf_in_prio = 8'd3; #1;
    check(eff_prio == 8'd3 && boosted, "forwarded priority takes over");
    pf_in_prio = 8'd50; #1;
    check(eff_prio == 8'd40 && !boosted, "higher forwarded value ignored");
    pf_in_valid = 0;
    out_ready = 0;
    do_grant();
    @(posedge clk); #1;
    check(stalled && got.size() == 0, "stalled while output refuses");
    out_ready = 1;
    repeat (4) @(posedge clk); #1;
    check(got.size() == 2 && releases == 1, "packet completes after stall");
    got.delete(); releases = 0;

    // ---- 5: fragment closed upstream by a SPLIT flit
    send(mk_head(1, 0, 12, 127));
    send('{ftype: FT_BODY, data: 32'hC0});
    send('{ftype: FT_SPLIT, data: 32'h0});
    do_grant();
    repeat (4) @(posedge clk); #1;
    check(got.size() == 3 && got[2].ftype == FT_SPLIT && releases == 1 && !req,
          "upstream SPLIT ends the packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
