// tb_slack_fifo: random push/pop/tick traffic against a queue model. The
// model keeps its own copy of every flit and, on each tick, lowers the slack
// of every header it holds (stopping at 0, leaving 127 alone). Each cycle
// the front flit, full and empty are compared with the model. A directed
// phase then parks a header behind three body flits and checks that its
// slack went down by the number of ticks it waited.
module tb_slack_fifo;
  import dhara_pkg::*;
  localparam int DEPTH = 4;
  logic  clk = 0, rst_n = 0;
  logic  slack_tick = 0, push = 0, pop = 0;
  flit_t din, dout;
  logic  full, empty;
  int checks = 0, failures = 0;
  flit_t model[$];
  header_t hq;

  slack_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .slack_tick, .push, .din,
                                   .full, .pop, .dout, .empty);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t rand_flit();
    flit_t f;
    header_t h;
    f.ftype = flit_type_e'($urandom_range(0, 3));
    h = header_t'($urandom);
    case ($urandom_range(0, 3))
      0: h.slack = 7'd127;
      1: h.slack = 7'd0;
      2: h.slack = 7'd1;
      default: ;
    endcase
    f.data = DATA_W'(h);
    return f;
  endfunction

  task automatic compare();
    checks++;
    if (empty !== (model.size() == 0) || full !== (model.size() == DEPTH)) begin
      failures++;
      $display("flags: empty=%0b full=%0b model=%0d", empty, full, model.size());
    end
    if (model.size() > 0) begin
      checks++;
      if (dout !== model[0]) begin
        failures++;
        $display("front %h expected %h", dout, model[0]);
      end
    end
  endtask

  // apply the same cycle's operations to the model
  task automatic model_step(logic t, logic pu, logic po, flit_t d);
    logic do_pop, do_push;
    do_pop  = po && model.size() > 0;
    do_push = pu && model.size() < DEPTH;
    if (t)
      foreach (model[k])
        if (model[k].ftype == FT_HEAD) begin
          header_t h;
          h = header_t'(model[k].data);
          h.slack = slack_dec(h.slack);
          model[k].data = DATA_W'(h);
        end
    if (do_pop) void'(model.pop_front());
    if (do_push) model.push_back(d);
  endtask

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      #1;
      compare();
      push = $urandom_range(0, 1) == 1;
      pop  = $urandom_range(0, 2) == 0;
      slack_tick = $urandom_range(0, 3) == 0;
      din  = rand_flit();
      @(posedge clk);
      model_step(slack_tick, push, pop, din);
    end
    // drain
    #1 push = 0; slack_tick = 0; pop = 1;
    repeat (DEPTH + 1) @(posedge clk);
    #1 pop = 0;
    model.delete();
    // directed: header behind three body flits, 5 ticks while queued
    for (int k = 0; k < 4; k++) begin
      header_t h;
      h = '0; h.slack = 7'd20;
      din = (k < 3) ? '{ftype: FT_BODY, data: 32'(k)} : '{ftype: FT_HEAD, data: DATA_W'(h)};
      push = 1;
      @(posedge clk);
      #1;
    end
    push = 0;
    for (int k = 0; k < 5; k++) begin
      slack_tick = 1; @(posedge clk); #1 slack_tick = 0; @(posedge clk); #1;
    end
    pop = 1; repeat (3) @(posedge clk); #1 pop = 0;
    #1;
    checks++;
    hq = header_t'(dout.data);
    if (dout.ftype != FT_HEAD || hq.slack != 7'd15) begin
      failures++;
      $display("queued header: type %0d slack %0d, expected HEAD slack 15",
               dout.ftype, hq.slack);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
