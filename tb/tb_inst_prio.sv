// tb_inst_prio: exhaustive check of P_i = P_p + (S >> D) over all packet
// priorities, slacks and divider indices 0..2, with slack 127 meaning the
// slack term is left out.
module tb_inst_prio;
  import dhara_pkg::*;
  logic [PRIO_W-1:0]  prio;
  logic [SLACK_W-1:0] slack;
  logic [1:0]         div_idx;
  logic [PI_W-1:0]    prio_i;
  int checks = 0, failures = 0;

  inst_prio dut (.prio, .slack, .div_idx, .prio_i);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 3; d++)
      for (int p = 0; p < (1 << PRIO_W); p++)
        for (int s = 0; s < (1 << SLACK_W); s++) begin
          int expv, div;
          div = (d == 0) ? 1 : (d == 1) ? 2 : 4;
          expv = (s == 127) ? p : p + s / div;
          prio = PRIO_W'(p); slack = SLACK_W'(s); div_idx = 2'(d);
          #1;
          checks++;
          if (int'(prio_i) != expv) begin
            failures++;
            if (failures < 10) $display("p=%0d s=%0d d=%0d got %0d exp %0d", p, s, d, prio_i, expv);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
