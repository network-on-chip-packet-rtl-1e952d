// tb_slack_tick_gen: checks the slack-interrupt period for every scale
// pointer value. For each pointer it resets the generator, then compares the
// tick output in every cycle against a reference: a tick exactly in the
// cycles where (cycle index + 1) is a multiple of 2^(ptr+1).
module tb_slack_tick_gen;
  logic       clk = 0, rst_n = 0;
  logic [2:0] scale_ptr;
  logic       slack_tick;
  int checks = 0, failures = 0;

  slack_tick_gen #(.CNT_W(8)) dut (.clk, .rst_n, .scale_ptr, .slack_tick);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 8; p++) begin
      int period, nticks;
      period = 1 << (p + 1);
      scale_ptr = 3'(p);
      rst_n = 0;
      @(posedge clk); @(posedge clk);
      #1 rst_n = 1;
      nticks = 0;
      for (int c = 0; c < 4 * period; c++) begin
        logic expect_tick;
        #1;
        expect_tick = ((c + 1) % period) == 0;
        checks++;
        if (slack_tick !== expect_tick) begin
          failures++;
          $display("ptr=%0d cycle=%0d tick=%0b expected %0b", p, c, slack_tick, expect_tick);
        end
        nticks += int'(slack_tick);
        @(posedge clk);
      end
      checks++;
      if (nticks != 4) begin
        failures++;
        $display("ptr=%0d: %0d ticks in 4 periods", p, nticks);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
