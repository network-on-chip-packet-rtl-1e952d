// slack_fifo: slack-aware input buffer of a router input port.
//
// A circular FIFO of DEPTH flits. Next to each slot it keeps a flag saying
// whether the slot holds a HEAD flit; the flag is set when the flit is
// written, i.e. the buffer recognises headers as they are injected. On every
// slack-interrupt (slack_tick) the slack field of every header held in the
// buffer is decremented by one, whatever its position in the queue, so the
// time a header spends behind other flits is accounted for. Decrement stops
// at 0; a header with slack 127 (timeliness disabled) is never changed. A
// header written in the same cycle as a tick is stored unchanged.
//
// Interface: push/din with full, pop/dout with empty, first-word
// fall-through (dout is the oldest flit whenever empty is low). Push while
// full and pop while empty are ignored. Both may happen in the same cycle.
module slack_fifo
  import dhara_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  slack_tick,
  input  logic  push,
  input  flit_t din,
  output logic  full,
  input  logic  pop,
  output flit_t dout,
  output logic  empty
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t          mem   [DEPTH];
  logic [DEPTH-1:0] is_hdr;
  logic [AW-1:0]  rd_ptr, wr_ptr;
  logic [AW:0]    count;

  logic do_push, do_pop;
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      is_hdr <= '0;
    end else begin
      if (slack_tick) begin
        for (int unsigned k = 0; k < DEPTH; k++) begin
          if (is_hdr[k]) begin
            header_t h;
            h = header_t'(mem[k].data);
            h.slack = slack_dec(h.slack);
            mem[k].data <= DATA_W'(h);
          end
        end
      end
      if (do_pop) begin
        rd_ptr         <= inc(rd_ptr);
        is_hdr[rd_ptr] <= 1'b0;
      end
      if (do_push) begin
        mem[wr_ptr]    <= din;
        is_hdr[wr_ptr] <= (din.ftype == FT_HEAD);
        wr_ptr         <= inc(wr_ptr);
      end
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

endmodule
