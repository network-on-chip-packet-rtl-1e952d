// input_port: buffered router input port with DHARA slack tracking and the
// input side of selective packet splitting.
//
// Flits from the link enter a slack_fifo. When a HEAD reaches the front of
// the buffer it is taken out and its fields are loaded into the port's
// registers: destination, source, packet priority, the 'slack' register and
// the 'port request' register (XY route). The port then requests the output
// (S_WAIT). While it waits, the slack register is decremented on every
// slack-interrupt. The request carries the effective priority: the
// instantaneous priority P_i = P_p + (S >> D), lowered to the priority
// forwarded by the upstream router on this link when that one is smaller
// (priority forwarding boosts the packet that blocks the link).
//
// On a grant the port is connected to the output (S_ACTIVE). It first sends
// a HEAD rebuilt from its registers, carrying the current residual slack, and
// then the payload flits from the buffer until the TAIL (or a SPLIT flit
// that closed the packet upstream), after which it releases the output. If the output arbiter asks it to split (a more urgent
// packet wants the same output) and the next flit is not the TAIL, the port
// sends an extra SPLIT flit that closes the packet downstream, releases the
// output and requests it again; the remainder later goes out behind a new
// HEAD. If the split request comes before the HEAD has left, the port just
// gives the output back.
//
// Timing: a HEAD at the buffer front is loaded in one cycle, the request is
// raised the next cycle, and one flit per cycle moves when out_ready is high.
// release_o and split_done are one-cycle pulses; boosted is high while the
// forwarded priority is the one in force. Regenerating the HEAD from
// the registers and the SPLIT flit type are this design's choices; the
// registers, the decrement while blocked and Equation 1 follow the scheme.
module input_port
  import dhara_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned X     = 0,
  parameter int unsigned Y     = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            slack_tick,
  input  logic [1:0]      div_idx,
  // link from upstream
  input  logic            in_valid,
  input  flit_t           in_flit,
  output logic            in_ready,
  input  logic            pf_in_valid,
  input  logic [PI_W-1:0] pf_in_prio,
  // arbitration
  output logic            req,
  output port_e           req_port,
  output logic [PI_W-1:0] eff_prio,
  input  logic            grant,
  input  logic            split,
  output logic            release_o,
  output logic            split_done,
  // towards the crossbar
  output logic            out_valid,
  output flit_t           out_flit,
  input  logic            out_ready,
  output logic            stalled,
  output logic            boosted
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_ACTIVE} state_e;
  state_e state;

  flit_t fifo_dout;
  logic  fifo_empty, fifo_full, fifo_pop;

  slack_fifo #(.DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .slack_tick,
    .push (in_valid), .din (in_flit), .full (fifo_full),
    .pop  (fifo_pop), .dout (fifo_dout), .empty (fifo_empty)
  );
  assign in_ready = !fifo_full;

  // Registers of the packet being served
  header_t            hdr_reg;
  logic [SLACK_W-1:0] slack_reg;
  port_e              port_reg;
  logic               need_hdr;

  header_t head_hdr;
  port_e   head_route;
  assign head_hdr = header_t'(fifo_dout.data);

  xy_route u_route (
    .cur_x (COORD_W'(X)), .cur_y (COORD_W'(Y)),
    .dst_x (head_hdr.dst_x), .dst_y (head_hdr.dst_y),
    .out_port (head_route)
  );

  logic [PI_W-1:0] p_inst;
  inst_prio u_prio (
    .prio (hdr_reg.prio), .slack (slack_reg), .div_idx, .prio_i (p_inst)
  );

  assign eff_prio    = (pf_in_valid && pf_in_prio < p_inst) ? pf_in_prio : p_inst;
  assign boosted     = (state != S_IDLE) && pf_in_valid && pf_in_prio < p_inst;
  assign req         = (state == S_WAIT);
  assign req_port    = port_reg;

  // Output flit selection
  header_t regen;
  logic    front_is_tail, do_split, split_now, xfer;
  always_comb begin
    regen       = hdr_reg;
    regen.slack = slack_reg;
    // A TAIL or a SPLIT received from upstream both end the packet here.
    front_is_tail = !fifo_empty && (fifo_dout.ftype inside {FT_TAIL, FT_SPLIT});
    do_split    = (state == S_ACTIVE) && split && !front_is_tail;
    split_now   = do_split && need_hdr;        // header not yet out: just yield
    out_valid   = 1'b0;
    out_flit    = fifo_dout;
    if (state == S_ACTIVE && !split_now) begin
      if (do_split) begin
        out_valid = 1'b1;
        out_flit  = '{ftype: FT_SPLIT, data: '0};
      end else if (need_hdr) begin
        out_valid = 1'b1;
        out_flit  = '{ftype: FT_HEAD, data: DATA_W'(regen)};
      end else begin
        out_valid = !fifo_empty;
      end
    end
    xfer     = out_valid && out_ready;
    stalled  = out_valid && !out_ready;
    fifo_pop = (state == S_IDLE && !fifo_empty) ||
               (state == S_ACTIVE && xfer && !need_hdr && !do_split);
    release_o  = split_now || (xfer && (do_split || (!need_hdr && front_is_tail)));
    split_done = split_now || (xfer && do_split);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      hdr_reg   <= '0;
      slack_reg <= '0;
      port_reg  <= P_LOCAL;
      need_hdr  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          // A non-HEAD flit at the front of an idle port is a protocol
          // error; it is popped and dropped.
          if (!fifo_empty && fifo_dout.ftype == FT_HEAD) begin
            hdr_reg   <= head_hdr;
            slack_reg <= slack_tick ? slack_dec(head_hdr.slack) : head_hdr.slack;
            port_reg  <= head_route;
            need_hdr  <= 1'b1;
            state     <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (slack_tick) slack_reg <= slack_dec(slack_reg);
          if (grant) state <= S_ACTIVE;
        end
        S_ACTIVE: begin
          if (split_done) begin
            need_hdr <= 1'b1;
            state    <= S_WAIT;
          end else if (xfer) begin
            if (need_hdr) need_hdr <= 1'b0;
            else if (front_is_tail) state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A grant only ever reaches a port that is asking for one.
  a_grant_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    grant |-> state == S_WAIT);

endmodule
