// dhara_noc: a MESH_W x MESH_H mesh of slack-aware routers, each with a
// packet generator on its local input port.
//
// Node n = y*MESH_W + x sits at column x, row y. Its east link goes to node
// (x+1, y), its north link to (x, y+1). Every link carries flits one way,
// ready the other way, and the priority-forwarding channel alongside the
// flits. Links leaving the mesh edge are tied off (nothing enters, ready
// low); XY routing never uses them for in-mesh destinations.
//
// The local output of every router is brought out (ej_*), so the receiving
// side, which only has to absorb flits, is outside this module. The flows of
// each generator are configured through cfg[n][f]. The injection of each
// generator (inj_*) and per-router event flags are brought out for
// observation: ev_split[n][p] pulses when input port p of router n splits a
// packet, ev_boost[n][p] is high while a forwarded priority raises that
// port's packet, released[n][f] pulses when a flow releases a packet.
//
// Defaults: 4 x 4 mesh, scale pointer 7, divider index 0 (the set-up of the
// evaluation); 8-flit buffers and four flows per node are this design's
// choices.
module dhara_noc
  import dhara_pkg::*;
#(
  parameter int unsigned MESH_W    = 4,
  parameter int unsigned MESH_H    = 4,
  parameter int unsigned DEPTH     = 8,
  parameter int unsigned SCALE_PTR = 7,
  parameter int unsigned DIV_IDX   = 0,
  parameter int unsigned FLOWS     = 4,
  localparam int unsigned N        = MESH_W * MESH_H
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  flow_cfg_t [N-1:0][FLOWS-1:0]     cfg,
  output logic      [N-1:0]                ej_valid,
  output flit_t     [N-1:0]                ej_flit,
  input  logic      [N-1:0]                ej_ready,
  output logic      [N-1:0]                inj_valid,
  output flit_t     [N-1:0]                inj_flit,
  output logic      [N-1:0]                inj_ready,
  output logic      [N-1:0][NPORTS-1:0]    ev_split,
  output logic      [N-1:0][NPORTS-1:0]    ev_boost,
  output logic      [N-1:0][FLOWS-1:0]     released
);

  link_t [N-1:0][NPORTS-1:0] r_in, r_out;
  logic  [N-1:0][NPORTS-1:0] r_in_ready, r_out_ready;

  for (genvar y = 0; y < MESH_H; y++) begin : g_y
    for (genvar x = 0; x < MESH_W; x++) begin : g_x
      localparam int unsigned n = y * MESH_W + x;

      packet_generator #(.X(x), .Y(y), .FLOWS(FLOWS)) u_gen (
        .clk, .rst_n,
        .cfg      (cfg[n]),
        .valid    (inj_valid[n]),
        .flit     (inj_flit[n]),
        .ready    (r_in_ready[n][P_LOCAL]),
        .released (released[n])
      );
      assign inj_ready[n] = r_in_ready[n][P_LOCAL];

      always_comb begin
        r_in[n][P_LOCAL]          = '0;
        r_in[n][P_LOCAL].valid    = inj_valid[n];
        r_in[n][P_LOCAL].flit     = inj_flit[n];
        r_out_ready[n][P_LOCAL]   = ej_ready[n];
        ej_valid[n]               = r_out[n][P_LOCAL].valid;
        ej_flit[n]                = r_out[n][P_LOCAL].flit;
      end

      // East neighbour
      if (x + 1 < MESH_W) begin : g_e
        assign r_in[n][P_EAST]        = r_out[n + 1][P_WEST];
        assign r_out_ready[n][P_EAST] = r_in_ready[n + 1][P_WEST];
      end else begin : g_e_edge
        assign r_in[n][P_EAST]        = '0;
        assign r_out_ready[n][P_EAST] = 1'b0;
      end
      // West neighbour
      if (x > 0) begin : g_w
        assign r_in[n][P_WEST]        = r_out[n - 1][P_EAST];
        assign r_out_ready[n][P_WEST] = r_in_ready[n - 1][P_EAST];
      end else begin : g_w_edge
        assign r_in[n][P_WEST]        = '0;
        assign r_out_ready[n][P_WEST] = 1'b0;
      end
      // North neighbour
      if (y + 1 < MESH_H) begin : g_n
        assign r_in[n][P_NORTH]        = r_out[n + MESH_W][P_SOUTH];
        assign r_out_ready[n][P_NORTH] = r_in_ready[n + MESH_W][P_SOUTH];
      end else begin : g_n_edge
        assign r_in[n][P_NORTH]        = '0;
        assign r_out_ready[n][P_NORTH] = 1'b0;
      end
      // South neighbour
      if (y > 0) begin : g_s
        assign r_in[n][P_SOUTH]        = r_out[n - MESH_W][P_NORTH];
        assign r_out_ready[n][P_SOUTH] = r_in_ready[n - MESH_W][P_NORTH];
      end else begin : g_s_edge
        assign r_in[n][P_SOUTH]        = '0;
        assign r_out_ready[n][P_SOUTH] = 1'b0;
      end

      dhara_router #(
        .X(x), .Y(y), .DEPTH(DEPTH), .SCALE_PTR(SCALE_PTR), .DIV_IDX(DIV_IDX)
      ) u_router (
        .clk, .rst_n,
        .in_link   (r_in[n]),
        .in_ready  (r_in_ready[n]),
        .out_link  (r_out[n]),
        .out_ready (r_out_ready[n]),
        .ev_split  (ev_split[n]),
        .ev_boost  (ev_boost[n])
      );
    end
  end

endmodule
