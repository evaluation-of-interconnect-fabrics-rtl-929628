// mpsoc_top: hierarchical MPSoC, a 2D mesh of switch boxes with one CPU
// cluster on each switch box.
//
// MESH_X x MESH_Y switch boxes (noc_switch) are linked to their four
// neighbours; the local port of each switch box goes to the NCI of its
// cluster. Every cluster holds N_CPU CPUs on a cluster interconnect. The
// default is the 2x2x4 configuration: 4 clusters of 4 CPUs, 16 CPUs in
// all, with an AXI-style crossbar and one master and one slave register
// stage in each cluster; BUS_STD = BUS_WB gives Wishbone clusters instead.
// Switch box (x,y) and its cluster have index c = y*MESH_X + x; CPU k of
// cluster c has global index c*N_CPU + k.
// Mesh ports with no neighbour are tied off (never valid, always ready).
//
// The CPU cores are outside this RTL: for each CPU the top brings out the
// request port of its bus master (cpu_req/cpu_rsp), the port to its own
// data memory (lmem_req/lmem_rsp) and the full flag of its write FIFO.
// Everything runs in one clock domain.
module mpsoc_top
  import mpsoc_pkg::*;
#(
  parameter int unsigned MESH_X   = 2,
  parameter int unsigned MESH_Y   = 2,
  parameter int unsigned N_CPU    = 4,
  parameter bus_std_e    BUS_STD  = BUS_AXI,
  parameter topology_e   TOPOLOGY = TOPO_CROSSBAR,
  parameter int unsigned MST_REGS = 1,
  parameter int unsigned SLV_REGS = 1,
  localparam int unsigned N_CL    = MESH_X * MESH_Y,
  localparam int unsigned N_TOT   = N_CL * N_CPU
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cpu_req_t cpu_req    [N_TOT],
  output cpu_rsp_t cpu_rsp    [N_TOT],
  output logic     wfifo_full [N_TOT],
  input  cpu_req_t lmem_req   [N_TOT],
  output cpu_rsp_t lmem_rsp   [N_TOT]
);

  logic  in_valid  [N_CL][NUM_PORTS];
  logic  in_ready  [N_CL][NUM_PORTS];
  flit_t in_flit   [N_CL][NUM_PORTS];
  logic  out_valid [N_CL][NUM_PORTS];
  logic  out_ready [N_CL][NUM_PORTS];
  flit_t out_flit  [N_CL][NUM_PORTS];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned C = y * MESH_X + x;

      noc_switch #(.MY_X(x), .MY_Y(y)) u_sw (
        .clk, .rst_n,
        .in_valid (in_valid[C]),  .in_ready (in_ready[C]),  .in_flit (in_flit[C]),
        .out_valid(out_valid[C]), .out_ready(out_ready[C]), .out_flit(out_flit[C]));

      cluster #(
        .N_CPU(N_CPU), .BUS_STD(BUS_STD), .TOPOLOGY(TOPOLOGY), .MST_REGS(MST_REGS), .SLV_REGS(SLV_REGS),
        .MY_X(x), .MY_Y(y)
      ) u_cl (
        .clk, .rst_n,
        .cpu_req   (cpu_req[C*N_CPU +: N_CPU]),
        .cpu_rsp   (cpu_rsp[C*N_CPU +: N_CPU]),
        .wfifo_full(wfifo_full[C*N_CPU +: N_CPU]),
        .lmem_req  (lmem_req[C*N_CPU +: N_CPU]),
        .lmem_rsp  (lmem_rsp[C*N_CPU +: N_CPU]),
        .tx_valid  (in_valid[C][PORT_LOCAL]),
        .tx_ready  (in_ready[C][PORT_LOCAL]),
        .tx_flit   (in_flit[C][PORT_LOCAL]),
        .rx_valid  (out_valid[C][PORT_LOCAL]),
        .rx_ready  (out_ready[C][PORT_LOCAL]),
        .rx_flit   (out_flit[C][PORT_LOCAL]));

      // east / west links
      if (x + 1 < MESH_X) begin : g_e
        assign in_valid[C+1][PORT_WEST]  = out_valid[C][PORT_EAST];
        assign in_flit[C+1][PORT_WEST]   = out_flit[C][PORT_EAST];
        assign out_ready[C][PORT_EAST]   = in_ready[C+1][PORT_WEST];
        assign in_valid[C][PORT_EAST]    = out_valid[C+1][PORT_WEST];
        assign in_flit[C][PORT_EAST]     = out_flit[C+1][PORT_WEST];
        assign out_ready[C+1][PORT_WEST] = in_ready[C][PORT_EAST];
      end else begin : g_e_tie
        assign in_valid[C][PORT_EAST]  = 1'b0;
        assign in_flit[C][PORT_EAST]   = '0;
        assign out_ready[C][PORT_EAST] = 1'b1;
      end
      if (x == 0) begin : g_w_tie
        assign in_valid[C][PORT_WEST]  = 1'b0;
        assign in_flit[C][PORT_WEST]   = '0;
        assign out_ready[C][PORT_WEST] = 1'b1;
      end
      // north / south links
      if (y + 1 < MESH_Y) begin : g_n
        assign in_valid[C+MESH_X][PORT_SOUTH]  = out_valid[C][PORT_NORTH];
        assign in_flit[C+MESH_X][PORT_SOUTH]   = out_flit[C][PORT_NORTH];
        assign out_ready[C][PORT_NORTH]        = in_ready[C+MESH_X][PORT_SOUTH];
        assign in_valid[C][PORT_NORTH]         = out_valid[C+MESH_X][PORT_SOUTH];
        assign in_flit[C][PORT_NORTH]          = out_flit[C+MESH_X][PORT_SOUTH];
        assign out_ready[C+MESH_X][PORT_SOUTH] = in_ready[C][PORT_NORTH];
      end else begin : g_n_tie
        assign in_valid[C][PORT_NORTH]  = 1'b0;
        assign in_flit[C][PORT_NORTH]   = '0;
        assign out_ready[C][PORT_NORTH] = 1'b1;
      end
      if (y == 0) begin : g_s_tie
        assign in_valid[C][PORT_SOUTH]  = 1'b0;
        assign in_flit[C][PORT_SOUTH]   = '0;
        assign out_ready[C][PORT_SOUTH] = 1'b1;
      end
    end
  end

endmodule
