// noc_switch: switch box of the 2D-mesh network on chip.
//
// Five ports: the local cluster (through its NCI) and the four mesh
// neighbours. Packets are split into flits that each carry the 23-bit
// header and 64 bits of payload (mpsoc_pkg::flit_t); they are forwarded by
// wormhole switching: the first flit of a packet that wins an output port
// locks that port to its input until the flit marked `last` has passed,
// so packets are never interleaved on a link. Routing is dimension-order
// (XY): first along x to the destination column, then along y, then out
// of the local port. Each input has a FIFO of BUF_DEPTH flits; each output
// has one register. Free outputs are given to requesting inputs by a
// round-robin arbiter per output.
//
// Links use valid/ready flow control (a flit moves when both are high).
// A flit presented at an input in cycle t leaves on the output in cycle
// t+2 when nothing blocks it: one cycle in the input buffer, one in the
// output register, which gives the two-cycle latency of the design
// description. Ports of a switch at the mesh edge that have no neighbour
// are tied off by the instantiating level. Packet switching, wormhole
// routing, the flit format sizes and the two-cycle latency follow the
// description; XY routing, the buffer depth and the handshake are this
// design's choices. Virtual channels are not implemented (they are
// disabled in the described configuration).
module noc_switch
  import mpsoc_pkg::*;
#(
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [NUM_PORTS],
  output logic  in_ready  [NUM_PORTS],
  input  flit_t in_flit   [NUM_PORTS],
  output logic  out_valid [NUM_PORTS],
  input  logic  out_ready [NUM_PORTS],
  output flit_t out_flit  [NUM_PORTS]
);

  localparam int unsigned P = NUM_PORTS;

  function automatic port_e route(input flit_hdr_t h);
    if (int'(h.dst_x) > int'(MY_X)) return PORT_EAST;
    if (int'(h.dst_x) < int'(MY_X)) return PORT_WEST;
    if (int'(h.dst_y) > int'(MY_Y)) return PORT_NORTH;
    if (int'(h.dst_y) < int'(MY_Y)) return PORT_SOUTH;
    return PORT_LOCAL;
  endfunction

  // ---------------- input buffers ----------------------------------------
  flit_t  head     [P];
  logic   buf_full [P];
  logic   buf_empty[P];
  logic   pop      [P];
  port_e  want     [P];

  for (genvar i = 0; i < P; i++) begin : g_in
    logic [$clog2(BUF_DEPTH):0] cnt;
    sync_fifo #(.T(flit_t), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .push (in_valid[i] && !buf_full[i]),
      .wdata(in_flit[i]),
      .pop  (pop[i]),
      .rdata(head[i]),
      .full (buf_full[i]),
      .empty(buf_empty[i]),
      .count(cnt)
    );
    assign in_ready[i] = !buf_full[i];
    assign want[i]     = route(head[i].hdr);
  end

  // ---------------- output allocation ------------------------------------
  logic [P-1:0]         req    [P];   // per output: requesting inputs
  logic [P-1:0]         gnt    [P];
  logic [$clog2(P)-1:0] gidx   [P];
  logic                 gval   [P];
  logic                 lock_q [P];
  logic [$clog2(P)-1:0] owner_q[P];
  logic                 o_valid[P];
  logic                 o_ready[P];
  flit_t                o_flit [P];
  logic                 o_adv  [P];
  logic [$clog2(P)-1:0] src    [P];

  always_comb begin
    for (int unsigned o = 0; o < P; o++) begin
      for (int unsigned i = 0; i < P; i++)
        req[o][i] = !buf_empty[i] && (int'(want[i]) == o) && !lock_q[o];
    end
  end

  for (genvar o = 0; o < P; o++) begin : g_arb
    rr_arbiter #(.N(P)) u_arb (
      .clk, .rst_n, .req(req[o]), .advance(o_adv[o]),
      .gnt(gnt[o]), .gnt_idx(gidx[o]), .gnt_valid(gval[o]));
  end

  always_comb begin
    for (int unsigned i = 0; i < P; i++) pop[i] = 1'b0;
    for (int unsigned o = 0; o < P; o++) begin
      src[o]     = lock_q[o] ? owner_q[o] : gidx[o];
      o_valid[o] = lock_q[o] ? (!buf_empty[src[o]] && int'(want[src[o]]) == o) : gval[o];
      o_flit[o]  = head[src[o]];
      o_adv[o]   = o_valid[o] && o_ready[o];
      if (o_adv[o]) pop[src[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned o = 0; o < P; o++) begin
        lock_q[o]  <= 1'b0;
        owner_q[o] <= '0;
      end
    end else begin
      for (int unsigned o = 0; o < P; o++) begin
        if (o_adv[o]) begin
          lock_q[o]  <= !o_flit[o].hdr.last;
          owner_q[o] <= src[o];
        end
      end
    end
  end

  // ---------------- output registers -------------------------------------
  for (genvar o = 0; o < P; o++) begin : g_out
    reg_stage #(.T(flit_t)) u_oreg (
      .clk, .rst_n,
      .in_valid (o_valid[o]), .in_ready (o_ready[o]), .in_data (o_flit[o]),
      .out_valid(out_valid[o]), .out_ready(out_ready[o]), .out_data(out_flit[o]));
  end

  for (genvar o = 0; o < P; o++) begin : g_chk
    a_no_uturn: assert property (@(posedge clk) disable iff (!rst_n)
      o_adv[o] && o != int'(PORT_LOCAL) |-> int'(src[o]) != o)
      else $error("noc_switch: flit sent back out of the port it came in");
  end

endmodule
