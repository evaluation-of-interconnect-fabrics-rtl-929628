// wb_interconnect: cluster interconnect in the Wishbone style (pipelined
// mode), as a shared bus or as a full crossbar.
//
// N_M masters reach N_S slaves through the same 16 kB address windows as
// the AXI variant. A master raises cyc for a bus cycle and keeps it high
// until all its requests are acknowledged; within one bus cycle it
// addresses a single slave. Arbitration is round robin and takes place
// when cyc rises:
//  * TOPO_SHARED: one arbiter for the whole bus; the winner owns the bus
//    until it drops cyc.
//  * TOPO_CROSSBAR: one arbiter per slave; masters that address different
//    slaves own them at the same time.
// While a master owns a slave, its cyc/stb/we/adr/dat/sel go straight to
// that slave and the slave's ack/stall/err/dat straight back (no register,
// so an acknowledge can come in the same cycle as the request:
// asynchronous cycle termination). Masters that wait see stall high and no
// ack. A pipelined master can issue one request per cycle. The
// topologies, arbiter counts and round-robin policy follow the design
// description; holding the grant for the whole cyc and the one-slave-per-
// cycle rule are this design's choices.
module wb_interconnect
  import mpsoc_pkg::*;
#(
  parameter int unsigned N_M      = 5,
  parameter int unsigned N_S      = 5,
  parameter topology_e   TOPOLOGY = TOPO_CROSSBAR,
  localparam int unsigned N_DOM   = (TOPOLOGY == TOPO_CROSSBAR) ? N_S : 1,
  localparam int unsigned M_W     = (N_M > 1) ? $clog2(N_M) : 1,
  localparam int unsigned SEL_W   = (N_S > 1) ? $clog2(N_S) : 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  wb_req_t mst_req [N_M],
  output wb_rsp_t mst_rsp [N_M],
  output wb_req_t slv_req [N_S],
  input  wb_rsp_t slv_rsp [N_S]
);

  function automatic logic [SEL_W-1:0] slv_of(input logic [ADDR_W-1:0] a);
    return a[SLV_WIN_LSB +: SEL_W];
  endfunction

  function automatic int unsigned dom_of(input logic [SEL_W-1:0] s);
    return (TOPOLOGY == TOPO_CROSSBAR) ? int'(s) : 0;
  endfunction

  logic [N_DOM-1:0] busy_q;
  logic [M_W-1:0]   own_q [N_DOM];
  logic [SEL_W-1:0] slv_q [N_DOM];
  logic [N_M-1:0]   req   [N_DOM];
  logic [N_M-1:0]   gnt   [N_DOM];
  logic [M_W-1:0]   gidx  [N_DOM];
  logic [N_DOM-1:0] gval;
  logic [N_DOM-1:0] act, take;
  logic [M_W-1:0]   own   [N_DOM];
  logic [SEL_W-1:0] tgt   [N_DOM];
  logic [N_M-1:0]   owns_any;

  // a master that owns a domain does not compete for another one
  always_comb begin
    owns_any = '0;
    for (int unsigned d = 0; d < N_DOM; d++)
      if (busy_q[d]) owns_any[own_q[d]] = 1'b1;
    for (int unsigned d = 0; d < N_DOM; d++) begin
      for (int unsigned m = 0; m < N_M; m++)
        req[d][m] = mst_req[m].cyc && mst_req[m].stb && !owns_any[m]
                    && (dom_of(slv_of(mst_req[m].adr)) == d);
      if (busy_q[d]) req[d] = '0;
    end
  end

  for (genvar d = 0; d < N_DOM; d++) begin : g_arb
    rr_arbiter #(.N(N_M)) u_arb (
      .clk, .rst_n, .req(req[d]), .advance(take[d]),
      .gnt(gnt[d]), .gnt_idx(gidx[d]), .gnt_valid(gval[d]));
  end

  always_comb begin
    for (int unsigned s = 0; s < N_S; s++) slv_req[s] = WB_REQ_IDLE;
    for (int unsigned m = 0; m < N_M; m++) begin
      mst_rsp[m]       = WB_RSP_IDLE;
      mst_rsp[m].stall = 1'b1;
    end
    for (int unsigned d = 0; d < N_DOM; d++) begin
      act[d]  = busy_q[d] || gval[d];
      own[d]  = busy_q[d] ? own_q[d] : gidx[d];
      tgt[d]  = busy_q[d] ? slv_q[d] : slv_of(mst_req[gidx[d]].adr);
      take[d] = !busy_q[d] && gval[d];
      if (act[d]) begin
        slv_req[tgt[d]] = mst_req[own[d]];
        mst_rsp[own[d]] = slv_rsp[tgt[d]];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= '0;
      for (int unsigned d = 0; d < N_DOM; d++) begin
        own_q[d] <= '0;
        slv_q[d] <= '0;
      end
    end else begin
      for (int unsigned d = 0; d < N_DOM; d++) begin
        if (take[d]) begin
          busy_q[d] <= mst_req[own[d]].cyc;
          own_q[d]  <= own[d];
          slv_q[d]  <= tgt[d];
        end else if (busy_q[d] && !mst_req[own_q[d]].cyc) begin
          busy_q[d] <= 1'b0;
        end
      end
    end
  end

  for (genvar m = 0; m < N_M; m++) begin : g_chk
    a_in_map: assert property (@(posedge clk) disable iff (!rst_n)
      mst_req[m].cyc && mst_req[m].stb |-> int'(mst_req[m].adr >> SLV_WIN_LSB) < N_S)
      else $error("wb_interconnect: address outside the slave windows");
  end
  for (genvar d = 0; d < N_DOM; d++) begin : g_chk_d
    a_one_slave: assert property (@(posedge clk) disable iff (!rst_n)
      busy_q[d] && mst_req[own_q[d]].cyc && mst_req[own_q[d]].stb
      |-> slv_of(mst_req[own_q[d]].adr) == slv_q[d])
      else $error("wb_interconnect: master changed slave inside one bus cycle");
  end

endmodule
