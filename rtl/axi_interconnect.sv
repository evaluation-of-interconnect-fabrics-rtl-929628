// axi_interconnect: cluster interconnect in the AXI style, as a shared bus
// or as a full crossbar.
//
// N_M masters (the CPUs' bus master ports and the NCI) reach N_S slaves
// (the CPUs' data memories and the NCI registers). A slave is selected by
// address bits [SLV_WIN_LSB +: SEL_W]: each slave owns a 16 kB window.
// Read and write paths are separate, so a read and a write can proceed at
// the same time even on the shared bus. No master has more than one
// transaction per direction in flight, so the data channels need no
// arbitration of their own: W follows the grant of AW, R the grant of AR.
//
//  * TOPO_SHARED: one write-address and one read-address arbiter for the
//    whole bus, and a round-robin choice among slaves that return a write
//    response at the same time (the single B channel).
//  * TOPO_CROSSBAR: a write-address and a read-address arbiter per slave,
//    so different slaves serve different masters in parallel.
//
// Writes: a write holds its address domain only until AW and W have been
// handed over. Its B response is routed back through a small queue per
// slave that remembers, in order, which master each accepted write came
// from. So while one master waits for its B, another master's write can
// already use the bus: a single master writes every second cycle, but
// writes of different masters interleave. Reads: a read holds its domain
// from AR to R, and the next read can start in the cycle after R.
//
// All arbiters are round robin. Grants are combinational (no register in
// the interconnect itself; register stages are separate axi_reg_slice
// instances). Shared/crossbar, round-robin arbitration, the arbiters per
// slave of the crossbar, interleaved writes of different masters and the
// absence of outstanding transactions per master follow the design
// description; the address map, the B queues and the way W/R follow the
// address grant are this design's choices. An address outside the N_S
// windows is a usage error (assertion), not a DECERR.
module axi_interconnect
  import mpsoc_pkg::*;
#(
  parameter int unsigned N_M      = 5,
  parameter int unsigned N_S      = 5,
  parameter topology_e   TOPOLOGY = TOPO_CROSSBAR,
  localparam int unsigned N_DOM   = (TOPOLOGY == TOPO_CROSSBAR) ? N_S : 1,
  localparam int unsigned M_W     = (N_M > 1) ? $clog2(N_M) : 1,
  localparam int unsigned SEL_W   = (N_S > 1) ? $clog2(N_S) : 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t mst_req [N_M],
  output axi_rsp_t mst_rsp [N_M],
  output axi_req_t slv_req [N_S],
  input  axi_rsp_t slv_rsp [N_S]
);

  function automatic logic [SEL_W-1:0] slv_of(input logic [ADDR_W-1:0] a);
    return a[SLV_WIN_LSB +: SEL_W];
  endfunction

  function automatic int unsigned dom_of(input logic [SEL_W-1:0] s);
    return (TOPOLOGY == TOPO_CROSSBAR) ? int'(s) : 0;
  endfunction

  // ---------------- per-domain state -------------------------------------
  logic [N_DOM-1:0] wr_busy_q, aw_done_q, w_done_q, rd_busy_q;
  logic [M_W-1:0]   wr_own_q [N_DOM];
  logic [M_W-1:0]   rd_own_q [N_DOM];
  logic [SEL_W-1:0] wr_slv_q [N_DOM];
  logic [SEL_W-1:0] rd_slv_q [N_DOM];

  logic [N_M-1:0]   aw_req [N_DOM];
  logic [N_M-1:0]   ar_req [N_DOM];
  logic [N_M-1:0]   aw_gnt [N_DOM];
  logic [N_M-1:0]   ar_gnt [N_DOM];
  logic [M_W-1:0]   aw_gidx [N_DOM];
  logic [M_W-1:0]   ar_gidx [N_DOM];
  logic [N_DOM-1:0] aw_gval, ar_gval;
  logic [N_DOM-1:0] aw_adv, ar_adv;

  // effective owner/target of each domain in this cycle
  logic [N_DOM-1:0] wr_act, rd_act, aw_hs, w_hs;
  logic [M_W-1:0]   wr_own [N_DOM];
  logic [M_W-1:0]   rd_own [N_DOM];
  logic [SEL_W-1:0] wr_slv [N_DOM];
  logic [SEL_W-1:0] rd_slv [N_DOM];

  // per-slave queue of the masters whose writes await their B
  logic [N_S-1:0]   bq_push, bq_pop, bq_empty;
  logic [M_W-1:0]   bq_in   [N_S];
  logic [M_W-1:0]   bq_head [N_S];
  logic [N_S-1:0]   b_req, b_gnt, b_sel;
  logic [SEL_W-1:0] b_gidx;
  logic             b_gval, b_adv;

  always_comb begin
    for (int unsigned d = 0; d < N_DOM; d++) begin
      for (int unsigned m = 0; m < N_M; m++) begin
        aw_req[d][m] = mst_req[m].aw_valid && (dom_of(slv_of(mst_req[m].aw.addr)) == d);
        ar_req[d][m] = mst_req[m].ar_valid && (dom_of(slv_of(mst_req[m].ar.addr)) == d);
      end
      // a new grant is only taken while the domain is idle
      if (wr_busy_q[d]) aw_req[d] = '0;
      if (rd_busy_q[d]) ar_req[d] = '0;
    end
  end

  for (genvar d = 0; d < N_DOM; d++) begin : g_arb
    rr_arbiter #(.N(N_M)) u_aw_arb (
      .clk, .rst_n, .req(aw_req[d]), .advance(aw_adv[d]),
      .gnt(aw_gnt[d]), .gnt_idx(aw_gidx[d]), .gnt_valid(aw_gval[d]));
    rr_arbiter #(.N(N_M)) u_ar_arb (
      .clk, .rst_n, .req(ar_req[d]), .advance(ar_adv[d]),
      .gnt(ar_gnt[d]), .gnt_idx(ar_gidx[d]), .gnt_valid(ar_gval[d]));
  end

  for (genvar s = 0; s < N_S; s++) begin : g_bq
    // each master has at most one write in flight, so N_M entries suffice
    sync_fifo #(.T(logic [M_W-1:0]), .DEPTH(N_M)) u_bq (
      .clk, .rst_n,
      .push(bq_push[s]), .wdata(bq_in[s]),
      .pop (bq_pop[s]),  .rdata(bq_head[s]),
      .full(), .empty(bq_empty[s]), .count());
  end

  // the shared bus has one B channel: slaves with a response take turns
  always_comb
    for (int unsigned s = 0; s < N_S; s++)
      b_req[s] = !bq_empty[s] && slv_rsp[s].b_valid;

  if (TOPOLOGY == TOPO_SHARED) begin : g_b_arb
    rr_arbiter #(.N(N_S)) u_b_arb (
      .clk, .rst_n, .req(b_req), .advance(b_adv),
      .gnt(b_gnt), .gnt_idx(b_gidx), .gnt_valid(b_gval));
    assign b_sel = b_gnt;
  end else begin : g_b_all
    assign b_gnt  = '0;
    assign b_gidx = '0;
    assign b_gval = 1'b0;
    assign b_sel  = ~bq_empty;
  end

  always_comb begin
    for (int unsigned d = 0; d < N_DOM; d++) begin
      wr_act[d] = wr_busy_q[d] || aw_gval[d];
      wr_own[d] = wr_busy_q[d] ? wr_own_q[d] : aw_gidx[d];
      wr_slv[d] = wr_busy_q[d] ? wr_slv_q[d] : slv_of(mst_req[aw_gidx[d]].aw.addr);
      rd_act[d] = rd_busy_q[d] || ar_gval[d];
      rd_own[d] = rd_busy_q[d] ? rd_own_q[d] : ar_gidx[d];
      rd_slv[d] = rd_busy_q[d] ? rd_slv_q[d] : slv_of(mst_req[ar_gidx[d]].ar.addr);
    end
  end

  // ---------------- routing ----------------------------------------------
  always_comb begin
    for (int unsigned s = 0; s < N_S; s++) slv_req[s] = AXI_REQ_IDLE;
    for (int unsigned m = 0; m < N_M; m++) mst_rsp[m] = AXI_RSP_IDLE;
    aw_adv  = '0;
    ar_adv  = '0;
    aw_hs   = '0;
    w_hs    = '0;
    bq_push = '0;
    bq_pop  = '0;
    b_adv   = 1'b0;
    for (int unsigned s = 0; s < N_S; s++) bq_in[s] = '0;

    for (int unsigned d = 0; d < N_DOM; d++) begin
      // write address and data
      if (wr_act[d]) begin
        slv_req[wr_slv[d]].aw_valid = mst_req[wr_own[d]].aw_valid && !aw_done_q[d];
        slv_req[wr_slv[d]].aw       = mst_req[wr_own[d]].aw;
        slv_req[wr_slv[d]].w_valid  = mst_req[wr_own[d]].w_valid && !w_done_q[d];
        slv_req[wr_slv[d]].w        = mst_req[wr_own[d]].w;
        mst_rsp[wr_own[d]].aw_ready = slv_rsp[wr_slv[d]].aw_ready && !aw_done_q[d];
        mst_rsp[wr_own[d]].w_ready  = slv_rsp[wr_slv[d]].w_ready && !w_done_q[d];
        aw_hs[d] = slv_req[wr_slv[d]].aw_valid && slv_rsp[wr_slv[d]].aw_ready;
        w_hs[d]  = slv_req[wr_slv[d]].w_valid && slv_rsp[wr_slv[d]].w_ready;
        aw_adv[d] = !wr_busy_q[d];
        if (aw_hs[d]) begin
          bq_push[wr_slv[d]] = 1'b1;
          bq_in[wr_slv[d]]   = wr_own[d];
        end
      end
      // read path
      if (rd_act[d]) begin
        slv_req[rd_slv[d]].ar_valid = mst_req[rd_own[d]].ar_valid && !rd_busy_q[d];
        slv_req[rd_slv[d]].ar       = mst_req[rd_own[d]].ar;
        slv_req[rd_slv[d]].r_ready  = mst_req[rd_own[d]].r_ready && rd_busy_q[d];
        mst_rsp[rd_own[d]].ar_ready = slv_rsp[rd_slv[d]].ar_ready && !rd_busy_q[d];
        mst_rsp[rd_own[d]].r_valid  = slv_rsp[rd_slv[d]].r_valid && rd_busy_q[d];
        mst_rsp[rd_own[d]].r        = slv_rsp[rd_slv[d]].r;
        ar_adv[d] = !rd_busy_q[d] && mst_req[rd_own[d]].ar_valid
                    && slv_rsp[rd_slv[d]].ar_ready;
      end
    end

    // write responses, back to the master at the head of each queue
    for (int unsigned s = 0; s < N_S; s++) begin
      if (b_sel[s]) begin
        mst_rsp[bq_head[s]].b_valid = slv_rsp[s].b_valid;
        mst_rsp[bq_head[s]].b       = slv_rsp[s].b;
        slv_req[s].b_ready          = mst_req[bq_head[s]].b_ready;
        bq_pop[s] = slv_rsp[s].b_valid && mst_req[bq_head[s]].b_ready;
        if (bq_pop[s]) b_adv = 1'b1;
      end
    end
  end

  // ---------------- state update -----------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_busy_q <= '0;
      aw_done_q <= '0;
      w_done_q  <= '0;
      rd_busy_q <= '0;
      for (int unsigned d = 0; d < N_DOM; d++) begin
        wr_own_q[d] <= '0;
        rd_own_q[d] <= '0;
        wr_slv_q[d] <= '0;
        rd_slv_q[d] <= '0;
      end
    end else begin
      for (int unsigned d = 0; d < N_DOM; d++) begin
        if (wr_act[d]) begin
          // the domain is free again once both AW and W are through
          if ((aw_done_q[d] || aw_hs[d]) && (w_done_q[d] || w_hs[d])) begin
            wr_busy_q[d] <= 1'b0;
            aw_done_q[d] <= 1'b0;
            w_done_q[d]  <= 1'b0;
          end else begin
            wr_busy_q[d] <= 1'b1;
            wr_own_q[d]  <= wr_own[d];
            wr_slv_q[d]  <= wr_slv[d];
            aw_done_q[d] <= aw_done_q[d] || aw_hs[d];
            w_done_q[d]  <= w_done_q[d] || w_hs[d];
          end
        end
        if (rd_act[d]) begin
          if (ar_adv[d]) begin
            rd_busy_q[d] <= 1'b1;
            rd_own_q[d]  <= rd_own[d];
            rd_slv_q[d]  <= rd_slv[d];
          end
          if (rd_busy_q[d] && slv_rsp[rd_slv[d]].r_valid && mst_req[rd_own[d]].r_ready)
            rd_busy_q[d] <= 1'b0;
        end
      end
    end
  end

  // ---------------- protocol checks --------------------------------------
  for (genvar m = 0; m < N_M; m++) begin : g_chk
    a_aw_in_map: assert property (@(posedge clk) disable iff (!rst_n)
      mst_req[m].aw_valid |-> int'(mst_req[m].aw.addr >> SLV_WIN_LSB) < N_S)
      else $error("axi_interconnect: write address outside the slave windows");
    a_ar_in_map: assert property (@(posedge clk) disable iff (!rst_n)
      mst_req[m].ar_valid |-> int'(mst_req[m].ar.addr >> SLV_WIN_LSB) < N_S)
      else $error("axi_interconnect: read address outside the slave windows");
    a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
      mst_req[m].aw_valid && !mst_rsp[m].aw_ready |=> mst_req[m].aw_valid)
      else $error("axi_interconnect: AW valid dropped before ready");
    a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
      mst_req[m].ar_valid && !mst_rsp[m].ar_ready |=> mst_req[m].ar_valid)
      else $error("axi_interconnect: AR valid dropped before ready");
  end
  for (genvar sl = 0; sl < N_S; sl++) begin : g_chk_b
    a_b_expected: assert property (@(posedge clk) disable iff (!rst_n)
      slv_rsp[sl].b_valid |-> !bq_empty[sl])
      else $error("axi_interconnect: write response without a write");
  end

endmodule
