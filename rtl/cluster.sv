// cluster: one CPU cluster of the hierarchical MPSoC.
//
// N_CPU CPUs are tightly coupled by a cluster interconnect (shared bus or
// crossbar, TOPOLOGY). Each CPU contributes a bus master (cpu_bus_master,
// with its write FIFO) and a bus slave (its data memory, dmem); the NCI
// adds one more master (its DMA) and one more slave (its registers), so the
// interconnect has N_CPU+1 ports on each side. Address map of the cluster
// bus: CPU k's data memory at k*0x4000, the NCI registers at N_CPU*0x4000.
// Register stages (axi_reg_slice) can be put on every master port
// (MST_REGS) and on every slave port (SLV_REGS) to reach the clock target;
// the default of one of each is what the described 16-CPU configurations
// needed at 830 MHz. With them a remote load takes 8 cycles instead of 4.
//
// BUS_STD selects the bus standard of the cluster. BUS_AXI (default) uses
// cpu_bus_master, axi_reg_slice and axi_interconnect. BUS_WB uses
// cpu_wb_master, wb_reg_slice and wb_interconnect (pipelined Wishbone);
// there the data memories and the NCI registers are reached through
// wb2axi_slave and the NCI's DMA port drives the bus through
// axi2wb_master, so the slaves and the NCI are the same in both cases.
//
// The CPU cores themselves are not part of this RTL: for each CPU the
// cluster exposes the bus-side request port (cpu_req/cpu_rsp, into the
// cpu_bus_master) and the port to its own data memory (lmem_req/lmem_rsp).
// The NCI's flit ports connect to the local port of the switch box.
module cluster
  import mpsoc_pkg::*;
#(
  parameter int unsigned N_CPU      = 4,
  parameter bus_std_e    BUS_STD    = BUS_AXI,
  parameter topology_e   TOPOLOGY   = TOPO_CROSSBAR,
  parameter int unsigned MST_REGS   = 1,
  parameter int unsigned SLV_REGS   = 1,
  parameter int unsigned DMEM_WORDS = 4096,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned MY_X       = 0,
  parameter int unsigned MY_Y       = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cpu_req_t cpu_req  [N_CPU],
  output cpu_rsp_t cpu_rsp  [N_CPU],
  output logic     wfifo_full [N_CPU],
  input  cpu_req_t lmem_req [N_CPU],
  output cpu_rsp_t lmem_rsp [N_CPU],
  output logic     tx_valid,
  input  logic     tx_ready,
  output flit_t    tx_flit,
  input  logic     rx_valid,
  output logic     rx_ready,
  input  flit_t    rx_flit
);

  localparam int unsigned N_P = N_CPU + 1;

  axi_req_t m_req  [N_P];   // AXI master side of each master
  axi_rsp_t m_rsp  [N_P];
  axi_req_t s_req  [N_P];   // AXI slave port of each slave
  axi_rsp_t s_rsp  [N_P];

  for (genvar c = 0; c < N_CPU; c++) begin : g_mem
    dmem #(.WORDS(DMEM_WORDS)) u_dmem (
      .clk, .rst_n,
      .lmem_req(lmem_req[c]),
      .lmem_rsp(lmem_rsp[c]),
      .bus_req (s_req[c]),
      .bus_rsp (s_rsp[c])
    );
  end

  nci #(.MY_X(MY_X), .MY_Y(MY_Y)) u_nci (
    .clk, .rst_n,
    .slv_req (s_req[N_CPU]),
    .slv_rsp (s_rsp[N_CPU]),
    .mst_req (m_req[N_CPU]),
    .mst_rsp (m_rsp[N_CPU]),
    .tx_valid, .tx_ready, .tx_flit,
    .rx_valid, .rx_ready, .rx_flit
  );

  if (BUS_STD == BUS_AXI) begin : g_axi
    axi_req_t xm_req [N_P];   // interconnect master ports
    axi_rsp_t xm_rsp [N_P];
    axi_req_t xs_req [N_P];   // interconnect slave ports
    axi_rsp_t xs_rsp [N_P];

    for (genvar c = 0; c < N_CPU; c++) begin : g_cpu
      cpu_bus_master #(.FIFO_DEPTH(FIFO_DEPTH)) u_bm (
        .clk, .rst_n,
        .cpu_req  (cpu_req[c]),
        .cpu_rsp  (cpu_rsp[c]),
        .bus_req  (m_req[c]),
        .bus_rsp  (m_rsp[c]),
        .fifo_full(wfifo_full[c])
      );
    end

    for (genvar p = 0; p < N_P; p++) begin : g_regs
      axi_reg_slice #(.STAGES(MST_REGS)) u_mreg (
        .clk, .rst_n,
        .slv_req(m_req[p]),  .slv_rsp(m_rsp[p]),
        .mst_req(xm_req[p]), .mst_rsp(xm_rsp[p]));
      axi_reg_slice #(.STAGES(SLV_REGS)) u_sreg (
        .clk, .rst_n,
        .slv_req(xs_req[p]), .slv_rsp(xs_rsp[p]),
        .mst_req(s_req[p]),  .mst_rsp(s_rsp[p]));
    end

    axi_interconnect #(.N_M(N_P), .N_S(N_P), .TOPOLOGY(TOPOLOGY)) u_xbar (
      .clk, .rst_n,
      .mst_req(xm_req), .mst_rsp(xm_rsp),
      .slv_req(xs_req), .slv_rsp(xs_rsp)
    );
  end else begin : g_wb
    wb_req_t wm_req [N_P];    // Wishbone masters
    wb_rsp_t wm_rsp [N_P];
    wb_req_t xm_req [N_P];    // interconnect master ports
    wb_rsp_t xm_rsp [N_P];
    wb_req_t xs_req [N_P];    // interconnect slave ports
    wb_rsp_t xs_rsp [N_P];
    wb_req_t ws_req [N_P];    // Wishbone slave fronts
    wb_rsp_t ws_rsp [N_P];

    for (genvar c = 0; c < N_CPU; c++) begin : g_cpu
      cpu_wb_master #(.FIFO_DEPTH(FIFO_DEPTH)) u_bm (
        .clk, .rst_n,
        .cpu_req  (cpu_req[c]),
        .cpu_rsp  (cpu_rsp[c]),
        .bus_req  (wm_req[c]),
        .bus_rsp  (wm_rsp[c]),
        .fifo_full(wfifo_full[c])
      );
      assign m_rsp[c] = AXI_RSP_IDLE;   // no AXI master in this position
    end

    axi2wb_master u_nci_mst (
      .clk, .rst_n,
      .axi_req(m_req[N_CPU]), .axi_rsp(m_rsp[N_CPU]),
      .wb_req (wm_req[N_CPU]), .wb_rsp (wm_rsp[N_CPU]));

    for (genvar p = 0; p < N_P; p++) begin : g_regs
      wb_reg_slice #(.STAGES(MST_REGS)) u_mreg (
        .clk, .rst_n,
        .slv_req(wm_req[p]), .slv_rsp(wm_rsp[p]),
        .mst_req(xm_req[p]), .mst_rsp(xm_rsp[p]));
      wb_reg_slice #(.STAGES(SLV_REGS)) u_sreg (
        .clk, .rst_n,
        .slv_req(xs_req[p]), .slv_rsp(xs_rsp[p]),
        .mst_req(ws_req[p]), .mst_rsp(ws_rsp[p]));
      wb2axi_slave u_front (
        .wb_req (ws_req[p]), .wb_rsp (ws_rsp[p]),
        .axi_req(s_req[p]),  .axi_rsp(s_rsp[p]));
    end

    wb_interconnect #(.N_M(N_P), .N_S(N_P), .TOPOLOGY(TOPOLOGY)) u_xbar (
      .clk, .rst_n,
      .mst_req(xm_req), .mst_rsp(xm_rsp),
      .slv_req(xs_req), .slv_rsp(xs_rsp)
    );
  end

endmodule
