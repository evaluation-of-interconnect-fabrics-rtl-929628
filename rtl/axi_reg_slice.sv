// axi_reg_slice: register stage on one AXI port of the cluster interconnect.
//
// The interconnect is unregistered by default; to reach the target clock
// frequency, register stages can be put between each master and the
// interconnect ("master register stage") and between the interconnect and
// each slave ("slave register stage"). This module is one such stage: it
// puts one reg_stage on each of the five channels (AW, W and AR forward,
// B and R backward). Every channel keeps full valid/ready flow control and
// gains one cycle of latency, so a read through one stage on each side
// takes two cycles more. STAGES chains that many slices; 0 is a plain wire.
module axi_reg_slice
  import mpsoc_pkg::*;
#(
  parameter int unsigned STAGES = 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t slv_req,   // from the master side
  output axi_rsp_t slv_rsp,
  output axi_req_t mst_req,   // towards the slave side
  input  axi_rsp_t mst_rsp
);

  axi_req_t req [STAGES+1];
  axi_rsp_t rsp [STAGES+1];

  assign req[0]  = slv_req;
  assign slv_rsp = rsp[0];
  assign mst_req = req[STAGES];
  assign rsp[STAGES] = mst_rsp;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    reg_stage #(.T(axi_ax_t)) u_aw (
      .clk, .rst_n,
      .in_valid (req[s].aw_valid),   .in_ready (rsp[s].aw_ready),   .in_data (req[s].aw),
      .out_valid(req[s+1].aw_valid), .out_ready(rsp[s+1].aw_ready), .out_data(req[s+1].aw));
    reg_stage #(.T(axi_w_t)) u_w (
      .clk, .rst_n,
      .in_valid (req[s].w_valid),    .in_ready (rsp[s].w_ready),    .in_data (req[s].w),
      .out_valid(req[s+1].w_valid),  .out_ready(rsp[s+1].w_ready),  .out_data(req[s+1].w));
    reg_stage #(.T(axi_ax_t)) u_ar (
      .clk, .rst_n,
      .in_valid (req[s].ar_valid),   .in_ready (rsp[s].ar_ready),   .in_data (req[s].ar),
      .out_valid(req[s+1].ar_valid), .out_ready(rsp[s+1].ar_ready), .out_data(req[s+1].ar));
    reg_stage #(.T(axi_b_t)) u_b (
      .clk, .rst_n,
      .in_valid (rsp[s+1].b_valid),  .in_ready (req[s+1].b_ready),  .in_data (rsp[s+1].b),
      .out_valid(rsp[s].b_valid),    .out_ready(req[s].b_ready),    .out_data(rsp[s].b));
    reg_stage #(.T(axi_r_t)) u_r (
      .clk, .rst_n,
      .in_valid (rsp[s+1].r_valid),  .in_ready (req[s+1].r_ready),  .in_data (rsp[s+1].r),
      .out_valid(rsp[s].r_valid),    .out_ready(req[s].r_ready),    .out_data(rsp[s].r));
  end

endmodule
