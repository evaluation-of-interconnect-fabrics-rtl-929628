// wb_reg_slice: register stage on one Wishbone port of the cluster
// interconnect (the Wishbone counterpart of axi_reg_slice).
//
// Requests: stb with its we/adr/dat/sel is held in a register that is
// free when empty or when the downstream side does not stall; the
// upstream side sees stall while it is full and blocked. cyc is delayed
// by one cycle as well, and stays high while a request is still held, so
// a bus cycle ends downstream only after its last request. Responses:
// ack, err and read data are registered on the way back. A request and its
// ack each gain one cycle. STAGES chains that many slices; 0 is a wire.
module wb_reg_slice
  import mpsoc_pkg::*;
#(
  parameter int unsigned STAGES = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  wb_req_t slv_req,   // from the master side
  output wb_rsp_t slv_rsp,
  output wb_req_t mst_req,   // towards the slave side
  input  wb_rsp_t mst_rsp
);

  typedef struct packed {
    logic              we;
    logic [ADDR_W-1:0] adr;
    logic [DATA_W-1:0] dat;
    logic [STRB_W-1:0] sel;
  } wb_cmd_t;

  wb_req_t req [STAGES+1];
  wb_rsp_t rsp [STAGES+1];

  assign req[0]      = slv_req;
  assign slv_rsp     = rsp[0];
  assign mst_req     = req[STAGES];
  assign rsp[STAGES] = mst_rsp;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    logic    in_ready, out_valid, cyc_q, ack_q, err_q;
    logic [DATA_W-1:0] dat_q;
    wb_cmd_t out_cmd;

    reg_stage #(.T(wb_cmd_t)) u_cmd (
      .clk, .rst_n,
      .in_valid (req[s].cyc && req[s].stb),
      .in_ready (in_ready),
      .in_data  ('{we: req[s].we, adr: req[s].adr, dat: req[s].dat, sel: req[s].sel}),
      .out_valid(out_valid),
      .out_ready(!rsp[s+1].stall),
      .out_data (out_cmd));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cyc_q <= 1'b0;
        ack_q <= 1'b0;
        err_q <= 1'b0;
        dat_q <= '0;
      end else begin
        cyc_q <= req[s].cyc;
        ack_q <= rsp[s+1].ack;
        err_q <= rsp[s+1].err;
        if (rsp[s+1].ack) dat_q <= rsp[s+1].dat;
      end
    end

    assign req[s+1] = '{cyc: cyc_q || out_valid, stb: out_valid, we: out_cmd.we,
                        adr: out_cmd.adr, dat: out_cmd.dat, sel: out_cmd.sel};
    assign rsp[s]   = '{ack: ack_q, stall: !in_ready, err: err_q, dat: dat_q};
  end

endmodule
