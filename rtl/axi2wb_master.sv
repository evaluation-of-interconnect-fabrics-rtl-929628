// axi2wb_master: lets a master with the cluster's AXI-style master port
// (the NCI's DMA engine) drive the Wishbone cluster bus.
//
// The DMA engine may present a read and a write at the same time; the
// adapter serves them one after the other, alternating when both wait.
// Each transfer is one Wishbone bus cycle with a single request: the
// request is held with stb until the bus stops stalling, then cyc stays
// high until the ack. The ack (or err) is kept in a B or R register until
// the DMA engine takes it, and only then does the next transfer start.
// An ack can come in the same cycle as the request.
module axi2wb_master
  import mpsoc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t axi_req,
  output axi_rsp_t axi_rsp,
  output wb_req_t  wb_req,
  input  wb_rsp_t  wb_rsp
);

  typedef enum logic [2:0] {S_IDLE, S_WR, S_WR_ACK, S_B, S_RD, S_RD_ACK, S_R} state_e;
  state_e            st_q;
  logic              last_wr_q;
  logic [DATA_W-1:0] rdata_q;
  logic              err_q;
  logic              want_wr, want_rd;

  assign want_wr = axi_req.aw_valid && axi_req.w_valid;
  assign want_rd = axi_req.ar_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= S_IDLE;
      last_wr_q <= 1'b0;
      rdata_q   <= '0;
      err_q     <= 1'b0;
    end else begin
      unique case (st_q)
        S_IDLE:
          if (want_wr && (!want_rd || !last_wr_q)) begin
            st_q <= S_WR; last_wr_q <= 1'b1;
          end else if (want_rd) begin
            st_q <= S_RD; last_wr_q <= 1'b0;
          end
        S_WR:     if (!wb_rsp.stall) st_q <= wb_rsp.ack ? S_B : S_WR_ACK;
        S_WR_ACK: if (wb_rsp.ack) st_q <= S_B;
        S_B:      if (axi_req.b_ready) st_q <= S_IDLE;
        S_RD:     if (!wb_rsp.stall) st_q <= wb_rsp.ack ? S_R : S_RD_ACK;
        S_RD_ACK: if (wb_rsp.ack) st_q <= S_R;
        S_R:      if (axi_req.r_ready) st_q <= S_IDLE;
        default:  st_q <= S_IDLE;
      endcase
      if (wb_rsp.ack) begin
        rdata_q <= wb_rsp.dat;
        err_q   <= wb_rsp.err;
      end
    end
  end

  always_comb begin
    wb_req     = WB_REQ_IDLE;
    wb_req.cyc = (st_q == S_WR) || (st_q == S_WR_ACK) || (st_q == S_RD) || (st_q == S_RD_ACK);
    wb_req.stb = (st_q == S_WR) || (st_q == S_RD);
    wb_req.we  = (st_q == S_WR) || (st_q == S_WR_ACK);
    wb_req.adr = wb_req.we ? axi_req.aw.addr : axi_req.ar.addr;
    wb_req.dat = axi_req.w.data;
    wb_req.sel = wb_req.we ? axi_req.w.strb : '1;

    axi_rsp          = AXI_RSP_IDLE;
    axi_rsp.aw_ready = (st_q == S_WR) && !wb_rsp.stall;
    axi_rsp.w_ready  = axi_rsp.aw_ready;
    axi_rsp.b_valid  = (st_q == S_B);
    axi_rsp.b.resp   = err_q ? RESP_SLVERR : RESP_OKAY;
    axi_rsp.ar_ready = (st_q == S_RD) && !wb_rsp.stall;
    axi_rsp.r_valid  = (st_q == S_R);
    axi_rsp.r.data   = rdata_q;
    axi_rsp.r.resp   = err_q ? RESP_SLVERR : RESP_OKAY;
  end

endmodule
