// wb2axi_slave: Wishbone slave front for a slave that has the cluster's
// AXI-style slave port (a data memory or the NCI registers).
//
// The slaves of a cluster have generic bus interfaces; this adapter lets
// the same slave sit on the Wishbone interconnect without adding a cycle.
// A write request (stb, we) drives AW and W together, a read request AR;
// stall is the inverse of the slave's ready. B and R are always taken at
// once and become ack (err for a non-OKAY response), R's data the read
// data. With a data memory, writes are acknowledged one cycle after they
// are taken, one per cycle, and reads two cycles after. Purely
// combinational.
module wb2axi_slave
  import mpsoc_pkg::*;
(
  input  wb_req_t  wb_req,
  output wb_rsp_t  wb_rsp,
  output axi_req_t axi_req,
  input  axi_rsp_t axi_rsp
);

  logic req_wr, req_rd;
  assign req_wr = wb_req.cyc && wb_req.stb && wb_req.we;
  assign req_rd = wb_req.cyc && wb_req.stb && !wb_req.we;

  always_comb begin
    axi_req          = AXI_REQ_IDLE;
    axi_req.aw_valid = req_wr;
    axi_req.aw.addr  = wb_req.adr;
    axi_req.w_valid  = req_wr;
    axi_req.w        = '{data: wb_req.dat, strb: wb_req.sel};
    axi_req.b_ready  = 1'b1;
    axi_req.ar_valid = req_rd;
    axi_req.ar.addr  = wb_req.adr;
    axi_req.r_ready  = 1'b1;

    wb_rsp.stall = wb_req.we ? !(axi_rsp.aw_ready && axi_rsp.w_ready) : !axi_rsp.ar_ready;
    wb_rsp.ack   = axi_rsp.b_valid || axi_rsp.r_valid;
    wb_rsp.err   = (axi_rsp.b_valid && axi_rsp.b.resp != RESP_OKAY)
                || (axi_rsp.r_valid && axi_rsp.r.resp != RESP_OKAY);
    wb_rsp.dat   = axi_rsp.r.data;
  end

endmodule
