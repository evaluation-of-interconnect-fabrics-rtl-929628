// cpu_bus_master: bus master interface of one CPU, with a write FIFO.
//
// The CPU core sees a simple request port (cpu_req_t/cpu_rsp_t). Stores
// are posted: they are granted as soon as the write FIFO has room and are
// then drained to the bus one at a time, so a congested bus does not stall
// the CPU until the FIFO fills up. Loads block: a load is granted only
// when the FIFO is empty and no write is in flight (so it sees all earlier
// stores), and the CPU waits for rvalid. One read and one write at most
// are in flight; the bus side has no outstanding transactions.
//
// Timing without register stages, load: request in cycle 0, AR valid in
// cycle 1, data back to the CPU (rvalid) in cycle 4 against the data
// memory. Stores: AW and W are presented together from registers; the
// next store is loaded in the cycle its predecessor's B arrives, so a
// stream of stores runs at one write every second cycle on this bus.
// The FIFO and its purpose follow the design description; the FIFO
// depth, the read-after-write ordering rule and the handshake are this
// design's choices.
module cpu_bus_master
  import mpsoc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cpu_req_t cpu_req,
  output cpu_rsp_t cpu_rsp,
  output axi_req_t bus_req,
  input  axi_rsp_t bus_rsp,
  output logic     fifo_full   // for observation: stores are being held off
);

  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
    logic [STRB_W-1:0] strb;
  } wr_entry_t;

  wr_entry_t fifo_head;
  logic      fifo_empty, fifo_push, fifo_pop;
  logic [$clog2(FIFO_DEPTH):0] fifo_cnt;

  logic aw_valid_q, w_valid_q, wait_b_q;
  logic [ADDR_W-1:0] aw_addr_q;
  axi_w_t            w_q;
  logic ar_valid_q, rd_busy_q, rvalid_q;
  logic [ADDR_W-1:0] ar_addr_q;
  logic [DATA_W-1:0] rdata_q;

  logic wr_inflight, b_done, load_next, rd_gnt, wr_gnt;

  assign wr_inflight = aw_valid_q || w_valid_q || wait_b_q;
  assign b_done      = wait_b_q && !aw_valid_q && !w_valid_q && bus_rsp.b_valid;
  assign load_next   = !fifo_empty && (!wr_inflight || b_done);
  assign fifo_pop    = load_next;

  assign wr_gnt    = cpu_req.req && cpu_req.we && !fifo_full;
  assign rd_gnt    = cpu_req.req && !cpu_req.we && fifo_empty && !wr_inflight
                     && !rd_busy_q;
  assign fifo_push = wr_gnt;

  sync_fifo #(.T(wr_entry_t), .DEPTH(FIFO_DEPTH)) u_wfifo (
    .clk, .rst_n,
    .push (fifo_push),
    .wdata('{addr: cpu_req.addr, data: cpu_req.wdata, strb: cpu_req.be}),
    .pop  (fifo_pop),
    .rdata(fifo_head),
    .full (fifo_full),
    .empty(fifo_empty),
    .count(fifo_cnt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_valid_q <= 1'b0;
      w_valid_q  <= 1'b0;
      wait_b_q   <= 1'b0;
      aw_addr_q  <= '0;
      w_q        <= '0;
      ar_valid_q <= 1'b0;
      ar_addr_q  <= '0;
      rd_busy_q  <= 1'b0;
      rvalid_q   <= 1'b0;
      rdata_q    <= '0;
    end else begin
      // ---- write channel
      if (aw_valid_q && bus_rsp.aw_ready) aw_valid_q <= 1'b0;
      if (w_valid_q  && bus_rsp.w_ready)  w_valid_q  <= 1'b0;
      if (b_done) wait_b_q <= 1'b0;
      if (load_next) begin
        aw_valid_q <= 1'b1;
        w_valid_q  <= 1'b1;
        wait_b_q   <= 1'b1;
        aw_addr_q  <= fifo_head.addr;
        w_q        <= '{data: fifo_head.data, strb: fifo_head.strb};
      end
      // ---- read channel
      rvalid_q <= 1'b0;
      if (rd_gnt) begin
        ar_valid_q <= 1'b1;
        ar_addr_q  <= cpu_req.addr;
        rd_busy_q  <= 1'b1;
      end
      if (ar_valid_q && bus_rsp.ar_ready) ar_valid_q <= 1'b0;
      if (rd_busy_q && !ar_valid_q && bus_rsp.r_valid) begin
        rd_busy_q <= 1'b0;
        rvalid_q  <= 1'b1;
        rdata_q   <= bus_rsp.r.data;
      end
    end
  end

  always_comb begin
    bus_req          = AXI_REQ_IDLE;
    bus_req.aw_valid = aw_valid_q;
    bus_req.aw.addr  = aw_addr_q;
    bus_req.w_valid  = w_valid_q;
    bus_req.w        = w_q;
    bus_req.b_ready  = wait_b_q && !aw_valid_q && !w_valid_q;
    bus_req.ar_valid = ar_valid_q;
    bus_req.ar.addr  = ar_addr_q;
    bus_req.r_ready  = rd_busy_q && !ar_valid_q;
  end

  assign cpu_rsp.gnt    = wr_gnt || rd_gnt;
  assign cpu_rsp.rvalid = rvalid_q;
  assign cpu_rsp.rdata  = rdata_q;

  a_one_load: assert property (@(posedge clk) disable iff (!rst_n)
    rd_busy_q |-> !rd_gnt)
    else $error("cpu_bus_master: second load while one is in flight");

endmodule
