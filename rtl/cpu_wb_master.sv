// cpu_wb_master: bus master interface of one CPU for the Wishbone cluster
// bus, with the same write FIFO and CPU-side port as cpu_bus_master.
//
// Stores are posted into the write FIFO and drained as pipelined Wishbone
// writes: within one bus cycle (cyc high) a new write is issued in every
// cycle that the bus does not stall, as long as it goes to the same slave
// window as the first one. The bus cycle ends (cyc low for at least one
// cycle) when the FIFO is empty or the next write goes to another slave
// and all writes have been acknowledged. Loads are granted when the FIFO
// is empty and the bus master is idle; they use a bus cycle of their own.
//
// Timing without register stages: a load requested in cycle 0 is on the
// bus in cycle 1 and its data reaches the CPU (rvalid) in cycle 4 against
// a data memory; a store stream reaches one write per cycle. Follows the
// design description in the FIFO and in the write rate of Wishbone; the
// cycle framing and FIFO depth are this design's choices.
module cpu_wb_master
  import mpsoc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cpu_req_t cpu_req,
  output cpu_rsp_t cpu_rsp,
  output wb_req_t  bus_req,
  input  wb_rsp_t  bus_rsp,
  output logic     fifo_full
);

  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
    logic [STRB_W-1:0] strb;
  } wr_entry_t;

  localparam int unsigned OUT_W = $clog2(FIFO_DEPTH + 2) + 1;

  wr_entry_t fifo_head;
  logic      fifo_empty, fifo_pop;

  logic              cyc_q, stb_q, we_q, rvalid_q;
  logic [ADDR_W-1:0] adr_q;
  logic [DATA_W-1:0] dat_q, rdata_q;
  logic [STRB_W-1:0] sel_q;
  logic [OUT_W-1:0]  outst_q;        // requests taken, not yet acknowledged
  logic              taken, same_win, can_issue, rd_gnt, wr_gnt, cyc_end;
  logic [OUT_W-1:0]  outst_nxt;

  assign taken    = stb_q && !bus_rsp.stall;
  assign same_win = (fifo_head.addr[ADDR_W-1:SLV_WIN_LSB] == adr_q[ADDR_W-1:SLV_WIN_LSB]);
  // next write: start a new cycle when idle, or continue a write cycle
  assign can_issue = !fifo_empty && (!stb_q || taken)
                     && (!cyc_q || (we_q && same_win));
  assign fifo_pop  = can_issue;

  assign wr_gnt = cpu_req.req && cpu_req.we && !fifo_full;
  assign rd_gnt = cpu_req.req && !cpu_req.we && fifo_empty && !cyc_q;

  assign outst_nxt = outst_q + OUT_W'(taken) - OUT_W'(bus_rsp.ack);
  assign cyc_end   = cyc_q && !can_issue && (!stb_q || taken) && outst_nxt == '0;

  sync_fifo #(.T(wr_entry_t), .DEPTH(FIFO_DEPTH)) u_wfifo (
    .clk, .rst_n,
    .push (wr_gnt),
    .wdata('{addr: cpu_req.addr, data: cpu_req.wdata, strb: cpu_req.be}),
    .pop  (fifo_pop),
    .rdata(fifo_head),
    .full (fifo_full),
    .empty(fifo_empty),
    .count()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_q    <= 1'b0;
      stb_q    <= 1'b0;
      we_q     <= 1'b0;
      adr_q    <= '0;
      dat_q    <= '0;
      sel_q    <= '0;
      outst_q  <= '0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      outst_q  <= outst_nxt;
      rvalid_q <= 1'b0;
      if (taken) stb_q <= 1'b0;
      if (can_issue) begin
        cyc_q <= 1'b1;
        stb_q <= 1'b1;
        we_q  <= 1'b1;
        adr_q <= fifo_head.addr;
        dat_q <= fifo_head.data;
        sel_q <= fifo_head.strb;
      end else if (rd_gnt) begin
        cyc_q <= 1'b1;
        stb_q <= 1'b1;
        we_q  <= 1'b0;
        adr_q <= cpu_req.addr;
        sel_q <= '1;
      end else if (cyc_end) begin
        cyc_q <= 1'b0;
      end
      if (cyc_q && !we_q && bus_rsp.ack) begin
        rvalid_q <= 1'b1;
        rdata_q  <= bus_rsp.dat;
      end
    end
  end

  assign bus_req = '{cyc: cyc_q, stb: stb_q, we: we_q, adr: adr_q, dat: dat_q, sel: sel_q};

  assign cpu_rsp.gnt    = wr_gnt || rd_gnt;
  assign cpu_rsp.rvalid = rvalid_q;
  assign cpu_rsp.rdata  = rdata_q;

  a_no_spurious_ack: assert property (@(posedge clk) disable iff (!rst_n)
    bus_rsp.ack |-> cyc_q)
    else $error("cpu_wb_master: ack outside a bus cycle");

endmodule
