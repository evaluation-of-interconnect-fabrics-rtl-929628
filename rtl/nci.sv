// nci: network cluster interface, the DMA engine between a cluster and
// its switch box.
//
// Sending: a CPU programs four registers over the cluster bus and the NCI
// then reads the data from a data memory on its own bus master port,
// packs two 32-bit words into each 64-bit flit payload, and sends the
// flits of one packet to the switch box. Receiving: each incoming flit is
// written straight into the data memory of the target CPU (two 32-bit bus
// writes), so no CPU copies network data. The read side of the bus master
// serves sending and the write side serves receiving, so both run at once.
//
// Registers (32-bit, offsets in the NCI's bus window):
//   0x00 TX_SRC  byte address of the data to send (cluster address map)
//   0x04 TX_DST  {dst_x[2], dst_y[2], dst_cpu[3], dst_addr[11]} packed as
//                the low 18 bits, dst_addr being the 64-bit word address
//                in the target CPU's data memory
//   0x08 TX_LEN  packet length in flits (1 .. MAX_FLITS)
//   0x0C CTRL    write: start sending; read: bit 0 = sending busy
//   0x10 RX_CNT  number of flits received and stored (write clears)
// Flit k of a packet carries the words at TX_SRC+8k (low half) and
// TX_SRC+8k+4 (high half) and is stored at dst_addr+k; the last flit has
// hdr.last set. A start while busy is ignored.
//
// Bus slave: one register access at a time, answered one cycle after the
// handshake. Flit ports use valid/ready. The DMA role, flit storage in the
// target memory and the 64-bit payload follow the design description;
// the register map, header fields and the 4 kB maximum packet (512
// flits, from the described maximum payload) bound the TX_LEN register.
module nci
  import mpsoc_pkg::*;
#(
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0,
  parameter int unsigned MAX_FLITS = 512   // 4 kB / 8 B per flit
) (
  input  logic     clk,
  input  logic     rst_n,
  // register port (bus slave)
  input  axi_req_t slv_req,
  output axi_rsp_t slv_rsp,
  // DMA port (bus master)
  output axi_req_t mst_req,
  input  axi_rsp_t mst_rsp,
  // to the switch box local input
  output logic     tx_valid,
  input  logic     tx_ready,
  output flit_t    tx_flit,
  // from the switch box local output
  input  logic     rx_valid,
  output logic     rx_ready,
  input  flit_t    rx_flit
);

  localparam int unsigned LEN_W = $clog2(MAX_FLITS + 1);

  // ---------------- registers --------------------------------------------
  logic [ADDR_W-1:0] tx_src_q;
  logic [17:0]       tx_dst_q;
  logic [LEN_W-1:0]  tx_len_q;
  logic [31:0]       rx_cnt_q;

  // ---------------- TX engine --------------------------------------------
  typedef enum logic [2:0] {TX_IDLE, TX_AR0, TX_R0, TX_AR1, TX_R1, TX_SEND} tx_state_e;
  tx_state_e         tx_st_q;
  logic [LEN_W-1:0]  tx_idx_q;
  logic [ADDR_W-1:0] tx_ptr_q;
  logic [DATA_W-1:0] tx_lo_q, tx_hi_q;
  logic              tx_busy, start;

  assign tx_busy = (tx_st_q != TX_IDLE);

  // ---------------- RX engine --------------------------------------------
  typedef enum logic [2:0] {RX_IDLE, RX_W0, RX_B0, RX_W1, RX_B1} rx_state_e;
  rx_state_e         rx_st_q;
  flit_t             rx_q;
  logic [ADDR_W-1:0] rx_addr;

  assign rx_ready = (rx_st_q == RX_IDLE);
  assign rx_addr  = (ADDR_W'(rx_q.hdr.dst_cpu) << SLV_WIN_LSB)
                  | (ADDR_W'(rx_q.hdr.dst_addr) << 3);

  // ---------------- bus slave --------------------------------------------
  logic              s_b_q, s_r_q;
  logic [DATA_W-1:0] s_rdata_q;
  logic              s_wr, s_rd;
  logic [2:0]        s_wreg, s_rreg;

  assign s_wreg = slv_req.aw.addr[4:2];
  assign s_rreg = slv_req.ar.addr[4:2];

  always_comb begin
    slv_rsp          = AXI_RSP_IDLE;
    slv_rsp.aw_ready = !s_b_q && slv_req.w_valid;
    slv_rsp.w_ready  = !s_b_q && slv_req.aw_valid;
    slv_rsp.b_valid  = s_b_q;
    slv_rsp.b.resp   = RESP_OKAY;
    slv_rsp.ar_ready = !s_r_q;
    slv_rsp.r_valid  = s_r_q;
    slv_rsp.r.data   = s_rdata_q;
    slv_rsp.r.resp   = RESP_OKAY;
  end
  assign s_wr  = slv_req.aw_valid && slv_rsp.aw_ready;
  assign s_rd  = slv_req.ar_valid && slv_rsp.ar_ready;
  assign start = s_wr && (s_wreg == 3'd3) && !tx_busy
                 && tx_len_q != '0 && 32'(tx_len_q) <= MAX_FLITS;

  logic rx_done;
  assign rx_done = (rx_st_q == RX_B1) && mst_rsp.b_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_b_q     <= 1'b0;
      s_r_q     <= 1'b0;
      s_rdata_q <= '0;
      tx_src_q  <= '0;
      tx_dst_q  <= '0;
      tx_len_q  <= '0;
      rx_cnt_q  <= '0;
    end else begin
      if (s_wr) s_b_q <= 1'b1;
      else if (slv_req.b_ready) s_b_q <= 1'b0;
      if (s_rd) s_r_q <= 1'b1;
      else if (slv_req.r_ready) s_r_q <= 1'b0;

      if (rx_done) rx_cnt_q <= rx_cnt_q + 1'b1;
      if (s_wr) begin
        unique case (s_wreg)
          3'd0: tx_src_q <= slv_req.w.data;
          3'd1: tx_dst_q <= slv_req.w.data[17:0];
          3'd2: tx_len_q <= slv_req.w.data[LEN_W-1:0];
          3'd4: rx_cnt_q <= '0;
          default: ;
        endcase
      end
      if (s_rd) begin
        unique case (s_rreg)
          3'd0: s_rdata_q <= tx_src_q;
          3'd1: s_rdata_q <= 32'(tx_dst_q);
          3'd2: s_rdata_q <= 32'(tx_len_q);
          3'd3: s_rdata_q <= 32'(tx_busy);
          3'd4: s_rdata_q <= rx_cnt_q;
          default: s_rdata_q <= '0;
        endcase
      end
    end
  end

  // ---------------- TX state machine -------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_st_q  <= TX_IDLE;
      tx_idx_q <= '0;
      tx_ptr_q <= '0;
      tx_lo_q  <= '0;
      tx_hi_q  <= '0;
    end else begin
      unique case (tx_st_q)
        TX_IDLE: if (start) begin
          tx_st_q  <= TX_AR0;
          tx_idx_q <= '0;
          tx_ptr_q <= tx_src_q;
        end
        TX_AR0: if (mst_rsp.ar_ready) tx_st_q <= TX_R0;
        TX_R0: if (mst_rsp.r_valid) begin
          tx_lo_q  <= mst_rsp.r.data;
          tx_ptr_q <= tx_ptr_q + 32'd4;
          tx_st_q  <= TX_AR1;
        end
        TX_AR1: if (mst_rsp.ar_ready) tx_st_q <= TX_R1;
        TX_R1: if (mst_rsp.r_valid) begin
          tx_hi_q  <= mst_rsp.r.data;
          tx_ptr_q <= tx_ptr_q + 32'd4;
          tx_st_q  <= TX_SEND;
        end
        TX_SEND: if (tx_ready) begin
          tx_idx_q <= tx_idx_q + 1'b1;
          tx_st_q  <= (tx_idx_q + 1'b1 == tx_len_q) ? TX_IDLE : TX_AR0;
        end
        default: tx_st_q <= TX_IDLE;
      endcase
    end
  end

  assign tx_valid              = (tx_st_q == TX_SEND);
  assign tx_flit.hdr.last      = (tx_idx_q + 1'b1 == tx_len_q);
  assign tx_flit.hdr.dst_x     = tx_dst_q[17:16];
  assign tx_flit.hdr.dst_y     = tx_dst_q[15:14];
  assign tx_flit.hdr.src_x     = COORD_W'(MY_X);
  assign tx_flit.hdr.src_y     = COORD_W'(MY_Y);
  assign tx_flit.hdr.dst_cpu   = tx_dst_q[13:11];
  assign tx_flit.hdr.dst_addr  = tx_dst_q[10:0] + FLIT_ADDR_W'(tx_idx_q);
  assign tx_flit.data          = {tx_hi_q, tx_lo_q};

  // ---------------- RX state machine -------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_st_q <= RX_IDLE;
      rx_q    <= '0;
    end else begin
      unique case (rx_st_q)
        RX_IDLE: if (rx_valid) begin
          rx_q    <= rx_flit;
          rx_st_q <= RX_W0;
        end
        RX_W0: if (mst_rsp.aw_ready) rx_st_q <= RX_B0;
        RX_B0: if (mst_rsp.b_valid)  rx_st_q <= RX_W1;
        RX_W1: if (mst_rsp.aw_ready) rx_st_q <= RX_B1;
        RX_B1: if (mst_rsp.b_valid)  rx_st_q <= RX_IDLE;
        default: rx_st_q <= RX_IDLE;
      endcase
    end
  end

  // ---------------- bus master -------------------------------------------
  always_comb begin
    mst_req          = AXI_REQ_IDLE;
    mst_req.ar_valid = (tx_st_q == TX_AR0) || (tx_st_q == TX_AR1);
    mst_req.ar.addr  = tx_ptr_q;
    mst_req.r_ready  = (tx_st_q == TX_R0) || (tx_st_q == TX_R1);
    mst_req.aw_valid = (rx_st_q == RX_W0) || (rx_st_q == RX_W1);
    mst_req.w_valid  = mst_req.aw_valid;
    mst_req.aw.addr  = (rx_st_q == RX_W1) ? rx_addr + 32'd4 : rx_addr;
    mst_req.w.data   = (rx_st_q == RX_W1) ? rx_q.data[63:32] : rx_q.data[31:0];
    mst_req.w.strb   = '1;
    mst_req.b_ready  = (rx_st_q == RX_B0) || (rx_st_q == RX_B1);
  end

  a_aw_w_together: assert property (@(posedge clk) disable iff (!rst_n)
    mst_req.aw_valid && mst_rsp.aw_ready |-> mst_rsp.w_ready)
    else $error("nci: slave took AW without W");

endmodule
