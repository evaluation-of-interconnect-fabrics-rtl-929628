// dmem: data memory of one CPU, with the CPU's own port and a bus slave.
//
// Each CPU has a private 16 kB data memory that the other CPUs of the
// cluster (and the NCI's DMA) reach over the cluster bus: there is no
// shared memory, only remote access to local memories (NUMA). The memory
// is modelled as one single-ported synchronous SRAM array of WORDS 32-bit
// words with byte enables. The CPU port has priority: in a cycle with a
// CPU access the bus side is held off (aw_ready/ar_ready low), which is
// how a busy CPU stalls remote accesses.
//
// CPU port: lmem_req (cpu_req_t, byte address, only the word bits are
// used) in, lmem_rsp out; gnt is always high, load data comes one cycle
// later with rvalid. Bus port: AXI subset (mpsoc_pkg), one read and one
// write at a time. A bus read takes two cycles inside the memory: the SRAM
// cycle, then the R register, so R is valid two cycles after the AR
// handshake. A write is accepted when AW and W are both present and
// answered with B one cycle later. Up to two write responses can be
// pending (a small counter; all responses are OKAY), so a master that
// takes each B at once can write in every cycle, and bus readiness never
// depends combinationally on b_ready. The 16 kB size is from the design
// description; port priority and the single SRAM port are assumptions.
module dmem
  import mpsoc_pkg::*;
#(
  parameter int unsigned WORDS = 4096,
  localparam int unsigned WA_W = $clog2(WORDS)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cpu_req_t lmem_req,
  output cpu_rsp_t lmem_rsp,
  input  axi_req_t bus_req,
  output axi_rsp_t bus_rsp
);

  logic [DATA_W-1:0] mem [WORDS];

  logic              rd_ph1_q, r_valid_q, cpu_rvalid_q;
  logic [1:0]        b_cnt_q;      // write responses not yet taken
  logic              b_room;
  logic [DATA_W-1:0] sram_q, r_data_q;

  logic              bus_wr, bus_rd, cpu_acc;
  logic              port_en, port_we;
  logic [WA_W-1:0]   port_addr;
  logic [DATA_W-1:0] port_wdata;
  logic [STRB_W-1:0] port_be;

  assign cpu_acc = lmem_req.req;
  assign b_room  = (b_cnt_q != 2'd2);

  always_comb begin
    bus_rsp          = AXI_RSP_IDLE;
    bus_rsp.aw_ready = !cpu_acc && b_room && bus_req.w_valid;
    bus_rsp.w_ready  = !cpu_acc && b_room && bus_req.aw_valid;
    bus_rsp.b_valid  = (b_cnt_q != 2'd0);
    bus_rsp.b.resp   = RESP_OKAY;
    // a write (AW and W both present) goes first, the read waits
    bus_rsp.ar_ready = !cpu_acc && !rd_ph1_q && !r_valid_q
                       && !(bus_req.aw_valid && bus_req.w_valid && b_room);
    bus_rsp.r_valid  = r_valid_q;
    bus_rsp.r.data   = r_data_q;
    bus_rsp.r.resp   = RESP_OKAY;
  end

  assign bus_wr = bus_req.aw_valid && bus_rsp.aw_ready;   // W valid is implied
  assign bus_rd = bus_req.ar_valid && bus_rsp.ar_ready;

  // single SRAM port: CPU first, then a bus write, then a bus read
  always_comb begin
    port_en    = cpu_acc || bus_wr || bus_rd;
    port_we    = cpu_acc ? lmem_req.we : bus_wr;
    port_addr  = cpu_acc ? lmem_req.addr[2 +: WA_W]
               : bus_wr  ? bus_req.aw.addr[2 +: WA_W]
               :           bus_req.ar.addr[2 +: WA_W];
    port_wdata = cpu_acc ? lmem_req.wdata : bus_req.w.data;
    port_be    = cpu_acc ? lmem_req.be    : bus_req.w.strb;
  end

  always_ff @(posedge clk) begin
    if (port_en) begin
      if (port_we) begin
        for (int b = 0; b < int'(STRB_W); b++)
          if (port_be[b]) mem[port_addr][8*b +: 8] <= port_wdata[8*b +: 8];
      end else begin
        sram_q <= mem[port_addr];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ph1_q     <= 1'b0;
      r_valid_q    <= 1'b0;
      r_data_q     <= '0;
      b_cnt_q      <= 2'd0;
      cpu_rvalid_q <= 1'b0;
    end else begin
      cpu_rvalid_q <= cpu_acc && !lmem_req.we;
      rd_ph1_q     <= bus_rd;
      if (rd_ph1_q) begin
        r_valid_q <= 1'b1;
        r_data_q  <= sram_q;
      end else if (bus_req.r_ready) begin
        r_valid_q <= 1'b0;
      end
      b_cnt_q <= b_cnt_q + 2'(bus_wr) - 2'(bus_rsp.b_valid && bus_req.b_ready);
    end
  end

  assign lmem_rsp.gnt    = lmem_req.req;
  assign lmem_rsp.rvalid = cpu_rvalid_q;
  assign lmem_rsp.rdata  = sram_q;

endmodule
