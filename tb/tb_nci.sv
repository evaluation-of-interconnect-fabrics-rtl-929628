// tb_nci: self-checking test of the network cluster interface (DMA).
//
// The NCI's bus master port is attached to a memory model of the whole
// cluster address space (random ready, one-cycle responses). The test
// programs the registers over the bus slave port, starts packets and
// checks every flit the NCI sends: header fields, last flag, address
// increment and the two 32-bit words packed into the payload. The sent
// flits are fed back into the receive port (with random gaps), and the
// test checks that each one was written to the right place in the target
// memory and that RX_CNT counts them. The busy bit is polled over the bus.
module tb_nci;
  import mpsoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  axi_req_t sreq, mreq;
  axi_rsp_t srsp, mrsp;
  logic  tx_valid, tx_ready, rx_valid, rx_ready;
  flit_t tx_flit, rx_flit;
  int checks = 0, failures = 0;
  logic [31:0] mem [int];
  flit_t loop_q [$];
  flit_t exp_q [$];
  logic  m_b, m_r, m_rdy;
  logic [31:0] m_rd;

  nci #(.MY_X(2), .MY_Y(1)) dut (.clk, .rst_n, .slv_req(sreq), .slv_rsp(srsp),
    .mst_req(mreq), .mst_rsp(mrsp), .tx_valid, .tx_ready, .tx_flit,
    .rx_valid, .rx_ready, .rx_flit);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- memory model on the DMA port -------------------------
  always_comb begin
    mrsp          = AXI_RSP_IDLE;
    mrsp.aw_ready = mreq.aw_valid && mreq.w_valid && !m_b && m_rdy;
    mrsp.w_ready  = mrsp.aw_ready;
    mrsp.b_valid  = m_b;
    mrsp.ar_ready = !m_r && m_rdy;
    mrsp.r_valid  = m_r;
    mrsp.r.data   = m_rd;
  end
  always @(negedge clk) begin
    m_rdy    = ($urandom % 3) != 0;
    tx_ready = ($urandom % 4) != 0;
  end
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_b <= 1'b0; m_r <= 1'b0; m_rd <= '0;
    end else begin
      if (mreq.aw_valid && mrsp.aw_ready) begin
        mem[int'(mreq.aw.addr)] = mreq.w.data;
        m_b <= 1'b1;
      end else if (mreq.b_ready) m_b <= 1'b0;
      if (mreq.ar_valid && mrsp.ar_ready) begin
        m_rd <= mem.exists(int'(mreq.ar.addr)) ? mem[int'(mreq.ar.addr)] : 32'hDEAD_BEEF;
        m_r  <= 1'b1;
      end else if (mreq.r_ready) m_r <= 1'b0;
    end
  end

  // ---------------- flit checker and loopback ----------------------------
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    flit_t e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected flit"); end
    else begin
      e = exp_q.pop_front();
      if (e != tx_flit) begin
        failures++;
        $display("flit mismatch: expected %h got %h", e, tx_flit);
      end
    end
    loop_q.push_back(tx_flit);
  end

  initial begin
    rx_valid = 1'b0; rx_flit = '0;
    forever begin
      @(negedge clk);
      if (loop_q.size() > 0 && ($urandom % 2)) begin
        rx_flit  = loop_q[0];
        rx_valid = 1'b1;
        #1;
        while (!rx_ready) begin @(negedge clk); #1; end
        void'(loop_q.pop_front());
        @(negedge clk);
        rx_valid = 1'b0;
      end
    end
  end

  // ---------------- register access --------------------------------------
  task automatic reg_write(input int r, input logic [31:0] d);
    @(negedge clk);
    sreq.aw_valid = 1'b1; sreq.aw.addr = 32'(r) << 2;
    sreq.w_valid  = 1'b1; sreq.w = '{data: d, strb: 4'hF};
    sreq.b_ready  = 1'b1;
    #1;
    while (!srsp.aw_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    sreq.aw_valid = 1'b0; sreq.w_valid = 1'b0;
    #1;
    while (!srsp.b_valid) begin @(negedge clk); #1; end
    @(negedge clk);
    sreq.b_ready = 1'b0;
  endtask

  task automatic reg_read(input int r, output logic [31:0] d);
    @(negedge clk);
    sreq.ar_valid = 1'b1; sreq.ar.addr = 32'(r) << 2; sreq.r_ready = 1'b1;
    #1;
    while (!srsp.ar_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    sreq.ar_valid = 1'b0;
    #1;
    while (!srsp.r_valid) begin @(negedge clk); #1; end
    d = srsp.r.data;
    @(negedge clk);
    sreq.r_ready = 1'b0;
  endtask

  initial begin
    logic [31:0] d;
    int total;
    sreq = AXI_REQ_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    total = 0;
    for (int p = 0; p < 6; p++) begin
      int src_cpu, dst_cpu, len, src_off, dst_addr;
      logic [31:0] src, dst;
      src_cpu  = $urandom % 4;
      dst_cpu  = $urandom % 4;
      len      = 1 + $urandom % 9;
      src_off  = ($urandom % 64) * 8;
      dst_addr = 100 + ($urandom % 64);
      src = (32'(src_cpu) << SLV_WIN_LSB) + 32'(src_off);
      dst = {14'd0, 2'd2, 2'd1, 3'(dst_cpu), 11'(dst_addr)};
      // source data and expected flits
      for (int k = 0; k < 2 * len; k++) mem[int'(src) + 4 * k] = $urandom;
      for (int k = 0; k < len; k++) begin
        flit_t f;
        f.hdr = '{last: (k == len - 1), dst_x: 2'd2, dst_y: 2'd1, src_x: 2'd2, src_y: 2'd1,
                  dst_cpu: 3'(dst_cpu), dst_addr: 11'(dst_addr + k)};
        f.data = {mem[int'(src) + 8 * k + 4], mem[int'(src) + 8 * k]};
        exp_q.push_back(f);
      end
      reg_write(0, src);
      reg_write(1, dst);
      reg_write(2, 32'(len));
      reg_write(3, 32'd1);
      reg_read(3, d);
      checks++;
      if (d[0] !== 1'b1 && exp_q.size() != 0) begin failures++; $display("busy not set after start"); end
      do reg_read(3, d); while (d[0]);
      total += len;
      // wait until the loopback has delivered everything
      do reg_read(4, d); while (d != 32'(total));
      for (int k = 0; k < len; k++) begin
        int a;
        a = (dst_cpu << SLV_WIN_LSB) + 8 * (dst_addr + k);
        checks += 2;
        if (mem[a] !== mem[int'(src) + 8 * k]) begin failures++; $display("rx low word wrong"); end
        if (mem[a + 4] !== mem[int'(src) + 8 * k + 4]) begin failures++; $display("rx high word wrong"); end
      end
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d flits never sent", exp_q.size()); end
    reg_write(4, 0);
    reg_read(4, d);
    check_zero: begin
      checks++;
      if (d != 0) begin failures++; $display("RX_CNT not cleared"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
