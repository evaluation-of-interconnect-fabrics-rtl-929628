// tb_axi_ic_env: test environment for one axi_interconnect instance.
//
// NM masters run random single writes and reads against NS slave models
// (64-word memories with random ready and one-cycle responses). Each
// master writes only the words whose index modulo NM is its own number, so
// the expected value of every read is known without a bus-order model.
// After the random phase, master 0 alone writes a series of words to an
// always-ready slave, which are then checked in the slave. Counts:
// checks, failures, cycles with two or more writes or reads accepted by
// different slaves at once, cycles in which a master waited for the bus,
// and writes accepted while another master's write still awaited its
// response (interleaved writes).
module tb_axi_ic_env
  import mpsoc_pkg::*;
#(
  parameter topology_e TOPO = TOPO_CROSSBAR,
  parameter int NM = 3,
  parameter int NS = 3,
  parameter int OPS = 150
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   parallel_cycles,
  output int   conflict_waits,
  output int   interleaved,
  output logic done
);
  localparam int WORDS = 64;

  axi_req_t mreq [NM];
  axi_rsp_t mrsp [NM];
  axi_req_t sreq [NS];
  axi_rsp_t srsp [NS];

  axi_interconnect #(.N_M(NM), .N_S(NS), .TOPOLOGY(TOPO)) dut (
    .clk, .rst_n, .mst_req(mreq), .mst_rsp(mrsp), .slv_req(sreq), .slv_rsp(srsp));

  // ---------------- slave models -----------------------------------------
  logic [31:0] smem [NS][WORDS];
  logic [31:0] ref_mem [NS][WORDS];
  logic        s_b [NS], s_r [NS], s_rdy [NS];
  logic [31:0] s_rd [NS];
  logic        always_ready = 1'b0;

  for (genvar s = 0; s < NS; s++) begin : g_s
    always_comb begin
      srsp[s]          = AXI_RSP_IDLE;
      srsp[s].aw_ready = sreq[s].aw_valid && sreq[s].w_valid && !s_b[s] && s_rdy[s];
      srsp[s].w_ready  = srsp[s].aw_ready;
      srsp[s].b_valid  = s_b[s];
      srsp[s].ar_ready = !s_r[s] && s_rdy[s];
      srsp[s].r_valid  = s_r[s];
      srsp[s].r.data   = s_rd[s];
    end
    always @(negedge clk) s_rdy[s] = always_ready || ($urandom % 3 != 0);
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s_b[s] <= 1'b0; s_r[s] <= 1'b0; s_rd[s] <= '0;
        for (int w = 0; w < WORDS; w++) smem[s][w] <= '0;
      end else begin
        if (sreq[s].aw_valid && srsp[s].aw_ready) begin
          smem[s][sreq[s].aw.addr[7:2]] <= sreq[s].w.data;
          s_b[s] <= 1'b1;
        end else if (sreq[s].b_ready) s_b[s] <= 1'b0;
        if (sreq[s].ar_valid && srsp[s].ar_ready) begin
          s_rd[s] <= smem[s][sreq[s].ar.addr[7:2]];
          s_r[s]  <= 1'b1;
        end else if (sreq[s].r_ready) s_r[s] <= 1'b0;
      end
    end
  end

  // ---------------- monitor ----------------------------------------------
  logic b_wait [NM];   // master's write accepted, B not yet received
  for (genvar m = 0; m < NM; m++) begin : g_bw
    always @(posedge clk or negedge rst_n)
      if (!rst_n) b_wait[m] <= 1'b0;
      else if (mreq[m].aw_valid && mrsp[m].aw_ready) b_wait[m] <= 1'b1;
      else if (mrsp[m].b_valid && mreq[m].b_ready) b_wait[m] <= 1'b0;
  end

  always @(posedge clk) if (rst_n) begin
    int nw, nr;
    nw = 0; nr = 0;
    for (int s = 0; s < NS; s++) begin
      if (sreq[s].aw_valid && srsp[s].aw_ready) nw++;
      if (sreq[s].ar_valid && srsp[s].ar_ready) nr++;
    end
    if (nw > 1 || nr > 1) parallel_cycles++;
    for (int m = 0; m < NM; m++)
      if (mreq[m].aw_valid && mrsp[m].aw_ready)
        for (int o = 0; o < NM; o++)
          if (o != m && b_wait[o]) begin interleaved++; break; end
    if (TOPO == TOPO_SHARED && (nw > 1 || nr > 1)) begin
      failures++; $display("shared bus: two transfers of one direction at once");
    end
    begin
      int nv, nwait;
      nv = 0; nwait = 0;
      for (int m = 0; m < NM; m++) if (mreq[m].aw_valid) begin
        nv++;
        if (!mrsp[m].aw_ready) nwait++;
      end
      if (nv > 1 && nwait > 0) conflict_waits++;
    end
  end

  // ---------------- master threads ---------------------------------------
  int finished = 0;

  task automatic do_write(input int m, input int s, input int w, input logic [31:0] d);
    @(negedge clk);
    mreq[m].aw_valid = 1'b1; mreq[m].aw.addr = (32'(s) << SLV_WIN_LSB) | (32'(w) << 2);
    mreq[m].w_valid  = 1'b1; mreq[m].w = '{data: d, strb: 4'hF};
    mreq[m].b_ready  = 1'b1;
    #1;
    while (!(mrsp[m].aw_ready && mrsp[m].w_ready)) begin @(negedge clk); #1; end
    @(negedge clk);
    mreq[m].aw_valid = 1'b0; mreq[m].w_valid = 1'b0;
    #1;
    while (!mrsp[m].b_valid) begin @(negedge clk); #1; end
    ref_mem[s][w] = d;
    @(negedge clk);
    mreq[m].b_ready = 1'b0;
  endtask

  task automatic do_read(input int m, input int s, input int w);
    @(negedge clk);
    mreq[m].ar_valid = 1'b1; mreq[m].ar.addr = (32'(s) << SLV_WIN_LSB) | (32'(w) << 2);
    mreq[m].r_ready  = 1'b1;
    #1;
    while (!mrsp[m].ar_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    mreq[m].ar_valid = 1'b0;
    #1;
    while (!mrsp[m].r_valid) begin @(negedge clk); #1; end
    checks++;
    if (mrsp[m].r.data !== ref_mem[s][w]) begin
      failures++;
      $display("master %0d read slave %0d word %0d: expected %h got %h", m, s, w, ref_mem[s][w], mrsp[m].r.data);
    end
    @(negedge clk);
    mreq[m].r_ready = 1'b0;
  endtask

  initial begin
    checks = 0; failures = 0; parallel_cycles = 0; conflict_waits = 0; interleaved = 0; done = 1'b0;
    for (int m = 0; m < NM; m++) mreq[m] = AXI_REQ_IDLE;
    for (int s = 0; s < NS; s++) for (int w = 0; w < WORDS; w++) ref_mem[s][w] = '0;
    @(posedge rst_n);
    for (int m = 0; m < NM; m++) begin
      fork
        automatic int mm = m;
        begin
          for (int k = 0; k < OPS; k++) begin
            automatic int s, w;
            s = $urandom % NS;
            w = (($urandom % (WORDS / NM)) * NM) + mm;
            if ($urandom % 2) do_write(mm, s, w, $urandom);
            else do_read(mm, s, w);
          end
          finished++;
        end
      join_none
    end
    wait (finished == NM);
    // write rate of a single master on an idle bus
    always_ready = 1'b1;
    repeat (3) @(negedge clk);
    for (int k = 0; k < 8; k++) do_write(0, 1, k * NM, 32'hB00 + 32'(k));
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (smem[1][k * NM] !== 32'hB00 + 32'(k)) begin failures++; $display("stream write %0d lost", k); end
    end
    done = 1'b1;
  end
endmodule
