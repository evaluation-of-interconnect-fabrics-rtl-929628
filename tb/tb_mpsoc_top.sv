// tb_mpsoc_top: end-to-end test of the whole MPSoC at its default size
// (2x2 mesh, 4 CPUs per cluster, 16 CPUs, 16 kB per data memory).
//
// Testbench threads stand in for the 16 CPU cores. Phase 1, inside the
// clusters: every CPU streams stores into the memory of a neighbour in
// its cluster (filling its write FIFO), then loads them back, and the
// contents are also read over the memories' own ports; then three CPUs of
// every cluster store into the same memory at once, so that their writes
// interleave on the bus; one remote load is timed (8 cycles with the
// default register stages). Phase 2, across the
// NoC: CPU 0 of every cluster programs its NCI to send an 8-flit packet;
// three clusters send to the same cluster at once (so packets wait for
// the locked output and links see back-pressure) and that cluster sends
// to the opposite corner; the corner-to-corner packets take two hops. The receiving
// CPUs poll their NCI's RX_CNT and the data is checked in the target
// memories. Each mechanism (write-FIFO stall, bus wait, interleaved
// writes, register-stage latency, DMA send and receive, two-hop route,
// link back-pressure) is
// counted, and one that never happened counts as a failure.
module tb_mpsoc_top;
  import mpsoc_pkg::*;
  localparam int MX = 2, MY = 2, NC = 4, NCL = MX * MY, NT = NCL * NC;
  logic clk = 1'b0, rst_n = 1'b0;
  cpu_req_t creq [NT], lreq [NT];
  cpu_rsp_t crsp [NT], lrsp [NT];
  logic     wfull [NT];
  int checks = 0, failures = 0;
  int n_fifo_full = 0, n_store_stall = 0, n_backpressure = 0, n_lat_ok = 0;
  int n_flits_rx = 0, n_two_hop = 0, n_interleave = 0;
  logic [31:0] ref_mem [NT][64];

  mpsoc_top dut (.clk, .rst_n, .cpu_req(creq), .cpu_rsp(crsp), .wfifo_full(wfull),
                 .lmem_req(lreq), .lmem_rsp(lrsp));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NT; i++) begin
      if (wfull[i]) n_fifo_full++;
      if (creq[i].req && creq[i].we && !crsp[i].gnt) n_store_stall++;
    end
    for (int c = 0; c < NCL; c++)
      for (int p = 1; p < NUM_PORTS; p++)
        if (dut.out_valid[c][p] && !dut.out_ready[c][p]) n_backpressure++;
    for (int c = 0; c < NCL; c++)
      if (dut.out_valid[c][PORT_LOCAL] && dut.out_ready[c][PORT_LOCAL]) begin
        flit_t f;
        f = dut.out_flit[c][PORT_LOCAL];
        n_flits_rx++;
        if ((f.hdr.src_x != f.hdr.dst_x) && (f.hdr.src_y != f.hdr.dst_y)) n_two_hop++;
      end
  end

  // a write accepted by a memory of cluster 0 while an earlier write to
  // it still waits for its response
  always @(posedge clk) if (rst_n)
    for (int s = 0; s < NC; s++)
      if (dut.g_y[0].g_x[0].u_cl.g_axi.xs_req[s].aw_valid
          && dut.g_y[0].g_x[0].u_cl.g_axi.xs_rsp[s].aw_ready
          && !dut.g_y[0].g_x[0].u_cl.g_axi.u_xbar.bq_empty[s])
        n_interleave++;

  function automatic logic [31:0] cl_addr(input int cpu, input int word);
    return (32'(cpu) << SLV_WIN_LSB) | (32'(word) << 2);
  endfunction

  task automatic store(input int g, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    creq[g] = '{req: 1'b1, we: 1'b1, addr: a, wdata: d, be: 4'hF};
    #1;
    while (!crsp[g].gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    creq[g] = '0;
  endtask

  // back-to-back stores: the next one is presented right after a grant
  task automatic store_burst(input int g, input int tgt, input int w0, input int n);
    @(negedge clk);
    for (int w = w0; w < w0 + n; w++) begin
      automatic logic [31:0] v = $urandom;
      creq[g] = '{req: 1'b1, we: 1'b1, addr: cl_addr(tgt % NC, w), wdata: v, be: 4'hF};
      #1;
      while (!crsp[g].gnt) begin @(negedge clk); #1; end
      ref_mem[tgt][w] = v;
      @(negedge clk);
    end
    creq[g] = '0;
  endtask

  task automatic load(input int g, input logic [31:0] a, output logic [31:0] d, output int lat);
    @(negedge clk);
    creq[g] = '{req: 1'b1, we: 1'b0, addr: a, wdata: '0, be: '0};
    #1;
    while (!crsp[g].gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    creq[g] = '0;
    lat = 1;
    while (!crsp[g].rvalid && lat < 500) begin @(negedge clk); lat++; end
    d = crsp[g].rdata;
  endtask

  task automatic local_read(input int g, input int word, output logic [31:0] d);
    @(negedge clk);
    lreq[g] = '{req: 1'b1, we: 1'b0, addr: 32'(word) << 2, wdata: '0, be: '0};
    @(negedge clk);
    lreq[g] = '0;
    d = lrsp[g].rdata;
  endtask

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: expected %h got %h", what, exp, got); end
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("%-28s %0d", what, n);
  endtask

  initial begin
    int done_cnt, lat;
    logic [31:0] d;
    for (int i = 0; i < NT; i++) begin creq[i] = '0; lreq[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- phase 1: traffic inside the clusters
    done_cnt = 0;
    for (int g = 0; g < NT; g++) begin
      fork
        automatic int gg = g;
        begin
          automatic int cl = gg / NC;
          automatic int tgt = cl * NC + (gg % NC + 1) % NC;
          automatic int l;
          automatic logic [31:0] v;
          store_burst(gg, tgt, 0, 24);
          for (int w = 0; w < 24; w++) begin
            load(gg, cl_addr(tgt % NC, w), v, l);
            check("remote read back", v, ref_mem[tgt][w]);
          end
          done_cnt++;
        end
      join_none
    end
    wait (done_cnt == NT);
    for (int g = 0; g < NT; g++)
      for (int w = 0; w < 24; w += 7) begin
        local_read(g, w, d);
        check("local port view", d, ref_mem[g][w]);
      end
    // CPUs 1..3 of every cluster write into CPU 0's memory together
    done_cnt = 0;
    for (int g = 0; g < NT; g++) if (g % NC != 0) begin
      fork
        automatic int gg = g;
        begin
          store_burst(gg, gg - gg % NC, 24 + 8 * (gg % NC), 8);
          done_cnt++;
        end
      join_none
    end
    wait (done_cnt == NT - NCL);
    repeat (20) @(negedge clk);
    for (int g = 0; g < NT; g += NC)
      for (int w = 32; w < 56; w++) begin
        local_read(g, w, d);
        check("shared target memory", d, ref_mem[g][w]);
      end
    repeat (5) @(negedge clk);
    load(5, cl_addr(3, 2), d, lat);
    check("timed load", d, ref_mem[7][2]);
    checks++;
    if (lat == 8) n_lat_ok++;
    else begin failures++; $display("remote load latency %0d, expected 8", lat); end

    // ---- phase 2: clusters 0, 1 and 2 each send an 8-flit packet to
    // CPU 1 of cluster 3 (words 32+16c ..), cluster 3 sends one to CPU 1
    // of cluster 0 (word 32 ..), all at the same time
    done_cnt = 0;
    for (int c = 0; c < NCL; c++) begin
      fork
        automatic int cc = c;
        begin
          automatic int dc = (cc == NCL - 1) ? 0 : NCL - 1;
          automatic int dx = dc % MX, dy = dc / MX;
          automatic int fa = (cc == NCL - 1) ? 16 : 16 + 8 * cc;
          store(cc * NC, cl_addr(NC, 0), cl_addr(0, 0));                          // TX_SRC
          store(cc * NC, cl_addr(NC, 1), {14'd0, 2'(dx), 2'(dy), 3'd1, 11'(fa)}); // TX_DST
          store(cc * NC, cl_addr(NC, 2), 32'd8);                                   // 8 flits
          store(cc * NC, cl_addr(NC, 3), 32'd1);                                   // start
          done_cnt++;
        end
      join_none
    end
    wait (done_cnt == NCL);
    for (int c = 0; c < NCL; c += NCL - 1) begin
      int tries, expect_n;
      expect_n = (c == 0) ? 8 : 8 * (NCL - 1);
      tries = 0;
      do begin load(c * NC + 1, cl_addr(NC, 4), d, lat); tries++; end
      while (d != 32'(expect_n) && tries < 500);
      check("RX_CNT", d, 32'(expect_n));
    end
    for (int w = 0; w < 16; w++) begin
      local_read(1, 32 + w, d);
      check("NoC delivery to cluster 0", d, ref_mem[(NCL - 1) * NC][w]);
    end
    for (int c = 0; c < NCL - 1; c++)
      for (int w = 0; w < 16; w++) begin
        local_read((NCL - 1) * NC + 1, 32 + 16 * c + w, d);
        check("NoC delivery to cluster 3", d, ref_mem[c * NC][w]);
      end

    need("write FIFO full", n_fifo_full);
    need("CPU store stall", n_store_stall);
    need("interleaved writes", n_interleave);
    need("8-cycle remote load", n_lat_ok);
    need("flits received by NCIs", n_flits_rx);
    need("two-hop flits", n_two_hop);
    need("link back-pressure cycles", n_backpressure);
    checks++;
    if (n_flits_rx != 32) begin failures++; $display("%0d flits arrived, expected 32", n_flits_rx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
