// tb_cpu_wb_master: self-checking test of the Wishbone CPU bus master and
// its write FIFO, attached to a data memory through wb2axi_slave (no
// interconnect, no register stages).
//
// Checks: a load returns the stored value with rvalid exactly 4 cycles
// after the request; a stream of stores issued in consecutive cycles
// leaves as pipelined writes, one accepted by the memory in every cycle,
// inside a single bus cycle; while the memory's own CPU port keeps the
// memory busy, the write FIFO fills and the CPU is held off; a load
// issued right after stores sees their data; random loads and stores
// agree with a reference model, and the final contents, read over the
// memory's own port, match it too.
module tb_cpu_wb_master;
  import mpsoc_pkg::*;
  localparam int W = 256, DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  cpu_req_t creq, lreq;
  cpu_rsp_t crsp, lrsp;
  wb_req_t  wreq;
  wb_rsp_t  wrsp;
  axi_req_t breq;
  axi_rsp_t brsp;
  logic ffull;
  logic [31:0] ref_mem [W];
  int checks = 0, failures = 0;
  int cyc = 0, stall_cycles = 0, full_seen = 0, cyc_rises = 0;
  int acc_times[$];
  logic cyc_d = 1'b0;

  cpu_wb_master #(.FIFO_DEPTH(DEPTH)) dut (.clk, .rst_n, .cpu_req(creq), .cpu_rsp(crsp),
                                           .bus_req(wreq), .bus_rsp(wrsp), .fifo_full(ffull));
  wb2axi_slave u_front (.wb_req(wreq), .wb_rsp(wrsp), .axi_req(breq), .axi_rsp(brsp));
  dmem #(.WORDS(W)) u_mem (.clk, .rst_n, .lmem_req(lreq), .lmem_rsp(lrsp), .bus_req(breq), .bus_rsp(brsp));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (wreq.cyc && wreq.stb && wreq.we && !wrsp.stall) acc_times.push_back(cyc);
    if (ffull) full_seen++;
    if (wreq.cyc && !cyc_d) cyc_rises++;
    cyc_d <= wreq.cyc;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: expected %h got %h", what, exp, got); end
  endtask

  task automatic store(input int a, input logic [31:0] d);
    @(negedge clk);
    creq = '{req: 1'b1, we: 1'b1, addr: 32'(a) << 2, wdata: d, be: 4'hF};
    #1;
    while (!crsp.gnt) begin stall_cycles++; @(negedge clk); #1; end
    ref_mem[a] = d;
    @(negedge clk);
    creq = '0;
  endtask

  task automatic load(input int a, output int lat);
    @(negedge clk);
    creq = '{req: 1'b1, we: 1'b0, addr: 32'(a) << 2, wdata: '0, be: '0};
    #1;
    while (!crsp.gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    creq = '0;
    lat = 1;
    while (!crsp.rvalid && lat < 50) begin @(negedge clk); lat++; end
    check("load data", crsp.rdata, ref_mem[a]);
  endtask

  // stores in consecutive cycles, as fast as the CPU port grants them
  task automatic store_stream(input int a0, input int n, input logic [31:0] base);
    @(negedge clk);
    for (int i = 0; i < n; i++) begin
      creq = '{req: 1'b1, we: 1'b1, addr: 32'(a0 + i) << 2, wdata: base + 32'(i), be: 4'hF};
      #1;
      while (!crsp.gnt) begin stall_cycles++; @(negedge clk); #1; end
      ref_mem[a0 + i] = base + 32'(i);
      @(negedge clk);
    end
    creq = '0;
  endtask

  initial begin
    int lat, rises0;
    creq = '0; lreq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < W; a++) ref_mem[a] = '0;
    for (int a = 0; a < W; a++) begin
      @(negedge clk); lreq = '{req: 1'b1, we: 1'b1, addr: 32'(a) << 2, wdata: '0, be: 4'hF};
    end
    @(negedge clk); lreq = '0;

    // load latency
    store(3, 32'h12345678);
    repeat (10) @(negedge clk);
    load(3, lat);
    checks++;
    if (lat != 4) begin failures++; $display("load latency %0d, expected 4", lat); end

    // one write per cycle in a single bus cycle
    repeat (5) @(negedge clk);
    acc_times.delete();
    rises0 = cyc_rises;
    store_stream(16, 12, 32'hA000);
    repeat (20) @(negedge clk);
    checks++;
    if (acc_times.size() != 12) begin failures++; $display("%0d writes accepted, expected 12", acc_times.size()); end
    for (int i = 1; i < acc_times.size(); i++) begin
      checks++;
      if (acc_times[i] - acc_times[i-1] != 1) begin
        failures++; $display("writes %0d cycles apart, expected 1", acc_times[i] - acc_times[i-1]);
      end
    end
    checks++;
    if (cyc_rises - rises0 != 1) begin
      failures++; $display("stream used %0d bus cycles, expected 1", cyc_rises - rises0);
    end

    // the memory's own port has priority: bus writes wait, the FIFO fills
    stall_cycles = 0;
    fork
      begin
        for (int i = 0; i < 12; i++) begin
          @(negedge clk); lreq = '{req: 1'b1, we: 1'b0, addr: '0, wdata: '0, be: '0};
        end
        @(negedge clk); lreq = '0;
      end
      store_stream(40, 10, 32'hC000);
    join
    repeat (20) @(negedge clk);
    checks++;
    if (stall_cycles == 0) begin failures++; $display("full write FIFO never stalled the CPU"); end
    checks++;
    if (full_seen == 0) begin failures++; $display("FIFO never full"); end

    // read after write, and a random mix
    for (int t = 0; t < 300; t++) begin
      int a;
      a = $urandom % W;
      if ($urandom % 2) store(a, $urandom);
      else load(a, lat);
    end
    for (int t = 0; t < 20; t++) begin
      store_stream(100 + t, 3, 32'(t) << 8);
      load(100 + t + 2, lat);
    end

    for (int a = 0; a < W; a++) begin
      @(negedge clk); lreq = '{req: 1'b1, we: 1'b0, addr: 32'(a) << 2, wdata: '0, be: '0};
      @(negedge clk); lreq = '0;
      check("memory word", lrsp.rdata, ref_mem[a]);
    end
    $display("CPU stall cycles on a full FIFO: %0d", stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
