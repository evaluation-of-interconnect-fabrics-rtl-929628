// tb_cpu_bus_master: self-checking test of the CPU bus master and its
// write FIFO, attached directly to a data memory (no interconnect).
//
// Checks: a load returns the stored value with rvalid exactly 4 cycles
// after the request; a burst of stores is granted without stalls until the
// write FIFO is full, then the CPU is held off; stores leave the FIFO at
// one bus write every second cycle; a load issued after stores sees their
// data (it waits for the FIFO to drain); memory contents, read back over
// the memory's own CPU port, match a reference model.
module tb_cpu_bus_master;
  import mpsoc_pkg::*;
  localparam int W = 256, DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  cpu_req_t creq, lreq;
  cpu_rsp_t crsp, lrsp;
  axi_req_t breq;
  axi_rsp_t brsp;
  logic ffull;
  logic [31:0] ref_mem [W];
  int checks = 0, failures = 0;
  int cyc = 0, stall_cycles = 0, full_seen = 0;
  int b_times[$];

  cpu_bus_master #(.FIFO_DEPTH(DEPTH)) dut (.clk, .rst_n, .cpu_req(creq), .cpu_rsp(crsp),
                                            .bus_req(breq), .bus_rsp(brsp), .fifo_full(ffull));
  dmem #(.WORDS(W)) u_mem (.clk, .rst_n, .lmem_req(lreq), .lmem_rsp(lrsp), .bus_req(breq), .bus_rsp(brsp));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (brsp.b_valid && breq.b_ready) b_times.push_back(cyc);
    if (ffull) full_seen++;
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

  // store: present the request until it is granted
  task automatic store(input int a, input logic [31:0] d);
    @(negedge clk);
    creq = '{req: 1'b1, we: 1'b1, addr: 32'(a) << 2, wdata: d, be: 4'hF};
    #1;
    while (!crsp.gnt) begin stall_cycles++; @(negedge clk); #1; end
    ref_mem[a] = d;
    @(negedge clk);
    creq = '0;
  endtask

  // load: returns the cycles from the granted request to rvalid
  task automatic load(input int a, output int lat);
    @(negedge clk);
    creq = '{req: 1'b1, we: 1'b0, addr: 32'(a) << 2, wdata: '0, be: '0};
    #1;
    while (!crsp.gnt) begin @(negedge clk); #1; end
    lat = 0;
    @(negedge clk);
    creq = '0;
    lat = 1;
    while (!crsp.rvalid && lat < 50) begin @(negedge clk); lat++; end
    check("load data", crsp.rdata, ref_mem[a]);
  endtask

  initial begin
    int lat;
    creq = '0; lreq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < W; a++) ref_mem[a] = '0;
    // clear the memory through its CPU port
    for (int a = 0; a < W; a++) begin
      @(negedge clk); lreq = '{req: 1'b1, we: 1'b1, addr: 32'(a) << 2, wdata: '0, be: 4'hF};
    end
    @(negedge clk); lreq = '0;

    // single load latency
    store(3, 32'h12345678);
    repeat (10) @(negedge clk);
    load(3, lat);
    checks++;
    if (lat != 4) begin failures++; $display("load latency %0d, expected 4", lat); end

    // burst of stores, back to back
    b_times.delete();
    stall_cycles = 0;
    fork
      begin
        @(negedge clk);
        for (int i = 0; i < 12; i++) begin
          creq = '{req: 1'b1, we: 1'b1, addr: 32'(16 + i) << 2, wdata: 32'hA000 + 32'(i), be: 4'hF};
          #1;
          while (!crsp.gnt) begin stall_cycles++; @(negedge clk); #1; end
          ref_mem[16 + i] = 32'hA000 + 32'(i);
          @(negedge clk);
        end
        creq = '0;
      end
    join
    repeat (40) @(negedge clk);
    checks++;
    if (stall_cycles == 0) begin failures++; $display("full write FIFO never stalled the CPU"); end
    checks++;
    if (b_times.size() != 12) begin failures++; $display("%0d writes completed, expected 12", b_times.size()); end
    for (int i = 1; i < b_times.size(); i++) begin
      checks++;
      if (b_times[i] - b_times[i-1] != 2) begin
        failures++; $display("writes %0d cycles apart, expected 2", b_times[i] - b_times[i-1]);
      end
    end

    // store then load at once: the load must see the store
    for (int t = 0; t < 200; t++) begin
      int a;
      a = $urandom % W;
      if ($urandom % 2) store(a, $urandom);
      else load(a, lat);
    end

    // final contents over the memory's own port
    for (int a = 0; a < W; a++) begin
      @(negedge clk); lreq = '{req: 1'b1, we: 1'b0, addr: 32'(a) << 2, wdata: '0, be: '0};
      @(negedge clk); lreq = '0;
      check("memory word", lrsp.rdata, ref_mem[a]);
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FIFO never full"); end
    $display("CPU stall cycles on a full FIFO: %0d", stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
