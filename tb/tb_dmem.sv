// tb_dmem: self-checking test of a CPU data memory with its bus slave.
//
// Uses a 256-word memory. Checks: CPU-port writes with byte enables and
// loads one cycle later; bus writes (AW+W, B one cycle later) and bus
// reads (R two cycles after the AR handshake); that a CPU access in the
// same cycle holds the bus off (the CPU port has priority); and a random
// mix of both ports against a reference array in the testbench.
module tb_dmem;
  import mpsoc_pkg::*;
  localparam int W = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  cpu_req_t lreq;
  cpu_rsp_t lrsp;
  axi_req_t breq;
  axi_rsp_t brsp;
  logic [31:0] ref_mem [W];
  int checks = 0, failures = 0;
  int blocked = 0;

  dmem #(.WORDS(W)) dut (.clk, .rst_n, .lmem_req(lreq), .lmem_rsp(lrsp), .bus_req(breq), .bus_rsp(brsp));

  always #5 clk = ~clk;

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

  task automatic cpu_write(input int a, input logic [31:0] d, input logic [3:0] be);
    @(negedge clk);
    lreq = '{req: 1'b1, we: 1'b1, addr: 32'(a) << 2, wdata: d, be: be};
    for (int b = 0; b < 4; b++) if (be[b]) ref_mem[a][8*b +: 8] = d[8*b +: 8];
    @(negedge clk);
    lreq = '0;
  endtask

  task automatic cpu_read(input int a);
    @(negedge clk);
    lreq = '{req: 1'b1, we: 1'b0, addr: 32'(a) << 2, wdata: '0, be: '0};
    @(negedge clk);
    lreq = '0;
    checks++;
    if (!lrsp.rvalid) begin failures++; $display("no rvalid one cycle after a load"); end
    check("cpu read", lrsp.rdata, ref_mem[a]);
  endtask

  // bus write; cpu_busy keeps the CPU port busy for that many cycles first
  task automatic bus_write(input int a, input logic [31:0] d, input logic [3:0] s, input int cpu_busy);
    int n;
    @(negedge clk);
    breq.aw_valid = 1'b1; breq.aw.addr = 32'(a) << 2;
    breq.w_valid  = 1'b1; breq.w = '{data: d, strb: s};
    breq.b_ready  = 1'b1;
    n = 0;
    forever begin
      lreq = (n < cpu_busy) ? '{req: 1'b1, we: 1'b0, addr: '0, wdata: '0, be: '0} : '0;
      #1;
      if (n < cpu_busy) begin
        checks++;
        if (brsp.aw_ready) begin failures++; $display("bus write taken during a CPU access"); end
        else blocked++;
      end
      if (brsp.aw_ready && brsp.w_ready) break;
      @(negedge clk); n++;
    end
    @(negedge clk);
    lreq = '0;
    breq.aw_valid = 1'b0; breq.w_valid = 1'b0;
    checks++;
    if (!brsp.b_valid) begin failures++; $display("B not one cycle after the write"); end
    for (int b = 0; b < 4; b++) if (s[b]) ref_mem[a][8*b +: 8] = d[8*b +: 8];
    @(negedge clk);
    breq.b_ready = 1'b0;
  endtask

  task automatic bus_read(input int a, input int cpu_busy);
    int n, lat;
    @(negedge clk);
    breq.ar_valid = 1'b1; breq.ar.addr = 32'(a) << 2; breq.r_ready = 1'b1;
    n = 0;
    forever begin
      lreq = (n < cpu_busy) ? '{req: 1'b1, we: 1'b0, addr: '0, wdata: '0, be: '0} : '0;
      #1;
      if (n < cpu_busy) begin
        checks++;
        if (brsp.ar_ready) begin failures++; $display("bus read taken during a CPU access"); end
        else blocked++;
      end
      if (brsp.ar_ready) break;
      @(negedge clk); n++;
    end
    @(negedge clk);
    lreq = '0;
    breq.ar_valid = 1'b0;
    lat = 1;
    while (!brsp.r_valid && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 2) begin failures++; $display("bus read latency %0d, expected 2", lat); end
    check("bus read", brsp.r.data, ref_mem[a]);
    @(negedge clk);
    breq.r_ready = 1'b0;
  endtask

  initial begin
    lreq = '0; breq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // initialise through the CPU port
    for (int a = 0; a < W; a++) cpu_write(a, $urandom, 4'hF);
    for (int a = 0; a < W; a += 17) cpu_read(a);
    // byte enables
    cpu_write(5, 32'hAABBCCDD, 4'b0101);
    cpu_read(5);
    bus_write(6, 32'h11223344, 4'b1010, 0);
    bus_read(6, 0);
    // contention with the CPU
    bus_write(7, 32'hCAFEF00D, 4'hF, 3);
    bus_read(7, 2);
    // random mix
    for (int t = 0; t < 300; t++) begin
      int a, op;
      a  = $urandom % W;
      op = $urandom % 4;
      unique case (op)
        0: cpu_write(a, $urandom, 4'($urandom));
        1: cpu_read(a);
        2: bus_write(a, $urandom, 4'($urandom), $urandom % 3);
        default: bus_read(a, $urandom % 3);
      endcase
    end
    checks++;
    if (blocked == 0) begin failures++; $display("CPU priority never exercised"); end
    $display("bus accesses held off by the CPU: %0d cycles", blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
