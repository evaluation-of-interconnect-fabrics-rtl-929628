// tb_cluster_wb: self-checking test of one CPU cluster built on the
// Wishbone bus (4 CPUs, crossbar, one master and one slave register stage
// per port), with the NCI's flit output looped back to its input. The
// same test as tb_cluster, run on the other bus standard; the NCI's DMA
// port reaches the memories through axi2wb_master here.
//
// The CPU cores are replaced by testbench threads on the bus-side request
// ports and on the ports to the CPUs' own memories. Checks: all four CPUs
// write blocks into their neighbour's memory at the same time and read
// them back over the bus; the contents are also read over the memories'
// own ports; a remote load through both register stages takes 8 cycles;
// a DMA transfer programmed through the NCI registers copies a block from
// one CPU's memory into another's, and RX_CNT reports its flits.
module tb_cluster_wb;
  import mpsoc_pkg::*;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  cpu_req_t creq [N], lreq [N];
  cpu_rsp_t crsp [N], lrsp [N];
  logic     wfull [N];
  logic  tx_valid, tx_ready, rx_valid, rx_ready;
  flit_t tx_flit, rx_flit;
  int checks = 0, failures = 0;
  logic [31:0] ref_mem [N][64];

  cluster #(.N_CPU(N), .BUS_STD(BUS_WB), .DMEM_WORDS(1024)) dut (
    .clk, .rst_n, .cpu_req(creq), .cpu_rsp(crsp), .wfifo_full(wfull),
    .lmem_req(lreq), .lmem_rsp(lrsp),
    .tx_valid, .tx_ready, .tx_flit, .rx_valid, .rx_ready, .rx_flit);

  assign rx_valid = tx_valid;
  assign rx_flit  = tx_flit;
  assign tx_ready = rx_ready;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] cl_addr(input int cpu, input int word);
    return (32'(cpu) << SLV_WIN_LSB) | (32'(word) << 2);
  endfunction

  task automatic store(input int c, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    creq[c] = '{req: 1'b1, we: 1'b1, addr: a, wdata: d, be: 4'hF};
    #1;
    while (!crsp[c].gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    creq[c] = '0;
  endtask

  task automatic load(input int c, input logic [31:0] a, output logic [31:0] d, output int lat);
    @(negedge clk);
    creq[c] = '{req: 1'b1, we: 1'b0, addr: a, wdata: '0, be: '0};
    #1;
    while (!crsp[c].gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    creq[c] = '0;
    lat = 1;
    while (!crsp[c].rvalid && lat < 200) begin @(negedge clk); lat++; end
    d = crsp[c].rdata;
  endtask

  task automatic local_read(input int c, input int word, output logic [31:0] d);
    @(negedge clk);
    lreq[c] = '{req: 1'b1, we: 1'b0, addr: 32'(word) << 2, wdata: '0, be: '0};
    @(negedge clk);
    lreq[c] = '0;
    d = lrsp[c].rdata;
  endtask

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: expected %h got %h", what, exp, got); end
  endtask

  initial begin
    logic [31:0] d;
    int lat, done_cnt;
    for (int c = 0; c < N; c++) begin creq[c] = '0; lreq[c] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // all CPUs write their neighbour's memory at once, then read it back
    done_cnt = 0;
    for (int c = 0; c < N; c++) begin
      fork
        automatic int cc = c;
        begin
          automatic int t, l;
          automatic logic [31:0] v;
          t = (cc + 1) % N;
          for (int w = 0; w < 32; w++) begin
            v = $urandom;
            ref_mem[t][w] = v;
            store(cc, cl_addr(t, w), v);
          end
          for (int w = 0; w < 32; w++) begin
            load(cc, cl_addr(t, w), v, l);
            check("remote read back", v, ref_mem[t][w]);
          end
          done_cnt++;
        end
      join_none
    end
    wait (done_cnt == N);
    for (int c = 0; c < N; c++)
      for (int w = 0; w < 32; w += 5) begin
        local_read(c, w, d);
        check("local port view", d, ref_mem[c][w]);
      end

    // remote load latency through one master and one slave register stage
    repeat (5) @(negedge clk);
    load(0, cl_addr(2, 3), d, lat);
    check("latency read", d, ref_mem[2][3]);
    checks++;
    if (lat != 8) begin failures++; $display("remote load latency %0d, expected 8", lat); end

    // DMA: CPU 1 moves words 0..7 of CPU 1's memory to CPU 3, word 40..
    store(1, cl_addr(N, 0), cl_addr(1, 0));                  // TX_SRC
    store(1, cl_addr(N, 1), {14'd0, 2'd0, 2'd0, 3'd3, 11'd20}); // TX_DST, flit addr 20 = word 40
    store(1, cl_addr(N, 2), 32'd4);                           // 4 flits
    store(1, cl_addr(N, 3), 32'd1);                           // start
    lat = 0;
    do begin load(1, cl_addr(N, 4), d, lat); end while (d != 32'd4 && lat < 200);
    check("RX_CNT", d, 32'd4);
    for (int w = 0; w < 8; w++) begin
      local_read(3, 40 + w, d);
      check("DMA copy", d, ref_mem[1][w]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
