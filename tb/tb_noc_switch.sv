// tb_noc_switch: self-checking test of one switch box in the middle of a
// 3x3 mesh (coordinates 1,1), so every output has a neighbour.
//
// First a lone flit measures the latency (must be 2 cycles). Then all five
// inputs send random packets (1 to 6 flits) to random destinations while
// the outputs apply random back-pressure. Each flit carries its input port,
// packet number and flit number in the payload. Checks: each flit leaves
// on the port that XY routing prescribes; flits from one input to one output
// leave in the order they were sent; a packet is never interleaved with another on an
// output (wormhole); every flit arrives. It also counts how often two
// packets competed for one output.
module tb_noc_switch;
  import mpsoc_pkg::*;
  localparam int P = NUM_PORTS;
  localparam int NPKT = 60;
  logic clk = 1'b0, rst_n = 1'b0;
  logic  in_valid [P], in_ready [P], out_valid [P], out_ready [P];
  flit_t in_flit [P], out_flit [P];
  int checks = 0, failures = 0;
  int sent = 0, received = 0, contention = 0;
  flit_t exp_q [P][P][$];   // per input and output
  logic  open_pkt [P];
  logic [7:0]  open_src [P];
  logic [15:0] open_seq [P];
  logic random_ready = 1'b0;

  noc_switch #(.MY_X(1), .MY_Y(1)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_flit,
                                        .out_valid, .out_ready, .out_flit);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xy_route(input int x, input int y);
    if (x > 1) return int'(PORT_EAST);
    if (x < 1) return int'(PORT_WEST);
    if (y > 1) return int'(PORT_NORTH);
    if (y < 1) return int'(PORT_SOUTH);
    return int'(PORT_LOCAL);
  endfunction

  always @(negedge clk) for (int o = 0; o < P; o++) out_ready[o] = !random_ready || ($urandom % 3 != 0);

  // output monitor
  always @(posedge clk) if (rst_n) begin
    int nreq [P];
    for (int o = 0; o < P; o++) nreq[o] = 0;
    for (int i = 0; i < P; i++)
      if (!dut.buf_empty[i]) nreq[int'(dut.want[i])]++;
    for (int o = 0; o < P; o++) if (nreq[o] > 1) contention++;

    for (int o = 0; o < P; o++) if (out_valid[o] && out_ready[o]) begin
      flit_t f;
      int    src;
      f   = out_flit[o];
      src = int'(f.data[63:56]);
      received++;
      checks++;
      if (xy_route(int'(f.hdr.dst_x), int'(f.hdr.dst_y)) != o) begin
        failures++; $display("flit for (%0d,%0d) left on port %0d", f.hdr.dst_x, f.hdr.dst_y, o);
      end
      checks++;
      if (src >= P || exp_q[src][o].size() == 0) begin
        failures++; $display("unexpected flit on port %0d", o);
      end else begin
        flit_t e;
        e = exp_q[src][o].pop_front();
        if (e != f) begin failures++; $display("port %0d: flit out of order from input %0d", o, src); end
      end
      checks++;
      if (open_pkt[o] && (open_src[o] != f.data[63:56] || open_seq[o] != f.data[55:40])) begin
        failures++; $display("port %0d: packets interleaved", o);
      end
      open_pkt[o] = !f.hdr.last;
      open_src[o] = f.data[63:56];
      open_seq[o] = f.data[55:40];
    end
  end

  task automatic send_packet(input int i, input int seq);
    int len, dx, dy;
    do begin
      dx = $urandom % 3; dy = $urandom % 3;
    end while (i != int'(PORT_LOCAL) && xy_route(dx, dy) == i);
    len = 1 + $urandom % 6;
    for (int k = 0; k < len; k++) begin
      flit_t f;
      f = '0;
      f.hdr.last  = (k == len - 1);
      f.hdr.dst_x = COORD_W'(dx);
      f.hdr.dst_y = COORD_W'(dy);
      f.hdr.dst_addr = FLIT_ADDR_W'($urandom);
      f.data = {8'(i), 16'(seq), 8'(k), 32'($urandom)};
      @(negedge clk);
      in_valid[i] = 1'b1;
      in_flit[i]  = f;
      #1;
      while (!in_ready[i]) begin @(negedge clk); #1; end
      exp_q[i][xy_route(dx, dy)].push_back(f);
      sent++;
      @(negedge clk);
      in_valid[i] = 1'b0;
      repeat ($urandom % 3) @(negedge clk);
    end
  endtask

  initial begin
    int lat, done_cnt;
    for (int i = 0; i < P; i++) begin in_valid[i] = 1'b0; in_flit[i] = '0; open_pkt[i] = 1'b0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // latency of a lone flit, local to east
    @(negedge clk);
    in_flit[PORT_LOCAL] = '0;
    in_flit[PORT_LOCAL].hdr.last = 1'b1;
    in_flit[PORT_LOCAL].hdr.dst_x = 2'd2;
    in_flit[PORT_LOCAL].hdr.dst_y = 2'd1;
    in_flit[PORT_LOCAL].data = {8'(PORT_LOCAL), 56'h0};
    in_valid[PORT_LOCAL] = 1'b1;
    exp_q[PORT_LOCAL][PORT_EAST].push_back(in_flit[PORT_LOCAL]);
    sent++;
    lat = 0;
    do begin @(negedge clk); in_valid[PORT_LOCAL] = 1'b0; lat++; end while (!out_valid[PORT_EAST] && lat < 10);
    checks++;
    if (lat != 2) begin failures++; $display("switch latency %0d, expected 2", lat); end
    repeat (3) @(negedge clk);

    random_ready = 1'b1;
    done_cnt = 0;
    for (int i = 0; i < P; i++) begin
      fork
        automatic int ii = i;
        begin
          for (int n = 1; n <= NPKT; n++) send_packet(ii, n);
          done_cnt++;
        end
      join_none
    end
    wait (done_cnt == P);
    repeat (50) @(negedge clk);
    checks++;
    if (received != sent) begin failures++; $display("sent %0d flits, received %0d", sent, received); end
    checks++;
    if (contention == 0) begin failures++; $display("no output contention happened"); end
    $display("flits: %0d, cycles with output contention: %0d", received, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
