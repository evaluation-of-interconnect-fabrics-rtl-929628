// tb_wb_ic_env: test environment for one wb_interconnect instance.
//
// NM masters run random single writes and reads, and short bursts of
// pipelined writes, against NS Wishbone slave models (64-word memories
// with random stall and an ack in the cycle after a request is taken).
// Each master writes only the words whose index modulo NM is its own
// number, so the expected value of every read is known without a model of
// the bus order. At the end master 0 alone sends a burst of 8 pipelined
// writes to an idle bus with slaves that never stall; they must be taken
// in 8 consecutive cycles. Counts: checks, failures, cycles in which two
// or more slaves took a request, and cycles in which a master waited
// while another one was served.
module tb_wb_ic_env
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
  output logic done
);
  localparam int WORDS = 64;

  wb_req_t mreq [NM];
  wb_rsp_t mrsp [NM];
  wb_req_t sreq [NS];
  wb_rsp_t srsp [NS];

  wb_interconnect #(.N_M(NM), .N_S(NS), .TOPOLOGY(TOPO)) dut (
    .clk, .rst_n, .mst_req(mreq), .mst_rsp(mrsp), .slv_req(sreq), .slv_rsp(srsp));

  // ---------------- slave models -----------------------------------------
  logic [31:0] smem [NS][WORDS];
  logic [31:0] ref_mem [NS][WORDS];
  logic        s_ack [NS], s_rdy [NS];
  logic [31:0] s_rd [NS];
  logic        always_ready = 1'b0;

  for (genvar s = 0; s < NS; s++) begin : g_s
    always_comb begin
      srsp[s]       = WB_RSP_IDLE;
      srsp[s].stall = !s_rdy[s];
      srsp[s].ack   = s_ack[s];
      srsp[s].dat   = s_rd[s];
    end
    always @(negedge clk) s_rdy[s] = always_ready || ($urandom % 3 != 0);
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s_ack[s] <= 1'b0; s_rd[s] <= '0;
        for (int w = 0; w < WORDS; w++) smem[s][w] <= '0;
      end else begin
        s_ack[s] <= sreq[s].cyc && sreq[s].stb && s_rdy[s];
        if (sreq[s].cyc && sreq[s].stb && s_rdy[s]) begin
          if (sreq[s].we) smem[s][sreq[s].adr[7:2]] <= sreq[s].dat;
          else            s_rd[s] <= smem[s][sreq[s].adr[7:2]];
        end
      end
    end
    a_ack_in_cycle: assert property (@(posedge clk) disable iff (!rst_n)
      s_ack[s] |-> sreq[s].cyc)
      else $error("slave %0d: bus cycle ended before its ack", s);
  end

  // ---------------- monitor ----------------------------------------------
  int ack_cnt [NM];
  logic [31:0] last_dat [NM];

  always @(posedge clk) if (rst_n) begin
    int n, nv, nwait;
    n = 0; nv = 0; nwait = 0;
    for (int s = 0; s < NS; s++) if (sreq[s].cyc && sreq[s].stb && !srsp[s].stall) n++;
    if (n > 1) parallel_cycles++;
    if (TOPO == TOPO_SHARED && n > 1) begin
      failures++; $display("shared bus: two slaves served at once");
    end
    for (int m = 0; m < NM; m++) begin
      if (mrsp[m].ack) begin
        ack_cnt[m]++;
        last_dat[m] = mrsp[m].dat;
        if (!mreq[m].cyc) begin failures++; $display("master %0d: ack outside its bus cycle", m); end
      end
      if (mreq[m].cyc && mreq[m].stb) begin
        nv++;
        if (mrsp[m].stall) nwait++;
      end
    end
    if (nv > 1 && nwait > 0) conflict_waits++;
  end

  // ---------------- master threads ---------------------------------------
  int finished = 0;

  function automatic logic [31:0] adr_of(input int s, input int w);
    return (32'(s) << SLV_WIN_LSB) | (32'(w) << 2);
  endfunction

  // a bus cycle of n pipelined writes to words w, w+NM, ... of slave s
  task automatic do_writes(input int m, input int s, input int w, input int n,
                           input logic [31:0] d0);
    int acks0;
    acks0 = ack_cnt[m];
    @(negedge clk);
    mreq[m].cyc = 1'b1;
    for (int k = 0; k < n; k++) begin
      mreq[m].stb = 1'b1; mreq[m].we = 1'b1; mreq[m].sel = 4'hF;
      mreq[m].adr = adr_of(s, w + k * NM);
      mreq[m].dat = d0 + 32'(k);
      #1;
      while (mrsp[m].stall) begin @(negedge clk); #1; end
      ref_mem[s][w + k * NM] = d0 + 32'(k);
      @(negedge clk);
    end
    mreq[m].stb = 1'b0;
    #1;
    while (ack_cnt[m] - acks0 < n) begin @(negedge clk); #1; end
    mreq[m].cyc = 1'b0;
  endtask

  task automatic do_read(input int m, input int s, input int w);
    int acks0;
    acks0 = ack_cnt[m];
    @(negedge clk);
    mreq[m].cyc = 1'b1; mreq[m].stb = 1'b1; mreq[m].we = 1'b0; mreq[m].sel = 4'hF;
    mreq[m].adr = adr_of(s, w);
    #1;
    while (mrsp[m].stall) begin @(negedge clk); #1; end
    @(negedge clk);
    mreq[m].stb = 1'b0;
    #1;
    while (ack_cnt[m] == acks0) begin @(negedge clk); #1; end
    checks++;
    if (last_dat[m] !== ref_mem[s][w]) begin
      failures++;
      $display("master %0d read slave %0d word %0d: expected %h got %h", m, s, w, ref_mem[s][w], last_dat[m]);
    end
    mreq[m].cyc = 1'b0;
  endtask

  initial begin
    checks = 0; failures = 0; parallel_cycles = 0; conflict_waits = 0; done = 1'b0;
    for (int m = 0; m < NM; m++) begin mreq[m] = WB_REQ_IDLE; ack_cnt[m] = 0; end
    for (int s = 0; s < NS; s++) for (int w = 0; w < WORDS; w++) ref_mem[s][w] = '0;
    @(posedge rst_n);
    for (int m = 0; m < NM; m++) begin
      fork
        automatic int mm = m;
        begin
          for (int k = 0; k < OPS; k++) begin
            automatic int s, w, op, n;
            s  = $urandom % NS;
            n  = 1 + $urandom % 3;
            w  = (($urandom % (WORDS / NM - n + 1)) * NM) + mm;
            op = $urandom % 3;
            if (op == 0) do_writes(mm, s, w, 1, $urandom);
            else if (op == 1) do_writes(mm, s, w, n, $urandom);
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
    fork
      do_writes(0, 1, 0, 8, 32'hB00);
      begin
        int first, last, t;
        t = 0; first = -1; last = -1;
        while (mreq[0].cyc || first < 0) begin
          @(posedge clk);
          if (mreq[0].cyc && mreq[0].stb && !mrsp[0].stall) begin
            if (first < 0) first = t;
            last = t;
          end
          t++;
        end
        checks++;
        if (last - first != 7) begin
          failures++; $display("8 pipelined writes took %0d cycles, expected 8", last - first + 1);
        end
      end
    join
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (smem[1][k * NM] !== 32'hB00 + 32'(k)) begin failures++; $display("burst write %0d lost", k); end
    end
    // every word, read back through master 0
    for (int s = 0; s < NS; s++)
      for (int w = 0; w < WORDS; w += 3) do_read(0, s, w);
    done = 1'b1;
  end
endmodule
