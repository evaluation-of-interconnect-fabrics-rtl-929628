// tb_axi_reg_slice: self-checking test of one AXI register stage.
//
// Random traffic is pushed into all five channels at once: AW, W and AR
// from the master side, B and R from the slave side, each with random
// valid and random ready at the far end. Every item that leaves a channel
// is compared with a queue of the items that went in (order and value),
// and no item may leave in the cycle it entered: a stage adds exactly one
// cycle, which is checked on the first item of each channel.
module tb_axi_reg_slice;
  import mpsoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  axi_req_t sreq, mreq;
  axi_rsp_t srsp, mrsp;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [31:0] q [5][$];  // AW, W, AR, B, R
  int t_in_aw[$];
  int n_out [5];

  axi_reg_slice #(.STAGES(1)) dut (.clk, .rst_n, .slv_req(sreq), .slv_rsp(srsp), .mst_req(mreq), .mst_rsp(mrsp));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string ch, input logic [31:0] got, input int idx);
    checks++;
    n_out[idx]++;
    if (q[idx].size() == 0) begin failures++; $display("%s: item out of nowhere", ch); end
    else begin
      logic [31:0] e;
      e = q[idx].pop_front();
      if (e != got) begin failures++; $display("%s: expected %h got %h", ch, e, got); end
    end
  endtask

  // handshakes are sampled at the clock edge
  always @(posedge clk) if (rst_n) begin
    if (sreq.aw_valid && srsp.aw_ready) begin q[0].push_back(sreq.aw.addr); t_in_aw.push_back(cyc); end
    if (sreq.w_valid  && srsp.w_ready)  q[1].push_back(sreq.w.data);
    if (sreq.ar_valid && srsp.ar_ready) q[2].push_back(sreq.ar.addr);
    if (mrsp.b_valid  && mreq.b_ready)  q[3].push_back(32'(mrsp.b.resp));
    if (mrsp.r_valid  && mreq.r_ready)  q[4].push_back(mrsp.r.data);
    if (mreq.aw_valid && mrsp.aw_ready) begin
      int t;
      t = t_in_aw.pop_front();
      checks++;
      if (cyc - t < 1) begin failures++; $display("AW passed without a register"); end
      cmp("AW", mreq.aw.addr, 0);
    end
    if (mreq.w_valid  && mrsp.w_ready)  cmp("W",  mreq.w.data, 1);
    if (mreq.ar_valid && mrsp.ar_ready) cmp("AR", mreq.ar.addr, 2);
    if (srsp.b_valid  && sreq.b_ready)  cmp("B",  32'(srsp.b.resp), 3);
    if (srsp.r_valid  && sreq.r_ready)  cmp("R",  srsp.r.data, 4);
  end

  // Sources change their item only after it was taken (AXI rule). The
  // stimulus changes at the falling edge; handshakes are seen at the
  // rising edge.
  logic hs_aw, hs_w, hs_ar, hs_b, hs_r;
  always @(posedge clk) begin
    hs_aw = sreq.aw_valid && srsp.aw_ready;
    hs_w  = sreq.w_valid  && srsp.w_ready;
    hs_ar = sreq.ar_valid && srsp.ar_ready;
    hs_b  = mrsp.b_valid  && mreq.b_ready;
    hs_r  = mrsp.r_valid  && mreq.r_ready;
  end
  initial begin
    sreq = '0; mrsp = '0;
    forever begin
      @(negedge clk);
      if (rst_n) begin
        if (!sreq.aw_valid || hs_aw) begin sreq.aw_valid = 1'($urandom); sreq.aw.addr = $urandom; end
        if (!sreq.w_valid  || hs_w)  begin sreq.w_valid  = 1'($urandom); sreq.w.data  = $urandom; end
        if (!sreq.ar_valid || hs_ar) begin sreq.ar_valid = 1'($urandom); sreq.ar.addr = $urandom; end
        if (!mrsp.b_valid  || hs_b)  begin mrsp.b_valid  = 1'($urandom); mrsp.b.resp  = axi_resp_e'($urandom); end
        if (!mrsp.r_valid  || hs_r)  begin mrsp.r_valid  = 1'($urandom); mrsp.r.data  = $urandom; end
        mrsp.aw_ready = 1'($urandom); mrsp.w_ready = 1'($urandom); mrsp.ar_ready = 1'($urandom);
        sreq.b_ready  = 1'($urandom); sreq.r_ready = 1'($urandom);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (n_out[i] < 100) begin failures++; $display("channel %0d moved only %0d items", i, n_out[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
