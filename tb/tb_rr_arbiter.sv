// tb_rr_arbiter: self-checking test of the round-robin arbiter.
//
// Drives random request vectors into a 5-input arbiter and compares its
// grant with a reference model kept in the testbench (a priority pointer
// that moves past each accepted grant). Also checks fairness: with all
// inputs requesting and every grant accepted, each input is served once
// in any N consecutive grants.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req, gnt;
  logic [2:0]   gidx;
  logic         gval, adv;
  int checks = 0, failures = 0;
  int ptr = 0;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .advance(adv), .gnt, .gnt_idx(gidx), .gnt_valid(gval));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(input logic [N-1:0] r, input int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return (p + k) % N;
    return -1;
  endfunction

  initial begin
    int served [N];
    req = '0; adv = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      int e;
      @(negedge clk);
      req = N'($urandom);
      adv = ($urandom % 4) != 0;
      #1;
      e = expected(req, ptr);
      checks++;
      if (e < 0) begin
        if (gval !== 1'b0 || gnt !== '0) begin failures++; $display("grant without request"); end
      end else if (!gval || int'(gidx) != e || gnt != (N'(1) << e)) begin
        failures++;
        $display("t=%0d req=%b ptr=%0d expected %0d got %0d", t, req, ptr, e, gidx);
      end
      @(posedge clk);
      if (adv && e >= 0) ptr = (e + 1) % N;
    end
    // fairness with all requesting
    for (int i = 0; i < N; i++) served[i] = 0;
    for (int t = 0; t < 4 * N; t++) begin
      @(negedge clk);
      req = '1; adv = 1'b1;
      #1 served[gidx]++;
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (served[i] != 4) begin failures++; $display("input %0d served %0d times", i, served[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
