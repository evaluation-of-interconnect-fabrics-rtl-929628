// tb_axi_interconnect: self-checking test of the cluster interconnect in
// both topologies, side by side.
//
// Two environments (tb_axi_ic_env), one with a shared bus and one with a
// crossbar, each with 4 masters and 4 slaves and random traffic. Every
// read is compared with the last value written. The crossbar must serve
// different slaves in parallel at least once; the shared bus must never
// do so (checked in every cycle inside the environment). Arbitration
// conflicts (a master waiting while another holds the bus) must occur, and
// the shared bus must accept a write while another master's write still
// waits for its response (interleaved writes).
module tb_axi_interconnect;
  import mpsoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int c_sh, f_sh, p_sh, w_sh, i_sh, c_xb, f_xb, p_xb, w_xb, i_xb;
  logic d_sh, d_xb;
  int checks, failures;

  tb_axi_ic_env #(.TOPO(TOPO_SHARED),   .NM(4), .NS(4)) u_shared (
    .clk, .rst_n, .checks(c_sh), .failures(f_sh), .parallel_cycles(p_sh), .conflict_waits(w_sh), .interleaved(i_sh), .done(d_sh));
  tb_axi_ic_env #(.TOPO(TOPO_CROSSBAR), .NM(4), .NS(4)) u_xbar (
    .clk, .rst_n, .checks(c_xb), .failures(f_xb), .parallel_cycles(p_xb), .conflict_waits(w_xb), .interleaved(i_xb), .done(d_xb));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c_sh + c_xb, f_sh + f_xb + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d_sh && d_xb);
    checks   = c_sh + c_xb + 4;
    failures = f_sh + f_xb;
    if (p_xb == 0) begin failures++; $display("crossbar never served two slaves at once"); end
    if (w_sh == 0) begin failures++; $display("shared bus never made a master wait"); end
    if (i_sh == 0) begin failures++; $display("shared bus never interleaved writes of two masters"); end
    if (c_sh < 100 || c_xb < 100) begin failures++; $display("too few reads checked"); end
    $display("shared: %0d reads checked, %0d waits, %0d interleaved writes; crossbar: %0d reads, %0d parallel cycles",
             c_sh, w_sh, i_sh, c_xb, p_xb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
