// Full-size testbench of xhybrid_top: the design at its default parameters
// (32 chains of 15783 cells, 32-bit MISR, q = 7, 32 channels) takes six
// patterns through one complete operation: partitioning, mask loads of
// 15783 columns, unloads with halts inside the patterns whenever 25 X's have
// entered the MISR, and a final halt for the last X-free bits. Two copies
// with different values in the X cells must give the X-free bits computed
// from the known bits alone.
module tb_xhybrid_full;
  logic clk = 0;
  always #5 clk = ~clk;

  logic d;
  int c, f, nl, ns, nm, nk, hm, he, cl, np, nb;
  int checks = 0, failures = 0;

  xh_harness #(.N(xh_pkg::DEF_N_CHAINS), .L(xh_pkg::DEF_CHAIN_LEN), .M(xh_pkg::DEF_M),
               .Q(xh_pkg::DEF_Q), .FB(xh_pkg::DEF_FB_TAPS), .WORKLOAD(1), .NP(6),
               .NXGROUPS(4), .CELLS_PER_GROUP(40), .NSPARSE(30), .NALWAYS(20),
               .SEED(11), .USE_DEFAULTS(1)) h (
    .clk, .done(d), .checks(c), .failures(f), .n_loads(nl), .n_shifts(ns),
    .n_masked_x(nm), .n_leaked_x(nk), .n_halts_mid(hm), .n_halts_end(he),
    .n_clears(cl), .n_parts(np), .ctrl_bits(nb), .plan_bits(), .plan_masked(), .plan_leaked());

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (d);
    @(posedge clk);
    checks++; if (ns != 6 * xh_pkg::DEF_CHAIN_LEN) begin failures++; $display("FAIL shifts %0d", ns); end
    checks++; if (nm == 0) begin failures++; $display("FAIL no X masked"); end
    checks++; if (hm == 0) begin failures++; $display("FAIL no halt inside a pattern"); end
    $display("full: parts %0d loads %0d shifts %0d masked %0d leaked %0d halts %0d+%0d ctrl bits %0d",
             np, nl, ns, nm, nk, hm, he, nb);
    checks += c;
    failures += f;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
