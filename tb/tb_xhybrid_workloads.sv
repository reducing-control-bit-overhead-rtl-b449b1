// Workload testbench: responses shaped like the three evaluated industrial
// circuits, each compacted by its own copy of the design with 32 chains, a
// 32-bit MISR and q = 7. The patterns are partitioned over all 3000
// patterns of the evaluation; the first SP partitions are then loaded and
// one pattern of each is unloaded through the design.
//   CKT-A: 505,050 cells (32 x 15783), X-density 0.05 %
//   CKT-B:  36,075 cells (32 x 1128),  X-density 2.75 %
//   CKT-C:  97,643 cells (32 x 3052),  X-density 2.38 %
// The X maps are synthetic. CKT-B follows its published profile: about
// 3,900 X-capturing cells in groups of 177 cells that capture X's in the
// same patterns, a cell being X in a given pattern with probability
// 2.75 % * 36,075 / 3,900 = 25 %. CKT-A and CKT-C use the same group size
// and probability, with the number of groups set by their X-density.
// Checks are those of the harness (X-free bits against the known-value
// reference, cycle counts, only X cells masked), plus: masking happened, a
// halt happened, and the planned control bits for 3000 patterns are below
// both X-masking only and X-canceling only. The report also gives the
// test time normalised to the shift cycles, 1 + Q * (X's / (M-Q)) / shifts.
module tb_xhybrid_workloads;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NC = 3;
  localparam int SP = 4;  // partitions simulated per circuit, one pattern each
  logic d [NC];
  int c [NC], f [NC], nl [NC], ns [NC], nm [NC], nk [NC], hm [NC], he [NC],
      cl [NC], np [NC], nb [NC], pm [NC], pk [NC];
  longint pb [NC];

  // X cells: A about 1,000 (6 groups), B 3,903 (22), C about 9,300 (53).
  xh_harness #(.N(32), .L(15783), .M(32), .Q(7), .FB(32'hE000_0200), .WORKLOAD(1),
               .NP(3000), .PW(3000), .SIM_PARTS(SP), .SIM_PER_PART(1),
               .NXGROUPS(6), .CELLS_PER_GROUP(177), .NSPARSE(0),
               .PX_PCT(25), .SEED(21)) ckt_a (
    .clk, .done(d[0]), .checks(c[0]), .failures(f[0]), .n_loads(nl[0]), .n_shifts(ns[0]),
    .n_masked_x(nm[0]), .n_leaked_x(nk[0]), .n_halts_mid(hm[0]), .n_halts_end(he[0]),
    .n_clears(cl[0]), .n_parts(np[0]), .ctrl_bits(nb[0]),
    .plan_bits(pb[0]), .plan_masked(pm[0]), .plan_leaked(pk[0]));
  xh_harness #(.N(32), .L(1128), .M(32), .Q(7), .FB(32'hE000_0200), .WORKLOAD(1),
               .NP(3000), .PW(3000), .SIM_PARTS(SP), .SIM_PER_PART(1),
               .NXGROUPS(22), .CELLS_PER_GROUP(177), .NSPARSE(0),
               .PX_PCT(25), .SEED(22)) ckt_b (
    .clk, .done(d[1]), .checks(c[1]), .failures(f[1]), .n_loads(nl[1]), .n_shifts(ns[1]),
    .n_masked_x(nm[1]), .n_leaked_x(nk[1]), .n_halts_mid(hm[1]), .n_halts_end(he[1]),
    .n_clears(cl[1]), .n_parts(np[1]), .ctrl_bits(nb[1]),
    .plan_bits(pb[1]), .plan_masked(pm[1]), .plan_leaked(pk[1]));
  xh_harness #(.N(32), .L(3052), .M(32), .Q(7), .FB(32'hE000_0200), .WORKLOAD(1),
               .NP(3000), .PW(3000), .SIM_PARTS(SP), .SIM_PER_PART(1),
               .NXGROUPS(53), .CELLS_PER_GROUP(177), .NSPARSE(0),
               .PX_PCT(25), .SEED(23)) ckt_c (
    .clk, .done(d[2]), .checks(c[2]), .failures(f[2]), .n_loads(nl[2]), .n_shifts(ns[2]),
    .n_masked_x(nm[2]), .n_leaked_x(nk[2]), .n_halts_mid(hm[2]), .n_halts_end(he[2]),
    .n_clears(cl[2]), .n_parts(np[2]), .ctrl_bits(nb[2]),
    .plan_bits(pb[2]), .plan_masked(pm[2]), .plan_leaked(pk[2]));

  int checks = 0, failures = 0;
  localparam int CELLS [NC] = '{505056, 36096, 97664};
  localparam string NAME [NC] = '{"CKT-A", "CKT-B", "CKT-C"};

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (d[0] && d[1] && d[2]);
    @(posedge clk);
    for (int i = 0; i < NC; i++) begin
      automatic longint xtot = longint'(pm[i]) + pk[i];
      automatic longint mask_only = longint'(CELLS[i]) * 3000;
      automatic longint cancel_only = (longint'(32) * 7 * xtot + 24) / 25;
      automatic real shifts = real'(CELLS[i]) / 32.0 * 3000.0;
      automatic real tt_hyb = 1.0 + 7.0 * (real'(pk[i]) / 25.0) / shifts;
      automatic real tt_can = 1.0 + 7.0 * (real'(xtot) / 25.0) / shifts;
      $display("%s: X-density %0.2f%%, %0d partitions, %0d of %0d X's masked; control bits %0d (masking only %0d = %0.2fx, canceling only %0d = %0.2fx); test time %0.2f (canceling only %0.2f); simulated %0d shifts, %0d halts",
               NAME[i], 100.0 * real'(xtot) / (real'(CELLS[i]) * 3000.0), np[i], pm[i], xtot,
               pb[i], mask_only, real'(mask_only) / real'(pb[i]), cancel_only,
               real'(cancel_only) / real'(pb[i]), tt_hyb, tt_can, ns[i], hm[i] + he[i]);
      checks++;
      if (ns[i] != SP * CELLS[i] / 32 || hm[i] + he[i] == 0 || pm[i] == 0) begin
        failures++;
        $display("FAIL %s: %0d shifts, %0d halts, %0d masked", NAME[i], ns[i], hm[i] + he[i], pm[i]);
      end
      checks++;
      if (pb[i] > cancel_only || pb[i] > mask_only) begin
        failures++;
        $display("FAIL %s: partitioning did not beat both single methods", NAME[i]);
      end
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
