// End-to-end testbench of xhybrid_top.
// Three runs side by side:
//  * ex2: the 8-pattern example (5 chains x 3 cells) with a 10-bit MISR and
//    q = 2. The partitioning must stop after two rounds with control-bit
//    costs 60 and 58, give three partitions whose masks are the printed
//    control bits, mask 23 X's and leak 5.
//  * ex1: the same example with q = 1: partitioning stops after the first
//    round (44 bits against 51 for the second).
//  * rnd: 24 random patterns with correlated X's (four groups of 40 cells
//    sharing pattern sets) on 8 chains of 40 cells,
//    which makes halts happen inside patterns.
// Every mechanism (mask load, shift, masking, X leak into the MISR, halt
// inside a pattern, halt from idle, MISR clear) must occur at least once.
module tb_xhybrid_top;
  logic clk = 0;
  always #5 clk = ~clk;

  logic d2, d1, dr;
  int c2, f2, c1, f1, cr, fr;
  int l2, s2, m2, k2, hm2, he2, cl2, p2, b2;
  int l1, s1, m1, k1, hm1, he1, cl1, p1, b1;
  int lr, sr, mr, kr, hmr, her, clr, pr, br;

  xh_harness #(.N(5), .L(3), .M(10), .Q(2), .WORKLOAD(0), .NP(8)) ex2 (
    .clk, .done(d2), .checks(c2), .failures(f2), .n_loads(l2), .n_shifts(s2),
    .n_masked_x(m2), .n_leaked_x(k2), .n_halts_mid(hm2), .n_halts_end(he2),
    .n_clears(cl2), .n_parts(p2), .ctrl_bits(b2), .plan_bits(), .plan_masked(), .plan_leaked());
  xh_harness #(.N(5), .L(3), .M(10), .Q(1), .WORKLOAD(0), .NP(8)) ex1 (
    .clk, .done(d1), .checks(c1), .failures(f1), .n_loads(l1), .n_shifts(s1),
    .n_masked_x(m1), .n_leaked_x(k1), .n_halts_mid(hm1), .n_halts_end(he1),
    .n_clears(cl1), .n_parts(p1), .ctrl_bits(b1), .plan_bits(), .plan_masked(), .plan_leaked());
  xh_harness #(.N(8), .L(40), .M(10), .Q(2), .WORKLOAD(1), .NP(24), .NXGROUPS(4),
               .CELLS_PER_GROUP(40), .NSPARSE(20), .NALWAYS(4), .SEED(7)) rnd (
    .clk, .done(dr), .checks(cr), .failures(fr), .n_loads(lr), .n_shifts(sr),
    .n_masked_x(mr), .n_leaked_x(kr), .n_halts_mid(hmr), .n_halts_end(her),
    .n_clears(clr), .n_parts(pr), .ctrl_bits(br), .plan_bits(), .plan_masked(), .plan_leaked());

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit has_part(logic [63:0] v);
    foreach (ex2.parts[i]) if (ex2.parts[i] == v) return 1;
    return 0;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (d2 && d1 && dr);
    @(posedge clk);
    // Partitioning of the example (patterns numbered from 1 in the text).
    check(ex2.round_cost.size() == 4 && ex2.round_cost[1] == 60 && ex2.round_cost[2] == 58,
          $sformatf("q=2 round costs %p", ex2.round_cost));
    check(p2 == 3, "q=2: three partitions");
    check(has_part(64'b1100_0110) && has_part(64'b0001_1001) && has_part(64'b0010_0000),
          "q=2: partitions {2,3,7,8} {1,4,5} {6}");
    check(m2 == 23 && k2 == 5, $sformatf("q=2: masked %0d leaked %0d, expected 23/5", m2, k2));
    check(ex1.round_cost.size() == 3 && ex1.round_cost[1] == 44 && ex1.round_cost[2] == 51,
          $sformatf("q=1 round costs %p", ex1.round_cost));
    check(p1 == 2 && m1 == 16 && k1 == 12, "q=1: two partitions, 16 masked, 12 leaked");
    // Control bits of the printed masks: partition {2,3,7,8}: SC4 cell 3;
    // {1,4,5}: SC1..SC3 cell 1, SC4 cell 3, SC5 cell 2; {6}: SC1..SC3 cell 1, SC2 cell 3.
    for (int i = 0; i < 3; i++) begin
      logic [63:0] pt;
      logic [14:0] got, expb;
      int cells[$];  // chain * 10 + cell, both numbered from 1
      pt = (i == 0) ? 64'b1100_0110 : (i == 1) ? 64'b0001_1001 : 64'b0010_0000;
      cells = (i == 0) ? '{43} : (i == 1) ? '{11, 21, 31, 43, 52} : '{11, 21, 23, 31};
      expb = '0;
      foreach (cells[k]) expb[(cells[k] % 10 - 1) * 5 + cells[k] / 10 - 1] = 1'b1;
      got = '0;
      for (int c = 0; c < 5; c++)
        for (int j = 0; j < 3; j++) got[j * 5 + c] = ex2.mask_bit(pt, c, j);
      check(got == expb, $sformatf("mask of partition %0d: %b expected %b", i, got, expb));
    end
    // Mechanisms.
    check(l2 + l1 + lr > 0, "mask loads happened");
    check(s2 + s1 + sr > 0, "shifts happened");
    check(m2 + mr > 0, "X masking happened");
    check(k2 + kr > 0, "X's entered the MISR");
    check(hmr > 0, "halt inside a pattern happened");
    check(he2 + her > 0, "halt from idle happened");
    check(cl2 + clr > 0, "MISR clears happened");
    check(pr > 1, "random workload was partitioned");
    $display("ex2: loads %0d shifts %0d masked %0d leaked %0d halts %0d+%0d ctrl bits %0d",
             l2, s2, m2, k2, hm2, he2, b2);
    $display("rnd: loads %0d shifts %0d masked %0d leaked %0d halts %0d+%0d ctrl bits %0d parts %0d",
             lr, sr, mr, kr, hmr, her, br, pr);
    checks += c2 + c1 + cr;
    failures += f2 + f1 + fr;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
