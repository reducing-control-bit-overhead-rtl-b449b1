// Tester model and checker for xhybrid_top, shared by the end-to-end tests.
//
// It plays the tester: it builds a response workload (unknown cells and
// their pattern sets), partitions the patterns with the correlation-driven
// binary partitioning and its control-bit cost function, loads one mask per
// partition, unloads every pattern of that partition, and halts the
// compactor whenever the next column would push the number of unmasked X's
// in the MISR beyond M-Q. For each halt it runs Gaussian elimination on the
// symbolic X dependence of the MISR bits and sends Q selection words.
// Two copies of the design see identical known bits but independent random
// values in every X cell; both X-free outputs must equal the value computed
// from the known bits alone (X's taken as 0).
//   WORKLOAD 0: the 8-pattern, 5-chain, 3-cell example (N=5, L=3).
//   WORKLOAD 1: random correlated X's over NP patterns: NXGROUPS groups of
//               CELLS_PER_GROUP cells sharing a pattern set (each pattern
//               in it with probability PX_PCT %), NALWAYS cells
//               X in every pattern and NSPARSE single X's.
// USE_DEFAULTS instantiates the design without a parameter list (the
// harness parameters must then equal the package defaults).
module xh_harness #(
  parameter int unsigned N = 5,
  parameter int unsigned L = 3,
  parameter int unsigned M = 10,
  parameter int unsigned Q = 2,
  parameter logic [M-1:0] FB = 10'b10_0100_0000,
  parameter int unsigned WORKLOAD = 0,
  parameter int unsigned NP = 8,
  parameter int unsigned PW = 64,           // width of a pattern set, >= NP
  parameter int unsigned SIM_PARTS = 0,     // partitions simulated, 0 = all
  parameter int unsigned SIM_PER_PART = 0,  // patterns simulated per partition, 0 = all
  parameter int unsigned NXGROUPS = 4,
  parameter int unsigned CELLS_PER_GROUP = 6,
  parameter int unsigned NSPARSE = 10,
  parameter int unsigned NALWAYS = 0,
  parameter int unsigned PX_PCT = 35,
  parameter int unsigned SEED = 1,
  parameter bit USE_DEFAULTS = 0
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_loads,      // mask loads (partitions)
  output int   n_shifts,     // shift cycles
  output int   n_masked_x,   // X's removed by masking
  output int   n_leaked_x,   // X's that entered the MISR
  output int   n_halts_mid,  // halts inside a pattern
  output int   n_halts_end,  // halts from idle
  output int   n_clears,     // MISR clears seen
  output int   n_parts,      // partitions used
  output int   ctrl_bits,    // control bits sent (masks + selection words)
  output longint plan_bits,  // control bits the partitioning plans for all NP patterns
  output int   plan_masked,  // X's masked over all NP patterns
  output int   plan_leaked   // X's left to the MISR over all NP patterns
);
  localparam int unsigned CH = 32;
  localparam int unsigned CAP = M - Q;    // X's the MISR may hold
  typedef logic [PW-1:0] pset_t;          // bit p: pattern p

  logic rst_n;
  logic load_start, pat_start, cancel_req;
  logic [CH-1:0] chan_in;
  logic [N-1:0]  scan_a, scan_b;
  logic sh_a, sh_b, xv_a, xv_b, xb_a, xb_b, pd_a, pd_b, ld_a, ld_b, busy_a, busy_b;

  if (USE_DEFAULTS) begin : g_def
    xhybrid_top dut_a (.clk, .rst_n, .load_start, .pat_start, .cancel_req, .chan_in,
      .scan_out(scan_a), .scan_shift(sh_a), .xfree_valid(xv_a), .xfree_bit(xb_a),
      .pat_done(pd_a), .load_done(ld_a), .busy(busy_a));
    xhybrid_top dut_b (.clk, .rst_n, .load_start, .pat_start, .cancel_req, .chan_in,
      .scan_out(scan_b), .scan_shift(sh_b), .xfree_valid(xv_b), .xfree_bit(xb_b),
      .pat_done(pd_b), .load_done(ld_b), .busy(busy_b));
  end else begin : g_par
    xhybrid_top #(.N_CHAINS(N), .CHAIN_LEN(L), .M(M), .Q(Q), .CHANNELS(CH), .FB_TAPS(FB))
      dut_a (.clk, .rst_n, .load_start, .pat_start, .cancel_req, .chan_in,
      .scan_out(scan_a), .scan_shift(sh_a), .xfree_valid(xv_a), .xfree_bit(xb_a),
      .pat_done(pd_a), .load_done(ld_a), .busy(busy_a));
    xhybrid_top #(.N_CHAINS(N), .CHAIN_LEN(L), .M(M), .Q(Q), .CHANNELS(CH), .FB_TAPS(FB))
      dut_b (.clk, .rst_n, .load_start, .pat_start, .cancel_req, .chan_in,
      .scan_out(scan_b), .scan_shift(sh_b), .xfree_valid(xv_b), .xfree_bit(xb_b),
      .pat_done(pd_b), .load_done(ld_b), .busy(busy_b));
  end

  // ---------------------------------------------------------------- workload
  // xmap[cix] = set of patterns (bit p) in which the cell captures an X;
  // cix = pos * N + chain, pos 0 = first bit out of the chain.
  pset_t xmap [int];
  string fig [8][5];  // example responses, cix 1..3 left to right

  function automatic bit known_val(int p, int chain, int pos);
    int unsigned h;
    if (WORKLOAD == 0) return fig[p][chain][pos] == "1";
    h = (p + 1) * 32'h9E37_79B1 ^ (chain + 7) * 32'h85EB_CA6B ^ (pos + 3) * 32'hC2B2_AE35;
    h ^= h >> 15; h *= 32'h2C1B_3C6D; h ^= h >> 12;
    return h[7];
  endfunction

  function automatic bit is_x(int p, int cix);
    return xmap.exists(cix) && xmap[cix][p];
  endfunction

  task automatic build_workload();
    if (WORKLOAD == 0) begin
      fig[0] = '{"X11", "X0X", "X01", "01X", "0X1"};
      fig[1] = '{"111", "110", "100", "00X", "1X1"};
      fig[2] = '{"011", "001", "111", "01X", "001"};
      fig[3] = '{"X11", "X11", "X00", "11X", "0XX"};
      fig[4] = '{"X01", "X01", "X10", "11X", "1X0"};
      fig[5] = '{"X10", "X0X", "X11", "011", "101"};
      fig[6] = '{"111", "110", "100", "00X", "1X0"};
      fig[7] = '{"110", "100", "011", "00X", "1X1"};
      for (int p = 0; p < 8; p++)
        for (int c = 0; c < 5; c++)
          for (int j = 0; j < 3; j++)
            if (fig[p][c][j] == "X") begin
              if (!xmap.exists(j * N + c)) xmap[j * N + c] = '0;
              xmap[j * N + c][p] = 1'b1;
            end
    end else begin
      void'($urandom(SEED));
      for (int g = 0; g < NXGROUPS; g++) begin
        pset_t pset = '0;
        for (int p = 0; p < NP; p++) pset[p] = ($urandom_range(99) < PX_PCT);
        for (int k = 0; k < CELLS_PER_GROUP; k++) begin
          pset_t ps = pset;
          int cix = $urandom_range(N * L - 1);
          // Mostly the group's patterns, sometimes one more or one fewer.
          if ($urandom_range(3) == 0) ps[$urandom_range(NP - 1)] ^= 1'b1;
          xmap[cix] = ps;
        end
      end
      // Cells that capture an X in every pattern (never initialised state).
      for (int k = 0; k < NALWAYS; k++) begin
        pset_t ps = '0;
        for (int p = 0; p < NP; p++) ps[p] = 1'b1;
        xmap[$urandom_range(N * L - 1)] = ps;
      end
      for (int k = 0; k < NSPARSE; k++) begin
        int cix = $urandom_range(N * L - 1);
        pset_t ps = '0;
        ps[$urandom_range(NP - 1)] = 1'b1;
        xmap[cix] = ps;
      end
    end
  endtask

  // ------------------------------------------------------------ partitioning
  pset_t parts[$];

  function automatic int popc(pset_t v);
    return $countones(v);
  endfunction

  // Control bits of a partition set: one mask per partition plus the
  // selection words of the canceling MISR for every unmasked X.
  function automatic longint cost(pset_t ps[$], output int masked, output int leaked);
    masked = 0; leaked = 0;
    foreach (ps[i])
      foreach (xmap[c]) begin
        int cnt = popc(xmap[c] & ps[i]);
        if (cnt == popc(ps[i])) masked += cnt;
        else leaked += cnt;
      end
    return longint'(N) * L * ps.size() + (longint'(M) * Q * leaked + CAP - 1) / CAP;
  endfunction

  // Selected cix of a partition: among the cells that are X in some but not
  // all of its patterns, take the X count shared by the most cells (at least
  // two); the cix first in chain order is selected. Returns -1 if none.
  function automatic int select_cell(pset_t part);
    int grp[int];
    int best_cnt = -1, best_n = 1, sel = -1, sel_key = 0;
    foreach (xmap[c]) begin
      int cnt = popc(xmap[c] & part);
      if (cnt > 0 && cnt < popc(part)) begin
        if (!grp.exists(cnt)) grp[cnt] = 0;
        grp[cnt]++;
      end
    end
    foreach (grp[cnt])
      if (grp[cnt] > best_n || (grp[cnt] == best_n && best_cnt >= 0 && cnt > best_cnt)) begin
        best_n = grp[cnt]; best_cnt = cnt;
      end
    if (best_cnt < 0) return -1;
    foreach (xmap[c])
      if (popc(xmap[c] & part) == best_cnt) begin
        int key = (c % N) * L + c / N;
        if (sel < 0 || key < sel_key) begin sel = c; sel_key = key; end
      end
    return sel;
  endfunction

  // Rounds of binary partitioning; stop when a round would not lower the
  // total control bits. round_cost[r] records the cost after round r.
  longint round_cost[$];
  task automatic partition();
    pset_t all = '0;
    int mk, lk;
    for (int p = 0; p < NP; p++) all[p] = 1'b1;
    parts = '{all};
    round_cost.push_back(cost(parts, mk, lk));
    forever begin
      pset_t nxt[$];
      bit split = 0;
      longint c;
      foreach (parts[i]) begin
        int s = select_cell(parts[i]);
        if (s >= 0) begin
          nxt.push_back(parts[i] & xmap[s]);
          nxt.push_back(parts[i] & ~xmap[s]);
          split = 1;
        end else nxt.push_back(parts[i]);
      end
      if (!split) break;
      c = cost(nxt, mk, lk);
      round_cost.push_back(c);
      if (c >= round_cost[round_cost.size() - 2]) break;
      parts = nxt;
    end
  endtask

  function automatic bit mask_bit(pset_t part, int chain, int pos);
    int cix = pos * N + chain;
    return xmap.exists(cix) && ((xmap[cix] & part) == part);
  endfunction

  // --------------------------------------------------------- symbolic MISR
  logic [M-1:0] ref_known;     // MISR contents with every X taken as 0
  logic [63:0] dep [M];  // X variables each MISR bit depends on
  int           wx;            // X's in the current window

  task automatic misr_step(logic [N-1:0] known, logic [N-1:0] newx);
    logic [M-1:0] f = '0;
    logic [63:0] d [M];
    for (int k = 0; k < N; k++) f[k % M] ^= known[k];
    for (int i = 0; i < M; i++)
      d[i] = (i < M - 1 ? dep[i+1] : 64'd0) ^ (FB[i] ? dep[0] : 64'd0);
    for (int k = 0; k < N; k++)
      if (newx[k]) begin
        d[k % M][wx] ^= 1'b1;
        wx++;
      end
    ref_known = ({1'b0, ref_known[M-1:1]}) ^ f ^ (FB & {M{ref_known[0]}});
    for (int i = 0; i < M; i++) dep[i] = d[i];
  endtask

  // Gaussian elimination: Q combinations of MISR bits free of every X.
  task automatic xfree_rows(output logic [M-1:0] sel [$]);
    logic [63:0] r [M];
    logic [M-1:0] comb [M];
    bit used [M];
    for (int i = 0; i < M; i++) begin
      r[i] = dep[i]; comb[i] = '0; comb[i][i] = 1'b1; used[i] = 0;
    end
    for (int v = 0; v < wx; v++) begin
      int piv = -1;
      for (int i = 0; i < M; i++) if (!used[i] && r[i][v]) begin piv = i; break; end
      if (piv < 0) continue;
      used[piv] = 1;
      for (int i = 0; i < M; i++)
        if (i != piv && r[i][v]) begin r[i] ^= r[piv]; comb[i] ^= comb[piv]; end
    end
    sel = {};
    for (int i = 0; i < M && sel.size() < Q; i++) if (!used[i]) sel.push_back(comb[i]);
  endtask

  // ------------------------------------------------------------- checking
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic halt(bit mid);
    logic [M-1:0] sel [$];
    xfree_rows(sel);
    check(sel.size() == Q, $sformatf("found %0d X-free rows for %0d X's", sel.size(), wx));
    foreach (sel[i]) check(sel[i] != '0, "X-free row is not empty");
    for (int q = 0; q < Q; q++) begin
      logic [M-1:0] s = (q < sel.size()) ? sel[q] : '0;
      bit expv = ^(ref_known & s);
      cancel_req = (q == 0);
      chan_in = CH'(s);
      scan_a = '0; scan_b = '1;
      #1;
      check(!sh_a && !sh_b, "scan halted while canceling");
      check(xv_a && xv_b, "xfree_valid while canceling");
      check(xb_a == expv && xb_b == expv,
            $sformatf("X-free bit %0d: got %b/%b expected %b", q, xb_a, xb_b, expv));
      @(negedge clk);
      ctrl_bits += M;
      if (busy_a == 0 && q < Q - 1) check(0, "controller left the halt early");
    end
    cancel_req = 0;
    n_clears++;  // the last cancel cycle clears the MISR (checked below)
    if (mid) n_halts_mid++; else n_halts_end++;
    ref_known = '0; wx = 0;
    for (int i = 0; i < M; i++) dep[i] = '0;
  endtask

  task automatic load_mask(pset_t part);
    load_start = 1; @(negedge clk); load_start = 0;
    for (int pos = 0; pos < L; pos++) begin
      logic [N-1:0] col;
      for (int c = 0; c < N; c++) col[c] = mask_bit(part, c, pos);
      chan_in = CH'(col);
      #1 check(ld_a == (pos == L - 1), "load_done timing");
      @(negedge clk);
    end
    n_loads++;
    ctrl_bits += N * L;
  endtask

  task automatic unload(int p, pset_t part);
    int cyc = 0, halts0 = n_halts_mid;
    pat_start = 1; @(negedge clk); pat_start = 0;
    for (int pos = 0; pos < L; pos++) begin
      logic [N-1:0] known, newx, colm;
      int nx = 0;
      for (int c = 0; c < N; c++) begin
        bit x = is_x(p, pos * N + c);
        colm[c] = mask_bit(part, c, pos);
        if (colm[c]) begin
          check(x, "only X cells are masked");
          n_masked_x++;
        end
        newx[c]  = x && !colm[c];
        known[c] = !x && known_val(p, c, pos);
        nx += int'(newx[c]);
      end
      check(nx <= CAP, "column fits the X-canceling capacity");
      if (wx + nx > CAP) begin
        halt(1);
        cyc += Q;
      end
      for (int c = 0; c < N; c++) begin
        scan_a[c] = newx[c] || colm[c] ? 1'($urandom) : known[c];
        scan_b[c] = newx[c] || colm[c] ? 1'($urandom) : known[c];
      end
      chan_in = CH'({$urandom, $urandom});  // ignored while shifting
      #1;
      check(sh_a && sh_b, "scan shifting");
      check(pd_a == (pos == L - 1), "pat_done timing");
      @(negedge clk);
      cyc++;
      n_shifts++;
      n_leaked_x += nx;
      misr_step(known, newx);
    end
    check(cyc == L + Q * (n_halts_mid - halts0),
          $sformatf("pattern took %0d cycles, expected %0d", cyc, L + Q * (n_halts_mid - halts0)));
  endtask

  initial begin
    int mk, lk;
    done = 0; checks = 0; failures = 0; n_loads = 0; n_shifts = 0; n_masked_x = 0;
    n_leaked_x = 0; n_halts_mid = 0; n_halts_end = 0; n_clears = 0; ctrl_bits = 0;
    rst_n = 0; load_start = 0; pat_start = 0; cancel_req = 0; chan_in = '0;
    scan_a = '0; scan_b = '0;
    ref_known = '0; wx = 0;
    for (int i = 0; i < M; i++) dep[i] = '0;
    build_workload();
    partition();
    n_parts = parts.size();
    plan_bits = cost(parts, mk, lk);
    plan_masked = mk;
    plan_leaked = lk;
    $display("harness W%0d: %0d patterns, %0d X cells, %0d partitions, %0d X masked, %0d leaked, round costs %p",
             WORKLOAD, NP, xmap.num(), parts.size(), mk, lk, round_cost);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (parts[i]) begin
      automatic int nsim = 0;
      if (SIM_PARTS != 0 && i >= SIM_PARTS) break;
      load_mask(parts[i]);
      for (int p = 0; p < NP; p++)
        if (parts[i][p] && (SIM_PER_PART == 0 || nsim < SIM_PER_PART)) begin
          unload(p, parts[i]);
          nsim++;
        end
    end
    // Final signature from idle.
    halt(0);
    #1 check(!busy_a && !busy_b, "idle at the end");
    if (SIM_PARTS == 0 && SIM_PER_PART == 0)
      check(n_masked_x == mk && n_leaked_x == lk, "masked/leaked X's match the partition cost");
    done = 1;
  end

endmodule
