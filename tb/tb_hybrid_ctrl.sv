// Self-checking testbench of hybrid_ctrl (CHAIN_LEN = 10, Q = 3).
// Checks, cycle by cycle: a mask load writes addresses 0..9 in the ten cycles
// after load_start; a pattern shifts ten times reading addresses 0..9; a halt
// requested mid-pattern stops the shift for exactly Q cycles, clears the MISR
// in the last of them and resumes at the interrupted position; a halt while
// idle also takes Q cycles. Total cycle counts are checked against
// CHAIN_LEN + Q * halts.
module tb_hybrid_ctrl;
  localparam int L = 10, Q = 3, AW = $clog2(L);
  logic clk = 0, rst_n = 0;
  logic load_start = 0, pat_start = 0, cancel_req = 0;
  logic mask_we, scan_shift, cancel_active, misr_clear, pat_done, load_done, busy;
  logic [AW-1:0] mask_waddr, mask_raddr;
  int checks = 0, failures = 0;

  hybrid_ctrl #(.CHAIN_LEN(L), .Q(Q)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Run one pattern, asking for halts before the shifts listed in halt_at.
  task automatic run_pattern(int halt_at[$]);
    int pos = 0, cycles = 0, halts = 0;
    pat_start = 1; @(negedge clk); pat_start = 0;
    while (pos < L) begin
      if (halt_at.size() > 0 && halt_at[0] == pos) begin
        void'(halt_at.pop_front());
        halts++;
        for (int q = 0; q < Q; q++) begin
          cancel_req = (q == 0);
          #1;
          check(!scan_shift, "no shift while halted");
          check(cancel_active, "cancel_active during halt");
          check(misr_clear == (q == Q - 1), "misr_clear on last cancel cycle");
          check(!mask_we, "no mask write during halt");
          @(negedge clk); cycles++;
          cancel_req = 0;
        end
      end else begin
        #1;
        check(scan_shift, "shift enabled");
        check(mask_raddr == AW'(pos), $sformatf("read address %0d", pos));
        check(pat_done == (pos == L - 1), "pat_done on last shift");
        check(!cancel_active && !misr_clear, "no cancel during shift");
        @(negedge clk); cycles++; pos++;
      end
    end
    #1;
    check(!busy && !scan_shift, "idle after pattern");
    check(cycles == L + Q * halts, $sformatf("pattern took %0d cycles", cycles));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    #1 check(!busy && !scan_shift && !mask_we, "idle after reset");

    // Mask load.
    load_start = 1; @(negedge clk); load_start = 0;
    for (int a = 0; a < L; a++) begin
      #1;
      check(mask_we && mask_waddr == AW'(a), $sformatf("load address %0d", a));
      check(load_done == (a == L - 1), "load_done on last column");
      check(!scan_shift, "no shift during load");
      @(negedge clk);
    end
    #1 check(!busy && !mask_we, "idle after load");

    run_pattern('{});
    run_pattern('{4});
    run_pattern('{0, 7, 9});

    // Final halt from idle.
    @(negedge clk);
    for (int q = 0; q < Q; q++) begin
      cancel_req = (q == 0);
      #1;
      check(cancel_active && !scan_shift, "idle halt");
      check(misr_clear == (q == Q - 1), "idle halt clear");
      @(negedge clk);
      cancel_req = 0;
    end
    #1 check(!busy, "idle after final halt");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
