// Self-checking testbench of xcancel_xor. First the 6-stage example: the
// selection words for M1^M3^M5 and M1^M4 applied to a symbolic-value MISR
// image; then random 32-bit words against a bit-by-bit parity count.
module tb_xcancel_xor;
  localparam int M = 32;
  logic [M-1:0] misr_state, sel;
  logic xfree;
  logic [5:0] st6, sel6;
  logic x6;
  int checks = 0, failures = 0;

  xcancel_xor #(.M(M)) dut   (.misr_state, .sel, .xfree);
  xcancel_xor #(.M(6)) dut6  (.misr_state(st6), .sel(sel6), .xfree(x6));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Example: bit 0 = M1. Select M1,M3,M5 then M1,M4.
    for (int v = 0; v < 64; v++) begin
      st6 = 6'(v);
      sel6 = 6'b010101; #1;
      checks++;
      if (x6 !== (st6[0] ^ st6[2] ^ st6[4])) failures++;
      sel6 = 6'b001001; #1;
      checks++;
      if (x6 !== (st6[0] ^ st6[3])) failures++;
    end
    for (int t = 0; t < 2000; t++) begin
      int ones;
      misr_state = $urandom;
      sel = (t == 0) ? '1 : $urandom;
      #1;
      ones = 0;
      for (int k = 0; k < M; k++) if (misr_state[k] && sel[k]) ones++;
      checks++;
      if (xfree !== 1'(ones % 2)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
