// Self-checking testbench of xmask_gates: random scan-out bits and masks; a
// masked chain must deliver 0, an unmasked chain its scan-out bit.
module tb_xmask_gates;
  localparam int N = 32;
  logic [N-1:0] scan_out, mask, masked;
  int checks = 0, failures = 0;

  xmask_gates #(.N_CHAINS(N)) dut (.scan_out, .mask, .masked);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      scan_out = $urandom;
      mask     = (t < 2) ? {N{t[0]}} : $urandom;
      #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (mask[k] ? (masked[k] !== 1'b0) : (masked[k] !== scan_out[k])) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d k=%0d", t, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
