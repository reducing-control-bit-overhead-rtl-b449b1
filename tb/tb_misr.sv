// Self-checking testbench of misr.
// Part 1 reproduces the 6-stage symbolic example: six chains of three cells
// holding O2..O17 and X1..X4 are shifted in, one symbol at a time set to 1
// (the register is linear), and the stages that end up at 1 must be exactly
// those whose printed equation contains the symbol:
//   M1=X1^O3^O8^O13  M2=X1^O2^X2^X3^O9^O14  M3=O2^O5^X3^O10^O15
//   M4=X1^O6^O11^O16 M5=X1^O2^X3^O12^O17    M6=O2^X3^X4
// Part 2 runs the 32-stage default against a behavioural model with random
// data, enable and clear, and 40 inputs so that inputs fold onto stages.
module tb_misr;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // ---------------- 6-stage example ----------------
  logic en6, clr6;
  logic [5:0] din6, st6;
  misr #(.M(6), .N_IN(6), .FB_TAPS(6'b110110)) dut6 (
    .clk, .rst_n, .en(en6), .clear(clr6), .din(din6), .state(st6));

  // Symbol ids: 1..17 = O1..O17, 18..21 = X1..X4. chain c, shift t (t=0 first out).
  int sym [6][3] = '{'{18, 20, 13}, '{2, 8, 14}, '{3, 9, 15},
                     '{19, 10, 16}, '{5, 11, 17}, '{6, 12, 21}};
  int eqn [6][] = '{'{18, 3, 8, 13}, '{18, 2, 19, 20, 9, 14}, '{2, 5, 20, 10, 15},
                    '{18, 6, 11, 16}, '{18, 2, 20, 12, 17}, '{2, 20, 21}};

  // ---------------- 32-stage default ----------------
  localparam int M = 32, NI = 40;
  localparam logic [M-1:0] TAPS = 32'hE000_0200;
  logic en, clr;
  logic [NI-1:0] din;
  logic [M-1:0] st, model;
  misr #(.M(M), .N_IN(NI)) dut (.clk, .rst_n, .en, .clear(clr), .din, .state(st));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] step(logic [M-1:0] s, logic [NI-1:0] d);
    logic [M-1:0] n;
    for (int i = 0; i < M; i++) begin
      n[i] = (i < M - 1 ? s[i+1] : 1'b0) ^ (TAPS[i] & s[0]);
      for (int k = i; k < NI; k += M) n[i] ^= d[k];
    end
    return n;
  endfunction

  initial begin
    en6 = 0; clr6 = 0; din6 = 0; en = 0; clr = 0; din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 1; s <= 21; s++) begin
      logic [5:0] exp6;
      exp6 = '0;
      for (int b = 0; b < 6; b++)
        foreach (eqn[b][j]) if (eqn[b][j] == s) exp6[b] = 1'b1;
      clr6 = 1; @(negedge clk); clr6 = 0;
      for (int t = 0; t < 3; t++) begin
        en6 = 1;
        for (int c = 0; c < 6; c++) din6[c] = (sym[c][t] == s);
        @(negedge clk);
      end
      en6 = 0; din6 = 0;
      @(negedge clk);  // held while en is low
      checks++;
      if (st6 !== exp6) begin
        failures++;
        $display("FAIL symbol %0d: stages %b expected %b", s, st6, exp6);
      end
    end

    // Random run of the default size.
    clr = 1; @(negedge clk); clr = 0; model = '0;
    for (int t = 0; t < 3000; t++) begin
      en  = ($urandom_range(3) != 0);
      clr = ($urandom_range(99) == 0);
      din = NI'({$urandom, $urandom});
      @(negedge clk);
      if (clr) model = '0;
      else if (en) model = step(model, din);
      checks++;
      if (st !== model) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d got %h exp %h", t, st, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
