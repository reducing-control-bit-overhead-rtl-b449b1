// Self-checking testbench of mask_buffer: writes a full set of random mask
// columns, reads them all back (asynchronous read), overwrites a few and
// checks that only those changed.
module tb_mask_buffer;
  localparam int N = 32, L = 200, AW = $clog2(L);
  logic clk = 0, we;
  logic [AW-1:0] waddr, raddr;
  logic [N-1:0] wdata, rdata;
  logic [N-1:0] model [L];
  int checks = 0, failures = 0;

  mask_buffer #(.N_CHAINS(N), .CHAIN_LEN(L)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic readall();
    we = 0;
    for (int a = 0; a < L; a++) begin
      raddr = AW'(a); #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%0d got %h exp %h", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    @(negedge clk);
    for (int a = 0; a < L; a++) begin
      we = 1; waddr = AW'(a); wdata = $urandom; model[a] = wdata;
      @(negedge clk);
    end
    readall();
    for (int i = 0; i < 20; i++) begin
      int a = $urandom_range(L - 1);
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = $urandom; model[a] = wdata;
      @(negedge clk);
      we = 0;
    end
    // A column presented with we low must not be written.
    waddr = 0; wdata = ~model[0];
    @(negedge clk);
    readall();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
