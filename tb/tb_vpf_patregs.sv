// tb_vpf_patregs: self-checking test of the pattern registers.
// Writes random 16-bit vectors to random registers and checks that reads
// return the low 2 + log2(P) bits of each word, for every register.
module tb_vpf_patregs;
  localparam int P = 8, W = 16, PW = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we; logic [3:0] widx, ridx;
  logic [P-1:0][W-1:0] wdata;
  logic [P-1:0][PW-1:0] rdata, refp [16];
  vpf_patregs #(.P(P)) dut (.*);
  initial begin
    we = 0; widx = 0; ridx = 0; wdata = '0;
    for (int r = 0; r < 16; r++) refp[r] = '0;
    repeat (2) @(posedge clk); rst = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we = 1'($urandom); widx = 4'($urandom);
      for (int i = 0; i < P; i++) wdata[i] = 16'($urandom);
      if (we) for (int i = 0; i < P; i++) refp[widx][i] = wdata[i][PW-1:0];
      @(negedge clk); we = 0;
      for (int r = 0; r < 16; r++) begin
        ridx = 4'(r); #1;
        checks++;
        if (rdata !== refp[r]) begin failures++; $display("n=%0d reg %0d", n, r); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
