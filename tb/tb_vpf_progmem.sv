// tb_vpf_progmem: self-checking test of the pipelined code memory.
// Fills it with random words, then reads random addresses and checks that each
// word, with its address, appears exactly two cycles after its address was
// presented; checks that hold freezes the output and that valid rises two
// cycles after reset.
module tb_vpf_progmem;
  localparam int IW = 40, DEPTH = 512;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we, hold, valid;
  logic [8:0] waddr, addr, raddr;
  logic [IW-1:0] wdata, rdata;
  logic [IW-1:0] refm [DEPTH];
  logic [8:0] ah [0:2];
  vpf_progmem #(.IW(IW), .DEPTH(DEPTH)) dut (.*);
  initial begin
    we = 0; hold = 0; addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 9'(i); wdata = {$urandom, 8'($urandom)}; refm[i] = wdata;
    end
    @(negedge clk); we = 0; rst = 0;
    @(posedge clk); #1; checks++; if (valid) failures++;
    @(posedge clk); #1; checks++; if (!valid) failures++;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      ah[2] = ah[1]; ah[1] = ah[0];
      addr = 9'($urandom); ah[0] = addr;
      @(posedge clk); #1;
      if (n >= 1) begin
        checks++;
        if (rdata !== refm[ah[1]] || raddr !== ah[1]) begin failures++; $display("n=%0d", n); end
      end
    end
    @(negedge clk); hold = 1; wdata = rdata; addr = 9'($urandom);
    repeat (3) @(posedge clk); #1;
    checks++; if (rdata !== wdata) failures++;
    // after the hold the fetch resumes with the word fetched before it
    @(negedge clk); hold = 0;
    @(posedge clk); #1;
    checks++; if (rdata !== refm[ah[0]]) begin failures++; $display("resume after hold"); end
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
