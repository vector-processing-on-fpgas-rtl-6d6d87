// tb_vpf_vmem: self-checking test of the banked data memory (small DEPTH).
// Port A writes whole vectors and reads with per-bank rows (gather form);
// port B writes lane subsets and reads rows; both are checked one cycle after
// the address against a reference array, including read-before-write in the
// same cycle and port B winning a same-word write.
module tb_vpf_vmem;
  localparam int P = 8, W = 16, DEPTH = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic a_en, a_we, b_en, b_we;
  logic [P-1:0][5:0] a_rows;
  logic [5:0] b_row;
  logic [P-1:0] b_lanes;
  logic [P-1:0][W-1:0] a_wdata, a_rdata, b_wdata, b_rdata, ea, eb;
  logic [W-1:0] refm [DEPTH][P];
  vpf_vmem #(.P(P), .DEPTH(DEPTH)) dut (.*);
  initial begin
    a_en = 0; b_en = 0; a_we = 0; b_we = 0;
    for (int r = 0; r < DEPTH; r++) begin
      @(negedge clk);
      a_en = 1; a_we = 1;
      for (int k = 0; k < P; k++) begin a_rows[k] = 6'(r); a_wdata[k] = 16'($urandom); refm[r][k] = a_wdata[k]; end
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      a_en = 1; a_we = 1'($urandom); b_en = 1; b_we = 1'($urandom);
      b_row = 6'($urandom % 8); b_lanes = P'($urandom);
      for (int k = 0; k < P; k++) begin
        a_rows[k] = a_we ? 6'($urandom % 8) : 6'($urandom % 8);
        a_wdata[k] = 16'($urandom); b_wdata[k] = 16'($urandom);
      end
      if (a_we) begin
        logic [5:0] r0; r0 = a_rows[0];
        for (int k = 0; k < P; k++) a_rows[k] = r0;
      end
      for (int k = 0; k < P; k++) begin ea[k] = refm[a_rows[k]][k]; eb[k] = refm[b_row][k]; end
      if (a_we) for (int k = 0; k < P; k++) refm[a_rows[k]][k] = a_wdata[k];
      if (b_we) for (int k = 0; k < P; k++) if (b_lanes[k]) refm[b_row][k] = b_wdata[k];
      @(posedge clk); #1;
      checks++; if (a_rdata !== ea) begin failures++; $display("A n=%0d", n); end
      checks++; if (b_rdata !== eb) begin failures++; $display("B n=%0d", n); end
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
