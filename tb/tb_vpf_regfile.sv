// tb_vpf_regfile: self-checking test of the vector register file.
// Random writes on the three ports (with lane masks and same-register
// conflicts) are mirrored in a reference array using the documented priority
// (shuffle port 0, then MAC port 1, then load/store port 2); the four read
// ports are checked one cycle after their address, including reads of a
// register written in the same cycle, which must return the old value.
module tb_vpf_regfile;
  localparam int P = 8, W = 16, NREG = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0][4:0]          rd_addr;
  logic [3:0][P-1:0][W-1:0] rd_data;
  logic [2:0]               wr_en;
  logic [2:0][4:0]          wr_addr;
  logic [2:0][P-1:0]        wr_lanes;
  logic [2:0][P-1:0][W-1:0] wr_data;
  logic [P-1:0][W-1:0] ref_rf [NREG];
  logic [3:0][P-1:0][W-1:0] exp_rd;

  vpf_regfile #(.P(P)) dut (.clk, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_lanes, .wr_data);

  initial begin
    wr_en = '0; rd_addr = '0;
    // initialise every register through port 2
    for (int r = 0; r < NREG; r++) begin
      @(negedge clk);
      wr_en = 3'b100; wr_addr[2] = 5'(r); wr_lanes[2] = '1;
      for (int l = 0; l < P; l++) wr_data[2][l] = 16'($urandom);
      ref_rf[r] = wr_data[2];
    end
    @(negedge clk); wr_en = '0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) rd_addr[k] = 5'($urandom % 6);
      for (int w = 0; w < 3; w++) begin
        wr_en[w] = 1'($urandom);
        wr_addr[w] = 5'($urandom % 6);
        wr_lanes[w] = (w == 0) ? P'($urandom) : '1;
        for (int l = 0; l < P; l++) wr_data[w][l] = 16'($urandom);
      end
      for (int k = 0; k < 4; k++) exp_rd[k] = ref_rf[rd_addr[k]];
      for (int w = 2; w >= 0; w--)
        if (wr_en[w]) for (int l = 0; l < P; l++) if (wr_lanes[w][l]) ref_rf[wr_addr[w]][l] = wr_data[w][l];
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (rd_data[k] !== exp_rd[k]) begin
          failures++; $display("n=%0d port %0d reg %0d mismatch", n, k, rd_addr[k]);
        end
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
