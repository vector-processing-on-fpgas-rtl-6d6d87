// tb_vpf_bcast_rot: self-checking test of a broadcast register with rotate.
// Loads a random vector, rotates it P+3 times and checks after every rotate
// that element i holds the loaded element (i + k) mod P; checks that a load
// wins over a rotate in the same cycle and that idle cycles hold the value.
module tb_vpf_bcast_rot;
  localparam int P = 8, W = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic ld, rot;
  logic [P-1:0][W-1:0] ld_data, q, v;
  vpf_bcast_rot #(.P(P)) dut (.*);
  initial begin
    ld = 0; rot = 0; ld_data = '0;
    repeat (2) @(posedge clk); rst = 0;
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk);
      for (int i = 0; i < P; i++) ld_data[i] = 16'($urandom);
      v = ld_data; ld = 1; rot = (rep == 1);
      @(negedge clk); ld = 0; rot = 0;
      checks++; if (q !== v) failures++;
      for (int k = 1; k <= P + 3; k++) begin
        rot = 1; @(negedge clk); rot = 0;
        for (int i = 0; i < P; i++) begin
          checks++;
          if (q[i] !== v[(i + k) % P]) begin failures++; $display("k=%0d i=%0d", k, i); end
        end
        @(negedge clk);
        checks++; if (q[0] !== v[k % P]) failures++;
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
