// tb_vpf_gather: self-checking test of the smart gather engine with a data
// memory and a shuffle unit, wired as in the processor (P = 8, small memory).
// Address vectors are random, all-distinct-bank, all-same-bank and mixed;
// for each the assembled vector (the masked shuffle writes merged into a
// register model) must equal mem[addr[i]] in every lane, and the number of
// rounds must equal the largest number of lanes that share a bank.
module tb_vpf_gather;
  localparam int P = 8, W = 16, AW = 6, DEPTH = 64;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, mem_valid, shf_valid, ev_collision;
  logic [4:0] dest, shf_dest, so_d;
  logic [P-1:0][15:0] addrs;
  logic [P-1:0][AW-1:0] mem_rows;
  logic [P-1:0][4:0] shf_pat;
  logic [P-1:0][W-1:0] rdata, so, bdummy, acc_reg;
  logic [P-1:0] so_w;
  logic so_v;
  logic [W-1:0] refm [DEPTH * P];

  vpf_gather #(.P(P), .AW(AW)) dut (.clk, .rst, .start, .dest, .addrs, .busy, .mem_valid,
    .mem_rows, .shf_valid, .shf_pat, .shf_dest, .ev_collision);
  vpf_vmem #(.P(P), .DEPTH(DEPTH)) u_mem (.clk, .a_en(mem_valid || init_we), .a_we(init_we),
    .a_rows(init_we ? init_rows : mem_rows), .a_wdata(init_data), .a_rdata(rdata),
    .b_en(1'b0), .b_we(1'b0), .b_row('0), .b_lanes('0), .b_wdata('0), .b_rdata(bdummy));
  vpf_shuffle #(.P(P)) u_shf (.clk, .rst, .in_valid(shf_valid), .tag_in(shf_dest), .src(rdata),
    .self_sel('0), .pat(shf_pat), .bc('0), .out_valid(so_v), .tag_out(so_d), .dout(so), .wlanes(so_w));

  logic init_we;
  logic [P-1:0][AW-1:0] init_rows;
  logic [P-1:0][W-1:0] init_data;

  // register model of the destination
  always_ff @(posedge clk)
    if (so_v && so_d == 5'd7)
      for (int l = 0; l < P; l++) if (so_w[l]) acc_reg[l] <= so[l];

  int rounds, maxc;
  initial begin
    start = 0; init_we = 0; dest = 7; addrs = '0;
    for (int r = 0; r < DEPTH; r++) begin
      @(negedge clk); init_we = 1;
      for (int k = 0; k < P; k++) begin
        init_rows[k] = AW'(r); init_data[k] = 16'($urandom); refm[r * P + k] = init_data[k];
      end
    end
    @(negedge clk); init_we = 0; rst = 0;
    for (int t = 0; t < 40; t++) begin
      int cnt [P];
      @(negedge clk);
      for (int i = 0; i < P; i++) begin
        case (t % 4)
          0: addrs[i] = 16'($urandom % (DEPTH * P));
          1: addrs[i] = 16'(($urandom % DEPTH) * P + i);          // no collisions
          2: addrs[i] = 16'(($urandom % DEPTH) * P + 3);          // all in bank 3
          default: addrs[i] = 16'(($urandom % DEPTH) * P + ($urandom % 3));
        endcase
      end
      for (int b = 0; b < P; b++) cnt[b] = 0;
      for (int i = 0; i < P; i++) cnt[addrs[i] % P]++;
      maxc = 0;
      for (int b = 0; b < P; b++) if (cnt[b] > maxc) maxc = cnt[b];
      start = 1; acc_reg = '0;
      @(negedge clk); start = 0;
      rounds = 0;
      while (busy) begin @(negedge clk); rounds++; end
      repeat (4) @(negedge clk);
      checks++;
      if (rounds != maxc) begin failures++; $display("t=%0d rounds %0d exp %0d", t, rounds, maxc); end
      for (int i = 0; i < P; i++) begin
        checks++;
        if (acc_reg[i] !== refm[addrs[i]]) begin
          failures++; $display("t=%0d lane %0d got %h exp %h", t, i, acc_reg[i], refm[addrs[i]]);
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
