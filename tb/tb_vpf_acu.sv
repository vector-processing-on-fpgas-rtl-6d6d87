// tb_vpf_acu: self-checking test of the address calculation unit.
// Directed part: a modulo window (B = 4, E = 7) walked with increment 1 and
// one access every other cycle must give 4,5,6,7,4,5,6,7; a plain pointer
// walked with increment -3 must go down by 3 per access; an immediate load
// is seen by the next access. Random part: accesses, modulo accesses and
// loads against a reference model of the pointer, window and pending
// correction registers.
module tb_vpf_acu;
  localparam int NPTR = 16, AW = 13;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic upd_en, upd_mod, ld_en, ldb_en, lde_en, wrapped;
  logic [3:0] upd_ptr, ld_ptr, ldbe_ptr;
  logic [4:0] upd_inc;
  logic [AW-1:0] addr, ld_val, ldbe_val;

  vpf_acu dut (.*);

  logic [AW-1:0] rp [NPTR], rb [NPTR], re [NPTR];
  logic pv; logic [3:0] pp; logic [AW-1:0] pval;
  logic [AW-1:0] exp_addr;

  task automatic idle();
    @(negedge clk); upd_en = 0; ld_en = 0; ldb_en = 0; lde_en = 0;
  endtask

  task automatic access(logic [3:0] p, logic [4:0] inc, logic m, logic [AW-1:0] expv, logic chk);
    @(negedge clk); upd_en = 1; upd_ptr = p; upd_inc = inc; upd_mod = m;
    ld_en = 0; ldb_en = 0; lde_en = 0;
    @(posedge clk); #1;
    if (chk) begin
      checks++;
      if (addr !== expv) begin failures++; $display("ptr %0d got %0d exp %0d", p, addr, expv); end
    end
  endtask

  initial begin
    upd_en = 0; ld_en = 0; ldb_en = 0; lde_en = 0; upd_mod = 0;
    upd_ptr = 0; upd_inc = 0; ld_ptr = 0; ld_val = 0; ldbe_ptr = 0; ldbe_val = 0;
    repeat (2) @(posedge clk); rst = 0;
    // window for pointer 3: size 4, end 7, start at 4
    @(negedge clk); ld_en = 1; ld_ptr = 3; ld_val = 4; ldb_en = 1; ldbe_ptr = 3; ldbe_val = 4;
    @(negedge clk); ld_en = 0; ldb_en = 0; lde_en = 1; ldbe_val = 7;
    idle();
    for (int n = 0; n < 8; n++) begin
      access(3, 5'd1, 1'b1, AW'(4 + n % 4), 1'b1);
      idle();
    end
    // plain pointer 9 from 100 down by 3
    @(negedge clk); ld_en = 1; ld_ptr = 9; ld_val = 100;
    idle();
    for (int n = 0; n < 5; n++) access(9, 5'h1d, 1'b0, AW'(100 - 3 * n), 1'b1);
    // random against a reference model
    idle(); idle();
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    for (int i = 0; i < NPTR; i++) begin rp[i] = 0; rb[i] = 0; re[i] = 0; end
    pv = 0; pp = 0; pval = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [AW-1:0] fix, base; logic wrap;
      @(negedge clk);
      upd_en = 1'($urandom); upd_ptr = 4'($urandom % 4); upd_inc = 5'($urandom); upd_mod = 1'($urandom);
      ld_en = ($urandom % 8 == 0); ld_ptr = 4'($urandom % 4); ld_val = 13'($urandom % 64);
      ldb_en = ($urandom % 8 == 0); lde_en = ($urandom % 8 == 0);
      ldbe_ptr = 4'($urandom % 4); ldbe_val = 13'($urandom % 64);
      wrap = pv && pval > re[pp];
      fix = wrap ? pval - rb[pp] : pval;
      base = (pv && pp == upd_ptr) ? fix : rp[upd_ptr];
      exp_addr = rp[upd_ptr];
      if (wrap) rp[pp] = fix;
      if (ld_en) rp[ld_ptr] = ld_val;
      if (upd_en) rp[upd_ptr] = base + AW'(signed'(upd_inc));
      pv = upd_en && upd_mod; pp = upd_ptr; pval = base + AW'(signed'(upd_inc));
      if (ldb_en) rb[ldbe_ptr] = ldbe_val;
      if (lde_en) re[ldbe_ptr] = ldbe_val;
      @(posedge clk); #1;
      if (upd_en) begin
        checks++;
        if (addr !== exp_addr) begin failures++; $display("rand n=%0d got %0d exp %0d", n, addr, exp_addr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
