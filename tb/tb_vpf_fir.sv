// tb_vpf_fir: the FIR filter workload on the default-size processor
// (P = 8 lanes), with N = 8 taps and 64 input samples.
//
// The program uses outer-loop parallelism: lane l of a block computes output
// y[8k+l] = sum_i h[i] x[8k+l-i], so every 8 instructions give 8 outputs and
// the MAC unit is busy in every cycle of the loop. A sample window register
// R1 is shifted by one lane per instruction with a shuffle whose top lane
// takes the next sample from the shuffle broadcast register (reloaded with
// LDS once per block and rotated with RSB); the coefficient comes from the
// multiplier broadcast register, rotated with RMB in every instruction. Two
// result registers alternate between blocks so each block's sum can be
// stored while the next one is accumulated; the loop body is two blocks
// (16 instructions) run by a hardware loop. Results are streamed out with
// EST and compared with the filter sum computed here (1.31 products summed
// in a wide accumulator, bits 31..16 kept). The testbench also checks that
// the loop takes exactly 8 cycles per 8 outputs.
module tb_vpf_fir;
  import vpf_pkg::*;
  localparam int P = 8, NS = P / 4, N = 8, K = 8;   // K blocks of P samples
  typedef logic [P-1:0][W-1:0] vec_t;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            prog_we;
  logic [CAW-1:0]  prog_addr;
  logic [IW-1:0]   prog_data;
  logic [XAW-1:0]  ext_addr;
  logic            ext_we;
  logic [63:0]     ext_wdata, ext_rdata;
  logic [CAW-1:0]  pc;
  logic ev_stall, ev_jump, ev_loop_back, ev_bypass_mac, ev_bypass_shf_masked;
  logic ev_fwd_mac, ev_fwd_shf, ev_modulo_wrap, ev_gather_collision;

  vpf_core dut (.*);

  // ---------------- external memory model ----------------
  logic [63:0] xm [1024];
  assign ext_rdata = xm[ext_addr[9:0]];
  always_ff @(posedge clk) if (ext_we) xm[ext_addr[9:0]] <= ext_wdata;

  // vector k of an ELD/EST stream occupies words base+NS*k .. ; lane 4t+j is
  // bytes 2j (high) and 2j+1 (low) of word t
  function automatic void put_vec(int base, int k, vec_t v);
    for (int t = 0; t < NS; t++)
      for (int j = 0; j < 4; j++) begin
        xm[base + NS * k + t][16*j +: 8]   = v[4*t + j][15:8];
        xm[base + NS * k + t][16*j+8 +: 8] = v[4*t + j][7:0];
      end
  endfunction
  function automatic vec_t get_vec(int base, int k);
    vec_t v;
    for (int t = 0; t < NS; t++)
      for (int j = 0; j < 4; j++)
        v[4*t + j] = {xm[base + NS * k + t][16*j +: 8], xm[base + NS * k + t][16*j+8 +: 8]};
    return v;
  endfunction

  // ---------------- program assembly ----------------
  instr_t prog [$];
  function automatic instr_t nop();
    return '0;
  endfunction
  function automatic instr_t ls(ls_op_e op, int r = 0, int p = 0, int inc = 0, int imm = 0, int r2 = 0);
    instr_t i = '0;
    i.ls.op = op; i.ls.r = 5'(r); i.ls.p = 4'(p); i.ls.inc = 5'(inc); i.ls.imm = AW'(imm); i.ls.r2 = 5'(r2);
    return i;
  endfunction
  function automatic instr_t ex(ex_op_e op, int x = 0, int i_ = 0, bit inc = 0, int imm = 0);
    instr_t i = '0;
    i.ex.op = op; i.ex.x = 4'(x); i.ex.i = 4'(i_); i.ex.inc = inc; i.ex.imm = XAW'(imm);
    return i;
  endfunction
  function automatic instr_t mac(mac_kind_e k, int x, int y, int z = 0, bit b = 0, bit rnd = 0);
    instr_t i = '0;
    i.mac.op.kind = k; i.mac.op.b = b; i.mac.op.rnd = rnd;
    i.mac.x = 5'(x); i.mac.y = 5'(y); i.mac.z = 5'(z);
    return i;
  endfunction
  function automatic instr_t shf(int x, int y, int t);
    instr_t i = '0;
    i.shf.en = 1; i.shf.x = 5'(x); i.shf.y = 5'(y); i.shf.t = 4'(t);
    return i;
  endfunction
  function automatic instr_t jr(int ofs);
    instr_t i = '0;
    i.fc.op = FC_JR; i.fc.jofs = 7'(ofs);
    return i;
  endfunction
  function automatic instr_t doi(int cnt, int st, int en);
    instr_t i = '0;
    i.fc.op = FC_DOI; i.fc.lcount = LCW'(cnt); i.fc.lstart = CAW'(st); i.fc.lend = CAW'(en);
    return i;
  endfunction
  function automatic instr_t sgw();
    instr_t i = '0;
    i.fc.op = FC_SGW;
    return i;
  endfunction
  function automatic instr_t rmb();
    instr_t i = '0;
    i.rmb = 1;
    return i;
  endfunction
  function automatic instr_t join2(instr_t a, instr_t b);
    return instr_t'(IW'(a) | IW'(b));
  endfunction
  function automatic void put(instr_t i);
    prog.push_back(i);
  endfunction
  function automatic void nops(int n);
    repeat (n) prog.push_back(nop());
  endfunction

  function automatic instr_t rsb();
    instr_t i = '0;
    i.rsb = 1;
    return i;
  endfunction
  function automatic instr_t join3(instr_t a, instr_t b, instr_t c);
    return instr_t'(IW'(a) | IW'(b) | IW'(c));
  endfunction

  localparam int XOUT = 512, ROW_OUT = 100;
  logic [W-1:0] x [K * P];
  logic [W-1:0] h [N];
  vec_t H, T;
  int loop_start, loop_end, t_start, t_end, cyc;

  always_ff @(posedge clk) begin
    if (rst) cyc <= 0; else cyc <= cyc + 1;
  end
  // first fetch of the loop start, first fetch after the loop
  always_ff @(posedge clk) if (!rst) begin
    if (pc == CAW'(loop_start) && t_start < 0) t_start <= cyc;
    if (pc == CAW'(loop_end + 1) && t_end < 0) t_end <= cyc;
  end

  initial begin
    t_start = -1; t_end = -1;
    prog_we = 0; prog_addr = '0; prog_data = '0;
    for (int k = 0; k < 1024; k++) xm[k] = '0;
    for (int n = 0; n < K * P; n++) x[n] = W'($urandom);
    for (int i = 0; i < N; i++) h[i] = W'($urandom);
    // the MAC at loop instruction m sees the coefficient rotated m times;
    // it needs h[(1 - m) mod 8]
    for (int j = 0; j < P; j++) H[j] = h[(1 - j + 8 * P) % P];
    // shift pattern: lane l takes lane l+1, the top lane the broadcast word
    for (int l = 0; l < P; l++) T[l] = W'((l == P - 1) ? 8 : l + 1);
    for (int k = 0; k < K; k++) begin
      vec_t v;
      for (int l = 0; l < P; l++) v[l] = x[k * P + l];
      put_vec(0, k, v);
    end
    put_vec(0, K, H);
    put_vec(0, K + 1, T);

    // ---------------- program ----------------
    for (int k = 0; k < (K + 2) * NS; k++) put(ex(EX_ELD, 0, 0, 1));   // rows 0..K+1
    put(ls(LS_LDP, 0, 2, 0, K));                // P2 = coefficient/pattern rows
    put(ls(LS_LDP, 0, 3, 0, ROW_OUT - 1));      // P3 = result rows
    put(mac(MK_SUB, 1, 5, 5));                  // R1 = 0 (samples before x[0])
    nops(1);
    put(ls(LS_LDM, 0, 2, 1));                   // vmbc = H
    put(ls(LS_LDT, 0, 2, 1));                   // T0 = shift pattern
    nops(4);
    put(join2(ls(LS_LDS, 0, 0, 1),              // vsbc = X0
              doi(K / 2, 3, 3 + 2 * P - 1)));
    nops(2);
    loop_start = prog.size();
    for (int j = 0; j < 2 * P; j++) begin
      instr_t i;
      int r, cur, prv;
      r   = j % P;
      cur = (j < P) ? 2 : 3;                    // result register of this block
      prv = (j < P) ? 3 : 2;                    // and of the previous one
      i = join2(shf(1, 1, 0), rmb());
      if (r != 0) i = join2(i, rsb());
      if (r == 2)      i = join2(i, mac(MK_MUL, cur, 1, 0, 1));
      else if (r >= 3) i = join2(i, mac(MK_MAC, cur, 1, 0, 1));
      else             i = join2(i, mac(MK_MAC, prv, 1, 0, 1));
      if (j == 5 || j == 13) i = join2(i, ls(LS_LDS, 0, 0, 1));
      if (j == 6)  i = join2(i, ls(LS_STV, 3, 3, 1));
      if (j == 14) i = join2(i, ls(LS_STV, 2, 3, 1));
      put(i);
    end
    loop_end = prog.size() - 1;
    // last block: two MACs and its store
    put(join2(mac(MK_MAC, 3, 1, 0, 1), rmb()));
    put(mac(MK_MAC, 3, 1, 0, 1));
    put(ex(EX_ELX, 1, 0, 0, XOUT));
    put(ex(EX_ELI, 0, 1, 0, ROW_OUT));
    put(ex(EX_EIE, 0, 1, 0, 4095));
    nops(1);
    put(ls(LS_STV, 3, 3, 1));
    nops(1);
    for (int k = 0; k < K * NS; k++) put(ex(EX_EST, 1, 1, 1));
    nops(4);
    put(jr(-2));
    nops(3);

    for (int a = 0; a < prog.size(); a++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = CAW'(a); prog_data = IW'(prog[a]);
    end
    @(negedge clk); prog_we = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (prog.size() + 8 * K + 40) @(negedge clk);

    for (int k = 0; k < K; k++) begin
      automatic vec_t got = get_vec(XOUT, k);
      for (int l = 0; l < P; l++) begin
        automatic longint s = 0;
        automatic int n = k * P + l;
        for (int i = 0; i < N; i++)
          if (n - i >= 0)
            s += longint'(signed'(x[n - i])) * longint'(signed'(h[i])) * 2;
        checks++;
        if (got[l] !== W'(s >>> 16)) begin
          failures++;
          $display("y[%0d]: got %h exp %h", n, got[l], W'(s >>> 16));
        end
      end
    end
    // 8 outputs per 8 cycles: the loop runs K blocks in 8K cycles
    checks++;
    if (t_end - t_start != P * K) begin
      failures++;
      $display("loop took %0d cycles, expected %0d", t_end - t_start, P * K);
    end
    $display("FIR: %0d outputs in %0d loop cycles", K * P, t_end - t_start);
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
