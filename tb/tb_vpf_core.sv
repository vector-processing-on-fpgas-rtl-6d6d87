// tb_vpf_core: end-to-end test of the whole processor at its default size
// (P = 8 lanes, 8192-row data memory, 512-word program memory).
//
// The testbench assembles a program from instruction-word structs, loads it
// through the program write port and runs it against a word-addressed
// external memory model. The program streams seven vectors in with ELD
// (data A, B, broadcast M, shuffle patterns T0/T1, gather addresses,
// shuffle broadcast S), loads registers, pointers, patterns and broadcast
// registers, and then exercises each mechanism of the machine:
//   modulo addressing with a wrap, MAC results taken through the EX1 forward
//   and the ID3 bypass, broadcast multiplies around a rotate, rounding, a
//   masked shuffle with a broadcast lane, shuffle-to-shuffle forwarding, a
//   masked shuffle result taken through the bypass, a smart gather with bank
//   collisions and an SGW stall, a jump with two delay slots, a hardware loop
//   accumulating with MAC, multiply-add forms whose third operand comes
//   through the load/store port (LDA), nested hardware loops, and the pixel
//   path (ELB, ELC, ESC, ESB) with a round trip through the colour buffer,
//   and the exact MAC -> multiply (2) and MAC -> MOV (3) latencies.
// Twenty-three result vectors are stored with STV and written out with EST; they
// are compared with values computed here from the input data and the
// instruction definitions. Each mechanism is counted from the core's event
// outputs, and one that never happened counts as a failure.
// SHF_S selects the core's shuffle depth; the program pads the one
// shuffle-to-shuffle distance that depends on it. The core is reached
// through tb_vpf_core_dut, which passes SHF_S on; at the default SHF_S = 1 the
// core runs with all its own defaults. tb_vpf_core_shf3 sets SHF_S = 3.
module tb_vpf_core #(
  parameter int SHF_S = 1   // shuffle execute stages of the core under test
);
  import vpf_pkg::*;
  localparam int P = 8, NS = P / 4;
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

  tb_vpf_core_dut #(.SHF_S(SHF_S)) dut (.*);

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

  // ---------------- reference arithmetic ----------------
  function automatic vec_t v_add(vec_t a, vec_t b, bit sub);
    vec_t r;
    for (int l = 0; l < P; l++) r[l] = sub ? a[l] - b[l] : a[l] + b[l];
    return r;
  endfunction
  function automatic longint prod2(logic [W-1:0] a, logic [W-1:0] b);
    return longint'(signed'(a)) * longint'(signed'(b)) * 2;   // 1.31 product
  endfunction
  function automatic vec_t v_mul(vec_t a, vec_t b, bit rnd, int times);
    vec_t r;
    for (int l = 0; l < P; l++) begin
      longint s = prod2(a[l], b[l]) * times;
      r[l] = rnd ? W'((s >>> 16) + ((s >>> 15) & 1)) : W'(s >>> 16);
    end
    return r;
  endfunction
  // m + y*f or m - y*f, optionally rounded
  function automatic vec_t v_mad(vec_t m, vec_t y, vec_t f, bit sub, bit rnd);
    vec_t r;
    for (int l = 0; l < P; l++) begin
      longint s = (longint'(signed'(m[l])) <<< 16) + (sub ? -prod2(y[l], f[l]) : prod2(y[l], f[l]));
      r[l] = rnd ? W'((s >>> 16) + ((s >>> 15) & 1)) : W'(s >>> 16);
    end
    return r;
  endfunction
  function automatic vec_t v_splat(logic [W-1:0] x);
    vec_t r;
    for (int l = 0; l < P; l++) r[l] = x;
    return r;
  endfunction

  // ---------------- data ----------------
  vec_t A, B, M, T0, T1, G, S;
  localparam int XIN = 0, XOUT = 256, XPIX = 128;
  int rounds_exp;

  // mechanism counters
  int n_stall, n_jump, n_loop, n_bmac, n_bshf, n_fmac, n_fshf, n_wrap, n_gcol;
  always_ff @(posedge clk) if (!rst) begin
    n_stall += int'(ev_stall);
    n_jump  += int'(ev_jump);
    n_loop  += int'(ev_loop_back);
    n_bmac  += int'(ev_bypass_mac);
    n_bshf  += int'(ev_bypass_shf_masked);
    n_fmac  += int'(ev_fwd_mac);
    n_fshf  += int'(ev_fwd_shf);
    n_wrap  += int'(ev_modulo_wrap);
    n_gcol  += int'(ev_gather_collision);
  end

  task automatic chk_vec(string what, vec_t got, vec_t exp);
    for (int l = 0; l < P; l++) begin
      checks++;
      if (got[l] !== exp[l]) begin
        failures++;
        $display("%s lane %0d: got %h exp %h", what, l, got[l], exp[l]);
      end
    end
  endtask
  task automatic chk_count(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("%-28s %0d", what, n);
  endtask

  int gaddr [P];
  vec_t e10, e11, e18, e24;
  initial begin
    n_stall = 0; n_jump = 0; n_loop = 0; n_bmac = 0; n_bshf = 0;
    n_fmac = 0; n_fshf = 0; n_wrap = 0; n_gcol = 0;
    prog_we = 0; prog_addr = '0; prog_data = '0;
    for (int k = 0; k < 1024; k++) xm[k] = '0;

    // input data
    for (int l = 0; l < P; l++) begin
      A[l] = W'($urandom); B[l] = W'($urandom); M[l] = W'($urandom); S[l] = W'($urandom);
      // T0: reverse, lanes 2 and 5 masked, lane 6 takes the shuffle broadcast
      T0[l] = W'((l == 2 || l == 5) ? 16 : (l == 6) ? 8 : (P - 1 - l));
      // T1: rotate by one lane
      T1[l] = W'((l + 1) % P);
    end
    // gather addresses into the elements of A (rows 0) and B (row 1): banks
    // 0,1,0,1,2,2,7,7 so two lanes compete for four banks
    gaddr = '{0, 9, 8, 1, 2, 10, 15, 7};
    rounds_exp = 2;
    for (int l = 0; l < P; l++) G[l] = W'(gaddr[l]);
    put_vec(XIN, 0, A); put_vec(XIN, 1, B); put_vec(XIN, 2, M); put_vec(XIN, 3, T0);
    for (int k = 0; k < 3; k++) xm[XPIX + k] = {$urandom, $urandom};
    put_vec(XIN, 4, G); put_vec(XIN, 5, T1); put_vec(XIN, 6, S);

    // ---------------- program ----------------
    // stream 7 vectors into data rows 0..6 (X0 = 0, I0 = 0 after reset)
    for (int k = 0; k < 7 * NS; k++) put(ex(EX_ELD, 0, 0, 1));
    // loads through P0 (0 after reset), post-increment 1
    put(ls(LS_LDV, 1, 0, 1));                  // R1 = A      row 0
    put(ls(LS_LDV, 2, 0, 1));                  // R2 = B      row 1
    put(ls(LS_LDM, 0, 0, 1));                  // vmbc = M    row 2
    put(ls(LS_LDT, 0, 0, 1));                  // T0          row 3
    put(ls(LS_LDV, 12, 0, 1));                 // R12 = G     row 4
    put(ls(LS_LDT, 1, 0, 1));                  // T1          row 5
    put(join2(ls(LS_LDS, 0, 0, 1),             // vsbc = S    row 6
              ex(EX_ELX, 1, 0, 0, XOUT)));     // X1 = output area
    put(join2(ls(LS_LDB, 0, 1, 0, 2),          // P1 window: size 2, end 1
              ex(EX_ELI, 0, 1, 0, 16)));       // I1 = row 16
    put(join2(ls(LS_LDE, 0, 1, 0, 1),
              ex(EX_EIB, 0, 1, 0, 64)));
    put(join2(ls(LS_MOV, 10, 0, 0, 0, 2),      // R10 = R2 (B)
              ex(EX_EIE, 0, 1, 0, 100)));
    put(ls(LS_LDP, 0, 2, 0, 16));              // P2 = 16 (result rows)
    put(ls(LS_LDVM, 4, 1, 1));                 // R4  = row 0
    put(ls(LS_LDVM, 15, 1, 1));                // R15 = row 1, P1 wraps to 0
    nops(1);
    put(ls(LS_LDVM, 16, 1, 1));                // R16 = row 0 again
    // MAC chain: forward at distance 1, bypass at distance 2
    put(mac(MK_MUL, 5, 1, 2));                 // R5 = A*B
    put(mac(MK_ADD, 6, 5, 1));                 // R6 = R5 + A   (EX1 forward)
    put(mac(MK_SUB, 7, 5, 2));                 // R7 = R5 - B   (bypass)
    // broadcast multiplies around a rotate (RMB -> MAC latency 1)
    put(join2(mac(MK_MUL, 8, 1, 0, 1, 1), rmb()));   // R8 = round(A*M[0]), RMB
    put(mac(MK_MUL, 9, 1, 0, 1, 0));           // R9 = A*M[1]
    // shuffles
    put(shf(10, 1, 0));                        // R10 = A[T0] over B, lane 6 = S[0]
    nops(SHF_S - 1);                           // SHF -> SHF latency is SHF_S
    put(shf(11, 10, 1));                       // R11 = R10[T1]  (shuffle forward)
    put(shf(14, 10, 1));                       // R14 = R10[T1]  (masked bypass)
    nops(3);
    // smart gather and wait
    put(ls(LS_SMG, 18, 0, 0, 0, 12));          // R18 = mem[R12[i]]
    nops(2);
    put(sgw());
    nops(3);
    // jump over two instructions, after two delay slots
    put(jr(3));                                // target = JR address + 2 + 3
    put(mac(MK_ADD, 19, 1, 1));                // delay slot: R19 = A + A
    nops(1);                                   // delay slot
    put(mac(MK_ADD, 19, 2, 2));                // skipped
    put(mac(MK_ADD, 19, 2, 2));                // skipped
    // hardware loop: the two-instruction body runs 3 times
    put(doi(3, 3, 4));
    put(mac(MK_MUL, 21, 1, 2));                // acc = A*B
    nops(1);
    put(mac(MK_MAC, 21, 1, 2));                // loop body: acc += A*B
    nops(1);                                   // loop end
    nops(5);
    // exact latencies: a multiply right after a MAC sees the old value, one
    // two instructions later the new one; MOV sees it three later
    put(ls(LS_MOV, 26, 0, 0, 0, 2));           // R26 = B
    nops(4);
    put(mac(MK_ADD, 26, 1, 1));                // R26 = A + A
    put(join2(ls(LS_MOV, 30, 0, 0, 0, 26),     // R30 = B   (MOV, distance 1)
              mac(MK_MUL, 27, 26, 2)));        // R27 = B*B (distance 1)
    put(mac(MK_MUL, 28, 26, 2));               // R28 = 2A*B (distance 2)
    put(ls(LS_MOV, 29, 0, 0, 0, 26));          // R29 = 2A  (MOV, distance 3)
    nops(5);
    // multiply-add forms with the third operand through the load/store port
    put(join2(ls(LS_LDA, 0, 0, 0, 0, 2), mac(MK_MAD, 22, 1, 2)));          // R22 = B + A*B
    put(join2(ls(LS_LDA, 0, 0, 0, 0, 1), mac(MK_MSB, 23, 1, 2, 0, 1)));    // R23 = round(A - A*B)
    // nested hardware loops: R25 = 0, then 2 x 3 additions of A
    put(mac(MK_SUB, 25, 1, 1));
    put(doi(2, 3, 8));
    nops(2);
    put(doi(3, 3, 4));                         // outer loop start
    nops(2);
    put(mac(MK_ADD, 25, 25, 1));               // inner loop start
    nops(1);                                   // inner loop end
    nops(1);                                   // outer loop end
    // pixels: ELB x3 from X2, ELC x3 to rows 40..42 (I2), ESC x3 back from
    // rows 40..42 (I3), ESB x3 to X3
    put(ex(EX_ELX, 2, 0, 0, XPIX));
    put(ex(EX_ELX, 3, 0, 0, XPIX + 32));
    put(ex(EX_ELI, 0, 2, 0, 40));
    put(ex(EX_ELI, 0, 3, 0, 40));
    nops(4);
    for (int k = 0; k < 3; k++) put(ex(EX_ELB, 2, 0, 1));
    for (int k = 0; k < 3; k++) put(ex(EX_ELC, 0, 2, 1));
    put(ls(LS_LDP, 0, 4, 0, 40));
    for (int k = 0; k < 3; k++) put(ex(EX_ESC, 0, 3, 1));
    put(ls(LS_LDV, 24, 4, 1));                 // R24 = red components
    for (int k = 0; k < 3; k++) put(ex(EX_ESB, 3, 0, 1));
    nops(5);
    // store the results to rows 16.. (P2) and write them out
    foreach (store_regs[k]) put(ls(LS_STV, store_regs[k], 2, 1));
    nops(1);
    for (int k = 0; k < $size(store_regs) * NS; k++) put(ex(EX_EST, 1, 1, 1));
    nops(4);
    put(jr(-2));                               // halt: jump to itself
    nops(3);

    // load the program while in reset
    for (int a = 0; a < prog.size(); a++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = CAW'(a); prog_data = IW'(prog[a]);
    end
    @(negedge clk); prog_we = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (prog.size() + 60) @(negedge clk);

    // ---------------- reference and compare ----------------
    for (int l = 0; l < P; l++) begin
      automatic logic [4:0] t = T0[l][4:0];
      e10[l] = t[4] ? B[l] : t[3] ? S[0] : A[t[2:0]];
    end
    for (int l = 0; l < P; l++) e11[l] = e10[(l + 1) % P];
    for (int l = 0; l < P; l++) e18[l] = (gaddr[l] / P == 0) ? A[gaddr[l] % P] : B[gaddr[l] % P];
    chk_vec("R4 modulo load",    get_vec(XOUT, 0), A);
    chk_vec("R15 modulo load",   get_vec(XOUT, 1), B);
    chk_vec("R16 wrapped load",  get_vec(XOUT, 2), A);
    chk_vec("R5 MUL",            get_vec(XOUT, 3), v_mul(A, B, 0, 1));
    chk_vec("R6 ADD forward",    get_vec(XOUT, 4), v_add(v_mul(A, B, 0, 1), A, 0));
    chk_vec("R7 SUB bypass",     get_vec(XOUT, 5), v_add(v_mul(A, B, 0, 1), B, 1));
    chk_vec("R8 BMULR",          get_vec(XOUT, 6), v_mul(A, v_splat(M[0]), 1, 1));
    chk_vec("R9 BMUL rotated",   get_vec(XOUT, 7), v_mul(A, v_splat(M[1]), 0, 1));
    chk_vec("R10 masked SHF",    get_vec(XOUT, 8), e10);
    chk_vec("R11 SHF forward",   get_vec(XOUT, 9), e11);
    chk_vec("R14 SHF bypass",    get_vec(XOUT, 10), e11);
    chk_vec("R18 gather",        get_vec(XOUT, 11), e18);
    chk_vec("R19 jump",          get_vec(XOUT, 12), v_add(A, A, 0));
    chk_vec("R21 loop MAC",      get_vec(XOUT, 13), v_mul(A, B, 0, 4));
    chk_vec("R22 MAD",           get_vec(XOUT, 14), v_mad(B, A, B, 0, 0));
    chk_vec("R23 MSBR",          get_vec(XOUT, 15), v_mad(A, A, B, 1, 1));
    for (int l = 0; l < P; l++) e24[l] = {8'h00, xm[XPIX + (3 * l) / 8][8 * ((3 * l) % 8) +: 8]};
    chk_vec("R24 ELC red",       get_vec(XOUT, 16), e24);
    chk_vec("R25 nested loops",  get_vec(XOUT, 17), v_add(v_add(v_add(A, A, 0), v_add(A, A, 0), 0), v_add(A, A, 0), 0));
    chk_vec("R26 ADD",           get_vec(XOUT, 18), v_add(A, A, 0));
    chk_vec("R27 MUL distance 1", get_vec(XOUT, 19), v_mul(B, B, 0, 1));
    chk_vec("R28 MUL distance 2", get_vec(XOUT, 20), v_mul(v_add(A, A, 0), B, 0, 1));
    chk_vec("R29 MOV distance 3", get_vec(XOUT, 21), v_add(A, A, 0));
    chk_vec("R30 MOV distance 1", get_vec(XOUT, 22), B);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (xm[XPIX + 32 + k] !== xm[XPIX + k]) begin
        failures++; $display("pixel round trip word %0d: got %h exp %h", k, xm[XPIX + 32 + k], xm[XPIX + k]);
      end
    end

    chk_count("SGW stall cycles", n_stall);
    // SGW waits one cycle per gather round
    checks++;
    if (n_stall != rounds_exp) begin
      failures++; $display("stall cycles %0d, expected %0d", n_stall, rounds_exp);
    end
    chk_count("jumps", n_jump);
    chk_count("hardware loop back edges", n_loop);
    checks++;
    if (n_loop != 7) begin failures++; $display("loop back edges %0d exp 7", n_loop); end
    chk_count("MAC/SHF result bypasses", n_bmac);
    chk_count("masked SHF bypasses", n_bshf);
    chk_count("MAC EX1 forwards", n_fmac);
    chk_count("SHF forwards", n_fshf);
    chk_count("modulo wraps", n_wrap);
    chk_count("gather bank collisions", n_gcol);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int store_regs [23] = '{4, 15, 16, 5, 6, 7, 8, 9, 10, 11, 14, 18, 19, 21, 22, 23, 24, 25, 26, 27, 28, 29, 30};

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
