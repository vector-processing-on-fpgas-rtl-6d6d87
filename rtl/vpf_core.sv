// vpf_core: the VPF, a VLIW vector processor for DSP work, P lanes of 16-bit
// fixed-point data.
//
// Every instruction word carries one operation for each unit: load/store,
// external I/O, flow control, MAC, shuffle and the rotates of the two
// broadcast registers. The processor never stalls on data hazards; each
// result becomes visible after a fixed latency, and bypasses make most
// latencies short. Only SGW (wait for a smart gather) stalls the front end.
//
// Pipeline (an instruction whose first decode stage is cycle t):
//   IF1, IF2   program memory, registered twice (two branch delay slots)
//   ID1   t    flow control: next pc, hardware loops, gather wait
//   ID2   t+1  register-file read for every port, pointer read and
//               post-increment, external pointers
//   ID3   t+2  bypass multiplexers fill the MAC and shuffle input registers;
//               data-memory address; broadcast rotates; pattern read;
//               external loads; gather address vector
//   EX1   t+3  MAC and shuffle execute; memory data register
//   EX2   t+4  MAC output copy; shuffle and load/store write back
//   WB    t+5  MAC write back; broadcast register load
//
// Bypasses, applied per lane in ID3 with the newest value winning:
//   MAC result register (from an instruction 2 earlier), MAC write-back
//   register (3), MAC extra write-back register (4), shuffle output (2, only
//   the lanes it wrote), shuffle extra write-back register (3). An add,
//   subtract or accumulate MAC instruction can also take the previous MAC's
//   result in EX1 (distance 1), and the shuffle can take its own previous
//   output (distance 1). On the load/store read port only MOV has bypasses,
//   from the write-back registers (3 and 4); STV and LDA have none.
//
// Resulting latencies (issue distance at which the new value is seen):
// LDV/MOV -> MAC,SHF 4; SHF -> SHF 1; SHF -> MAC 2; MAC -> ADD/SUB/MAC/MDC
// forms 1; MAC -> MUL/MAD/MSB forms 2; MAC -> SHF 2; MAC,SHF -> MOV 3;
// MAC -> STV 5; SHF -> STV 4; LDP -> access 4; LDB/LDE -> access 2;
// LDM -> MAC 4; LDM -> RMB 4; RMB -> MAC 1; LDS -> SHF 3; RSB -> SHF 0;
// LDT -> SHF 3; ELD/ELC -> LDV 1; SMG -> SGW 3.
//
// The unit set, the stage plan, register-file ports, bypass structure and the
// latencies above follow the design. MOV takes its operand in ID3 through
// the write-back bypass sources only, which gives the design's latency of 3;
// STV has no bypass. The instruction encoding, program loading through a write
// port, the split data bus and computing bypass selects in ID3 (the design
// computes them in ID1 and fans them out in ID2) are this implementation's
// choices.
//
// SHF_STAGES sets the shuffle unit's execute stages (1 to 3, the design's
// options). The latencies above are for the default of 1; with S stages every
// latency from a SHF is S - 1 larger, and the shuffle forward then reaches
// the SHF issued S instructions later.
//
// Interface: prog_we/prog_addr/prog_data load the program memory; after rst
// falls the processor runs from address 0. ext_addr/ext_we/ext_wdata drive
// the external memory, ext_rdata returns its data in the same cycle. The
// ev_* outputs pulse when a mechanism is used, for observation.
module vpf_core
  import vpf_pkg::*;
#(
  parameter int P          = 8,
  parameter int SHF_STAGES = 1    // shuffle execute stages, 1..3
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            prog_we,
  input  logic [CAW-1:0]  prog_addr,
  input  logic [IW-1:0]   prog_data,
  output logic [XAW-1:0]  ext_addr,
  output logic            ext_we,
  output logic [63:0]     ext_wdata,
  input  logic [63:0]     ext_rdata,
  output logic [CAW-1:0]  pc,
  output logic            ev_stall,
  output logic            ev_jump,
  output logic            ev_loop_back,
  output logic            ev_bypass_mac,
  output logic            ev_bypass_shf_masked,
  output logic            ev_fwd_mac,
  output logic            ev_fwd_shf,
  output logic            ev_modulo_wrap,
  output logic            ev_gather_collision
);
  localparam int LB = $clog2(P);
  localparam int PW = LB + 2;
  typedef logic [P-1:0][W-1:0] vec_t;

  // ======================= fetch and ID1 =======================
  logic           stall;
  logic [IW-1:0]  if_data;
  logic [CAW-1:0] if_addr;
  logic           if_valid;
  instr_t         id1;
  logic           id1_v;

  vpf_progmem #(.IW(IW), .DEPTH(1 << CAW)) u_prog (
    .clk, .rst,
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data),
    .hold(stall), .addr(pc),
    .rdata(if_data), .raddr(if_addr), .valid(if_valid)
  );

  assign id1   = instr_t'(if_data);
  assign id1_v = if_valid;

  logic gather_busy;
  logic ev_pop;

  vpf_flow u_flow (
    .clk, .rst,
    .id1_valid(id1_v), .id1_fc(id1.fc), .id1_pc(if_addr),
    .gather_busy,
    .pc, .stall,
    .ev_jump, .ev_loop_back, .ev_loop_pop(ev_pop)
  );
  assign ev_stall = stall;

  // ======================= ID2 =======================
  instr_t id2, id3;
  logic   id2_v, id3_v;

  always_ff @(posedge clk) begin
    if (rst) begin
      id2_v <= 1'b0;
      id3_v <= 1'b0;
    end else begin
      id2_v <= id1_v && !stall;
      id3_v <= id2_v;
    end
    id2 <= id1;
    id3 <= id2;
  end

  // register file
  logic [3:0][4:0]     rd_addr;
  vec_t [3:0]          rd_data;
  logic [2:0]          wr_en;
  logic [2:0][4:0]     wr_addr;
  logic [2:0][P-1:0]   wr_lanes;
  vec_t [2:0]          wr_data;

  always_comb begin
    rd_addr[RP_LS]   = id2.ls.op inside {LS_STV, LS_STVM} ? id2.ls.r : id2.ls.r2;
    rd_addr[RP_MAC1] = id2.mac.y;
    rd_addr[RP_MAC2] = id2.mac.z;
    rd_addr[RP_SHF]  = id2.shf.y;
  end

  vpf_regfile #(.P(P), .NREG(NREG), .W(W)) u_rf (
    .clk, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_lanes, .wr_data
  );

  // load/store pipeline registers after ID3
  logic            ls3_v, ls4_v, ls5_v;
  ls_slot_t        ls3, ls4, ls5;
  vec_t            mov3;           // MOV data, EX1
  vec_t            ld_wb;          // load/MOV write-back data, EX2
  vec_t            bdc;            // broadcast load data, WB
  logic            wrap_mem;

  // memory pointers
  logic [AW-1:0] ptr_addr;
  vpf_acu #(.NPTR(NPTR), .AW(AW)) u_acu (
    .clk, .rst,
    .upd_en  (id2_v && is_ls_mem(id2.ls.op)),
    .upd_ptr (id2.ls.p),
    .upd_inc (id2.ls.inc),
    .upd_mod (is_ls_modulo(id2.ls.op)),
    .addr    (ptr_addr),
    .ld_en   (ls4_v && ls4.op == LS_LDP),
    .ld_ptr  (ls4.p),
    .ld_val  (ls4.imm),
    .ldb_en  (id3_v && id3.ls.op == LS_LDB),
    .lde_en  (id3_v && id3.ls.op == LS_LDE),
    .ldbe_ptr(id3.ls.p),
    .ldbe_val(id3.ls.imm),
    .wrapped (wrap_mem)
  );

  // ======================= data memory =======================
  logic                   ma_en, ma_we;
  logic [P-1:0][AW-1:0]   ma_rows;
  vec_t                   ma_wdata, ma_rdata;
  logic                   mb_en, mb_we;
  logic [AW-1:0]          mb_row;
  logic [P-1:0]           mb_lanes;
  vec_t                   mb_wdata, mb_rdata;

  vpf_vmem #(.P(P), .W(W), .DEPTH(1 << AW)) u_mem (
    .clk,
    .a_en(ma_en), .a_we(ma_we), .a_rows(ma_rows), .a_wdata(ma_wdata), .a_rdata(ma_rdata),
    .b_en(mb_en), .b_we(mb_we), .b_row(mb_row), .b_lanes(mb_lanes),
    .b_wdata(mb_wdata), .b_rdata(mb_rdata)
  );

  // gather engine
  logic                  g_mem_valid, g_shf_valid, ev_gcol;
  logic [P-1:0][AW-1:0]  g_rows;
  logic [P-1:0][PW-1:0]  g_pat;
  logic [4:0]            g_dest;
  logic [P-1:0][15:0]    g_addrs;

  always_comb begin
    for (int i = 0; i < P; i++) g_addrs[i] = rd_data[RP_LS][i];
  end

  vpf_gather #(.P(P), .AW(AW)) u_gather (
    .clk, .rst,
    .start(id3_v && id3.ls.op == LS_SMG), .dest(id3.ls.r), .addrs(g_addrs),
    .busy(gather_busy), .mem_valid(g_mem_valid), .mem_rows(g_rows),
    .shf_valid(g_shf_valid), .shf_pat(g_pat), .shf_dest(g_dest),
    .ev_collision(ev_gcol)
  );
  assign ev_gather_collision = ev_gcol;

  always_comb begin
    ma_en    = id3_v && is_ls_mem(id3.ls.op);
    ma_we    = id3_v && id3.ls.op inside {LS_STV, LS_STVM};
    ma_wdata = rd_data[RP_LS];
    for (int k = 0; k < P; k++) ma_rows[k] = ptr_addr;
    if (g_mem_valid) begin
      ma_en   = 1'b1;
      ma_we   = 1'b0;
      ma_rows = g_rows;
    end
  end

  vpf_extio #(.P(P)) u_ext (
    .clk, .rst,
    .id2_valid(id2_v), .id2_ex(id2.ex),
    .mb_en, .mb_we, .mb_row, .mb_lanes, .mb_wdata, .mb_rdata,
    .ext_addr, .ext_we, .ext_wdata, .ext_rdata,
    .ev_wrap()
  );

  // load/store pipeline: EX1 (memory data), EX2 (write back), WB (broadcast)
  always_ff @(posedge clk) begin
    if (rst) begin
      ls3_v <= 1'b0; ls4_v <= 1'b0; ls5_v <= 1'b0;
    end else begin
      ls3_v <= id3_v && id3.ls.op != LS_NOP;
      ls4_v <= ls3_v;
      ls5_v <= ls4_v;
    end
    ls3  <= id3.ls;
    ls4  <= ls3;
    ls5  <= ls4;
    mov3 <= bypass_wb(rd_data[RP_LS], id3.ls.r2);
    ld_wb <= (ls3.op == LS_MOV) ? mov3 : ma_rdata;
    bdc  <= ld_wb;
  end

  // broadcast registers and patterns
  vec_t vmbc, vsbc;
  vpf_bcast_rot #(.P(P), .W(W)) u_vmbc (
    .clk, .rst,
    .ld(ls5_v && ls5.op inside {LS_LDM, LS_LDMM}), .ld_data(bdc),
    .rot(id3_v && id3.rmb), .q(vmbc)
  );
  vpf_bcast_rot #(.P(P), .W(W)) u_vsbc (
    .clk, .rst,
    .ld(ls5_v && ls5.op inside {LS_LDS, LS_LDSM}), .ld_data(bdc),
    .rot(id3_v && id3.rsb), .q(vsbc)
  );

  logic [P-1:0][PW-1:0] pat_rd;
  vpf_patregs #(.P(P), .W(W)) u_pat (
    .clk, .rst,
    .we(ls4_v && ls4.op inside {LS_LDT, LS_LDTM}), .widx(ls4.r[3:0]), .wdata(ld_wb),
    .ridx(id3.shf.t), .rdata(pat_rd)
  );

  // ======================= execute units =======================
  // MAC input registers (filled in ID3)
  logic        mi_v, mi_fy, mi_fz, mi_fm;
  mac_op_t     mi_op;
  logic [4:0]  mi_dest;
  vec_t        mi_y, mi_z, mi_m;
  logic [W-1:0] mi_bc;

  logic        mq_v, mwb_v, mx_v;
  logic [4:0]  mq_d, mwb_d, mx_d;
  vec_t        mq, mwb, mx;

  vpf_mac #(.P(P)) u_mac (
    .clk, .rst,
    .in_valid(mi_v), .op(mi_op), .dest(mi_dest),
    .y(mi_y), .z(mi_z), .m(mi_m), .bc(mi_bc),
    .fwd_y(mi_fy), .fwd_z(mi_fz), .fwd_m(mi_fm),
    .q_valid(mq_v), .q_dest(mq_d), .res_q(mq),
    .wb_valid(mwb_v), .wb_dest(mwb_d), .res_wb(mwb),
    .x_valid(mx_v), .x_dest(mx_d), .res_x(mx),
    .acc()
  );

  // shuffle input registers (filled in ID3)
  logic                  si_v;
  logic [4:0]            si_dest;
  vec_t                  si_src;
  logic [P-1:0]          si_self;
  logic [P-1:0][PW-1:0]  si_pat;

  logic                  so_v, sx_v;
  logic [4:0]            so_d, sx_d;
  vec_t                  so, sx;
  logic [P-1:0]          so_w, sx_w;

  vpf_shuffle #(.P(P), .W(W), .STAGES(SHF_STAGES), .TAGW(5)) u_shf (
    .clk, .rst,
    .in_valid(g_shf_valid || si_v),
    .tag_in  (g_shf_valid ? g_dest : si_dest),
    .src     (g_shf_valid ? ma_rdata : si_src),
    .self_sel(g_shf_valid ? '0 : si_self),
    .pat     (g_shf_valid ? g_pat : si_pat),
    .bc      (vsbc[0]),
    .out_valid(so_v), .tag_out(so_d), .dout(so), .wlanes(so_w)
  );

  // shuffle extra write-back register
  always_ff @(posedge clk) begin
    if (rst) sx_v <= 1'b0;
    else     sx_v <= so_v;
    sx_d <= so_d;
    sx   <= so;
    sx_w <= so_w;
  end

  // ======================= ID3: bypass =======================
  function automatic vec_t bypass(vec_t rf, logic [4:0] r);
    vec_t v;
    v = rf;
    if (mx_v && mx_d == r) v = mx;
    if (sx_v && sx_d == r)
      for (int l = 0; l < P; l++) if (sx_w[l]) v[l] = sx[l];
    if (mwb_v && mwb_d == r) v = mwb;
    if (so_v && so_d == r)
      for (int l = 0; l < P; l++) if (so_w[l]) v[l] = so[l];
    if (mq_v && mq_d == r) v = mq;
    return v;
  endfunction

  function automatic logic hits(logic [4:0] r);
    return (mx_v && mx_d == r) || (sx_v && sx_d == r) || (mwb_v && mwb_d == r) ||
           (so_v && so_d == r) || (mq_v && mq_d == r);
  endfunction

  // MOV reads through the write-back stage sources only (latency 3)
  function automatic vec_t bypass_wb(vec_t rf, logic [4:0] r);
    vec_t v;
    v = rf;
    if (mx_v && mx_d == r) v = mx;
    if (sx_v && sx_d == r)
      for (int l = 0; l < P; l++) if (sx_w[l]) v[l] = sx[l];
    if (mwb_v && mwb_d == r) v = mwb;
    return v;
  endfunction

  logic mac_act3, shf_act3, mac_fwd3;
  assign mac_fwd3 = mi_v && id3.mac.op.kind inside {MK_ADD, MK_SUB, MK_MAC, MK_MDC};
  assign mac_act3 = id3_v && id3.mac.op.kind != MK_NOP;
  assign shf_act3 = id3_v && id3.shf.en;

  // Shuffles in flight: entry k is the shuffle instruction issued k
  // instructions before the one now in ID3 (entry 1 is in the unit's input
  // registers). The one issued SHF_STAGES earlier is in the output register
  // when the current one enters the unit, so it feeds the folded bypass.
  logic [SHF_STAGES:1]          sh_v;
  logic [SHF_STAGES:1][4:0]     sh_d;
  logic [SHF_STAGES:1][P-1:0]   sh_w;
  always_ff @(posedge clk) begin
    if (rst) sh_v <= '0;
    else begin
      sh_v[1] <= shf_act3;
      for (int k = 2; k <= SHF_STAGES; k++) sh_v[k] <= sh_v[k-1];
    end
    sh_d[1] <= id3.shf.x;
    for (int l = 0; l < P; l++) sh_w[1][l] <= !pat_rd[l][PW-1];
    for (int k = 2; k <= SHF_STAGES; k++) begin
      sh_d[k] <= sh_d[k-1];
      sh_w[k] <= sh_w[k-1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mi_v <= 1'b0;
      si_v <= 1'b0;
    end else begin
      mi_v <= mac_act3;
      si_v <= shf_act3;
    end
    mi_op   <= id3.mac.op;
    mi_dest <= id3.mac.x;
    mi_y    <= bypass(rd_data[RP_MAC1], id3.mac.y);
    mi_z    <= bypass(rd_data[RP_MAC2], id3.mac.z);
    mi_m    <= bypass(rd_data[RP_LS],   id3.ls.r2);
    mi_bc   <= vmbc[0];
    // previous MAC, now in EX1, writes an operand: take it from its result
    // (only the add/subtract and accumulate forms have this path; the
    // multiply forms see a MAC result two instructions later)
    mi_fy   <= mac_fwd3 && mi_dest == id3.mac.y;
    mi_fz   <= mac_fwd3 && mi_dest == id3.mac.z;
    mi_fm   <= 1'b0;
    si_dest <= id3.shf.x;
    si_src  <= bypass(rd_data[RP_SHF], id3.shf.y);
    si_pat  <= pat_rd;
    for (int l = 0; l < P; l++)
      si_self[l] <= sh_v[SHF_STAGES] && sh_d[SHF_STAGES] == id3.shf.y && sh_w[SHF_STAGES][l];
  end

  // ======================= write back =======================
  always_comb begin
    wr_en[WP_SHF]    = so_v;
    wr_addr[WP_SHF]  = so_d;
    wr_lanes[WP_SHF] = so_w;
    wr_data[WP_SHF]  = so;
    wr_en[WP_MAC]    = mwb_v;
    wr_addr[WP_MAC]  = mwb_d;
    wr_lanes[WP_MAC] = '1;
    wr_data[WP_MAC]  = mwb;
    wr_en[WP_LS]     = ls4_v && ls4.op inside {LS_LDV, LS_LDVM, LS_MOV};
    wr_addr[WP_LS]   = ls4.r;
    wr_lanes[WP_LS]  = '1;
    wr_data[WP_LS]   = ld_wb;
  end

  // ======================= observation =======================
  always_ff @(posedge clk) begin
    if (rst) begin
      ev_bypass_mac        <= 1'b0;
      ev_bypass_shf_masked <= 1'b0;
      ev_fwd_mac           <= 1'b0;
      ev_fwd_shf           <= 1'b0;
    end else begin
      ev_bypass_mac <= (mac_act3 && (hits(id3.mac.y) || (!id3.mac.op.b && hits(id3.mac.z)))) ||
                       (shf_act3 && hits(id3.shf.y));
      ev_bypass_shf_masked <= shf_act3 && so_v && so_d == id3.shf.y && !(&so_w);
      ev_fwd_mac <= mac_act3 && mac_fwd3 && (mi_dest == id3.mac.y || mi_dest == id3.mac.z);
      ev_fwd_shf <= shf_act3 && sh_v[SHF_STAGES] && sh_d[SHF_STAGES] == id3.shf.y;
    end
  end
  assign ev_modulo_wrap = wrap_mem;

  // the ISA forbids vector loads/stores while a gather uses the memory port
  assert property (@(posedge clk) disable iff (rst)
                   !(g_mem_valid && id3_v && is_ls_mem(id3.ls.op)))
    else $error("vpf_core: load/store issued while the gather uses the memory port");

endmodule
