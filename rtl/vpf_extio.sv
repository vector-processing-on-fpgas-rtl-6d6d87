// vpf_extio: the VPF external I/O unit.
//
// It moves data between the vector data memory and a byte-wide external
// memory through a 64-bit (8-byte) data bus, an external address and a write
// enable. It owns
//   - 16 external pointers X (24 bits), loaded by ELX;
//   - 16 internal pointers I with window size C and end F (an ACU instance),
//     loaded by ELI/EIB/EIE, that address data-memory vectors;
//   - the scalar/vector counter s: ELD/EST move four 16-bit words, part s of
//     a vector, per bus transfer, and s counts 0 .. P/4-1;
//   - a colour buffer c of 3P bytes: ELB shifts 8 bytes in from the bus,
//     ESB shifts 8 bytes out to it, ELC unpacks one colour component of P
//     pixels into a data-memory vector (byte zero-extended to a word) and ESC
//     packs one (word saturated to 0..255). ELC and ESC rotate each pixel's
//     byte triplet, so three of them handle red, green and blue in turn.
//
// Pipeline, counted from the instruction's second decode stage (ID2) at t:
//   t   pointers read; X post-incremented; I post-incremented (modulo
//       window) at the end of a vector (ELD/EST) or always (ELC/ESC);
//   t+1 (ID3) loads: address on the bus, data sampled at the end of the cycle
//       and written to data memory or the colour buffer; data-memory read for
//       EST/ESC; EIB/EIE take effect;
//   t+2 (EX1) stores: address, data and write enable on the bus; ESC writes
//       the colour buffer; ELX takes effect;
//   t+3 ELI takes effect.
// This gives the ISA's latencies (ELX 3, ELI 4, EIB/EIE 2) and the rule that
// an external load must not follow an external store by one cycle.
//
// The instructions and their formulas follow the design. Bus byte order (word
// i is bytes 2i and 2i+1, byte 2i the high one, byte k at bits 8k+7..8k),
// the increment flag, pointer increments in vectors and bus words, the
// zero-extension into the low byte and the saturation rule are this
// implementation's choices. The data bus is split into an input and an
// output bus instead of one bidirectional bus.
module vpf_extio
  import vpf_pkg::*;
#(
  parameter int P = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 id2_valid,
  input  ex_slot_t             id2_ex,
  // data memory port B
  output logic                 mb_en,
  output logic                 mb_we,
  output logic [AW-1:0]        mb_row,
  output logic [P-1:0]         mb_lanes,
  output logic [P-1:0][W-1:0]  mb_wdata,
  input  logic [P-1:0][W-1:0]  mb_rdata,
  // external bus
  output logic [XAW-1:0]       ext_addr,
  output logic                 ext_we,
  output logic [63:0]          ext_wdata,
  input  logic [63:0]          ext_rdata,
  output logic                 ev_wrap
);
  localparam int NS  = (P / 4 > 1) ? P / 4 : 1;
  localparam int SW  = (NS > 1) ? $clog2(NS) : 1;
  localparam int NC  = 3 * P;

  logic [NPTR-1:0][XAW-1:0] xp;
  logic [SW-1:0]            s;
  logic [NC-1:0][7:0]       cb;

  // stage registers
  logic           v3, v4, v5;
  ex_slot_t       e3, e4, e5;
  logic [XAW-1:0] x3, x4;
  logic [SW-1:0]  s3, s4;
  logic [AW-1:0]  iaddr;

  logic io_ptr_use, vec_part, inc_i;
  assign io_ptr_use = id2_valid && id2_ex.op inside {EX_ELD, EX_EST, EX_ELC, EX_ESC};
  assign vec_part   = id2_ex.op inside {EX_ELD, EX_EST};
  assign inc_i      = id2_ex.inc && (!vec_part || s == SW'(NS - 1));

  vpf_acu #(.NPTR(NPTR), .AW(AW)) u_iptr (
    .clk, .rst,
    .upd_en  (io_ptr_use),
    .upd_ptr (id2_ex.i),
    .upd_inc (inc_i ? 5'd1 : 5'd0),
    .upd_mod (1'b1),
    .addr    (iaddr),
    .ld_en   (v5 && e5.op == EX_ELI),
    .ld_ptr  (e5.i),
    .ld_val  (e5.imm[AW-1:0]),
    .ldb_en  (v3 && e3.op == EX_EIB),
    .lde_en  (v3 && e3.op == EX_EIE),
    .ldbe_ptr(e3.i),
    .ldbe_val(e3.imm[AW-1:0]),
    .wrapped (ev_wrap)
  );

  function automatic logic [7:0] sat8(logic [W-1:0] v);
    if (v[W-1])        return 8'h00;
    else if (|v[W-2:8]) return 8'hff;
    else               return v[7:0];
  endfunction

  // ---------------- ID2: pointers, s ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      s  <= '0;
      xp <= '0;
      v3 <= 1'b0; v4 <= 1'b0; v5 <= 1'b0;
    end else begin
      v3 <= id2_valid && id2_ex.op != EX_NOP;
      v4 <= v3;
      v5 <= v4;
      if (id2_valid && vec_part)
        s <= (s == SW'(NS - 1)) ? '0 : s + 1'b1;
      if (id2_valid && id2_ex.inc && id2_ex.op inside {EX_ELD, EX_EST, EX_ELB, EX_ESB})
        xp[id2_ex.x] <= xp[id2_ex.x] + XAW'(1);
      if (v4 && e4.op == EX_ELX)
        xp[e4.x] <= e4.imm;
    end
    e3 <= id2_ex;
    e4 <= e3;
    e5 <= e4;
    x3 <= xp[id2_ex.x];
    x4 <= x3;
    s3 <= s;
    s4 <= s3;
  end

  // ---------------- ID3: loads, memory access ----------------
  logic ld3, st4;
  assign ld3 = v3 && e3.op inside {EX_ELD, EX_ELB};
  assign st4 = v4 && e4.op inside {EX_EST, EX_ESB};

  always_comb begin
    mb_en    = v3 && e3.op inside {EX_ELD, EX_ELC, EX_EST, EX_ESC};
    mb_we    = v3 && e3.op inside {EX_ELD, EX_ELC};
    mb_row   = iaddr;
    mb_lanes = '0;
    mb_wdata = '0;
    if (e3.op == EX_ELD) begin
      for (int k = 0; k < 4; k++) begin
        if (int'(s3) * 4 + k < P) begin
          mb_lanes[int'(s3) * 4 + k] = 1'b1;
          mb_wdata[int'(s3) * 4 + k] = {ext_rdata[16*k +: 8], ext_rdata[16*k+8 +: 8]};
        end
      end
    end else begin
      mb_lanes = '1;
      for (int i = 0; i < P; i++) mb_wdata[i] = {8'h00, cb[3*i]};
    end
  end

  // ---------------- EX1: stores ----------------
  always_comb begin
    ext_addr  = st4 ? x4 : x3;
    ext_we    = st4;
    ext_wdata = '0;
    if (e4.op == EX_EST) begin
      for (int k = 0; k < 4; k++)
        if (int'(s4) * 4 + k < P)
          {ext_wdata[16*k +: 8], ext_wdata[16*k+8 +: 8]} = mb_rdata[int'(s4) * 4 + k];
    end else begin
      for (int k = 0; k < 8; k++) ext_wdata[8*k +: 8] = cb[k];
    end
  end

  // ---------------- colour buffer ----------------
  always_ff @(posedge clk) begin
    if (rst) cb <= '0;
    else begin
      if (v4 && e4.op == EX_ESC) begin
        for (int i = 0; i < P; i++) begin
          cb[3*i]   <= cb[3*i+1];
          cb[3*i+1] <= cb[3*i+2];
          cb[3*i+2] <= sat8(mb_rdata[i]);
        end
      end else if (v4 && e4.op == EX_ESB) begin
        for (int i = 0; i < NC; i++) cb[i] <= (i + 8 < NC) ? cb[i+8] : 8'h00;
      end else if (v3 && e3.op == EX_ELB) begin
        for (int i = 0; i < NC; i++)
          cb[i] <= (i + 8 < NC) ? cb[i+8] : ext_rdata[8*(i-(NC-8)) +: 8];
      end else if (v3 && e3.op == EX_ELC) begin
        for (int i = 0; i < P; i++) begin
          cb[3*i]   <= cb[3*i+1];
          cb[3*i+1] <= cb[3*i+2];
          cb[3*i+2] <= cb[3*i];
        end
      end
    end
  end

  // loads must not meet stores on the shared bus
  assert property (@(posedge clk) disable iff (rst) !(ld3 && st4))
    else $error("vpf_extio: external load issued one cycle after an external store");

endmodule
