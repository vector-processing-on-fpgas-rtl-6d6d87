// vpf_acu: address calculation unit, a set of NPTR pointer registers with
// window-size (B) and window-end (E) registers.
//
// An access (upd_en) reads pointer upd_ptr, returns its value on addr in the
// next cycle and adds the signed increment upd_inc to the pointer. For a
// modulo access (upd_mod) the pointer is corrected one cycle later: if the
// incremented value is above E, B is subtracted. The incremented value is
// thus visible to an access issued one cycle later, the corrected value to
// one issued two cycles later, as the design specifies to keep the add,
// compare and subtract out of one cycle. If the pointer is accessed again in
// the cycle its correction is applied, the correction and the new increment
// are both kept (this implementation's choice).
//
// ld_en loads a pointer with an immediate, ldb_en and lde_en load B and E;
// the processor delays these requests to give the load latencies of the ISA.
// The unit serves both the memory pointers P/B/E of the load/store unit and
// the internal pointers I/C/F of the external I/O unit. Pointers reset to 0.
module vpf_acu #(
  parameter int NPTR = 16,
  parameter int AW   = 13
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    upd_en,
  input  logic [$clog2(NPTR)-1:0] upd_ptr,
  input  logic [4:0]              upd_inc,
  input  logic                    upd_mod,
  output logic [AW-1:0]           addr,
  input  logic                    ld_en,
  input  logic [$clog2(NPTR)-1:0] ld_ptr,
  input  logic [AW-1:0]           ld_val,
  input  logic                    ldb_en,
  input  logic                    lde_en,
  input  logic [$clog2(NPTR)-1:0] ldbe_ptr,
  input  logic [AW-1:0]           ldbe_val,
  output logic                    wrapped   // a modulo correction happened
);
  localparam int PIW = $clog2(NPTR);

  logic [NPTR-1:0][AW-1:0] ptr, bsz, eadr;

  // correction pipeline register
  logic            c_en;
  logic [PIW-1:0]  c_ptr;
  logic [AW-1:0]   c_val;
  logic            c_wrap;
  logic [AW-1:0]   c_fix;
  logic [AW-1:0]   inc_val;
  logic [AW-1:0]   base;

  assign c_wrap = c_en && (c_val > eadr[c_ptr]);
  assign c_fix  = c_wrap ? c_val - bsz[c_ptr] : c_val;
  // an access to a pointer whose correction is pending this cycle uses the
  // corrected value as the base of its increment
  assign base    = (c_en && c_ptr == upd_ptr) ? c_fix : ptr[upd_ptr];
  assign inc_val = base + AW'(signed'(upd_inc));

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr    <= '0;
      bsz    <= '0;
      eadr   <= '0;
      c_en   <= 1'b0;
      addr   <= '0;
      wrapped <= 1'b0;
    end else begin
      wrapped <= c_wrap;
      if (c_wrap) ptr[c_ptr] <= c_fix;
      if (ld_en) ptr[ld_ptr] <= ld_val;
      if (upd_en) begin
        addr          <= ptr[upd_ptr];
        ptr[upd_ptr]  <= inc_val;
      end
      c_en  <= upd_en && upd_mod;
      c_ptr <= upd_ptr;
      c_val <= inc_val;
      if (ldb_en) bsz[ldbe_ptr]  <= ldbe_val;
      if (lde_en) eadr[ldbe_ptr] <= ldbe_val;
    end
  end

endmodule
