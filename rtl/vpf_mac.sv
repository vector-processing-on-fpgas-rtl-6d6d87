// vpf_mac: the VPF multiply-accumulate unit, P independent lanes.
//
// Each lane computes, on signed 1.15 fixed-point words, one of
//   ADD  a = y + f        SUB  a = y - f        MUL  a = y * f
//   MAD  a = m + y * f    MSB  a = m - y * f
//   MAC  a = a + y * f    MDC  a = a - y * f
// where f is z, or element 0 of the multiplier broadcast register (bc) in the
// broadcast (B*) forms, and m comes from the load/store unit's read port (LDA).
// The accumulator a keeps 48 bits with 31 fraction bits, like the wide output
// register of an FPGA DSP block. A 1.15 x 1.15 product (2.30) is shifted one
// place left to 1.31; addends are placed on the same scale. The result written
// to the register file is bits 31..16 of a, truncated, or, in the rounding
// forms, plus bit 15 (the accumulator is then rounded too). There is no
// saturation: -1 * -1 wraps to -1, as in the design.
//
// Pipeline: operands arrive in the cycle the unit executes (EX1) and the
// result is in res_q one cycle later. The second execute stage copies it to
// res_wb, which feeds the register-file write port, and res_x keeps it one
// more cycle as the extra write-back bypass source. fwd_y/fwd_z/fwd_m take an
// operand from res_q instead of the input, so a MAC instruction can use the
// result of the one issued just before it.
//
// The operations, formats, rounding rule and output stages follow the design.
// The 48-bit accumulator width and keeping the bypass copy and the
// register-file copy of the write-back stage as one register are this
// implementation's choices.
module vpf_mac
  import vpf_pkg::*;
#(
  parameter int P = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  mac_op_t             op,
  input  logic [4:0]          dest,
  input  logic [P-1:0][W-1:0] y,
  input  logic [P-1:0][W-1:0] z,
  input  logic [P-1:0][W-1:0] m,
  input  logic [W-1:0]        bc,
  input  logic                fwd_y,
  input  logic                fwd_z,
  input  logic                fwd_m,
  output logic                q_valid,
  output logic [4:0]          q_dest,
  output logic [P-1:0][W-1:0] res_q,
  output logic                wb_valid,
  output logic [4:0]          wb_dest,
  output logic [P-1:0][W-1:0] res_wb,
  output logic                x_valid,
  output logic [4:0]          x_dest,
  output logic [P-1:0][W-1:0] res_x,
  output logic [P-1:0][47:0]  acc
);

  logic [P-1:0][47:0] nxt;
  logic               act;

  assign act = in_valid && op.kind != MK_NOP;

  always_comb begin
    for (int l = 0; l < P; l++) begin
      logic signed [W-1:0]  ye, ze, me, fe;
      logic signed [47:0]   prod, y48, f48, m48, sum;
      ye  = fwd_y ? res_q[l] : y[l];
      ze  = fwd_z ? res_q[l] : z[l];
      me  = fwd_m ? res_q[l] : m[l];
      fe  = op.b ? bc : ze;
      prod = 48'(ye * fe) <<< 1;
      y48 = 48'(ye) <<< 16;
      f48 = 48'(fe) <<< 16;
      m48 = 48'(me) <<< 16;
      unique case (op.kind)
        MK_ADD:  sum = y48 + f48;
        MK_SUB:  sum = y48 - f48;
        MK_MUL:  sum = prod;
        MK_MAD:  sum = m48 + prod;
        MK_MSB:  sum = m48 - prod;
        MK_MAC:  sum = signed'(acc[l]) + prod;
        MK_MDC:  sum = signed'(acc[l]) - prod;
        default: sum = signed'(acc[l]);
      endcase
      if (op.rnd && !(op.kind inside {MK_ADD, MK_SUB}))
        sum = {sum[47:16] + 32'(sum[15]), 16'h0000};
      nxt[l] = sum;
    end
  end

  always_ff @(posedge clk) begin
    if (act) begin
      acc <= nxt;
      for (int l = 0; l < P; l++) res_q[l] <= nxt[l][31:16];
    end
    q_dest  <= dest;
    res_wb  <= res_q;
    wb_dest <= q_dest;
    res_x   <= res_wb;
    x_dest  <= wb_dest;
    if (rst) begin
      q_valid  <= 1'b0;
      wb_valid <= 1'b0;
      x_valid  <= 1'b0;
      acc      <= '0;
    end else begin
      q_valid  <= act;
      wb_valid <= q_valid;
      x_valid  <= wb_valid;
    end
  end

endmodule
