// vpf_bcast_rot: a broadcast vector register with its rotate unit.
//
// The VPF has two of these: the multiplier broadcast register vmbc, whose
// element 0 is the scalar operand of the B* MAC instructions, and the shuffle
// broadcast register vsbc, whose element 0 a shuffle pattern can insert. The
// register is loaded as a whole vector from data memory (LDM/LDS) and rotated
// one position backward, q[i] <= q[(i+1) mod P], by the RMB/RSB instructions.
// The register has a single write port; if a load and a rotate arrive in the
// same cycle the load wins (the ISA forbids issuing them so that they meet).
// Both take effect at the end of the cycle they are presented in. Reset clears
// the register (reset behaviour is this implementation's choice).
module vpf_bcast_rot #(
  parameter int P = 8,
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                ld,
  input  logic [P-1:0][W-1:0] ld_data,
  input  logic                rot,
  output logic [P-1:0][W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else if (ld) q <= ld_data;
    else if (rot) begin
      for (int i = 0; i < P; i++) q[i] <= q[(i + 1) % P];
    end
  end
endmodule
