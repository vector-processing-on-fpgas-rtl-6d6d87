// vpf_patregs: the 16 shuffle pattern registers T[0..15] of the VPF.
//
// Each register holds one shuffle pattern element of 2 + log2(P) bits per lane
// (mask bit, broadcast bit, source lane). A register is written from a data
// memory vector by LDT/LDTM; only the low 2 + log2(P) bits of each 16-bit
// memory word are kept. The read port is combinational: the processor reads
// the pattern in its last decode stage and registers it at the shuffle unit's
// input. A write takes effect at the end of the cycle it is presented in.
// Reset clears the registers (this implementation's choice).
module vpf_patregs #(
  parameter int P    = 8,
  parameter int W    = 16,
  parameter int NPAT = 16
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          we,
  input  logic [$clog2(NPAT)-1:0]       widx,
  input  logic [P-1:0][W-1:0]           wdata,
  input  logic [$clog2(NPAT)-1:0]       ridx,
  output logic [P-1:0][$clog2(P)+1:0]   rdata
);
  localparam int PW = $clog2(P) + 2;
  logic [NPAT-1:0][P-1:0][PW-1:0] t;

  always_ff @(posedge clk) begin
    if (rst) t <= '0;
    else if (we) begin
      for (int i = 0; i < P; i++) t[widx][i] <= wdata[i][PW-1:0];
    end
  end
  assign rdata = t[ridx];
endmodule
