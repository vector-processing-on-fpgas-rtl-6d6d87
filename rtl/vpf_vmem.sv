// vpf_vmem: the banked vector data memory of the VPF.
//
// DEPTH rows of P words; word k of row r (element address r*P + k) lives in
// bank k, so an aligned vector is one row spread over all banks. Two ports,
// as in the design:
//   port A, used by the load/store unit, gives every bank its own row address
//     (a_rows). Vector loads and stores present the same row to all banks; the
//     smart gather presents a different row per bank.
//   port B, used by the external I/O unit, addresses one row and writes only
//     the lanes set in b_lanes (four lanes for ELD, all lanes for ELC).
// Both ports read synchronously: data for an address presented in one cycle
// is on a_rdata/b_rdata in the next (read before write). Writes take effect at
// the end of the cycle. If both ports write the same word in one cycle, port
// B wins (this implementation's choice). The contents are not reset.
module vpf_vmem #(
  parameter int P     = 8,
  parameter int W     = 16,
  parameter int DEPTH = 8192
) (
  input  logic                                clk,
  input  logic                                a_en,
  input  logic                                a_we,
  input  logic [P-1:0][$clog2(DEPTH)-1:0]     a_rows,
  input  logic [P-1:0][W-1:0]                 a_wdata,
  output logic [P-1:0][W-1:0]                 a_rdata,
  input  logic                                b_en,
  input  logic                                b_we,
  input  logic [$clog2(DEPTH)-1:0]            b_row,
  input  logic [P-1:0]                        b_lanes,
  input  logic [P-1:0][W-1:0]                 b_wdata,
  output logic [P-1:0][W-1:0]                 b_rdata
);
  for (genvar k = 0; k < P; k++) begin : g_bank
    logic [W-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (a_en) begin
        a_rdata[k] <= mem[a_rows[k]];
        if (a_we) mem[a_rows[k]] <= a_wdata[k];
      end
      if (b_en) begin
        b_rdata[k] <= mem[b_row];
        if (b_we && b_lanes[k]) mem[b_row] <= b_wdata[k];
      end
    end
  end
endmodule
