// vpf_regfile: the vector register file of the VPF.
//
// NREG registers of P lanes of W bits, held in flip-flops so that the file
// can have several write ports: four read ports (load/store, two for the MAC,
// one for the shuffle) and three write ports (shuffle, MAC, load/store).
// Each write port carries a per-lane enable so the shuffle unit can write
// only the lanes whose pattern mask bit is clear.
//
// Timing: reads are synchronous. The register number presented in one cycle
// (the second decode stage) gives its data from the port register in the next
// cycle. A write presented in a cycle takes effect at the clock edge that ends
// it; a read presented in the same cycle returns the old value (the processor
// covers that case with its extra write-back bypass register).
//
// The flip-flop implementation and the port counts follow the design; that
// for every register the writer is chosen by one multiplexer (priority
// shuffle, then MAC, then load/store if two write the same lanes in the same
// cycle) is this implementation's choice. No reset: the contents are
// undefined until written, as in the architecture.
module vpf_regfile #(
  parameter int P    = 8,
  parameter int NREG = 32,
  parameter int W    = 16,
  parameter int NRD  = 4,
  parameter int NWR  = 3
) (
  input  logic                         clk,
  input  logic [NRD-1:0][$clog2(NREG)-1:0] rd_addr,
  output logic [NRD-1:0][P-1:0][W-1:0]     rd_data,
  input  logic [NWR-1:0]                   wr_en,
  input  logic [NWR-1:0][$clog2(NREG)-1:0] wr_addr,
  input  logic [NWR-1:0][P-1:0]            wr_lanes,
  input  logic [NWR-1:0][P-1:0][W-1:0]     wr_data
);

  logic [NREG-1:0][P-1:0][W-1:0] regs;

  // Per register and lane: the write port that wins, if any.
  always_ff @(posedge clk) begin
    for (int r = 0; r < NREG; r++) begin
      for (int l = 0; l < P; l++) begin
        for (int w = NWR - 1; w >= 0; w--) begin
          // the loop runs from lowest to highest priority; the last match wins
          if (wr_en[w] && wr_addr[w] == r[$clog2(NREG)-1:0] && wr_lanes[w][l])
            regs[r][l] <= wr_data[w][l];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < NRD; k++)
      rd_data[k] <= regs[rd_addr[k]];
  end

endmodule
