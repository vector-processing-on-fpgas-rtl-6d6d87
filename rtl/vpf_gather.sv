// vpf_gather: the smart gather engine behind the SMG instruction.
//
// SMG Rd, Ra loads lane i of Rd from data memory element Ra[i] (a 16-bit
// element address; bank = address mod P, row = address / P). Lanes whose
// addresses fall in the same bank collide, so the engine fetches in rounds:
// each round every bank serves the lowest-numbered pending lane that wants
// it, the banks receive per-bank row addresses, and a shuffle pattern is
// built that routes bank b's word to the lanes served from it and masks all
// other lanes. The loaded vector and the pattern go through the shuffle unit,
// whose masked write builds Rd up round by round. busy (smg_todo) is high
// while lanes are still pending; the SGW instruction waits on it.
//
// Timing: start is presented with the address vector in the last decode
// stage. Each following cycle one round is selected and registered
// (mem_valid, mem_rows); the memory answers one cycle later, when shf_valid,
// shf_pat and shf_dest accompany the data into the shuffle unit. A gather
// with l rounds therefore occupies the memory port for l cycles.
//
// The round structure, per-bank selection and generated shuffle patterns
// follow the design. The design splits selection into a tree stage and an
// address-multiplexer stage and adds register stages before the shuffle; here
// selection and address choice share one cycle (a lowest-index priority
// choice, which synthesis builds as a tree) and the data goes straight to
// the shuffle unit. The address-check variant (equal addresses served by one
// fetch) is not built, as in the design.
module vpf_gather #(
  parameter int P  = 8,
  parameter int AW = 13
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       start,
  input  logic [4:0]                 dest,
  input  logic [P-1:0][15:0]         addrs,
  output logic                       busy,
  output logic                       mem_valid,
  output logic [P-1:0][AW-1:0]       mem_rows,
  output logic                       shf_valid,
  output logic [P-1:0][$clog2(P)+1:0] shf_pat,
  output logic [4:0]                 shf_dest,
  output logic                       ev_collision   // a round left lanes pending
);
  localparam int LB = $clog2(P);

  logic [P-1:0][15:0]  a_q;
  logic [P-1:0]        pend;
  logic [4:0]          d_q;
  logic [P-1:0]        served;
  logic [P-1:0][AW-1:0] rows;
  logic [P-1:0][LB+1:0] pat;
  logic [P-1:0][$clog2(P)+1:0] pat_q;
  logic [4:0]          d_m;

  assign busy = |pend;

  always_comb begin
    logic [P-1:0] taken;
    taken  = '0;
    served = '0;
    rows   = '0;
    for (int i = 0; i < P; i++) begin
      logic [LB-1:0] b;
      b = a_q[i][LB-1:0];
      if (pend[i] && !taken[b]) begin
        taken[b]  = 1'b1;
        served[i] = 1'b1;
        rows[b]   = AW'(a_q[i] >> LB);
      end
    end
    for (int i = 0; i < P; i++)
      pat[i] = {!served[i], 1'b0, a_q[i][LB-1:0]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pend      <= '0;
      mem_valid <= 1'b0;
      shf_valid <= 1'b0;
      ev_collision <= 1'b0;
    end else begin
      if (start) begin
        pend <= '1;
        a_q  <= addrs;
        d_q  <= dest;
      end else begin
        pend <= pend & ~served;
      end
      mem_valid    <= busy && !start;
      shf_valid    <= mem_valid;
      ev_collision <= busy && !start && ((pend & ~served) != '0);
    end
    mem_rows <= rows;
    pat_q    <= pat;
    d_m      <= d_q;
    shf_pat  <= pat_q;
    shf_dest <= d_m;
  end

endmodule
