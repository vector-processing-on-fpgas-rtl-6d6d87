// vpf_shuffle: the VPF shuffle unit, t[i] := s[p[i]] across a P-lane vector.
//
// Every output lane j has a multiplexer tree that picks one of the P source
// lanes. Each pattern element has 2 + log2(P) bits: the top bit is a mask bit
// (lane not written, its old register contents stay), the next bit selects
// element 0 of the shuffle broadcast register instead of a source lane, and
// the low log2(P) bits give the source lane.
//
// The multiplexer trees can be cut into STAGES pipeline stages (1, 2 or 3):
// each stage resolves its share of the source-index bits, least significant
// first, and registers the surviving candidates, so the unit's latency is
// STAGES cycles and each stage has a shallower tree. The last stage also
// applies the broadcast and mask bits.
//
// self_sel implements the latency-one shuffle-to-shuffle bypass: source lane l
// is taken from the unit's own output register instead of src when
// self_sel[l] is set. The tree is then in effect 2P sources wide, which is how
// the design folds this bypass into the shuffle multiplexers.
//
// Interface: in_valid/tag_in accompany src/pat/bc; out_valid/tag_out
// accompany dout and wlanes (the lanes to write) STAGES cycles later. bc is
// sampled together with the operands. The pattern format, the stage options
// and the folded bypass follow the design; splitting index bits evenly across
// stages, LSB first, is this implementation's choice.
module vpf_shuffle #(
  parameter int P      = 8,
  parameter int W      = 16,
  parameter int STAGES = 1,
  parameter int TAGW   = 5
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic [TAGW-1:0]       tag_in,
  input  logic [P-1:0][W-1:0]   src,
  input  logic [P-1:0]          self_sel,
  input  logic [P-1:0][$clog2(P)+1:0] pat,
  input  logic [W-1:0]          bc,
  output logic                  out_valid,
  output logic [TAGW-1:0]       tag_out,
  output logic [P-1:0][W-1:0]   dout,
  output logic [P-1:0]          wlanes
);
  localparam int LB = $clog2(P);
  localparam int PW = LB + 2;

  initial assert (STAGES >= 1 && STAGES <= 3 && STAGES <= LB)
    else $error("vpf_shuffle: STAGES must be 1..3 and at most log2(P)");

  function automatic int bits_before(int s);
    return (LB * s) / STAGES;
  endfunction

  // Candidates entering each level; only the first P >> bits_before(s)
  // entries of a lane are meaningful at level s.
  logic [P-1:0][P-1:0][W-1:0] cand   [STAGES+1];
  logic [P-1:0][PW-1:0]       pat_l  [STAGES+1];
  logic [W-1:0]               bc_l   [STAGES+1];
  logic                       vld_l  [STAGES+1];
  logic [TAGW-1:0]            tag_l  [STAGES+1];
  logic [P-1:0][P-1:0][W-1:0] next_c [STAGES];

  logic [P-1:0][W-1:0] src_eff;
  always_comb begin
    for (int l = 0; l < P; l++)
      src_eff[l] = self_sel[l] ? dout[l] : src[l];
  end

  always_comb begin
    for (int j = 0; j < P; j++) cand[0][j] = src_eff;
  end
  assign pat_l[0] = pat;
  assign bc_l[0]  = bc;
  assign vld_l[0] = in_valid;
  assign tag_l[0] = tag_in;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int LO = bits_before(s);
    localparam int NB = bits_before(s + 1) - bits_before(s);
    always_comb begin
      next_c[s] = '0;
      for (int j = 0; j < P; j++) begin
        for (int g = 0; g < (P >> (LO + NB)); g++) begin
          int sel;
          sel = (int'(pat_l[s][j][LB-1:0]) >> LO) & ((1 << NB) - 1);
          next_c[s][j][g] = cand[s][j][g * (1 << NB) + sel];
        end
      end
    end
    if (s < STAGES - 1) begin : g_mid
      always_ff @(posedge clk) begin
        cand[s+1]  <= next_c[s];
        pat_l[s+1] <= pat_l[s];
        bc_l[s+1]  <= bc_l[s];
        tag_l[s+1] <= tag_l[s];
        if (rst) vld_l[s+1] <= 1'b0;
        else     vld_l[s+1] <= vld_l[s];
      end
    end
  end

  // Last level: broadcast and mask bits, output register.
  localparam int LAST = STAGES - 1;
  always_ff @(posedge clk) begin
    for (int j = 0; j < P; j++) begin
      if (!pat_l[LAST][j][PW-1]) begin
        dout[j] <= pat_l[LAST][j][PW-2] ? bc_l[LAST] : next_c[LAST][j][0];
      end
      wlanes[j] <= !pat_l[LAST][j][PW-1];
    end
    tag_out <= tag_l[LAST];
    if (rst) out_valid <= 1'b0;
    else     out_valid <= vld_l[LAST];
  end

  // unused upper entries of the fixed-size level arrays
  assign cand[STAGES]  = '0;
  assign pat_l[STAGES] = '0;
  assign bc_l[STAGES]  = '0;
  assign vld_l[STAGES] = 1'b0;
  assign tag_l[STAGES] = '0;

endmodule
