// vpf_flow: the VPF flow control unit (program counter, jumps, hardware loops,
// gather wait).
//
// It works in the first decode stage (ID1) on the instruction that the
// two-cycle fetch delivers, whose own address is id1_pc; at that time the
// program counter already points two instructions further, so
//   JR      sets pc to id1_pc + 2 + offset (two delay slots are executed);
//   DOI     pushes the current loop record on a 4-deep stack and starts a new
//           one: count = x - 1, start = id1_pc + start offset,
//           end = id1_pc + end offset;
//   SGW     stalls while the gather unit is busy: pc and the fetch registers
//           hold, the SGW stays in ID1 and a NOP goes down the pipeline.
// Otherwise, when the address about to be fetched is the end of the active
// loop, the next address is the loop start and the count is decremented, or,
// when the count is zero, the outer loop record is popped and fetching goes
// on sequentially. So loops cost no cycles, and a loop end must lie at least
// three instructions after its DOI, as the ISA demands.
//
// The instruction semantics, delay slots, loop record and stack depth follow
// the design. Encoding of offsets relative to the DOI/JR address, the
// valid bit of a loop record and reset to pc = 0 with no loop active are this
// implementation's choices.
module vpf_flow
  import vpf_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            id1_valid,
  input  fc_slot_t        id1_fc,
  input  logic [CAW-1:0]  id1_pc,
  input  logic            gather_busy,
  output logic [CAW-1:0]  pc,
  output logic            stall,
  output logic            ev_jump,
  output logic            ev_loop_back,
  output logic            ev_loop_pop
);
  typedef struct packed {
    logic            valid;
    logic [LCW-1:0]  count;
    logic [CAW-1:0]  start;
    logic [CAW-1:0]  stop;
  } hwloop_t;

  hwloop_t              hw;
  hwloop_t [LSTK-1:0]   stk;
  logic [$clog2(LSTK):0] sp;

  logic is_jr, is_doi, at_end;

  assign stall   = id1_valid && id1_fc.op == FC_SGW && gather_busy;
  assign is_jr   = id1_valid && id1_fc.op == FC_JR;
  assign is_doi  = id1_valid && id1_fc.op == FC_DOI;
  assign at_end  = hw.valid && pc == hw.stop;

  assign ev_jump      = is_jr;
  assign ev_loop_back = !stall && !is_jr && at_end && hw.count != '0;
  assign ev_loop_pop  = !stall && !is_jr && at_end && hw.count == '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc <= '0;
      hw <= '0;
      sp <= '0;
      stk <= '0;
    end else if (!stall) begin
      // next fetch address
      if (is_jr)
        pc <= id1_pc + CAW'(2) + CAW'(signed'(id1_fc.jofs));
      else if (at_end && hw.count != '0)
        pc <= hw.start;
      else
        pc <= pc + CAW'(1);
      // loop record
      if (is_doi) begin
        stk[sp[$clog2(LSTK)-1:0]] <= hw;
        if (int'(sp) < LSTK) sp <= sp + 1'b1;
        hw.valid <= 1'b1;
        hw.count <= id1_fc.lcount - LCW'(1);
        hw.start <= id1_pc + id1_fc.lstart;
        hw.stop  <= id1_pc + id1_fc.lend;
      end else if (!is_jr && at_end) begin
        if (hw.count != '0) hw.count <= hw.count - LCW'(1);
        else if (sp != 0) begin
          hw <= stk[sp[$clog2(LSTK)-1:0] - 1'b1];
          sp <= sp - 1'b1;
        end else hw.valid <= 1'b0;
      end
    end
  end

endmodule
