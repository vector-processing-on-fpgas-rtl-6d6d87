// tb_vpf_flow: self-checking test of the flow control unit.
// A two-register fetch model in the testbench follows pc (as the program
// memory does) and presents flow-control slots from a small program:
//   0: DOI 3, loop 4..6      8: JR to 20 (two delay slots 9, 10 run)
//  20: DOI 2, loop 24..29   24: DOI 3, loop 27..28 (nested)   35: SGW
// The addresses that leave ID1 are compared with the trace worked out by hand
// from the ISA rules; SGW must hold for as long as the gather is busy.
module tb_vpf_flow;
  import vpf_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  fc_slot_t prog [512];
  logic id1_valid, gather_busy, stall, ev_jump, ev_loop_back, ev_loop_pop;
  fc_slot_t id1_fc;
  logic [CAW-1:0] id1_pc, pc, a1;
  logic v1;

  vpf_flow dut (.*);

  // fetch model: pc -> a1 -> id1_pc
  always_ff @(posedge clk) begin
    if (rst) begin v1 <= 0; id1_valid <= 0; end
    else if (!stall) begin v1 <= 1; id1_valid <= v1; end
    if (!stall) begin a1 <= pc; id1_pc <= a1; end
  end
  assign id1_fc = prog[id1_pc];

  int exp_trace [$];
  integer got [$];   // 4-state, so an unknown pc shows as a mismatch
  int stall_cycles = 0;

  initial begin
    for (int i = 0; i < 512; i++) prog[i] = '0;
    prog[0]  = '{FC_DOI, 7'd0, 9'd4, 9'd6, 11'd3};
    prog[8]  = '{FC_JR, 7'(20 - 10), 9'd0, 9'd0, 11'd0};
    prog[20] = '{FC_DOI, 7'd0, 9'd4, 9'd9, 11'd2};
    prog[24] = '{FC_DOI, 7'd0, 9'd3, 9'd4, 11'd3};
    prog[35] = '{FC_SGW, 7'd0, 9'd0, 9'd0, 11'd0};
    exp_trace = {0,1,2,3,4,5,6,4,5,6,4,5,6,7,8,9,10,
                 20,21,22,23,
                 24,25,26,27,28,27,28,27,28,29,
                 24,25,26,27,28,27,28,27,28,29,
                 30,31,32,33,34,35,36,37,38};
    gather_busy = 0;
    repeat (2) @(posedge clk); rst = 0;
    while (got.size() < exp_trace.size()) begin
      @(posedge clk);
      #1;
      gather_busy = (id1_valid && id1_pc == 35 && stall_cycles < 5);
      #1;
      if (id1_valid && !stall) got.push_back(id1_pc);
      if (stall) stall_cycles++;
    end
    for (int i = 0; i < exp_trace.size(); i++) begin
      checks++;
      if (got[i] !== exp_trace[i]) begin failures++; $display("step %0d got %0d exp %0d", i, got[i], exp_trace[i]); end
    end
    checks++;
    if (stall_cycles !== 5) begin failures++; $display("stall cycles %0d", stall_cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
