// vpf_progmem: the VPF code memory, DEPTH instruction words.
//
// A pipelined synchronous memory: the address (the program counter) presented
// in cycle t is read into the first register at the end of t, and copied into
// the output register at the end of t+1, so the instruction reaches decoding
// two cycles after its address. Because the flow control unit changes the
// program counter from the first decode stage, this two-cycle fetch gives the
// two branch delay slots of the ISA. hold freezes both registers (gather wait
// stall). A write port (we/waddr/wdata) loads the program; the design fills
// the block RAM at configuration time instead, so this port is this
// implementation's addition. valid marks that the output register holds a
// fetched instruction (it is 0 for two cycles after reset).
module vpf_progmem #(
  parameter int IW    = 149,
  parameter int DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [IW-1:0]            wdata,
  input  logic                     hold,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [IW-1:0]            rdata,
  output logic [$clog2(DEPTH)-1:0] raddr,
  output logic                     valid
);
  logic [IW-1:0] mem [DEPTH];
  logic [IW-1:0] r1;
  logic [$clog2(DEPTH)-1:0] a1;
  logic v1;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!hold) begin
      r1    <= mem[addr];
      a1    <= addr;
      rdata <= r1;
      raddr <= a1;
    end
    if (rst) begin
      v1    <= 1'b0;
      valid <= 1'b0;
    end else if (!hold) begin
      v1    <= 1'b1;
      valid <= v1;
    end
  end
endmodule
