// tb_vpf_core_dut: the processor under test for tb_vpf_core. With SHF_S = 1
// the core is built with all its default parameters; otherwise only its
// shuffle depth is changed.
module tb_vpf_core_dut
  import vpf_pkg::*;
#(
  parameter int SHF_S = 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            prog_we,
  input  logic [CAW-1:0]  prog_addr,
  input  logic [IW-1:0]   prog_data,
  output logic [XAW-1:0]  ext_addr,
  output logic            ext_we,
  output logic [63:0]     ext_wdata,
  input  logic [63:0]     ext_rdata,
  output logic [CAW-1:0]  pc,
  output logic            ev_stall,
  output logic            ev_jump,
  output logic            ev_loop_back,
  output logic            ev_bypass_mac,
  output logic            ev_bypass_shf_masked,
  output logic            ev_fwd_mac,
  output logic            ev_fwd_shf,
  output logic            ev_modulo_wrap,
  output logic            ev_gather_collision
);
  if (SHF_S == 1) begin : g_default
    vpf_core u_core (.*);
  end else begin : g_deep
    vpf_core #(.SHF_STAGES(SHF_S)) u_core (.*);
  end
endmodule
