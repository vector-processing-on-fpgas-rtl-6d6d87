// tb_vpf_core_shf3: the end-to-end processor test of tb_vpf_core, run on a
// core built with a three-stage shuffle unit. The inner testbench reports and
// finishes; the block below is only a backstop that fires after the inner
// watchdog (5000 cycles of 10 time units) would have.
module tb_vpf_core_shf3;
  tb_vpf_core #(.SHF_S(3)) u_run ();

  initial begin
    #60000;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
