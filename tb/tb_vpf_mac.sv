// tb_vpf_mac: self-checking test of the MAC unit.
// Random sequences of all MAC kinds, broadcast and rounding forms and operand
// forwarding are applied one per cycle; a reference model here keeps its own
// accumulator (64-bit integers, value scaled by 2^31) and predicts res_q one
// cycle after issue, res_wb two and res_x three cycles after issue. Fixed
// examples check the fixed-point scaling: 0.5 * 0.5 = 0.25, rounding and
// -1 * -1 wrapping to -1.
module tb_vpf_mac;
  import vpf_pkg::*;
  localparam int P = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, fwd_y, fwd_z, fwd_m;
  mac_op_t op;
  logic [4:0] dest;
  logic [P-1:0][W-1:0] y, z, m;
  logic [W-1:0] bc;
  logic q_valid, wb_valid, x_valid;
  logic [4:0] q_dest, wb_dest, x_dest;
  logic [P-1:0][W-1:0] res_q, res_wb, res_x;
  logic [P-1:0][47:0] acc;

  vpf_mac #(.P(P)) dut (.*);

  longint racc [P];
  int nissued = 0;
  logic [P-1:0][W-1:0] rres, hist1, hist2;

  task automatic issue(mac_kind_e k, logic b, logic r, logic fy, logic fz, logic fm);
    @(negedge clk);
    in_valid = 1; op.kind = k; op.b = b; op.rnd = r; dest = 5'($urandom);
    fwd_y = fy; fwd_z = fz; fwd_m = fm;
    for (int l = 0; l < P; l++) begin
      y[l] = 16'($urandom); z[l] = 16'($urandom); m[l] = 16'($urandom);
    end
    bc = 16'($urandom);
    for (int l = 0; l < P; l++) begin
      longint ye, ze, me, fe, pr, s;
      ye = longint'(signed'(fy ? rres[l] : y[l]));
      ze = longint'(signed'(fz ? rres[l] : z[l]));
      me = longint'(signed'(fm ? rres[l] : m[l]));
      fe = b ? longint'(signed'(bc)) : ze;
      pr = ye * fe * 2;
      case (k)
        MK_ADD: s = (ye + fe) * 65536;
        MK_SUB: s = (ye - fe) * 65536;
        MK_MUL: s = pr;
        MK_MAD: s = me * 65536 + pr;
        MK_MSB: s = me * 65536 - pr;
        MK_MAC: s = racc[l] + pr;
        MK_MDC: s = racc[l] - pr;
        default: s = racc[l];
      endcase
      if (r && !(k inside {MK_ADD, MK_SUB})) s = ((s + 32768) >>> 16) * 65536;
      // keep 48 bits, sign extended
      s = (s <<< 16) >>> 16;
      racc[l] = s;
      rres[l] = 16'(s >>> 16);
    end
    @(posedge clk); #1;
    checks++;
    if (res_q !== rres || !q_valid) begin
      failures++; $display("kind %0d b%0d r%0d f%0d%0d%0d: got %h exp %h y=%h bc=%h", k, b, r, fy,fz,fm, res_q, rres, y, bc);
    end
    if (nissued >= 1) begin checks++; if (res_wb !== hist1) failures++; end
    if (nissued >= 2) begin checks++; if (res_x !== hist2) failures++; end
    nissued++;
    hist2 = hist1; hist1 = rres;
  endtask

  initial begin
    in_valid = 0; fwd_y = 0; fwd_z = 0; fwd_m = 0;
    op = '0; y = '0; z = '0; m = '0; bc = '0; dest = '0;
    for (int l = 0; l < P; l++) racc[l] = 0;
    rres = '0; hist1 = '0; hist2 = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 400; n++)
      issue(mac_kind_e'(1 + $urandom % 7), 1'($urandom), 1'($urandom),
            n > 0 && ($urandom % 5 == 0), n > 0 && ($urandom % 5 == 0), n > 0 && ($urandom % 5 == 0));
    // fixed-point examples, lane 0
    @(negedge clk);
    op = '{MK_MUL, 1'b0, 1'b0}; y = '0; z = '0; y[0] = 16'h4000; z[0] = 16'h4000;
    y[1] = 16'h8000; z[1] = 16'h8000; y[2] = 16'h0001; z[2] = 16'h4000;
    fwd_y = 0; fwd_z = 0; fwd_m = 0;
    @(posedge clk); #1;
    checks++; if (res_q[0] !== 16'h2000) begin failures++; $display("0.5*0.5 = %h", res_q[0]); end
    checks++; if (res_q[1] !== 16'h8000) begin failures++; $display("-1*-1 = %h", res_q[1]); end
    checks++; if (res_q[2] !== 16'h0000) begin failures++; $display("trunc = %h", res_q[2]); end
    @(negedge clk); op = '{MK_MUL, 1'b0, 1'b1};
    @(posedge clk); #1;
    checks++; if (res_q[2] !== 16'h0001) begin failures++; $display("round = %h", res_q[2]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
