// tb_vpf_extio: self-checking test of the external I/O unit with a data
// memory (P = 8, small depth) and a word-addressed external memory model.
// It loads pointers with ELX/ELI/EIB/EIE, streams vectors in with ELD through
// a modulo window (checking the wrap), stores vectors out with EST, loads
// pixel bytes with ELB, unpacks colour components with ELC, packs them back
// with ESC (including saturation of out-of-range words) and writes them out
// with ESB. Every result is compared with values computed here from the
// external-memory contents, the pixel layout and the saturation rule.
module tb_vpf_extio;
  import vpf_pkg::*;
  localparam int P = 8, DEPTH = 32, NS = P / 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, wraps = 0;

  logic id2_valid;
  ex_slot_t id2_ex;
  logic mb_en, mb_we;
  logic [AW-1:0] mb_row;
  logic [P-1:0] mb_lanes;
  logic [P-1:0][W-1:0] mb_wdata, mb_rdata, a_rdata, a_wdata;
  logic [XAW-1:0] ext_addr;
  logic ext_we, ev_wrap;
  logic [63:0] ext_wdata, ext_rdata;
  logic a_en, a_we;
  logic [P-1:0][$clog2(DEPTH)-1:0] a_rows;

  logic [63:0] xm [256];
  assign ext_rdata = xm[ext_addr[7:0]];
  always_ff @(posedge clk) if (ext_we) xm[ext_addr[7:0]] <= ext_wdata;
  always_ff @(posedge clk) if (ev_wrap) wraps++;

  vpf_extio #(.P(P)) dut (.clk, .rst, .id2_valid, .id2_ex, .mb_en, .mb_we, .mb_row, .mb_lanes,
    .mb_wdata, .mb_rdata, .ext_addr, .ext_we, .ext_wdata, .ext_rdata, .ev_wrap);
  vpf_vmem #(.P(P), .DEPTH(DEPTH)) u_mem (.clk, .a_en, .a_we, .a_rows, .a_wdata, .a_rdata,
    .b_en(mb_en), .b_we(mb_we), .b_row(mb_row[$clog2(DEPTH)-1:0]), .b_lanes(mb_lanes),
    .b_wdata(mb_wdata), .b_rdata(mb_rdata));

  task automatic issue(ex_op_e op, int x, int i, bit inc, int imm);
    @(negedge clk);
    id2_valid = 1; id2_ex = '0;
    id2_ex.op = op; id2_ex.x = 4'(x); id2_ex.i = 4'(i); id2_ex.inc = inc; id2_ex.imm = 24'(imm);
    @(negedge clk) id2_valid = 0; id2_ex = '0;
  endtask
  // back-to-back issue without bubble
  task automatic issue_seq(ex_op_e op, int x, int i, int n);
    for (int k = 0; k < n; k++) begin
      if (k == 0) @(negedge clk);
      id2_valid = 1; id2_ex = '0;
      id2_ex.op = op; id2_ex.x = 4'(x); id2_ex.i = 4'(i); id2_ex.inc = 1;
      @(negedge clk);
    end
    id2_valid = 0; id2_ex = '0;
  endtask
  task automatic idle(int n); repeat (n) @(negedge clk); endtask

  task automatic mem_write(int row, logic [P-1:0][W-1:0] d);
    @(negedge clk); a_en = 1; a_we = 1; a_wdata = d;
    for (int k = 0; k < P; k++) a_rows[k] = $clog2(DEPTH)'(row);
    @(negedge clk); a_en = 0; a_we = 0;
  endtask
  task automatic mem_read(int row, output logic [P-1:0][W-1:0] d);
    @(negedge clk); a_en = 1; a_we = 0;
    for (int k = 0; k < P; k++) a_rows[k] = $clog2(DEPTH)'(row);
    @(negedge clk); a_en = 0; d = a_rdata;
  endtask
  function automatic logic [7:0] xbyte(int addr8);  // byte addr8 of external memory
    return xm[addr8 / 8][8 * (addr8 % 8) +: 8];
  endfunction
  function automatic logic [7:0] sat(logic signed [15:0] v);
    return v < 0 ? 8'd0 : (v > 255 ? 8'd255 : v[7:0]);
  endfunction
  function automatic logic [63:0] pack4(logic [P-1:0][W-1:0] v, int t);
    logic [63:0] e;
    for (int k = 0; k < 4; k++) begin
      e[16*k +: 8]   = v[4*t + k][15:8];
      e[16*k+8 +: 8] = v[4*t + k][7:0];
    end
    return e;
  endfunction
  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  logic [63:0] src_copy [256];
  logic [P-1:0][W-1:0] d, vin [3];
  initial begin
    id2_valid = 0; id2_ex = '0; a_en = 0; a_we = 0; a_rows = '0; a_wdata = '0;
    for (int k = 0; k < 256; k++) begin xm[k] = {$urandom, $urandom}; src_copy[k] = xm[k]; end
    idle(2); rst = 0;
    // pointers: X0 = 10, I0 = 5 with window size 4 ending at 8
    issue(EX_ELX, 0, 0, 0, 10);
    issue(EX_ELI, 0, 0, 0, 5);
    issue(EX_EIB, 0, 0, 0, 4);
    issue(EX_EIE, 0, 0, 0, 8);
    idle(4);
    // 5 vectors through a 4-vector window: rows 5,6,7,8 then 5 again
    // the wrapped pointer value is ready two cycles after the increment,
    // so a vector that follows a wrap is issued after one idle cycle
    for (int v = 0; v < 5; v++) begin
      issue_seq(EX_ELD, 0, 0, NS);
    end
    idle(4);
    for (int v = 0; v < 4; v++) begin
      automatic int vv = (v == 0) ? 4 : v;   // row 5 was overwritten by the fifth vector
      mem_read(5 + v, d);
      for (int l = 0; l < P; l++) begin
        automatic logic [63:0] wd = src_copy[10 + vv * NS + l / 4];
        chk(64'(d[l]), 64'({wd[16*(l%4) +: 8], wd[16*(l%4)+8 +: 8]}), $sformatf("ELD row %0d lane %0d", 5 + v, l));
      end
    end
    checks++; if (wraps != 1) begin failures++; $display("wraps %0d", wraps); end
    // EST rows 6,7 to X1 = 100 (I1 = 6, window wide enough not to wrap)
    issue(EX_ELX, 1, 0, 0, 100);
    issue(EX_ELI, 0, 1, 0, 6);
    issue(EX_EIB, 0, 1, 0, 16);
    issue(EX_EIE, 0, 1, 0, 31);
    idle(4);
    issue_seq(EX_EST, 1, 1, 2 * NS);
    idle(4);
    for (int v = 0; v < 2; v++) begin
      mem_read(6 + v, d);
      for (int t = 0; t < NS; t++)
        chk(xm[100 + v * NS + t], pack4(d, t), $sformatf("EST vec %0d part %0d", v, t));
    end
    // ELB x3 from X2 = 40, ELC x3 into rows 20..22
    issue(EX_ELX, 2, 0, 0, 40);
    issue(EX_ELI, 0, 2, 0, 20);
    issue(EX_EIB, 0, 2, 0, 16);
    issue(EX_EIE, 0, 2, 0, 31);
    idle(4);
    issue_seq(EX_ELB, 2, 0, 3);
    issue_seq(EX_ELC, 0, 2, 3);
    idle(4);
    for (int c = 0; c < 3; c++) begin
      mem_read(20 + c, d);
      for (int i = 0; i < P; i++)
        chk(64'(d[i]), 64'({8'h00, xbyte(40 * 8 + 3 * i + c)}), $sformatf("ELC comp %0d pixel %0d", c, i));
    end
    // ESC from rows 24..26 (with out-of-range words), ESB to X3 = 200
    for (int c = 0; c < 3; c++) begin
      for (int i = 0; i < P; i++)
        case ($urandom % 4)
          0: vin[c][i] = 16'($urandom | 32'h8000);   // negative
          1: vin[c][i] = 16'(256 + $urandom % 1000);  // too large
          default: vin[c][i] = 16'($urandom % 256);
        endcase
      mem_write(24 + c, vin[c]);
    end
    issue(EX_ELX, 3, 0, 0, 200);
    issue(EX_ELI, 0, 3, 0, 24);
    issue(EX_EIB, 0, 3, 0, 16);
    issue(EX_EIE, 0, 3, 0, 31);
    idle(4);
    issue_seq(EX_ESC, 0, 3, 3);
    issue_seq(EX_ESB, 3, 0, 3);
    idle(4);
    for (int i = 0; i < P; i++)
      for (int c = 0; c < 3; c++)
        chk(64'(xbyte(200 * 8 + 3 * i + c)), 64'(sat(vin[c][i])), $sformatf("ESC/ESB comp %0d pixel %0d", c, i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
