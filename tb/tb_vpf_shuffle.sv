// tb_vpf_shuffle: self-checking test of the shuffle unit.
// Three instances (one, two and three pipeline stages, P = 8) get the same
// random source vectors and patterns, including broadcast and masked lanes;
// each output is compared, STAGES cycles later, with a reference shuffle
// computed here. The one-stage instance also gets self_sel lanes, which must
// take the source from its previous output.
module tb_vpf_shuffle;
  localparam int P = 8, W = 16, PW = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                 in_valid;
  logic [4:0]           tag_in;
  logic [P-1:0][W-1:0]  src;
  logic [P-1:0]         self_sel;
  logic [P-1:0][PW-1:0] pat;
  logic [W-1:0]         bc;
  logic [2:0]           ov;
  logic [2:0][4:0]      tg;
  logic [2:0][P-1:0][W-1:0] dout;
  logic [2:0][P-1:0]    wl;

  vpf_shuffle #(.P(P), .STAGES(1)) u1 (.clk, .rst, .in_valid, .tag_in, .src, .self_sel, .pat, .bc,
    .out_valid(ov[0]), .tag_out(tg[0]), .dout(dout[0]), .wlanes(wl[0]));
  vpf_shuffle #(.P(P), .STAGES(2)) u2 (.clk, .rst, .in_valid, .tag_in, .src, .self_sel('0), .pat, .bc,
    .out_valid(ov[1]), .tag_out(tg[1]), .dout(dout[1]), .wlanes(wl[1]));
  vpf_shuffle #(.P(P), .STAGES(3)) u3 (.clk, .rst, .in_valid, .tag_in, .src, .self_sel('0), .pat, .bc,
    .out_valid(ov[2]), .tag_out(tg[2]), .dout(dout[2]), .wlanes(wl[2]));

  // expected results queued by issue cycle
  logic [P-1:0][W-1:0] exp_d [0:63];
  logic [P-1:0]        exp_w [0:63];
  logic [P-1:0][W-1:0] prev1;
  logic [P-1:0][W-1:0] prev0;   // output of the one-stage unit before an edge   // previous output of the one-stage unit (its written lanes)

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    in_valid = 0; self_sel = '0;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      in_valid = 1;
      tag_in = 5'(n);
      for (int l = 0; l < P; l++) begin
        src[l] = 16'($urandom);
        pat[l] = {($urandom % 4 == 0), ($urandom % 6 == 0), 3'($urandom)};
        if (pat[l][3]) pat[l][2:0] = 0;
      end
      bc = 16'($urandom);
      for (int l = 0; l < P; l++) begin
        exp_w[n][l] = !pat[l][4];
        exp_d[n][l] = pat[l][3] ? bc : src[pat[l][2:0]];
      end
      prev0 = dout[0];
      @(posedge clk);
      #1;
      // one-stage unit: result is out now; masked lanes keep their old value
      for (int l = 0; l < P; l++) if (!exp_w[n][l]) begin
        checks++;
        if (dout[0][l] !== prev0[l]) begin failures++; $display("S1 n=%0d masked lane %0d changed", n, l); end
      end
      for (int l = 0; l < P; l++) begin
        if (exp_w[n][l]) begin
          checks++;
          if (dout[0][l] !== exp_d[n][l]) begin
            failures++; $display("S1 n=%0d lane %0d got %h exp %h", n, l, dout[0][l], exp_d[n][l]);
          end
        end
        checks++; if (wl[0][l] !== exp_w[n][l]) failures++;
      end
      checks++; if (!ov[0] || tg[0] !== 5'(n)) failures++;
      if (n >= 1) for (int l = 0; l < P; l++) if (exp_w[n-1][l]) begin
        checks++; if (dout[1][l] !== exp_d[n-1][l]) failures++;
      end
      if (n >= 2) for (int l = 0; l < P; l++) if (exp_w[n-2][l]) begin
        checks++; if (dout[2][l] !== exp_d[n-2][l]) failures++;
      end
    end
    // self bypass on the one-stage unit: lanes with self_sel use its output
    for (int n = 0; n < 10; n++) begin
      @(negedge clk);
      prev1 = dout[0];
      for (int l = 0; l < P; l++) begin
        src[l] = 16'($urandom);
        self_sel[l] = 1'($urandom);
        pat[l] = {2'b00, 3'($urandom)};
      end
      @(posedge clk); #1;
      for (int l = 0; l < P; l++) begin
        logic [W-1:0] e;
        e = self_sel[pat[l][2:0]] ? prev1[pat[l][2:0]] : src[pat[l][2:0]];
        checks++;
        if (dout[0][l] !== e) begin
          failures++; $display("self n=%0d lane %0d got %h exp %h", n, l, dout[0][l], e);
        end
      end
    end
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
