// tb_pusch_precoder: for every codebook entry the precoder supports,
// applies random layer vectors and compares with y = W x computed in real
// arithmetic from the codebook written out entry by entry (characters
// 1, m = -1, j, k = -j, 0; row-major over ports, then layers). Checks
// that combinations outside the tables raise the flag and give zero.
module tb_pusch_precoder;
  import pusch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] n_layers = 1, n_ports = 1;
  logic [4:0] tpmi = 0;
  logic valid_in = 0;
  cplx16_t x [MAXL];
  logic valid_out, unsupported;
  cplx16_t y [MAXL];
  int checks = 0, failures = 0;

  pusch_precoder dut (.*);

  string cb_4p1l [28] = '{"1000","0100","0010","0001","1010","10m0","10j0","10k0",
                          "0101","010m","010j","010k","1111","11jj","11mm","11kk",
                          "1j1j","1jjm","1jmk","1jk1","1m1m","1mjk","1mm1","1mkj",
                          "1k1k","1kj1","1kmj","1kkm"};
  string cb_2p1l [6]  = '{"10","01","11","1m","1j","1k"};
  string cb_2p2l [3]  = '{"1001","111m","11jk"};
  string cb_4p2l [22] = '{"10010000","10000100","10000001","00100100","00100001","00001001",
                          "1001100k","1001100j","1001k001","1001k00m","1001m00k","1001m00j",
                          "1001j001","1001j00m","11111m1m","1111jkjk","11jj1mjk","11jjjkm1",
                          "11mm1mm1","11mmjkkj","11kk1mkj","11kkjk1m"};
  string cb_4p3l [7]  = '{"100010001000","100010100001","100010m00001","1111m111m1mm",
                          "1111m1jjkjkk","111m1m11mm11","111m1mjjkkjj"};
  string cb_4p4l [5]  = '{"1000010000100001","110000111m00001m","11000011jk0000jk",
                          "11111m1m11mm1mm1","11111m1mjjkkjkkj"};

  function automatic void cval(byte ch, output real r, output real i);
    case (ch)
      "1": begin r = 1;  i = 0;  end
      "m": begin r = -1; i = 0;  end
      "j": begin r = 0;  i = 1;  end
      "k": begin r = 0;  i = -1; end
      default: begin r = 0; i = 0; end
    endcase
  endfunction

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic run(int np, int nl, int t, string w, real scl, bit ok);
    real xr [4], xi [4], er, ei, cr, ci;
    logic signed [15:0] gr, gi;
    for (int rep = 0; rep < 6; rep++) begin
      @(negedge clk);
      n_ports = 3'(np); n_layers = 3'(nl); tpmi = 5'(t);
      for (int l = 0; l < 4; l++) begin
        x[l].re = 16'($signed(16'($urandom)) >>> 1);
        x[l].im = 16'($signed(16'($urandom)) >>> 1);
        if (l >= nl) x[l] = '0;
        xr[l] = real'(x[l].re); xi[l] = real'(x[l].im);
      end
      valid_in = 1;
      @(negedge clk);
      valid_in = 0;
      checks++;
      if (!valid_out || unsupported == ok) begin
        failures++; $display("np %0d nl %0d tpmi %0d: valid %b unsupported %b", np, nl, t, valid_out, unsupported);
      end
      for (int p = 0; p < 4; p++) begin
        er = 0; ei = 0;
        if (ok && p < np)
          for (int l = 0; l < nl; l++) begin
            cval(w[p * nl + l], cr, ci);
            er += cr * xr[l] - ci * xi[l];
            ei += cr * xi[l] + ci * xr[l];
          end
        er *= scl; ei *= scl;
        gr = y[p].re; gi = y[p].im;
        checks++;
        if (rabs(real'(gr) - er) > 1.01 || rabs(real'(gi) - ei) > 1.01) begin
          failures++;
          if (failures < 10) $display("np %0d nl %0d tpmi %0d port %0d got %0d,%0d exp %f,%f", np, nl, t, p, gr, gi, er, ei);
        end
      end
    end
  endtask

  initial begin
    real h, r2, r8, r12;
    h = 0.5; r2 = 1.0 / $sqrt(2.0); r8 = 1.0 / (2.0 * $sqrt(2.0)); r12 = 1.0 / (2.0 * $sqrt(3.0));
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1, 1, 0, "1", 1.0, 1);
    for (int t = 0; t < 6; t++)  run(2, 1, t, cb_2p1l[t], r2, 1);
    for (int t = 0; t < 3; t++)  run(2, 2, t, cb_2p2l[t], (t == 0) ? r2 : h, 1);
    for (int t = 0; t < 28; t++) run(4, 1, t, cb_4p1l[t], h, 1);
    for (int t = 0; t < 22; t++) run(4, 2, t, cb_4p2l[t], (t < 14) ? h : r8, 1);
    for (int t = 0; t < 7; t++)  run(4, 3, t, cb_4p3l[t], (t < 3) ? h : r12, 1);
    for (int t = 0; t < 5; t++)  run(4, 4, t, cb_4p4l[t], (t == 0) ? h : (t < 3) ? r8 : 0.25, 1);
    // combinations outside the tables
    run(2, 1, 6, "", h, 0);
    run(2, 2, 3, "", h, 0);
    run(4, 2, 22, "", h, 0);
    run(4, 3, 7, "", h, 0);
    run(4, 4, 5, "", h, 0);
    run(1, 2, 0, "", h, 0);
    run(3, 1, 0, "", h, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
