// pusch_tx_driver: stimulus and checking for the whole transmitter.
//
// For each configuration in its list it generates a random codeword, sends
// it over the codeword stream, writes the parameters and the start bit
// over AXI4-Lite and compares every
// 128-bit output word with a floating-point reference model kept in this
// module: the Gold sequence evaluated from its recursions, constellations
// from their Gray-coded PAM definition, the codebook from an
// entry-by-entry listing and each OFDM symbol from a direct inverse DFT
// with cyclic prefix; only the final Q2.14 saturation is modelled.
// Acceptance per sample is the transmitter's error budget: absolute error
// below 2^-11 on every component and mean absolute error below 2^-13. It
// also counts the mechanisms the run exercised (modulation schemes, layer
// and port counts, msgA scrambling, unsupported-TPMI flagging, CP/guard
// pauses in the input pacing, seamless symbol hand-over at the output,
// and in the full-size run a codeword that fills the whole store)
// and counts a failure for any that never happened. Ends the simulation
// with the TB_RESULT line.
module pusch_tx_driver
  import pusch_pkg::*;
#(
  parameter int NSYM = 2,
  parameter bit FULL = 1'b0
) (
  input  logic         clk,
  output logic         rst_n,
  output logic [31:0]  s_axis_tdata,
  output logic         s_axis_tvalid,
  output logic         s_axis_tlast,
  input  logic         s_axis_tready,
  output logic [7:0]   s_axil_awaddr,
  output logic         s_axil_awvalid,
  input  logic         s_axil_awready,
  output logic [31:0]  s_axil_wdata,
  output logic [3:0]   s_axil_wstrb,
  output logic         s_axil_wvalid,
  input  logic         s_axil_wready,
  input  logic [1:0]   s_axil_bresp,
  input  logic         s_axil_bvalid,
  output logic         s_axil_bready,
  output logic [7:0]   s_axil_araddr,
  output logic         s_axil_arvalid,
  input  logic         s_axil_arready,
  input  logic [31:0]  s_axil_rdata,
  input  logic [1:0]   s_axil_rresp,
  input  logic         s_axil_rvalid,
  output logic         s_axil_rready,
  input  logic [127:0] m_axis_tdata,
  input  logic         m_axis_tvalid,
  input  logic         busy,
  input  logic         done,
  input  logic         unsupported,
  input  logic         overrun,
  input  logic         ip_valid      // input pacing valid, for counting
);

  // ---- floating-point reference model, independent of the RTL ----
  typedef struct {
    real re;
    real im;
  } rc_t;

  // Gold sequence c(0..len-1) for a given c_init.
  function automatic void gold(int unsigned cinit, int len, ref bit c []);
    bit x1 [], x2 [];
    x1 = new [1600 + len + 31];
    x2 = new [1600 + len + 31];
    for (int i = 0; i < 31; i++) begin
      x1[i] = (i == 0);
      x2[i] = cinit[i];
    end
    for (int n = 0; n < 1600 + len; n++) begin
      x1[n+31] = x1[n+3] ^ x1[n];
      x2[n+31] = x2[n+3] ^ x2[n+2] ^ x2[n+1] ^ x2[n];
    end
    c = new [len];
    for (int n = 0; n < len; n++) c[n] = x1[n+1600] ^ x2[n+1600];
  endfunction

  function automatic int unsigned c_init(int rnti, int nid, int nrapid, bit en);
    if (en) return ((rnti << 16) + (nrapid << 10) + nid) & 32'h7fffffff;
    return ((rnti << 15) + nid) & 32'h7fffffff;
  endfunction

  // One axis of a Gray-coded PAM: g[0] sign, g[1..nb-1] magnitude bits.
  function automatic real pam(int nb, bit g [4]);
    real amp;
    amp = 1.0;
    for (int k = nb - 1; k >= 1; k--) amp = real'(1 << (nb - k)) - (g[k] ? -1.0 : 1.0) * amp;
    return (g[0] ? -1.0 : 1.0) * amp;
  endfunction

  // Modulation symbol from bits b[0..B-1]; scheme 0..4 as the RTL's mod_e;
  // idx is the symbol index (pi/2-BPSK rotation).
  function automatic rc_t modulate(int scheme, bit b [8], int idx);
    rc_t r;
    bit gi [4], gq [4];
    real nrm;
    for (int k = 0; k < 4; k++) begin gi[k] = b[2*k]; gq[k] = b[2*k+1]; end
    case (scheme)
      0: begin
        r.re = (b[0] ? -1.0 : 1.0) / $sqrt(2.0);
        r.im = r.re;
        if (idx % 2 == 1) r.re = -r.im;
        return r;
      end
      1: nrm = 1.0 / $sqrt(2.0);
      2: nrm = 1.0 / $sqrt(10.0);
      3: nrm = 1.0 / $sqrt(42.0);
      default: nrm = 1.0 / $sqrt(170.0);
    endcase
    r.re = pam(scheme, gi) * nrm;
    r.im = pam(scheme, gq) * nrm;
    return r;
  endfunction

  function automatic int bps(int scheme);
    case (scheme)
      0: return 1;
      1: return 2;
      2: return 4;
      3: return 6;
      default: return 8;
    endcase
  endfunction

  // Codebook entry as a string over {1, m=-1, j, k=-j, 0}, port-major;
  // returns "" for combinations outside the supported set.
  function automatic string codebook(int np, int nl, int t, output real scl);
    string c4 [28] = '{"1000","0100","0010","0001","1010","10m0","10j0","10k0",
                       "0101","010m","010j","010k","1111","11jj","11mm","11kk",
                       "1j1j","1jjm","1jmk","1jk1","1m1m","1mjk","1mm1","1mkj",
                       "1k1k","1kj1","1kmj","1kkm"};
    string c2 [6]  = '{"10","01","11","1m","1j","1k"};
    string c22 [3] = '{"1001","111m","11jk"};
    string c42 [22] = '{"10010000","10000100","10000001","00100100","00100001","00001001",
                       "1001100k","1001100j","1001k001","1001k00m","1001m00k","1001m00j",
                       "1001j001","1001j00m","11111m1m","1111jkjk","11jj1mjk","11jjjkm1",
                       "11mm1mm1","11mmjkkj","11kk1mkj","11kkjk1m"};
    string c43 [7] = '{"100010001000","100010100001","100010m00001","1111m111m1mm",
                       "1111m1jjkjkk","111m1m11mm11","111m1mjjkkjj"};
    string c44 [5] = '{"1000010000100001","110000111m00001m","11000011jk0000jk",
                       "11111m1m11mm1mm1","11111m1mjjkkjkkj"};
    scl = 0.5;
    if (np == 1 && nl == 1) begin scl = 1.0; return "1"; end
    if (np == 2 && nl == 1 && t < 6) begin scl = 1.0 / $sqrt(2.0); return c2[t]; end
    if (np == 2 && nl == 2 && t < 3) begin scl = (t == 0) ? 1.0 / $sqrt(2.0) : 0.5; return c22[t]; end
    if (np == 4 && nl == 1 && t < 28) return c4[t];
    if (np == 4 && nl == 2 && t < 22) begin if (t >= 14) scl = 1.0 / (2.0 * $sqrt(2.0)); return c42[t]; end
    if (np == 4 && nl == 3 && t < 7) begin if (t >= 3) scl = 1.0 / (2.0 * $sqrt(3.0)); return c43[t]; end
    if (np == 4 && nl == 4 && t < 5) begin scl = (t == 0) ? 0.5 : (t < 3) ? 1.0 / (2.0 * $sqrt(2.0)) : 0.25; return c44[t]; end
    return "";
  endfunction

  function automatic rc_t coef(byte ch);
    rc_t r;
    r.re = 0; r.im = 0;
    case (ch)
      "1": r.re = 1;
      "m": r.re = -1;
      "j": r.im = 1;
      "k": r.im = -1;
      default: ;
    endcase
    return r;
  endfunction

  function automatic real sat(real v);
    if (v > 32767.0 / 16384.0) return 32767.0 / 16384.0;
    if (v < -2.0) return -2.0;
    return v;
  endfunction

  // CP-OFDM symbol from a 132-subcarrier grid column: 64 CP samples then
  // 256, each (1/16) * sum_k X[k] e^{+j 2 pi k n / 256}, grid centred on DC.
  function automatic void ofdm_symbol(rc_t grid [132], ref rc_t out [320]);
    rc_t t [256];
    real cs [256], sn [256];
    for (int i = 0; i < 256; i++) begin
      cs[i] = $cos(2.0 * 3.14159265358979323846 * i / 256.0);
      sn[i] = $sin(2.0 * 3.14159265358979323846 * i / 256.0);
    end
    for (int n = 0; n < 256; n++) begin
      t[n].re = 0; t[n].im = 0;
      for (int k = 0; k < 132; k++) begin
        int b, a;
        b = (k + 256 - 66) % 256;
        a = (b * n) % 256;
        t[n].re += grid[k].re * cs[a] - grid[k].im * sn[a];
        t[n].im += grid[k].re * sn[a] + grid[k].im * cs[a];
      end
      t[n].re = sat(t[n].re / 16.0);
      t[n].im = sat(t[n].im / 16.0);
    end
    for (int n = 0; n < 64; n++) out[n] = t[192 + n];
    for (int n = 0; n < 256; n++) out[64 + n] = t[n];
  endfunction

  // ---- test sequencing ----

  typedef struct {
    int scheme, nl, np, tpmi, rnti, nid, nrapid;
    bit en;
    int beta;
  } tcfg_t;

  int checks = 0, failures = 0;
  real max_err = 0, sum_err = 0;
  int  n_err = 0;

  // mechanism counters
  int seen_mod [5], seen_nl [5], seen_np [5];
  int n_msga = 0, n_unsup = 0, n_pauses = 0, n_handover = 0, n_fullcw = 0;

  rc_t exp_q [4][$];

  // input pacing pauses (guard band + CP room): a valid after >= 1000 idle clocks
  int idle = 0;
  always @(posedge clk) begin
    if (ip_valid) begin
      if (idle >= 1000 && busy) n_pauses++;
      idle = 0;
    end else idle++;
  end

  // output checking
  int nout = 0, last_t = -1, cyc = 0, t_start = -1, first_lat = -1;
  always @(posedge clk) cyc++;
  always @(posedge clk) begin
    if (m_axis_tvalid) begin
      if (first_lat < 0 && t_start >= 0) first_lat = cyc - t_start;
      if (last_t >= 0 && cyc - last_t != 16) begin
        checks++;
        failures++;
        $display("output spacing %0d at sample %0d", cyc - last_t, nout);
      end
      if (nout % 320 == 0 && nout > 0 && last_t >= 0 && cyc - last_t == 16) n_handover++;
      last_t = cyc;
      for (int p = 0; p < 4; p++) begin
        rc_t e;
        logic signed [15:0] gr, gi;
        real dr, di;
        gr = m_axis_tdata[32*p +: 16];
        gi = m_axis_tdata[32*p + 16 +: 16];
        if (exp_q[p].size() == 0) begin
          checks++; failures++;
          $display("unexpected output sample");
        end else begin
          e = exp_q[p].pop_front();
          dr = real'(gr) / 16384.0 - e.re; if (dr < 0) dr = -dr;
          di = real'(gi) / 16384.0 - e.im; if (di < 0) di = -di;
          sum_err += dr + di; n_err += 2;
          if (dr > max_err) max_err = dr;
          if (di > max_err) max_err = di;
          checks++;
          if (dr >= 1.0 / 2048.0 || di >= 1.0 / 2048.0) begin
            failures++;
            if (failures < 10) $display("sample %0d port %0d got %f,%f exp %f,%f", nout, p,
                                        real'(gr) / 16384.0, real'(gi) / 16384.0, e.re, e.im);
          end
        end
      end
      nout++;
    end
  end

  // One AXI4-Lite register write.
  task automatic regwr(logic [7:0] a, int d);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_awvalid = 1; s_axil_wdata = d; s_axil_wstrb = 4'hf; s_axil_wvalid = 1;
    s_axil_bready = 1;
    @(posedge clk);
    while (!(s_axil_awready && s_axil_wready)) @(posedge clk);
    @(negedge clk);
    s_axil_awvalid = 0; s_axil_wvalid = 0;
    while (!s_axil_bvalid) @(negedge clk);
    @(negedge clk);
    s_axil_bready = 0;
  endtask

  task automatic run(tcfg_t t);
    int B, L, nwords, nsymb;
    bit cw [], c [];
    logic [31:0] w;
    rc_t grid [4][132];
    rc_t osym [320];
    real scl;
    string wm;
    int  t0;
    B = bps(t.scheme);
    L = NSYM * 132 * t.nl * B;
    cw = new [L];
    foreach (cw[i]) cw[i] = 1'($urandom);
    gold(c_init(t.rnti, t.nid, t.nrapid, t.en), L, c);
    wm = codebook(t.np, t.nl, t.tpmi, scl);
    nsymb = L / B;
    // reference, one OFDM symbol at a time
    for (int s = 0; s < NSYM; s++) begin
      for (int k = 0; k < 132; k++) begin
        rc_t x [4];
        for (int l = 0; l < 4; l++) begin x[l].re = 0; x[l].im = 0; end
        for (int l = 0; l < t.nl; l++) begin
          bit b [8];
          int i;
          i = (s * 132 + k) * t.nl + l;   // modulation symbol index
          for (int q = 0; q < 8; q++) b[q] = (q < B) ? (cw[i*B+q] ^ c[i*B+q]) : 1'b0;
          x[l] = modulate(t.scheme, b, i);
        end
        for (int p = 0; p < 4; p++) begin
          grid[p][k].re = 0; grid[p][k].im = 0;
          if (wm != "" && p < t.np)
            for (int l = 0; l < t.nl; l++) begin
              rc_t cf;
              cf = coef(wm[p * t.nl + l]);
              grid[p][k].re += cf.re * x[l].re - cf.im * x[l].im;
              grid[p][k].im += cf.re * x[l].im + cf.im * x[l].re;
            end
          grid[p][k].re *= scl * real'(t.beta) / 16384.0;
          grid[p][k].im *= scl * real'(t.beta) / 16384.0;
        end
      end
      for (int p = 0; p < 4; p++) begin
        ofdm_symbol(grid[p], osym);
        for (int n = 0; n < 320; n++) exp_q[p].push_back(osym[n]);
      end
    end
    // codeword stream
    nwords = (L + 31) / 32;
    for (int i = 0; i < nwords; i++) begin
      w = '0;
      for (int q = 0; q < 32; q++) if (i * 32 + q < L) w[q] = cw[i * 32 + q];
      @(negedge clk);
      s_axis_tdata = w; s_axis_tvalid = 1; s_axis_tlast = (i == nwords - 1);
    end
    @(negedge clk);
    s_axis_tvalid = 0; s_axis_tlast = 0;
    regwr(8'h04, t.scheme);
    regwr(8'h08, t.nl);
    regwr(8'h0c, t.np);
    regwr(8'h10, t.tpmi);
    regwr(8'h14, t.rnti);
    regwr(8'h18, t.nid);
    regwr(8'h1c, t.nrapid);
    regwr(8'h20, int'(t.en));
    regwr(8'h24, t.beta);
    regwr(8'h00, 1);
    t_start = cyc;
    first_lat = -1;
    t0 = cyc;
    // wait until every expected sample has come out
    while (exp_q[0].size() > 0 && cyc - t0 < NSYM * 5120 + 20000) begin
      if (unsupported && wm == "") begin n_unsup++; wm = "-"; end
      @(negedge clk);
    end
    checks++;
    if (exp_q[0].size() != 0) begin
      failures++; $display("%0d samples missing", exp_q[0].size());
      for (int p = 0; p < 4; p++) exp_q[p].delete();
    end
    while (busy) @(negedge clk);
    repeat (20) @(negedge clk);
    last_t = -1;
    seen_mod[t.scheme]++; seen_nl[t.nl]++; seen_np[t.np]++;
    if (t.en) n_msga++;
    if (L == 48 * 132 * 4 * 8) n_fullcw++;   // codeword as large as the store
    $display("config mod %0d layers %0d ports %0d tpmi %0d: done, first sample %0d clocks after start, max err %f",
             t.scheme, t.nl, t.np, t.tpmi, first_lat, max_err);
  endtask

  tcfg_t list [$];

  initial begin
    rst_n = 0; s_axis_tdata = 0; s_axis_tvalid = 0; s_axis_tlast = 0;
    s_axil_awaddr = 0; s_axil_awvalid = 0; s_axil_wdata = 0; s_axil_wstrb = 0; s_axil_wvalid = 0;
    s_axil_bready = 0; s_axil_araddr = 0; s_axil_arvalid = 0; s_axil_rready = 0;
    if (FULL) begin
      list.push_back('{3, 4, 4, 0, 'h4601, 511, 0, 0, 16384});
      list.push_back('{4, 4, 4, 3, 'h5a5a, 1000, 0, 0, 16384});   // fills the codeword store
    end else begin
      list.push_back('{0, 1, 1, 0, 'h0011, 3,   0,  0, 11469});
      list.push_back('{1, 2, 2, 1, 'h1234, 17,  9,  1, 11469});
      list.push_back('{2, 1, 4, 17, 'h00ab, 500, 0, 0, 16384});
      list.push_back('{3, 2, 4, 3, 'hbeef, 1,   0,  0, 16384});
      list.push_back('{4, 4, 4, 0, 'h7777, 1007, 0, 0, 16384});
      list.push_back('{2, 3, 4, 0, 'h0100, 0,   0,  0, 16384});
      list.push_back('{1, 1, 2, 4, 'h0fff, 99,  63, 1, 11469});
      list.push_back('{3, 2, 4, 22, 'h0001, 2,  0,  0, 16384});
      list.push_back('{1, 2, 4, 10, 'h2222, 33, 0,  0, 16384});
      list.push_back('{2, 3, 4, 6, 'h3333, 44,  0,  0, 16384});
      list.push_back('{4, 4, 4, 4, 'h4444, 55,  0,  0, 16384});
    end
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    foreach (list[i]) run(list[i]);
    checks++;
    if (overrun) begin failures++; $display("overrun"); end
    if (n_err > 0) begin
      checks++;
      if (sum_err / n_err >= 1.0 / 8192.0) begin failures++; $display("mean error too large"); end
    end
    $display("max abs error %e (2^%f), mean abs error %e", max_err, $ln(max_err + 1e-30) / $ln(2.0), sum_err / n_err);
    $display("mechanisms: pauses %0d handovers %0d msgA %0d unsupported %0d full codeword store %0d",
             n_pauses, n_handover, n_msga, n_unsup, n_fullcw);
    // every mechanism this configuration list is meant to exercise must have happened
    checks++; if (n_pauses == 0)   begin failures++; $display("no CP/guard pause seen"); end
    checks++; if (n_handover == 0) begin failures++; $display("no seamless symbol hand-over seen"); end
    if (FULL) begin checks++; if (n_fullcw == 0) begin failures++; $display("codeword store never filled"); end end
    if (!FULL) begin
      for (int m = 0; m < 5; m++) begin checks++; if (seen_mod[m] == 0) begin failures++; $display("scheme %0d not run", m); end end
      for (int l = 1; l <= 4; l++) begin checks++; if (seen_nl[l] == 0) begin failures++; $display("%0d layers not run", l); end end
      checks++; if (seen_np[1] == 0 || seen_np[2] == 0 || seen_np[4] == 0) begin failures++; $display("port count not run"); end
      checks++; if (n_msga == 0)  begin failures++; $display("no msgA scrambling"); end
      checks++; if (n_unsup == 0) begin failures++; $display("unsupported TPMI never flagged"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FULL ? 3 * (NSYM * 5120 + 12000) : 12 * (NSYM * 5120 + 12000)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
