// tb_pusch_ofdm_mod: sends four OFDM symbols of 132 random subcarriers,
// paced like the transmitter (one subcarrier per 16 clocks, a symbol every
// 320*16 clocks), and checks the output: one sample per 16 clocks with no
// gap across symbols, 64 cyclic-prefix samples equal to the last 64 of the
// symbol, and every sample against a real-valued inverse DFT of the
// centred grid. Finally sends symbols too fast and checks 'overrun'.
module tb_pusch_ofdm_mod;
  import pusch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_last = 0;
  logic [7:0] in_bin = 0;
  cplx16_t in_data = '0;
  logic out_valid, overrun, ready;
  cplx16_t out_data;
  int checks = 0, failures = 0;

  pusch_ofdm_mod dut (.*);

  localparam int NS = 4;
  real Xr [NS][256], Xi [NS][256];
  real er_q [$], ei_q [$];

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // expected output samples of symbol s, CP first
  task automatic expect_sym(int s);
    real xr [256], xi [256], a;
    for (int n = 0; n < 256; n++) begin
      xr[n] = 0; xi[n] = 0;
      for (int k = 0; k < 256; k++) begin
        a = 2.0 * 3.14159265358979 * k * n / 256.0;
        xr[n] += Xr[s][k] * $cos(a) - Xi[s][k] * $sin(a);
        xi[n] += Xr[s][k] * $sin(a) + Xi[s][k] * $cos(a);
      end
      xr[n] /= 16.0; xi[n] /= 16.0;
    end
    for (int n = 192; n < 256; n++) begin er_q.push_back(xr[n]); ei_q.push_back(xi[n]); end
    for (int n = 0; n < 256; n++)   begin er_q.push_back(xr[n]); ei_q.push_back(xi[n]); end
  endtask

  int nout = 0, last_t = -1, gaps = 0, cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) begin
    logic signed [15:0] gr, gi;
    real er, ei;
    if (out_valid) begin
      if (last_t >= 0 && cyc - last_t != 16) gaps++;
      last_t = cyc;
      gr = out_data.re; gi = out_data.im;
      if (er_q.size() > 0) begin
        er = er_q.pop_front(); ei = ei_q.pop_front();
        checks++;
        if (rabs(real'(gr) - er) > 3.0 || rabs(real'(gi) - ei) > 3.0) begin
          failures++;
          if (failures < 10) $display("sample %0d got %0d,%0d exp %f,%f", nout, gr, gi, er, ei);
        end
      end
      nout++;
    end
  end

  task automatic send_sym(int s, int period, int spacing, bit chk);
    int t;
    t = 0;
    for (int k = 0; k < 256; k++) begin Xr[s % NS][k] = 0; Xi[s % NS][k] = 0; end
    for (int k = 0; k < 132; k++) begin
      int b;
      b = (k + 256 - 66) % 256;
      @(negedge clk); t++;
      in_valid = 1; in_bin = 8'(b); in_last = (k == 131);
      in_data.re = 16'($signed(32'($urandom % 8001)) - 4000);
      in_data.im = 16'($signed(32'($urandom % 8001)) - 4000);
      Xr[s % NS][b] = real'(in_data.re); Xi[s % NS][b] = real'(in_data.im);
      @(negedge clk); t++;
      in_valid = 0; in_last = 0;
      repeat (spacing - 2) begin @(negedge clk); t++; end
    end
    if (chk) expect_sym(s % NS);
    while (t < period) begin @(negedge clk); t++; end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (!ready) @(negedge clk);
    for (int s = 0; s < NS; s++) send_sym(s, 5120, 16, 1);
    repeat (5120) @(negedge clk);
    checks++;
    if (nout != NS * 320) begin failures++; $display("samples %0d", nout); end
    checks++;
    if (gaps != 0) begin failures++; $display("gaps %0d", gaps); end
    checks++;
    if (overrun) begin failures++; $display("overrun at nominal pacing"); end
    // symbols at twice the rate overflow both banks
    er_q.delete(); ei_q.delete();
    for (int s = 0; s < 4; s++) send_sym(s, 1700, 2, 0);
    checks++;
    if (!overrun) begin failures++; $display("no overrun when pushed too fast"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
