// tb_pusch_ifft256: writes random sparse and full bin sets, runs the
// transform and compares every output sample with a direct inverse DFT in
// real arithmetic, x[n] = (1/16) * sum_k X[k] e^{+j 2 pi k n / 256}. Checks
// the start-to-output latency and that unwritten bins are zero on the next
// symbol (the core clears itself while it outputs).
module tb_pusch_ifft256;
  import pusch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, start = 0;
  logic [7:0] wr_bin = 0;
  cplx16_t wr_data = '0;
  logic busy, out_valid;
  logic [7:0] out_idx;
  cplx16_t out_data;
  int checks = 0, failures = 0;
  real maxerr = 0;

  pusch_ifft256 dut (.*);

  real Xr [256], Xi [256];

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic one(int nbins, int amp);
    int lat, n;
    real er, ei, a, e;
    logic signed [15:0] gr, gi;
    for (int k = 0; k < 256; k++) begin Xr[k] = 0; Xi[k] = 0; end
    for (int i = 0; i < nbins; i++) begin
      int k;
      k = (nbins == 256) ? i : int'($urandom % 256);
      @(negedge clk);
      wr_en = 1; wr_bin = 8'(k);
      wr_data.re = 16'($signed(32'($urandom % (2 * amp + 1)) - amp));
      wr_data.im = 16'($signed(32'($urandom % (2 * amp + 1)) - amp));
      Xr[k] = real'(wr_data.re); Xi[k] = real'(wr_data.im);
    end
    @(negedge clk);
    wr_en = 0; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 1026) begin failures++; $display("latency %0d", lat); end
    for (n = 0; n < 256; n++) begin
      er = 0; ei = 0;
      for (int k = 0; k < 256; k++) begin
        a = 2.0 * 3.14159265358979 * k * n / 256.0;
        er += Xr[k] * $cos(a) - Xi[k] * $sin(a);
        ei += Xr[k] * $sin(a) + Xi[k] * $cos(a);
      end
      er /= 16.0; ei /= 16.0;
      gr = out_data.re; gi = out_data.im;
      checks++;
      e = rabs(real'(gr) - er) > rabs(real'(gi) - ei) ? rabs(real'(gr) - er) : rabs(real'(gi) - ei);
      if (e > maxerr) maxerr = e;
      if (!out_valid || int'(out_idx) != n || e > 3.0) begin
        failures++;
        if (failures < 10) $display("n %0d idx %0d got %0d,%0d exp %f,%f", n, out_idx, gr, gi, er, ei);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (!busy) begin failures++; $display("not clearing after reset"); end
    while (busy) @(negedge clk);
    one(1, 16000);
    one(20, 8000);
    one(132, 4000);
    one(256, 2000);
    one(5, 30000);
    $display("max abs error %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
