// tb_pusch_re_mapper: feeds two symbols' worth of random precoded vectors
// and checks the FFT bin of every subcarrier (lower half of the grid on the
// negative bins, upper half from bin 0 up), the 'last' flag on subcarrier
// 131, and the amplitude scaling against a real-valued product.
module tb_pusch_re_mapper;
  import pusch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, valid_in = 0;
  logic [15:0] beta = 16'd16384;
  cplx16_t x [MAXL];
  logic valid_out, last;
  logic [7:0] bin;
  cplx16_t y [MAXL];
  int checks = 0, failures = 0;

  pusch_re_mapper dut (.*);

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    real b, er, ei;
    int  ebin;
    logic signed [15:0] gr, gi;
    for (int l = 0; l < MAXL; l++) x[l] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int sym = 0; sym < 3; sym++) begin
      beta = (sym == 0) ? 16'd16384 : 16'(8000 + $urandom % 12000);
      b = real'(beta) / 16384.0;
      @(negedge clk); load = (sym == 2); @(negedge clk); load = 0;
      for (int k = 0; k < 132; k++) begin
        for (int l = 0; l < MAXL; l++) x[l] = cplx16_t'($urandom);
        valid_in = 1;
        @(negedge clk);
        valid_in = 0;
        ebin = (k < 66) ? 256 - 66 + k : k - 66;
        checks++;
        if (!valid_out || int'(bin) != ebin || last != (k == 131)) begin
          failures++;
          if (failures < 10) $display("k %0d bin %0d exp %0d last %b", k, bin, ebin, last);
        end
        for (int l = 0; l < MAXL; l++) begin
          er = real'(x[l].re) * b; ei = real'(x[l].im) * b;
          if (er > 32767) er = 32767; if (er < -32768) er = -32768;
          if (ei > 32767) ei = 32767; if (ei < -32768) ei = -32768;
          gr = y[l].re; gi = y[l].im;
          checks++;
          if (rabs(real'(gr) - er) > 0.51 || rabs(real'(gi) - ei) > 0.51) begin
            failures++;
            if (failures < 10) $display("k %0d l %0d got %0d,%0d exp %f,%f", k, l, gr, gi, er, ei);
          end
        end
      end
    end
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
