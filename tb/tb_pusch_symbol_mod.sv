// tb_pusch_symbol_mod: drives every bit pattern of every modulation scheme
// and compares the output with the constellation points computed in real
// arithmetic (Gray-coded PAM per axis, normalised by 1/sqrt(2), 1/sqrt(10),
// 1/sqrt(42), 1/sqrt(170)), within one LSB of Q2.14. Checks the pi/2-BPSK
// rotation of odd symbols, its restart at load, and the one-clock latency.
module tb_pusch_symbol_mod;
  import pusch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mod_e mod_sel = MOD_QPSK;
  logic load = 0, valid_in = 0;
  logic [7:0] data_in = 0;
  logic valid_out;
  cplx16_t sym_out;
  int checks = 0, failures = 0;

  pusch_symbol_mod dut (.*);

  // Gray-coded PAM level from bits (first bit = sign, later bits refine).
  // Gray-coded PAM level of one axis: g[0] is the sign bit, g[1..nb-1]
  // refine the magnitude from the outer ring inwards.
  function automatic real pam(int nb, logic [3:0] g);
    real amp;
    amp = 1.0;
    for (int k = nb - 1; k >= 1; k--) amp = real'(1 << (nb - k)) - (g[k] ? -1.0 : 1.0) * amp;
    return (g[0] ? -1.0 : 1.0) * amp;
  endfunction

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic chk(mod_e m, logic [7:0] d, logic odd_sym);
    real er, ei, norm;
    int nb;
    logic [3:0] gi, gq;
    logic signed [15:0] gr, gim;
    nb = int'(bits_per_sym(m));
    case (m)
      MOD_PI2BPSK: norm = 1.0 / $sqrt(2.0);
      MOD_QPSK:    norm = 1.0 / $sqrt(2.0);
      MOD_16QAM:   norm = 1.0 / $sqrt(10.0);
      MOD_64QAM:   norm = 1.0 / $sqrt(42.0);
      default:     norm = 1.0 / $sqrt(170.0);
    endcase
    for (int k = 0; k < 4; k++) begin gi[k] = d[2*k]; gq[k] = d[2*k+1]; end
    if (m == MOD_PI2BPSK) begin
      er = (d[0] ? -1.0 : 1.0) * norm; ei = er;
      if (odd_sym) er = -ei;
    end else begin
      er = pam(nb / 2, gi) * norm;
      ei = pam(nb / 2, gq) * norm;
    end
    @(negedge clk);
    mod_sel = m; data_in = d; valid_in = 1;
    @(negedge clk);
    valid_in = 0;
    checks++;
    gr = sym_out.re;
    gim = sym_out.im;
    if (!valid_out || rabs(real'(gr) / 16384.0 - er) > 1.5 / 16384.0 ||
        rabs(real'(gim) / 16384.0 - ei) > 1.5 / 16384.0) begin
      failures++;
      if (failures < 10) $display("mod %0d d %h got %0d,%0d exp %f,%f", m, d, gr, gim, er, ei);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < 4; d++) chk(MOD_QPSK, 8'(d), 0);
    for (int d = 0; d < 16; d++) chk(MOD_16QAM, 8'(d), 0);
    for (int d = 0; d < 64; d++) chk(MOD_64QAM, 8'(d), 0);
    for (int d = 0; d < 256; d++) chk(MOD_256QAM, 8'(d), 0);
    // pi/2-BPSK: symbol index parity counts every valid since load
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    for (int i = 0; i < 8; i++) chk(MOD_PI2BPSK, 8'(i % 3 == 0), (i % 2) == 1);
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    chk(MOD_PI2BPSK, 8'd0, 0);
    chk(MOD_PI2BPSK, 8'd1, 1);
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
