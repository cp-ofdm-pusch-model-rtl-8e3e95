// pusch_precoder: codebook-based PUSCH precoding, layers to antenna ports.
//
// The layer vector x (up to 4 layers) is multiplied by the precoding matrix
// W selected by the number of antenna ports, the number of layers and the
// TPMI: y = W x. Every codebook entry of 3GPP TS 38.211 6.3.1.5 is 0, +-1
// or +-j times one common factor (1, 1/sqrt(2), 1/2, 1/(2 sqrt(2)),
// 1/(2 sqrt(3)) or 1/4), so the block needs only sign changes,
// real/imaginary swaps and adders per port, followed by one constant
// multiply for the factor (an 18-fractional-bit constant, so the factor
// adds at most 1/8 LSB of error).
//
// Codebooks built (TS 38.211, transform precoding disabled):
//   1 port : identity
//   2 ports: 1 layer TPMI 0-5, 2 layers TPMI 0-2
//   4 ports: 1 layer TPMI 0-27, 2 layers TPMI 0-21, 3 layers TPMI 0-6,
//            4 layers TPMI 0-4
// Any other combination (a TPMI past the end of its table, more layers
// than ports, 3 ports) gives zero output with 'unsupported' high.
// Codebook-based precoding driven by TPMI, layers and ports follows the
// transmitter description; the matrices are the standard's; the
// shift-and-add structure and the error flag are this design's own.
//
// Timing: one registered stage; y and valid_out follow valid_in by one
// clock. Outputs are rounded and saturated to Q2.14.
module pusch_precoder
  import pusch_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] n_layers,
  input  logic [2:0] n_ports,
  input  logic [4:0] tpmi,
  input  logic       valid_in,
  input  cplx16_t    x [MAXL],
  output logic       valid_out,
  output cplx16_t    y [MAXL],
  output logic       unsupported
);

  // Coefficient codes.
  typedef enum logic [2:0] {C0 = 3'd0, CP1 = 3'd1, CM1 = 3'd2, CPJ = 3'd3, CMJ = 3'd4} coef_e;
  // Common factor codes.
  typedef enum logic [2:0] {S_ONE = 3'd0, S_RT2 = 3'd1, S_HALF = 3'd2, S_RT8 = 3'd3,
                            S_RT12 = 3'd4, S_QTR = 3'd5} scale_e;

  typedef struct packed {
    logic                ok;
    scale_e              scl;
    logic [3:0][3:0][2:0] w;   // w[port][layer]
  } cb_t;

  // Quarter turns (0..3) to a coefficient code.
  function automatic logic [2:0] qt2c(int q);
    case (q % 4)
      0: return CP1;
      1: return CPJ;
      2: return CM1;
      default: return CMJ;
    endcase
  endfunction

  function automatic cb_t codebook(logic [2:0] np, logic [2:0] nl, logic [4:0] t);
    cb_t c;
    int  ti, a, b;
    c = '0;
    ti = int'(t);
    if (np == 3'd1 && nl == 3'd1) begin
      c.ok = 1'b1; c.scl = S_ONE; c.w[0][0] = CP1;
    end else if (np == 3'd2 && nl == 3'd1 && ti <= 5) begin
      c.ok = 1'b1; c.scl = S_RT2;
      case (ti)
        0: c.w[0][0] = CP1;
        1: c.w[1][0] = CP1;
        default: begin
          c.w[0][0] = CP1;
          c.w[1][0] = (ti == 2) ? CP1 : (ti == 3) ? CM1 : (ti == 4) ? CPJ : CMJ;
        end
      endcase
    end else if (np == 3'd2 && nl == 3'd2 && ti <= 2) begin
      c.ok = 1'b1;
      if (ti == 0) begin
        c.scl = S_RT2; c.w[0][0] = CP1; c.w[1][1] = CP1;
      end else begin
        c.scl = S_HALF;
        c.w[0][0] = CP1; c.w[0][1] = CP1;
        c.w[1][0] = (ti == 1) ? CP1 : CPJ;
        c.w[1][1] = (ti == 1) ? CM1 : CMJ;
      end
    end else if (np == 3'd4 && nl == 3'd1 && ti <= 27) begin
      c.ok = 1'b1; c.scl = S_HALF;
      if (ti <= 3) begin
        c.w[ti][0] = CP1;
      end else if (ti <= 11) begin
        a = (ti <= 7) ? 0 : 1;          // ports a and a+2
        c.w[a][0]   = CP1;
        c.w[a+2][0] = qt2c(((ti - 4) % 4 == 0) ? 0 : ((ti - 4) % 4 == 1) ? 2 : ((ti - 4) % 4 == 2) ? 1 : 3);
      end else begin
        a = (ti - 12) / 4;              // quarter turns of port 1
        b = (ti - 12) % 4;              // quarter turns of port 2
        c.w[0][0] = CP1;
        c.w[1][0] = qt2c(a);
        c.w[2][0] = qt2c(b);
        c.w[3][0] = qt2c(a + b);
      end
    end else if (np == 3'd4 && nl == 3'd2 && ti <= 21) begin
      c.ok = 1'b1; c.scl = S_HALF;
      if (ti <= 5) begin                // non-coherent: two single ports
        a = (ti <= 2) ? 0 : (ti <= 4) ? 1 : 2;
        b = (ti == 0) ? 1 : (ti == 1 || ti == 3) ? 2 : 3;
        c.w[a][0] = CP1;
        c.w[b][1] = CP1;
      end else if (ti <= 13) begin      // partial coherent: port pairs {0,2} and {1,3}
        c.w[0][0] = CP1;
        c.w[1][1] = CP1;
        case (ti)
          6:       begin c.w[2][0] = CP1; c.w[3][1] = CMJ; end
          7:       begin c.w[2][0] = CP1; c.w[3][1] = CPJ; end
          8:       begin c.w[2][0] = CMJ; c.w[3][1] = CP1; end
          9:       begin c.w[2][0] = CMJ; c.w[3][1] = CM1; end
          10:      begin c.w[2][0] = CM1; c.w[3][1] = CMJ; end
          11:      begin c.w[2][0] = CM1; c.w[3][1] = CPJ; end
          12:      begin c.w[2][0] = CPJ; c.w[3][1] = CP1; end
          default: begin c.w[2][0] = CPJ; c.w[3][1] = CM1; end
        endcase
      end else begin                    // full coherent: [1 phi theta phi.theta], theta negated in layer 1
        c.scl = S_RT8;
        a = (ti - 14) / 2;              // quarter turns of phi
        b = (ti - 14) % 2;              // quarter turns of theta
        c.w[0][0] = CP1;       c.w[0][1] = CP1;
        c.w[1][0] = qt2c(a);   c.w[1][1] = qt2c(a);
        c.w[2][0] = qt2c(b);   c.w[2][1] = qt2c(b + 2);
        c.w[3][0] = qt2c(a + b); c.w[3][1] = qt2c(a + b + 2);
      end
    end else if (np == 3'd4 && nl == 3'd3 && ti <= 6) begin
      c.ok = 1'b1;
      if (ti <= 2) begin
        c.scl = S_HALF;
        c.w[0][0] = CP1; c.w[1][1] = CP1;
        if (ti == 0) c.w[2][2] = CP1;
        else begin c.w[2][0] = (ti == 1) ? CP1 : CM1; c.w[3][2] = CP1; end
      end else begin
        // rows: [1 1 1], [s -s s] (s = +1 for TPMI 3,4, -1 for 5,6),
        // [u u -u] and [s.u -s.u -s.u] (u = 1 for TPMI 3,5, j for 4,6)
        c.scl = S_RT12;
        a = (ti >= 5) ? 2 : 0;          // quarter turns of s
        b = (ti % 2 == 0) ? 1 : 0;      // quarter turns of u
        c.w[0][0] = CP1; c.w[0][1] = CP1; c.w[0][2] = CP1;
        c.w[1][0] = qt2c(a); c.w[1][1] = qt2c(a + 2); c.w[1][2] = qt2c(a);
        c.w[2][0] = qt2c(b); c.w[2][1] = qt2c(b); c.w[2][2] = qt2c(b + 2);
        c.w[3][0] = qt2c(a + b); c.w[3][1] = qt2c(a + b + 2); c.w[3][2] = qt2c(a + b + 2);
      end
    end else if (np == 3'd4 && nl == 3'd4 && ti <= 4) begin
      c.ok = 1'b1;
      b = (ti % 2 == 0) ? 1 : 0;        // quarter turns of the lower rows (TPMI 2, 4)
      if (ti == 0) begin
        c.scl = S_HALF;
        for (int i = 0; i < 4; i++) c.w[i][i] = CP1;
      end else if (ti <= 2) begin
        c.scl = S_RT8;
        c.w[0][0] = CP1; c.w[0][1] = CP1;
        c.w[1][2] = CP1; c.w[1][3] = CP1;
        c.w[2][0] = qt2c(b); c.w[2][1] = qt2c(b + 2);
        c.w[3][2] = qt2c(b); c.w[3][3] = qt2c(b + 2);
      end else begin
        c.scl = S_QTR;
        for (int l = 0; l < 4; l++) begin
          c.w[0][l] = CP1;
          c.w[1][l] = qt2c((l % 2) * 2);
          c.w[2][l] = qt2c(b + (l / 2) * 2);
          c.w[3][l] = qt2c(b + ((l % 2) + (l / 2)) * 2);
        end
      end
    end
    return c;
  endfunction

  cb_t cb;
  assign cb = codebook(n_ports, n_layers, tpmi);

  logic signed [18:0] sre [MAXL];
  logic signed [18:0] sim [MAXL];
  logic signed [19:0] smul;     // common factor, 18 fractional bits

  always_comb begin
    case (cb.scl)
      S_ONE:   smul = 20'sd262144;  // 1
      S_RT2:   smul = 20'sd185364;  // 1/sqrt(2)
      S_HALF:  smul = 20'sd131072;  // 1/2
      S_RT8:   smul = 20'sd92682;   // 1/(2 sqrt(2))
      S_RT12:  smul = 20'sd75675;   // 1/(2 sqrt(3))
      default: smul = 20'sd65536;   // 1/4
    endcase
    for (int p = 0; p < MAXL; p++) begin
      sre[p] = '0;
      sim[p] = '0;
      for (int l = 0; l < MAXL; l++) begin
        case (cb.w[p][l])
          CP1: begin sre[p] = sre[p] + 19'(x[l].re); sim[p] = sim[p] + 19'(x[l].im); end
          CM1: begin sre[p] = sre[p] - 19'(x[l].re); sim[p] = sim[p] - 19'(x[l].im); end
          CPJ: begin sre[p] = sre[p] - 19'(x[l].im); sim[p] = sim[p] + 19'(x[l].re); end
          CMJ: begin sre[p] = sre[p] + 19'(x[l].im); sim[p] = sim[p] - 19'(x[l].re); end
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out   <= 1'b0;
      unsupported <= 1'b0;
      for (int p = 0; p < MAXL; p++) y[p] <= '0;
    end else begin
      valid_out   <= valid_in;
      unsupported <= !cb.ok;
      if (valid_in) begin
        for (int p = 0; p < MAXL; p++) begin
          y[p].re <= rnd_sat16(48'(sre[p]) * 48'(smul), 18);
          y[p].im <= rnd_sat16(48'(sim[p]) * 48'(smul), 18);
        end
      end
    end
  end

endmodule
