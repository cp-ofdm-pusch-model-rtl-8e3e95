// pusch_symbol_mod: NR symbol modulator (pi/2-BPSK, QPSK, 16QAM, 64QAM, 256QAM).
//
// Each valid input carries the B bits of one symbol, b(i) in data_in[i]
// (B = 1, 2, 4, 6, 8). The Gray-coded constellations and their unit-power
// normalisation are those of 3GPP TS 38.211 clause 5.1: the in-phase
// amplitude is built from the even bits as (1-2b0)*(2^(k-1) - (1-2b2)*(... ))
// and the quadrature amplitude likewise from the odd bits, giving odd
// integer levels that are multiplied by 1/sqrt(E), E = 2, 10, 42 or 170.
// pi/2-BPSK rotates every odd-indexed symbol by +90 degrees;
// the index restarts at 'load'. The set of schemes follows the transmitter
// description; the numbering of mod_sel is this design's own.
//
// Timing: one registered stage, so sym_out and valid_out follow valid_in
// by one clock. Output format Q2.14.
module pusch_symbol_mod
  import pusch_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  mod_e       mod_sel,
  input  logic       load,
  input  logic       valid_in,
  input  logic [7:0] data_in,
  output logic       valid_out,
  output cplx16_t    sym_out
);

  // Scale factors round(2^20 / sqrt(E)); products are rounded back to
  // Q2.14, so every point is within half an LSB of the exact value.
  localparam logic [19:0] S_2   = 20'd741455;
  localparam logic [19:0] S_10  = 20'd331590;
  localparam logic [19:0] S_42  = 20'd161799;
  localparam logic [19:0] S_170 = 20'd80421;

  // Signed level from a Gray-coded bit group: s(b) = 1 - 2b.
  function automatic int sgn(logic b);
    return b ? -1 : 1;
  endfunction

  logic odd;  // pi/2-BPSK symbol index parity
  int   li, lq;
  logic [19:0] scale;

  always_comb begin
    li = 0;
    lq = 0;
    scale = S_2;
    case (mod_sel)
      MOD_PI2BPSK: begin
        li = sgn(data_in[0]);
        lq = sgn(data_in[0]);
        if (odd) begin  // multiply by j
          li = -sgn(data_in[0]);
        end
        scale = S_2;
      end
      MOD_QPSK: begin
        li = sgn(data_in[0]);
        lq = sgn(data_in[1]);
        scale = S_2;
      end
      MOD_16QAM: begin
        li = sgn(data_in[0]) * (2 - sgn(data_in[2]));
        lq = sgn(data_in[1]) * (2 - sgn(data_in[3]));
        scale = S_10;
      end
      MOD_64QAM: begin
        li = sgn(data_in[0]) * (4 - sgn(data_in[2]) * (2 - sgn(data_in[4])));
        lq = sgn(data_in[1]) * (4 - sgn(data_in[3]) * (2 - sgn(data_in[5])));
        scale = S_42;
      end
      MOD_256QAM: begin
        li = sgn(data_in[0]) * (8 - sgn(data_in[2]) * (4 - sgn(data_in[4]) * (2 - sgn(data_in[6]))));
        lq = sgn(data_in[1]) * (8 - sgn(data_in[3]) * (4 - sgn(data_in[5]) * (2 - sgn(data_in[7]))));
        scale = S_170;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd       <= 1'b0;
      valid_out <= 1'b0;
      sym_out   <= '0;
    end else begin
      valid_out <= valid_in;
      if (load) odd <= 1'b0;
      else if (valid_in) odd <= ~odd;
      if (valid_in) begin
        sym_out.re <= 16'((li * int'(scale) + 32) >>> 6);
        sym_out.im <= 16'((lq * int'(scale) + 32) >>> 6);
      end
    end
  end

endmodule
