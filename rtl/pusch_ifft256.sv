// pusch_ifft256: in-place radix-2 inverse FFT for one OFDM symbol.
//
// Frequency bins are written in natural order while the core is idle; each
// is stored at its bit-reversed address, and bins never written stay zero.
// 'start' runs log2(NFFT) decimation-in-time stages of NFFT/2 butterflies,
// one butterfly per clock, with twiddles e^{+j*2*pi*t/NFFT} from a
// quarter-precision table computed at elaboration (16-bit, Q1.14). Words
// inside are W bits per component with no scaling between stages, so no
// stage can overflow. When the stages are done the core streams the NFFT
// time samples in natural order on out_*, one per clock, each divided by
// 2^OUT_SHIFT (1/sqrt(NFFT) by default) with rounding and saturation to
// Q2.14, and clears each word as it leaves so the next symbol starts from
// zero bins.
//
// After reset the core spends NFFT clocks clearing its memory ('busy').
// Timing: start to first output is NFFT/2*log2(NFFT)+2 clocks (1026 for
// 256 points); the output burst lasts NFFT clocks. 'busy' covers both.
// Writes while busy are ignored. The transform size follows the
// transmitter's 256-point FFT; the architecture, word widths and output
// scaling are this design's own.
module pusch_ifft256
  import pusch_pkg::*;
#(
  parameter int P_NFFT    = NFFT,
  parameter int W         = 26,
  parameter int OUT_SHIFT = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr_en,
  input  logic [$clog2(P_NFFT)-1:0] wr_bin,
  input  cplx16_t                   wr_data,
  input  logic                      start,
  output logic                      busy,
  output logic                      out_valid,
  output logic [$clog2(P_NFFT)-1:0] out_idx,
  output cplx16_t                   out_data
);

  localparam int AW  = $clog2(P_NFFT);
  localparam int NST = AW;

  typedef logic signed [15:0] tw_t [P_NFFT/2];

  function automatic tw_t mk_tw(bit want_sin);
    tw_t  t;
    real  a, v;
    for (int i = 0; i < P_NFFT / 2; i++) begin
      a = 2.0 * 3.14159265358979323846 * i / P_NFFT;
      v = (want_sin ? $sin(a) : $cos(a)) * 16384.0;
      t[i] = 16'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    end
    return t;
  endfunction

  localparam tw_t TW_COS = mk_tw(1'b0);
  localparam tw_t TW_SIN = mk_tw(1'b1);

  typedef struct packed {
    logic signed [W-1:0] im;
    logic signed [W-1:0] re;
  } cw_t;

  cw_t mem [P_NFFT];

  typedef enum logic [1:0] {S_CLR, S_IDLE, S_CALC, S_OUT} state_e;
  state_e state;

  logic [$clog2(NST)-1:0] stage;   // 0..NST-1, span 2^stage
  logic [AW-2:0]          bfly;    // butterfly within the stage
  logic [AW-1:0]          ocnt;

  function automatic logic [AW-1:0] bitrev(logic [AW-1:0] a);
    logic [AW-1:0] r;
    for (int i = 0; i < AW; i++) r[i] = a[AW-1-i];
    return r;
  endfunction

  // Butterfly addresses and twiddle.
  logic [AW-1:0] half, jj, i0, i1;
  logic [AW-2:0] twi;
  cw_t           a0, a1, b0, b1;
  logic signed [W+16:0] pr, pi;
  logic signed [W-1:0]  tr, ti;

  always_comb begin
    half = AW'(1) << stage;
    jj   = AW'(bfly) & (half - 1'b1);
    i0   = ((AW'(bfly) >> stage) << (stage + 1)) | jj;
    i1   = i0 | half;
    twi  = (AW-1)'(jj << (NST - 1 - int'(stage)));
    a0   = mem[i0];
    a1   = mem[i1];
    pr   = (W+17)'(a1.re) * (W+17)'(TW_COS[twi]) - (W+17)'(a1.im) * (W+17)'(TW_SIN[twi]);
    pi   = (W+17)'(a1.re) * (W+17)'(TW_SIN[twi]) + (W+17)'(a1.im) * (W+17)'(TW_COS[twi]);
    tr   = W'((pr + (W+17)'(8192)) >>> 14);
    ti   = W'((pi + (W+17)'(8192)) >>> 14);
    b0.re = a0.re + tr;
    b0.im = a0.im + ti;
    b1.re = a0.re - tr;
    b1.im = a0.im - ti;
  end

  assign busy = (state != S_IDLE);

  // Memory write ports: port A serves bin loading, the first butterfly
  // output and clearing; port B the second butterfly output.
  logic          wa_en, wb_en;
  logic [AW-1:0] wa_addr;
  cw_t           wa_data;

  always_comb begin
    wa_en   = 1'b0;
    wa_addr = ocnt;
    wa_data = '0;
    wb_en   = (state == S_CALC);
    case (state)
      S_CLR:  wa_en = 1'b1;
      S_IDLE: begin
        wa_en      = wr_en;
        wa_addr    = bitrev(wr_bin);
        wa_data.re = W'(wr_data.re);
        wa_data.im = W'(wr_data.im);
      end
      S_CALC: begin
        wa_en   = 1'b1;
        wa_addr = i0;
        wa_data = b0;
      end
      S_OUT:  wa_en = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (wa_en) mem[wa_addr] <= wa_data;
    if (wb_en) mem[i1] <= b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_CLR;
      stage     <= '0;
      bfly      <= '0;
      ocnt      <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      case (state)
        S_CLR: begin
          ocnt <= ocnt + 1'b1;
          if (&ocnt) state <= S_IDLE;
        end
        S_IDLE: begin
          if (start) begin
            state <= S_CALC;
            stage <= '0;
            bfly  <= '0;
          end
        end
        S_CALC: begin
          bfly <= bfly + 1'b1;
          if (&bfly) begin
            if (int'(stage) == NST - 1) begin
              state <= S_OUT;
              ocnt  <= '0;
            end else begin
              stage <= stage + 1'b1;
            end
          end
        end
        S_OUT: begin
          out_valid   <= 1'b1;
          out_idx     <= ocnt;
          out_data.re <= rnd_sat16(48'(mem[ocnt].re), OUT_SHIFT);
          out_data.im <= rnd_sat16(48'(mem[ocnt].im), OUT_SHIFT);
          ocnt        <= ocnt + 1'b1;
          if (&ocnt) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
