// pusch_pkg: types and constants shared by the CP-OFDM PUSCH transmitter.
//
// The numbers that define the waveform follow the transmitter's target
// configuration: a 256-point FFT with 132 active subcarriers (11 resource
// blocks) at 60 kHz subcarrier spacing, extended cyclic prefix, and a
// 245.76 MHz clock that is 16 times the 15.36 MHz output sample rate.
// The extended-CP length (NFFT/4), the 48 symbols of a 1 ms subframe at
// 60 kHz, the modulation encoding and the field widths of cfg_t are this
// design's own choices.
package pusch_pkg;

  localparam int NFFT      = 256;  // IFFT size
  localparam int NSC       = 132;  // active subcarriers
  localparam int NCP       = 64;   // extended cyclic prefix, NFFT/4
  localparam int OSR       = 16;   // clocks per output sample (R)
  localparam int NSYM_SF   = 48;   // OFDM symbols per subframe (4 slots x 12)
  localparam int MAXL      = 4;    // layers / antenna ports
  localparam int MAXB      = 8;    // bits per modulation symbol (256QAM)

  // Complex sample, 16-bit two's complement, Q2.14.
  typedef struct packed {
    logic signed [15:0] im;
    logic signed [15:0] re;
  } cplx16_t;

  typedef enum logic [2:0] {
    MOD_PI2BPSK = 3'd0,
    MOD_QPSK    = 3'd1,
    MOD_16QAM   = 3'd2,
    MOD_64QAM   = 3'd3,
    MOD_256QAM  = 3'd4
  } mod_e;

  // Runtime parameters of one transmission.
  typedef struct packed {
    mod_e        modu;       // modulation scheme
    logic [2:0]  n_layers;   // 1..4
    logic [2:0]  n_ports;    // 1, 2 or 4
    logic [4:0]  tpmi;       // precoding matrix indicator
    logic [15:0] rnti;       // n_RNTI
    logic [9:0]  nid;        // n_ID
    logic [5:0]  nrapid;     // random access preamble index
    logic        nrapid_en;  // use the msgA form of c_init
    logic [15:0] beta;       // amplitude scaling, unsigned Q1.14
  } cfg_t;

  function automatic logic [3:0] bits_per_sym(mod_e m);
    case (m)
      MOD_PI2BPSK: return 4'd1;
      MOD_QPSK:    return 4'd2;
      MOD_16QAM:   return 4'd4;
      MOD_64QAM:   return 4'd6;
      MOD_256QAM:  return 4'd8;
      default:     return 4'd2;
    endcase
  endfunction

  // Round a wide value right by SH bits (round half up) and saturate to 16 bits.
  function automatic logic signed [15:0] rnd_sat16(logic signed [47:0] v, int sh);
    logic signed [47:0] r;
    r = (sh > 0) ? ((v + (48'sd1 <<< (sh - 1))) >>> sh) : v;
    if (r > 48'sd32767)       return 16'sh7fff;
    else if (r < -48'sd32768) return 16'sh8000;
    else                      return r[15:0];
  endfunction

endpackage
