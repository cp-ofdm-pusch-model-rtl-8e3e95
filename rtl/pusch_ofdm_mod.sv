// pusch_ofdm_mod: CP-OFDM modulator for one antenna port.
//
// Mapped subcarriers of one OFDM symbol are written straight into the
// IFFT core (pusch_ifft256) by bin number; the write flagged 'in_last'
// starts the transform. The time samples the core produces are stored in
// one of two output banks (ping-pong), so that a symbol can be transformed
// while the previous one is still being sent. The sender plays a full bank
// as NCP cyclic-prefix samples (the bank's last NCP words) followed by all
// NFFT words, one sample every OSR clocks, and moves on to the other bank
// without a gap when that one is ready. If a new transform finishes while
// both banks are still full, that symbol is dropped and 'overrun' is set
// until reset.
//
// 'ready' is low while the IFFT clears its memory after reset and while it
// transforms; subcarriers must be written only while it is high.
//
// Timing: with symbols arriving every (NFFT+NCP)*OSR clocks, as the input
// pacing delivers them, the output is a continuous stream of one valid
// sample per OSR clocks. The first sample leaves about 1.3k clocks after
// the in_last write. CP-OFDM with extended cyclic prefix and the 1-in-16
// output rate follow the transmitter description; the banking is this
// design's own.
module pusch_ofdm_mod
  import pusch_pkg::*;
#(
  parameter int P_NFFT = NFFT,
  parameter int P_NCP  = NCP,
  parameter int P_OSR  = OSR
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [$clog2(P_NFFT)-1:0] in_bin,
  input  logic                      in_last,
  input  cplx16_t                   in_data,
  output logic                      out_valid,
  output cplx16_t                   out_data,
  output logic                      overrun,
  output logic                      ready     // IFFT idle: bins may be written
);

  localparam int AW   = $clog2(P_NFFT);
  localparam int NOUT = P_NFFT + P_NCP;

  logic          ifft_busy;
  logic          f_valid;
  logic [AW-1:0] f_idx;
  cplx16_t       f_data;

  pusch_ifft256 #(.P_NFFT(P_NFFT)) u_ifft (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (in_valid),
    .wr_bin   (in_bin),
    .wr_data  (in_data),
    .start    (in_valid && in_last),
    .busy     (ifft_busy),
    .out_valid(f_valid),
    .out_idx  (f_idx),
    .out_data (f_data)
  );

  cplx16_t bank [2][P_NFFT];
  logic [1:0] full;
  logic       wb, rb;      // bank being written / read
  logic       wdrop;       // current transform is being dropped

  logic       sending;
  logic [$clog2(NOUT)-1:0]  s;
  logic [$clog2(P_OSR)-1:0] ph;
  logic [AW-1:0]            ridx;

  assign ridx = (int'(s) < P_NCP) ? AW'(P_NFFT - P_NCP + int'(s)) : AW'(int'(s) - P_NCP);

  logic end_of_sym;
  assign end_of_sym = sending && (int'(s) == NOUT - 1) && (int'(ph) == P_OSR - 1);

  assign ready = !ifft_busy;

  logic drop_now;
  assign drop_now = (f_idx == '0) ? full[wb] : wdrop;

  always_ff @(posedge clk) begin
    if (f_valid && !drop_now) bank[wb][f_idx] <= f_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full      <= '0;
      wb        <= 1'b0;
      rb        <= 1'b0;
      wdrop     <= 1'b0;
      overrun   <= 1'b0;
      sending   <= 1'b0;
      s         <= '0;
      ph        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      // writer side
      if (f_valid && f_idx == '0) begin
        wdrop <= full[wb];
        if (full[wb]) overrun <= 1'b1;
      end
      if (f_valid && (&f_idx) && !drop_now) begin
        full[wb] <= 1'b1;
        wb       <= ~wb;
      end
      // sender side
      out_valid <= 1'b0;
      if (!sending) begin
        if (full[rb]) begin
          sending <= 1'b1;
          s       <= '0;
          ph      <= '0;
        end
      end else begin
        if (ph == '0) begin
          out_valid <= 1'b1;
          out_data  <= bank[rb][ridx];
        end
        ph <= (int'(ph) == P_OSR - 1) ? '0 : ph + 1'b1;
        if (int'(ph) == P_OSR - 1) s <= (int'(s) == NOUT - 1) ? '0 : s + 1'b1;
        if (end_of_sym) begin
          full[rb] <= 1'b0;
          rb       <= ~rb;
          sending  <= full[~rb];
        end
      end
    end
  end

  a_no_write_while_busy: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !ifft_busy)
    else $error("ofdm_mod: subcarrier written while the IFFT is busy");

endmodule
