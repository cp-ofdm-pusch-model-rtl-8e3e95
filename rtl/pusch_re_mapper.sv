// pusch_re_mapper: amplitude scaling and resource-element mapping.
//
// Precoded vectors arrive one per subcarrier in frequency order. Each port's
// sample is multiplied by the amplitude scaling factor beta (unsigned
// Q1.14, rounded and saturated back to Q2.14) and tagged with the IFFT bin
// it occupies: the NSC contiguous subcarriers are centred on DC, so
// subcarrier k goes to bin (k - NSC/2) mod NFFT. 'last' marks the final
// subcarrier of an OFDM symbol, after which the count restarts. All
// subcarriers carry PUSCH data: the input pacing decides which resource
// elements are filled. Scaling and mapping follow the transmitter
// description; the centred placement and the beta format are this design's
// own choices.
//
// Timing: one registered stage. 'load' restarts the subcarrier count.
module pusch_re_mapper
  import pusch_pkg::*;
#(
  parameter int P_NFFT = NFFT,
  parameter int P_NSC  = NSC
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [15:0] beta,
  input  logic        valid_in,
  input  cplx16_t     x [MAXL],
  output logic        valid_out,
  output logic [$clog2(P_NFFT)-1:0] bin,
  output logic        last,
  output cplx16_t     y [MAXL]
);

  localparam int AW = $clog2(P_NFFT);

  logic [$clog2(P_NSC)-1:0] k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k         <= '0;
      valid_out <= 1'b0;
      bin       <= '0;
      last      <= 1'b0;
      for (int p = 0; p < MAXL; p++) y[p] <= '0;
    end else begin
      valid_out <= 1'b0;
      last      <= 1'b0;
      if (load) begin
        k <= '0;
      end else if (valid_in) begin
        valid_out <= 1'b1;
        bin       <= AW'((int'(k) + P_NFFT - P_NSC / 2) % P_NFFT);
        last      <= (int'(k) == P_NSC - 1);
        k         <= (int'(k) == P_NSC - 1) ? '0 : k + 1'b1;
        for (int p = 0; p < MAXL; p++) begin
          y[p].re <= rnd_sat16(48'(x[p].re) * 48'($signed({1'b0, beta})), 14);
          y[p].im <= rnd_sat16(48'(x[p].im) * 48'($signed({1'b0, beta})), 14);
        end
      end
    end
  end

endmodule
