// pusch_scrambler: PUSCH bit scrambling with the length-31 Gold sequence.
//
// The scrambling sequence is c(n) = x1(n+Nc) xor x2(n+Nc) with the two
// 31-stage LFSRs of 3GPP TS 38.211 clause 5.2.1 (Nc = 1600). x1 starts at
// 1; x2 starts at c_init = n_RNTI*2^15 + n_ID, or, for a msgA
// transmission (nrapid_en), n_RNTI*2^16 + n_RAPID*2^10 + n_ID, both taken
// modulo 2^31. The initialising identities and the Gold sequence follow the
// transmitter description; the formula for c_init is the standard's.
//
// Interface and timing: a one-cycle 'load' captures c_init and starts the
// Nc-step warm-up, done WARM_STEPS steps per clock (100 clocks by default);
// 'ready' is low during it. Afterwards each 'valid_in' carries 'nbits'
// (1..8) codeword bits in data_in[nbits-1:0], first bit in bit 0; they
// leave XORed with the next nbits sequence bits one clock later. Bits above
// nbits are passed as zero. Data arriving while not ready is a protocol
// error (asserted in simulation). Reset leaves the block not ready until
// the first load.
module pusch_scrambler #(
  parameter int NC         = 1600,
  parameter int WARM_STEPS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [15:0] rnti,
  input  logic [9:0]  nid,
  input  logic [5:0]  nrapid,
  input  logic        nrapid_en,
  input  logic [3:0]  nbits,
  input  logic        valid_in,
  input  logic [7:0]  data_in,
  output logic        ready,
  output logic        valid_out,
  output logic [7:0]  data_out
);

  logic [30:0] x1, x2;       // bit i holds x(n+i)
  logic [$clog2(NC+1)-1:0] rem;  // warm-up steps still to take
  logic        loaded;
  logic [30:0] c_init;

  function automatic logic [30:0] step1(logic [30:0] s);
    return {s[3] ^ s[0], s[30:1]};
  endfunction
  function automatic logic [30:0] step2(logic [30:0] s);
    return {s[3] ^ s[2] ^ s[1] ^ s[0], s[30:1]};
  endfunction

  always_comb begin
    if (nrapid_en) c_init = 31'(({15'd0, rnti} << 16) + ({25'd0, nrapid} << 10) + {21'd0, nid});
    else           c_init = 31'(({15'd0, rnti} << 15) + {21'd0, nid});
  end

  // Advance by up to 8 steps while scrambling the valid bits.
  logic [30:0] x1_n, x2_n;
  logic [7:0]  scr;
  always_comb begin
    x1_n = x1;
    x2_n = x2;
    scr  = '0;
    for (int i = 0; i < 8; i++) begin
      if (i < int'(nbits)) begin
        scr[i] = data_in[i] ^ x1_n[0] ^ x2_n[0];
        x1_n   = step1(x1_n);
        x2_n   = step2(x2_n);
      end
    end
  end

  // Warm-up advance: WARM_STEPS steps, or the remainder on the final clock.
  logic [30:0] x1_w, x2_w;
  always_comb begin
    x1_w = x1;
    x2_w = x2;
    for (int i = 0; i < WARM_STEPS; i++) begin
      if (i < int'(rem)) begin
        x1_w = step1(x1_w);
        x2_w = step2(x2_w);
      end
    end
  end

  assign ready = loaded && (rem == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1        <= 31'd1;
      x2        <= '0;
      rem       <= '0;
      loaded    <= 1'b0;
      valid_out <= 1'b0;
      data_out  <= '0;
    end else begin
      valid_out <= 1'b0;
      if (load) begin
        x1     <= 31'd1;
        x2     <= c_init;
        rem    <= NC[$bits(rem)-1:0];
        loaded <= 1'b1;
      end else if (rem != '0) begin
        x1  <= x1_w;
        x2  <= x2_w;
        rem <= (int'(rem) > WARM_STEPS) ? rem - WARM_STEPS[$bits(rem)-1:0] : '0;
      end else if (valid_in) begin
        x1        <= x1_n;
        x2        <= x2_n;
        data_out  <= scr;
        valid_out <= 1'b1;
      end
    end
  end

  a_no_data_in_warmup: assert property (@(posedge clk) disable iff (!rst_n) valid_in |-> ready)
    else $error("scrambler: data while warming up");

endmodule
