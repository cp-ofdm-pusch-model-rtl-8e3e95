// pusch_input_proc: codeword store, parameter latch and data pacing.
//
// The whole transmitter runs at the device clock; this block decides on
// which clocks data moves. While idle it accepts the codeword over an
// AXI4-Stream slave into a word memory (32 bits per beat, codeword bit 0 in
// bit 0 of the first word; tlast rewinds the write pointer). 'start' latches
// the runtime parameters, pulses 'load' to the downstream blocks and waits
// for 'dn_ready' (scrambler warm-up done and OFDM stages idle). Then it paces one subframe of
// P_NSYM OFDM symbols. Each symbol is SYM_SLOTS slots of P_OSR clocks, one
// slot per output sample: in each of the first P_NSC slots (one per active
// subcarrier) 'valid' is high on the first N_l clocks, each time carrying
// the B bits of one modulation symbol; the remaining slots are idle and give
// the OFDM stage the time to add the cyclic prefix and guard band. The
// average input rate is thus B*N_l/R bits per clock during the data part
// of a symbol, as the transmitter description prescribes. 'done' pulses
// after the last slot of the subframe.
//
// The pacing scheme, R = 16 and the 132 subcarriers follow the transmitter
// description; the word width, the bit order, the downstream-ready handshake and
// the subframe length are this design's own.
module pusch_input_proc
  import pusch_pkg::*;
#(
  parameter int P_NSC     = NSC,
  parameter int P_OSR     = OSR,
  parameter int SYM_SLOTS = NFFT + NCP,
  parameter int P_NSYM    = NSYM_SF,
  parameter int CW_WORDS  = 6336
) (
  input  logic        clk,
  input  logic        rst_n,
  // codeword stream
  input  logic [31:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  input  logic        s_axis_tlast,
  output logic        s_axis_tready,
  // control
  input  logic        start,
  input  cfg_t        cfg_in,
  input  logic        dn_ready,   // downstream blocks ready for a new subframe
  output cfg_t        cfg_out,
  output logic        load,
  output logic        valid,
  output logic [7:0]  bits,
  output logic        busy,
  output logic        done
);

  localparam int WA = $clog2(CW_WORDS);
  localparam int BA = WA + 5;

  logic [31:0] cw_mem [CW_WORDS];
  logic [WA-1:0] wptr;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_WAIT, S_RUN} state_e;
  state_e state;

  logic [BA-1:0]                  bptr;
  logic [$clog2(P_NSYM)-1:0]      sym;
  logic [$clog2(SYM_SLOTS)-1:0]   slot;
  logic [$clog2(P_OSR)-1:0]       ph;
  logic [2:0]                     nl;
  logic [3:0]                     nb;

  assign s_axis_tready = (state == S_IDLE);
  assign busy          = (state != S_IDLE);
  assign nb            = bits_per_sym(cfg_out.modu);

  always_ff @(posedge clk) begin
    if (s_axis_tvalid && s_axis_tready) cw_mem[wptr] <= s_axis_tdata;
  end

  // Bit window at the read pointer.
  logic [WA-1:0] ra, ra1;
  logic [7:0]    grp;
  always_comb begin
    ra  = bptr[BA-1:5];
    ra1 = ra + 1'b1;
    grp = 8'({((int'(ra1) < CW_WORDS) ? cw_mem[ra1] : 32'd0), cw_mem[ra]} >> bptr[4:0]) & 8'((9'd1 << nb) - 9'd1);
  end

  logic data_slot;
  assign data_slot = (int'(slot) < P_NSC) && ({1'b0, ph} < ($bits(ph)+1)'(nl));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      wptr    <= '0;
      cfg_out <= '0;
      load    <= 1'b0;
      valid   <= 1'b0;
      bits    <= '0;
      done    <= 1'b0;
      bptr    <= '0;
      sym     <= '0;
      slot    <= '0;
      ph      <= '0;
      nl      <= 3'd1;
    end else begin
      load  <= 1'b0;
      valid <= 1'b0;
      done  <= 1'b0;
      if (s_axis_tvalid && s_axis_tready)
        wptr <= (s_axis_tlast || int'(wptr) == CW_WORDS - 1) ? '0 : wptr + 1'b1;
      case (state)
        S_IDLE: begin
          if (start) begin
            cfg_out <= cfg_in;
            nl      <= (cfg_in.n_layers == 3'd0 || cfg_in.n_layers > 3'd4) ? 3'd1 : cfg_in.n_layers;
            load    <= 1'b1;
            state   <= S_LOAD;
          end
        end
        S_LOAD: state <= S_WAIT;   // the scrambler sees load during this clock
        S_WAIT: begin
          if (dn_ready) begin
            state <= S_RUN;
            bptr  <= '0;
            sym   <= '0;
            slot  <= '0;
            ph    <= '0;
          end
        end
        S_RUN: begin
          if (data_slot) begin
            valid <= 1'b1;
            bits  <= grp;
            bptr  <= bptr + BA'(nb);
          end
          ph <= (int'(ph) == P_OSR - 1) ? '0 : ph + 1'b1;
          if (int'(ph) == P_OSR - 1) begin
            slot <= (int'(slot) == SYM_SLOTS - 1) ? '0 : slot + 1'b1;
            if (int'(slot) == SYM_SLOTS - 1) begin
              sym <= sym + 1'b1;
              if (int'(sym) == P_NSYM - 1) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
