// pusch_tx_top: CP-OFDM PUSCH transmitter, codeword in, antenna samples out.
//
// The host sets the runtime parameters and starts a transmission through an
// AXI4-Lite register file (pusch_axil_regs). The chain is input pacing -> scrambling -> symbol modulation -> layer
// mapping -> codebook precoding -> amplitude scaling and resource mapping ->
// one CP-OFDM modulator per antenna port. Everything runs on one clock; the
// input block's valid signal sets the rate, so that each port produces one
// complex sample every OSR (16) clocks, continuously over a subframe. The
// runtime parameters (modulation, layers, ports, TPMI, scrambling
// identities, amplitude scaling) are sampled at start. The four ports'
// 16-bit Q2.14 samples leave together on a 128-bit stream: port p in bits
// [32p+31:32p], imaginary part in the upper half. The output is paced and
// cannot be stalled, so the stream has no tready.
//
// The block order, the subsystem split and the 128-bit output follow the
// transmitter description; the bit layout of the output word, the register
// map and the status outputs are this design's own. Transform precoding is not part of the
// design.
module pusch_tx_top
  import pusch_pkg::*;
#(
  parameter int P_NSYM = NSYM_SF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [31:0]  s_axis_tdata,
  input  logic         s_axis_tvalid,
  input  logic         s_axis_tlast,
  output logic         s_axis_tready,
  // host register interface (AXI4-Lite), see pusch_axil_regs
  input  logic [7:0]   s_axil_awaddr,
  input  logic         s_axil_awvalid,
  output logic         s_axil_awready,
  input  logic [31:0]  s_axil_wdata,
  input  logic [3:0]   s_axil_wstrb,
  input  logic         s_axil_wvalid,
  output logic         s_axil_wready,
  output logic [1:0]   s_axil_bresp,
  output logic         s_axil_bvalid,
  input  logic         s_axil_bready,
  input  logic [7:0]   s_axil_araddr,
  input  logic         s_axil_arvalid,
  output logic         s_axil_arready,
  output logic [31:0]  s_axil_rdata,
  output logic [1:0]   s_axil_rresp,
  output logic         s_axil_rvalid,
  input  logic         s_axil_rready,
  output logic [127:0] m_axis_tdata,
  output logic         m_axis_tvalid,
  output logic         busy,
  output logic         done,
  output logic         unsupported,
  output logic         overrun
);

  cfg_t       cfg, c;
  logic       start;
  logic [MAXL-1:0] o_ready;
  logic       load, ip_valid, scr_ready;
  logic [7:0] ip_bits;

  pusch_axil_regs u_regs (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .cfg, .start, .busy, .done, .unsupported, .overrun
  );

  pusch_input_proc #(.P_NSYM(P_NSYM)) u_in (
    .clk, .rst_n,
    .s_axis_tdata, .s_axis_tvalid, .s_axis_tlast, .s_axis_tready,
    .start, .cfg_in(cfg), .dn_ready(scr_ready && (&o_ready)),
    .cfg_out(c), .load, .valid(ip_valid), .bits(ip_bits), .busy, .done
  );

  logic       scr_valid;
  logic [7:0] scr_bits;

  pusch_scrambler u_scr (
    .clk, .rst_n, .load,
    .rnti(c.rnti), .nid(c.nid), .nrapid(c.nrapid), .nrapid_en(c.nrapid_en),
    .nbits(bits_per_sym(c.modu)),
    .valid_in(ip_valid), .data_in(ip_bits),
    .ready(scr_ready), .valid_out(scr_valid), .data_out(scr_bits)
  );

  logic    mod_valid;
  cplx16_t mod_sym;

  pusch_symbol_mod u_mod (
    .clk, .rst_n, .mod_sel(c.modu), .load,
    .valid_in(scr_valid), .data_in(scr_bits),
    .valid_out(mod_valid), .sym_out(mod_sym)
  );

  logic    lm_valid;
  cplx16_t lm_x [MAXL];

  pusch_layer_map u_lm (
    .clk, .rst_n, .n_layers(c.n_layers), .load,
    .valid_in(mod_valid), .sym_in(mod_sym),
    .valid_out(lm_valid), .layers_out(lm_x)
  );

  logic    pc_valid;
  cplx16_t pc_y [MAXL];

  pusch_precoder u_pc (
    .clk, .rst_n, .n_layers(c.n_layers), .n_ports(c.n_ports), .tpmi(c.tpmi),
    .valid_in(lm_valid), .x(lm_x),
    .valid_out(pc_valid), .y(pc_y), .unsupported
  );

  logic    re_valid, re_last;
  logic [$clog2(NFFT)-1:0] re_bin;
  cplx16_t re_y [MAXL];

  pusch_re_mapper u_re (
    .clk, .rst_n, .load, .beta(c.beta),
    .valid_in(pc_valid), .x(pc_y),
    .valid_out(re_valid), .bin(re_bin), .last(re_last), .y(re_y)
  );

  logic [MAXL-1:0] o_valid, o_ovr;
  cplx16_t         o_data [MAXL];

  for (genvar p = 0; p < MAXL; p++) begin : g_port
    pusch_ofdm_mod u_ofdm (
      .clk, .rst_n,
      .in_valid(re_valid), .in_bin(re_bin), .in_last(re_last), .in_data(re_y[p]),
      .out_valid(o_valid[p]), .out_data(o_data[p]), .overrun(o_ovr[p]),
      .ready(o_ready[p])
    );
    assign m_axis_tdata[32*p +: 32] = {o_data[p].im, o_data[p].re};
  end

  assign m_axis_tvalid = o_valid[0];
  assign overrun       = |o_ovr;

  // All ports run in lockstep, so one port's valid stands for all.
  a_ports_lockstep: assert property (@(posedge clk) disable iff (!rst_n) o_valid == {MAXL{o_valid[0]}})
    else $error("tx_top: antenna ports out of step");

endmodule
