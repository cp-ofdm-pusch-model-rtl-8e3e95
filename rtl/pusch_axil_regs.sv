// pusch_axil_regs: AXI4-Lite register file holding the transmitter's
// runtime parameters.
//
// The host writes the modulation scheme, layer and port counts, TPMI,
// scrambling identities and amplitude scaling into registers and starts a
// transmission by writing 1 to CTRL bit 0; the block turns that write into
// a one-clock 'start' pulse and presents the registers as one cfg_t. Reads
// return the registers and, in CTRL, the status bits. Runtime
// parameterisation over AXI4-Lite follows the transmitter description; the
// register map below is this design's own.
//
//   0x00 CTRL   W: bit0 start (self-clearing)
//               R: bit0 busy, bit1 done since start, bit2 unsupported
//                  TPMI seen, bit3 output overrun
//   0x04 MOD    modulation (0 pi/2-BPSK, 1 QPSK, 2 16QAM, 3 64QAM, 4 256QAM)
//   0x08 LAYERS 1..4        0x0C PORTS 1, 2 or 4     0x10 TPMI
//   0x14 RNTI   16 bits     0x18 NID   10 bits       0x1C NRAPID 6 bits
//   0x20 MSGA   bit0: msgA scrambling initialisation
//   0x24 BETA   amplitude scaling, unsigned Q1.14
//
// Protocol: a write is accepted when address and data are both valid
// (awready and wready rise together for one clock), the response follows
// one clock later and is held until bready. A read is accepted when no read
// response is pending; rdata follows one clock later. Responses are always
// OKAY; unmapped addresses read 0 and ignore writes. Reset values: QPSK,
// one layer, one port, TPMI 0, identities 0, BETA 1.0.
module pusch_axil_regs
  import pusch_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // write address / data / response
  input  logic [7:0]  s_axil_awaddr,   // byte address; bits 1:0 ignored
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  // read address / data
  input  logic [7:0]  s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // to and from the transmitter
  output cfg_t        cfg,
  output logic        start,
  input  logic        busy,
  input  logic        done,
  input  logic        unsupported,
  input  logic        overrun
);

  logic done_seen, unsup_seen;
  logic wr_go, rd_go;

  assign wr_go          = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_awready = wr_go;
  assign s_axil_wready  = wr_go;
  assign s_axil_bresp   = 2'b00;
  assign rd_go          = s_axil_arvalid && !s_axil_rvalid;
  assign s_axil_arready = rd_go;
  assign s_axil_rresp   = 2'b00;

  // Byte-lane merge of a write into a register's old value.
  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] be);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = be[b] ? d[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  // Current value of a register, as read back (CTRL reads its status).
  function automatic logic [31:0] regval(logic [5:0] idx, cfg_t c, logic [3:0] status);
    case (idx)
      6'h00: return {28'd0, status};
      6'h01: return {29'd0, c.modu};
      6'h02: return {29'd0, c.n_layers};
      6'h03: return {29'd0, c.n_ports};
      6'h04: return {27'd0, c.tpmi};
      6'h05: return {16'd0, c.rnti};
      6'h06: return {22'd0, c.nid};
      6'h07: return {26'd0, c.nrapid};
      6'h08: return {31'd0, c.nrapid_en};
      6'h09: return {16'd0, c.beta};
      default: return 32'd0;
    endcase
  endfunction

  logic [3:0]  status;
  logic [31:0] wv;
  assign status = {overrun, unsup_seen, done_seen, busy};
  // CTRL bits are write-only pulses, so their write merges with zero.
  assign wv = merge((s_axil_awaddr[7:2] == 6'h00) ? 32'd0 : regval(s_axil_awaddr[7:2], cfg, status),
                    s_axil_wdata, s_axil_wstrb);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg           <= '0;
      cfg.modu      <= MOD_QPSK;
      cfg.n_layers  <= 3'd1;
      cfg.n_ports   <= 3'd1;
      cfg.beta      <= 16'd16384;
      start         <= 1'b0;
      done_seen     <= 1'b0;
      unsup_seen    <= 1'b0;
      s_axil_bvalid <= 1'b0;
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else begin
      start <= 1'b0;
      if (done)        done_seen  <= 1'b1;
      if (unsupported) unsup_seen <= 1'b1;
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;

      if (wr_go) begin
        s_axil_bvalid <= 1'b1;
        case (s_axil_awaddr[7:2])
          6'h00: begin
            if (wv[0]) begin
              start      <= 1'b1;
              done_seen  <= 1'b0;
              unsup_seen <= 1'b0;
            end
          end
          6'h01: cfg.modu <= mod_e'(wv[2:0]);
          6'h02: cfg.n_layers <= wv[2:0];
          6'h03: cfg.n_ports <= wv[2:0];
          6'h04: cfg.tpmi <= wv[4:0];
          6'h05: cfg.rnti <= wv[15:0];
          6'h06: cfg.nid <= wv[9:0];
          6'h07: cfg.nrapid <= wv[5:0];
          6'h08: cfg.nrapid_en <= wv[0];
          6'h09: cfg.beta <= wv[15:0];
          default: ;
        endcase
      end

      if (rd_go) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rdata  <= regval(s_axil_araddr[7:2], cfg, status);
      end
    end
  end

  // AXI rule: a response, once valid, stays valid until accepted.
  a_bvalid_held: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid)
    else $error("axil_regs: bvalid dropped");
  a_rvalid_held: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata))
    else $error("axil_regs: read response changed before it was taken");

endmodule
