// tb_pusch_tx_top: end-to-end test of the transmitter with a two-symbol
// transmission, over eight configurations that between them use every
// modulation scheme, 1 to 4 layers, 1, 2 and 4 antenna ports, several
// TPMIs, msgA scrambling and one unsupported TPMI. The checking is done by
// pusch_tx_driver against its floating-point reference model.
module tb_pusch_tx_top;
  import pusch_pkg::*;
  logic clk = 0;
  always #2 clk = ~clk;
  logic rst_n, s_axis_tvalid, s_axis_tlast, s_axis_tready;
  logic [31:0] s_axis_tdata;
  logic [7:0]  s_axil_awaddr, s_axil_araddr;
  logic        s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready, s_axil_bvalid, s_axil_bready;
  logic        s_axil_arvalid, s_axil_arready, s_axil_rvalid, s_axil_rready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0]  s_axil_wstrb;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic [127:0] m_axis_tdata;
  logic m_axis_tvalid, busy, done, unsupported, overrun;

  pusch_tx_top #(.P_NSYM(2)) dut (.*);

  pusch_tx_driver #(.NSYM(2), .FULL(1'b0)) drv (.*, .ip_valid(dut.ip_valid));
endmodule
