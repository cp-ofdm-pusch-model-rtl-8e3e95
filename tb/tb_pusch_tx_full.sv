// tb_pusch_tx_full: complete subframes (48 OFDM symbols each) through the
// transmitter at its default size, every output sample checked against the
// floating-point reference by pusch_tx_driver. Two subframes run back to
// back: 64QAM on four layers and four antenna ports with the non-coherent
// identity matrix, then 256QAM on four layers with a fully coherent matrix
// (TPMI 3), whose 202,752-bit codeword fills the codeword store exactly.
// The clock period is 4 time units; the checks count clocks, not time.
module tb_pusch_tx_full;
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

  pusch_tx_top dut (.*);

  pusch_tx_driver #(.NSYM(48), .FULL(1'b1)) drv (.*, .ip_valid(dut.ip_valid));
endmodule
