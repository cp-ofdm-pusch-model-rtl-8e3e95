// tb_pusch_axil_regs: checks the register file over AXI4-Lite: reset
// values, write and read-back of every register, byte strobes, the
// one-clock start pulse, the sticky status bits in CTRL, unmapped
// addresses, and responses held while bready/rready are low.
module tb_pusch_axil_regs;
  import pusch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0]  s_axil_awaddr = 0, s_axil_araddr = 0;
  logic        s_axil_awvalid = 0, s_axil_wvalid = 0, s_axil_bready = 0, s_axil_arvalid = 0, s_axil_rready = 0;
  logic [31:0] s_axil_wdata = 0;
  logic [3:0]  s_axil_wstrb = 4'hf;
  logic        s_axil_awready, s_axil_wready, s_axil_bvalid, s_axil_arready, s_axil_rvalid;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic [31:0] s_axil_rdata;
  cfg_t        cfg;
  logic        start, busy = 0, done = 0, unsupported = 0, overrun = 0;
  int checks = 0, failures = 0, nstart = 0;

  pusch_axil_regs dut (.*);

  always @(posedge clk) if (start) nstart++;

  task automatic wr(logic [7:0] a, logic [31:0] d, logic [3:0] be = 4'hf, int bdelay = 0);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_awvalid = 1; s_axil_wdata = d; s_axil_wstrb = be; s_axil_wvalid = 1;
    @(posedge clk);
    while (!(s_axil_awready && s_axil_wready)) @(posedge clk);
    @(negedge clk);
    s_axil_awvalid = 0; s_axil_wvalid = 0;
    repeat (bdelay) begin
      checks++;
      if (!s_axil_bvalid) begin failures++; $display("bvalid dropped"); end
      @(negedge clk);
    end
    s_axil_bready = 1;
    while (!s_axil_bvalid) @(negedge clk);
    checks++;
    if (s_axil_bresp != 2'b00) failures++;
    @(negedge clk);
    s_axil_bready = 0;
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d, input int rdelay = 0);
    @(negedge clk);
    s_axil_araddr = a; s_axil_arvalid = 1;
    @(posedge clk);
    while (!s_axil_arready) @(posedge clk);
    @(negedge clk);
    s_axil_arvalid = 0;
    repeat (rdelay) @(negedge clk);
    s_axil_rready = 1;
    while (!s_axil_rvalid) @(negedge clk);
    d = s_axil_rdata;
    @(negedge clk);
    s_axil_rready = 0;
  endtask

  task automatic expect_rd(logic [7:0] a, logic [31:0] e, int rdelay = 0);
    logic [31:0] d;
    rd(a, d, rdelay);
    checks++;
    if (d !== e) begin failures++; $display("read %h got %h exp %h", a, d, e); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    expect_rd(8'h04, 32'd1);
    expect_rd(8'h08, 32'd1);
    expect_rd(8'h0c, 32'd1);
    expect_rd(8'h24, 32'd16384);
    wr(8'h04, 32'd4);
    wr(8'h08, 32'd3, 4'hf, 3);
    wr(8'h0c, 32'd4);
    wr(8'h10, 32'd27);
    wr(8'h14, 32'hbeef);
    wr(8'h18, 32'd1007);
    wr(8'h1c, 32'd45);
    wr(8'h20, 32'd1);
    wr(8'h24, 32'h1234);
    wr(8'h24, 32'h5600, 4'b0010);       // upper byte only
    wr(8'h40, 32'hffffffff);            // unmapped
    expect_rd(8'h04, 32'd4, 2);
    expect_rd(8'h08, 32'd3);
    expect_rd(8'h0c, 32'd4);
    expect_rd(8'h10, 32'd27);
    expect_rd(8'h14, 32'hbeef);
    expect_rd(8'h18, 32'd1007);
    expect_rd(8'h1c, 32'd45);
    expect_rd(8'h20, 32'd1);
    expect_rd(8'h24, 32'h5634);
    expect_rd(8'h40, 32'd0);
    checks++;
    if (cfg.modu != MOD_256QAM || cfg.n_layers != 3 || cfg.n_ports != 4 || cfg.tpmi != 27 ||
        cfg.rnti != 16'hbeef || cfg.nid != 1007 || cfg.nrapid != 45 || !cfg.nrapid_en || cfg.beta != 16'h5634) begin
      failures++; $display("cfg output wrong: %p", cfg);
    end
    checks++;
    if (nstart != 0) begin failures++; $display("spurious start"); end
    wr(8'h00, 32'd1);
    repeat (2) @(negedge clk);
    checks++;
    if (nstart != 1) begin failures++; $display("start pulses %0d", nstart); end
    busy = 1; unsupported = 1; @(negedge clk); unsupported = 0;
    expect_rd(8'h00, 32'b0101);
    busy = 0; done = 1; overrun = 1; @(negedge clk); done = 0;
    expect_rd(8'h00, 32'b1110);
    overrun = 0;
    wr(8'h00, 32'd1);                   // new start clears the sticky bits
    expect_rd(8'h00, 32'b0000);
    checks++;
    if (nstart != 2) begin failures++; $display("start pulses %0d", nstart); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
