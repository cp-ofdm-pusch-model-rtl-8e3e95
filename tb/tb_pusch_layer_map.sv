// tb_pusch_layer_map: sends random symbols for 1, 2, 3 and 4 layers and
// checks that each output vector holds the next N_l symbols in order, with
// the unused layers zero, and that load discards a partial vector.
module tb_pusch_layer_map;
  import pusch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] n_layers = 1;
  logic load = 0, valid_in = 0;
  cplx16_t sym_in = '0;
  logic valid_out;
  cplx16_t layers_out [MAXL];
  int checks = 0, failures = 0;

  pusch_layer_map dut (.*);

  cplx16_t q [$];
  int nvec = 0;

  always @(posedge clk) begin
    if (valid_out) begin
      nvec++;
      for (int l = 0; l < MAXL; l++) begin
        cplx16_t e;
        e = (l < int'(n_layers)) ? q.pop_front() : '0;
        checks++;
        if (layers_out[l] !== e) begin
          failures++;
          if (failures < 10) $display("layer %0d got %h exp %h", l, layers_out[l], e);
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int nl = 1; nl <= 4; nl++) begin
      @(negedge clk); n_layers = 3'(nl); load = 1; @(negedge clk); load = 0;
      for (int i = 0; i < 40 * nl; i++) begin
        sym_in = cplx16_t'($urandom);
        q.push_back(sym_in);
        valid_in = 1;
        @(negedge clk);
        valid_in = 0;
        if ($urandom % 2 == 1) @(negedge clk);
      end
      repeat (3) @(negedge clk);
      checks++;
      if (q.size() != 0) begin failures++; $display("%0d symbols left over", q.size()); end
    end
    // partial vector, then load: the next vector must start afresh
    n_layers = 3;
    sym_in = cplx16_t'(32'h11112222); valid_in = 1; @(negedge clk); valid_in = 0;
    load = 1; @(negedge clk); load = 0;
    for (int i = 0; i < 3; i++) begin
      sym_in = cplx16_t'($urandom); q.push_back(sym_in); valid_in = 1; @(negedge clk);
    end
    valid_in = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (nvec != 40 * 4 + 1) begin failures++; $display("vectors %0d", nvec); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
