// tb_pusch_scrambler: checks the scrambler against a direct evaluation of
// the Gold sequence recursions x1(n+31) = x1(n+3)+x1(n) and
// x2(n+31) = x2(n+3)+x2(n+2)+x2(n+1)+x2(n), c(n) = x1(n+1600)+x2(n+1600),
// for both forms of c_init and random group sizes of 1 to 8 bits. Also
// checks that the warm-up takes 100 clocks.
module tb_pusch_scrambler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load = 0, valid_in = 0, nrapid_en = 0;
  logic [15:0] rnti = 0;
  logic [9:0] nid = 0;
  logic [5:0] nrapid = 0;
  logic [3:0] nbits = 1;
  logic [7:0] data_in = 0;
  logic ready, valid_out;
  logic [7:0] data_out;

  int checks = 0, failures = 0;

  pusch_scrambler dut (.*);

  localparam int M = 2000;
  bit c_ref [M];

  task automatic gen_ref(int unsigned cinit);
    bit x1 [1600 + M + 31];
    bit x2 [1600 + M + 31];
    for (int i = 0; i < 31; i++) begin
      x1[i] = (i == 0);
      x2[i] = cinit[i];
    end
    for (int n = 0; n < 1600 + M; n++) begin
      x1[n+31] = x1[n+3] ^ x1[n];
      x2[n+31] = x2[n+3] ^ x2[n+2] ^ x2[n+1] ^ x2[n];
    end
    for (int n = 0; n < M; n++) c_ref[n] = x1[n+1600] ^ x2[n+1600];
  endtask

  task automatic run(input logic [15:0] r, input logic [9:0] id, input logic [5:0] ra, input logic en);
    int unsigned cinit;
    int pos, cyc, nb;
    logic [7:0] d, exp_d;
    cinit = en ? ((int'(r) << 16) + (int'(ra) << 10) + int'(id)) & 32'h7fffffff
               : ((int'(r) << 15) + int'(id)) & 32'h7fffffff;
    gen_ref(cinit);
    @(negedge clk);
    rnti = r; nid = id; nrapid = ra; nrapid_en = en; load = 1;
    @(negedge clk);
    load = 0;
    cyc = 0;
    while (!ready) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc < 99 || cyc > 102) begin failures++; $display("warm-up took %0d clocks", cyc); end
    pos = 0;
    while (pos + 8 < M) begin
      nb = 1 + ($urandom % 8);
      d = 8'($urandom);
      nbits = 4'(nb); data_in = d; valid_in = 1;
      @(negedge clk);
      valid_in = 0;
      checks++;
      exp_d = 0;
      for (int i = 0; i < nb; i++) exp_d[i] = d[i] ^ c_ref[pos + i];
      if (!valid_out || data_out !== exp_d) begin
        failures++;
        if (failures < 10) $display("pos %0d nb %0d got %h exp %h", pos, nb, data_out, exp_d);
      end
      pos += nb;
      if ($urandom % 3 == 0) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(16'h1234, 10'd321, 6'd0, 1'b0);
    run(16'hffff, 10'd1007, 6'd17, 1'b1);
    run(16'h0001, 10'd0, 6'd63, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
