// tb_pusch_input_proc: streams a random codeword in, starts a (shortened)
// subframe and checks the pacing and the data: 'valid' exactly on the first
// N_l clocks of each of the first 132 slots of 16 clocks in every 320-slot
// symbol, B bits per valid taken in order from the codeword, 'load' once
// per start, and 'done' with the last clock of the last slot. Runs pi/2-BPSK with one
// layer and 256QAM with four layers.
module tb_pusch_input_proc;
  import pusch_pkg::*;
  localparam int NS = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] s_axis_tdata = 0;
  logic s_axis_tvalid = 0, s_axis_tlast = 0, s_axis_tready;
  logic start = 0, dn_ready = 0;
  cfg_t cfg_in = '0, cfg_out;
  logic load, valid, busy, done;
  logic [7:0] bits;
  int checks = 0, failures = 0;

  pusch_input_proc #(.P_NSYM(NS)) dut (.*);

  logic [31:0] cw [6336];

  task automatic run(mod_e m, int nl);
    int nb, nwords, pos, t, nvalid, nload, tdone;
    logic [7:0] e;
    nb = int'(bits_per_sym(m));
    nwords = (NS * 132 * nl * nb + 31) / 32 + 1;
    for (int i = 0; i < nwords; i++) begin
      @(negedge clk);
      cw[i] = $urandom;
      s_axis_tdata = cw[i]; s_axis_tvalid = 1; s_axis_tlast = (i == nwords - 1);
      if (!s_axis_tready) begin failures++; $display("not ready"); end
    end
    @(negedge clk);
    s_axis_tvalid = 0; s_axis_tlast = 0;
    cfg_in.modu = m; cfg_in.n_layers = 3'(nl); cfg_in.n_ports = 3'd4;
    start = 1; dn_ready = 0;
    @(negedge clk);
    start = 0;
    nload = 0;
    repeat (40) begin
      if (load) nload++;
      checks++;
      if (valid) begin failures++; $display("valid before ready"); end
      @(negedge clk);
    end
    dn_ready = 1;
    // wait for the first valid; slot timing is then measured from it
    t = 0;
    while (!valid && t < 10) begin @(negedge clk); t++; end
    pos = 0; nvalid = 0; tdone = -1;
    for (t = 0; t < NS * 320 * 16 + 20; t++) begin
      int slot, ph;
      bit expv;
      slot = (t / 16) % 320; ph = t % 16;
      expv = (t < NS * 320 * 16) && slot < 132 && ph < nl;
      checks++;
      if (valid != expv) begin
        failures++;
        if (failures < 10) $display("t %0d valid %b exp %b", t, valid, expv);
      end
      if (valid) begin
        e = 0;
        for (int i = 0; i < nb; i++) e[i] = cw[(pos + i) / 32][(pos + i) % 32];
        checks++;
        if (bits !== e) begin
          failures++;
          if (failures < 10) $display("pos %0d bits %h exp %h", pos, bits, e);
        end
        pos += nb; nvalid++;
      end
      if (done && tdone < 0) tdone = t;
      if (load) nload++;
      @(negedge clk);
    end
    checks += 3;
    if (nvalid != NS * 132 * nl) begin failures++; $display("valids %0d", nvalid); end
    if (nload != 1) begin failures++; $display("loads %0d", nload); end
    if (tdone != NS * 320 * 16 - 1) begin failures++; $display("done at %0d", tdone); end
    checks++;
    if (cfg_out.modu != m || busy) begin failures++; $display("cfg/busy"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(MOD_PI2BPSK, 1);
    run(MOD_256QAM, 4);
    run(MOD_16QAM, 3);
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
