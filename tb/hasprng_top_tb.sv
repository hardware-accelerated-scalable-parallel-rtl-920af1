// hasprng_top_tb: end-to-end test of the verification platform at its full
// size (32K-word capture RAM), with the testbench in the role of the host
// processor and its software reference generators.
//
// For each of the five generators in turn the testbench selects it, writes
// its stream constants and seeds, starts the platform, and then for ITERS
// buffer fills waits for buf_ready_o, reads the whole capture RAM, XORs
// every word with the most significant 32 bits of its own reference number
// (a non-zero result is a failure), and pulses check_done_i. After the last
// fill it aborts the run and moves to the next generator. It checks the
// generation rate of each fill (one number per clock for the LCGs and the
// MLFG, one every other clock for the CMRG and PMLCG), that the generator
// is stopped while the buffer waits, and that the stream continues across
// each pause. Each mechanism (fill/stop, resume, abort, generator switch)
// is counted and must occur.
module hasprng_top_tb;
  import hasprng_pkg::*;
  import hasprng_host_pkg::*;

  localparam int unsigned DEPTH = 32768;
  localparam int unsigned AW    = 15;
  localparam int unsigned ITERS = 2;
  localparam int unsigned L     = 17;   // MLFG lags of the top's defaults
  localparam int unsigned K     = 5;

  logic            clk = 1'b0, rst_n = 1'b0;
  gen_cfg_t        cfg;
  gen_sel_e        gen_sel = GEN_LCG48, ld_gen = GEN_LCG48;
  logic            ld_valid = 1'b0, ld_sel = 1'b0;
  logic [63:0]     ld_data = '0;
  logic            start = 1'b0, abort = 1'b0, check_done = 1'b0;
  logic            buf_ready, gen_en;
  logic [31:0]     iter;
  logic [4:0]      gen_ready;
  logic [AW:0]     fill;
  logic            rd_en = 1'b0;
  logic [AW-1:0]   rd_addr = '0;
  logic [31:0]     rd_data;

  int checks = 0, failures = 0;
  int n_pause = 0, n_resume = 0, n_abort = 0, n_switch = 0;
  int n_gen [5];

  always #5 clk = ~clk;

  hasprng_top dut (
    .clk, .rst_n, .cfg_i(cfg), .gen_sel_i(gen_sel), .ld_valid_i(ld_valid),
    .ld_gen_i(ld_gen), .ld_sel_i(ld_sel), .ld_data_i(ld_data),
    .start_i(start), .abort_i(abort), .check_done_i(check_done),
    .buf_ready_o(buf_ready), .iter_o(iter), .gen_en_o(gen_en),
    .gen_ready_o(gen_ready), .fill_o(fill), .rd_en_i(rd_en),
    .rd_addr_i(rd_addr), .rd_data_o(rd_data)
  );

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  host_model host = new(L, K);

  task automatic load_word(gen_sel_e g, bit sel, logic [63:0] d);
    ld_valid = 1'b1; ld_gen = g; ld_sel = sel; ld_data = d;
    @(negedge clk);
    ld_valid = 1'b0;
  endtask

  // Host seeding: stream constants and initial states.
  task automatic seed(gen_sel_e g);
    load_t loads[$];
    host.new_stream(g, cfg, loads);
    foreach (loads[i]) load_word(g, loads[i].sel, loads[i].data);
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("fail: %s", what); end
  endtask

  // Host check of one full buffer: read all words and XOR with the reference.
  task automatic check_buffer(gen_sel_e g);
    int bad;
    bad = 0;
    rd_en = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      logic [31:0] r;
      rd_addr = AW'(i);
      @(negedge clk);
      r = host.next(g) ^ rd_data;
      checks++;
      if (r != 0) begin
        bad++; failures++;
        if (bad < 3) $display("gen %0d word %0d xor %h", g, i, r);
      end
      chk(!gen_en, "generator stopped while the buffer is checked");
    end
    rd_en = 1'b0;
    if (bad > 0) $display("gen %0d: %0d of %0d words differ", g, bad, DEPTH);
  endtask

  initial begin
    static gen_sel_e order [5] = '{GEN_LCG48, GEN_LCG64, GEN_CMRG, GEN_MLFG, GEN_PMLCG};
    cfg = '0;
    foreach (n_gen[i]) n_gen[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    foreach (order[oi]) begin
      gen_sel_e g;
      int rate;
      g = order[oi];
      if (gen_sel != g) n_switch++;
      gen_sel = g;
      seed(g);
      chk(gen_ready[g], "generator seeded");
      rate = (g == GEN_CMRG || g == GEN_PMLCG) ? 2 : 1;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int it = 0; it < ITERS; it++) begin
        int cyc;
        cyc = 1;
        while (!buf_ready) begin @(negedge clk); cyc++; end
        n_pause++;
        // Fill time: DEPTH numbers at the generator's rate, plus the MLFG's
        // two-clock pipeline fill on its first buffer, plus two clocks for
        // the start (or resume) and the stop to register.
        chk(cyc == rate * DEPTH + ((g == GEN_MLFG && it == 0) ? 2 : 0) + 2,
            $sformatf("gen %0d fill took %0d clocks", g, cyc));
        chk(fill == (AW+1)'(DEPTH), "buffer full");
        check_buffer(g);
        check_done = 1'b1;
        @(negedge clk);
        check_done = 1'b0;
        n_resume++;
        chk(iter == 32'(it + 1), "iteration counted");
      end
      while (!buf_ready) @(negedge clk);   // let the next fill complete
      abort = 1'b1;
      @(negedge clk);
      abort = 1'b0;
      n_abort++;
      chk(!gen_en && !buf_ready, "idle after abort");
      n_gen[g]++;
    end
    $display("pauses=%0d resumes=%0d aborts=%0d switches=%0d", n_pause, n_resume, n_abort, n_switch);
    chk(n_pause > 0, "a full buffer stopped the generator");
    chk(n_resume > 0, "a checked buffer resumed the generator");
    chk(n_abort > 0, "a run was aborted");
    chk(n_switch > 0, "the generator under test was switched");
    foreach (n_gen[i]) chk(n_gen[i] > 0, $sformatf("generator %0d tested", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
