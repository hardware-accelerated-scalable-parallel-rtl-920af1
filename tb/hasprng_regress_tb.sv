// hasprng_regress_tb: regression run of the verification platform at full
// size, in the way the platform is used: every generator is tested with
// several seeds, each seed for many consecutive 32K-number buffers.
//
// For each generator and each of SEEDS random streams the host model seeds
// the platform, starts it and checks FILLS buffers. Before acknowledging a
// buffer it waits a random number of clocks, during which the generator must
// stay stopped and the fill level must not move. Between streams the run is
// ended with abort_i, once in the middle of a fill, so that the next start
// must discard a half-filled buffer. Finally the host slips its reference by
// one number and checks that the XOR comparison reports the mismatch, as
// the host software would before breaking off the run. Each of these events
// is counted and must occur at least once.
module hasprng_regress_tb;
  import hasprng_pkg::*;
  import hasprng_host_pkg::*;

  localparam int unsigned DEPTH = 32768;
  localparam int unsigned AW    = 15;
  localparam int unsigned SEEDS = 3;
  localparam int unsigned FILLS = 16;
  localparam int unsigned L     = 17;
  localparam int unsigned K     = 5;

  logic          clk = 1'b0, rst_n = 1'b0;
  gen_cfg_t      cfg = '0;
  gen_sel_e      gen_sel = GEN_LCG48, ld_gen = GEN_LCG48;
  logic          ld_valid = 1'b0, ld_sel = 1'b0;
  logic [63:0]   ld_data = '0;
  logic          start = 1'b0, abort = 1'b0, check_done = 1'b0;
  logic          buf_ready, gen_en;
  logic [31:0]   iter;
  logic [4:0]    gen_ready;
  logic [AW:0]   fill;
  logic          rd_en = 1'b0;
  logic [AW-1:0] rd_addr = '0;
  logic [31:0]   rd_data;

  int checks = 0, failures = 0;
  int n_fill = 0, n_wait = 0, n_abort_mid = 0, n_mismatch_caught = 0;
  longint n_numbers = 0;

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
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  host_model host = new(L, K);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("fail: %s", what); end
  endtask

  task automatic seed(gen_sel_e g);
    load_t loads[$];
    host.new_stream(g, cfg, loads);
    foreach (loads[i]) begin
      ld_valid = 1'b1; ld_gen = g; ld_sel = loads[i].sel; ld_data = loads[i].data;
      @(negedge clk);
    end
    ld_valid = 1'b0;
  endtask

  task automatic pulse(ref logic s);
    s = 1'b1;
    @(negedge clk);
    s = 1'b0;
  endtask

  // Read the whole buffer and XOR it with the reference; returns the number
  // of differing words.
  task automatic check_buffer(gen_sel_e g, output int bad);
    bad = 0;
    rd_en = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      rd_addr = AW'(i);
      @(negedge clk);
      if ((host.next(g) ^ rd_data) != 0) bad++;
    end
    rd_en = 1'b0;
  endtask

  initial begin
    static gen_sel_e order [5] = '{GEN_LCG48, GEN_LCG64, GEN_CMRG, GEN_MLFG, GEN_PMLCG};
    int bad;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    foreach (order[oi]) begin
      gen_sel_e g;
      g = order[oi];
      gen_sel = g;
      for (int s = 0; s < SEEDS; s++) begin
        seed(g);
        chk(gen_ready[g], "generator seeded");
        pulse(start);
        for (int f = 0; f < FILLS; f++) begin
          int w;
          logic [AW:0] lvl;
          while (!buf_ready) @(negedge clk);
          n_fill++;
          check_buffer(g, bad);
          checks += DEPTH;
          if (bad != 0) begin
            failures += bad;
            $display("gen %0d seed %0d fill %0d: %0d words differ", g, s, f, bad);
          end
          n_numbers += 64'(DEPTH);
          // Host think time: the generator must stay stopped.
          w = $urandom_range(1, 50);
          lvl = fill;
          repeat (w) begin
            chk(!gen_en && buf_ready && fill == lvl, "held while paused");
            @(negedge clk);
          end
          n_wait++;
          pulse(check_done);
        end
        // End the stream; the second stream is ended in mid-fill.
        if (s == 1) begin
          repeat (DEPTH / 3) @(negedge clk);
          chk(!buf_ready && fill != 0, "mid-fill");
          n_abort_mid++;
        end
        pulse(abort);
        chk(!gen_en, "stopped by abort");
      end
    end
    // Injected mismatch: the host reference slips by one number.
    gen_sel = GEN_LCG64;
    seed(GEN_LCG64);
    pulse(start);
    while (!buf_ready) @(negedge clk);
    void'(host.next(GEN_LCG64));
    check_buffer(GEN_LCG64, bad);
    chk(bad > 0, "XOR check reports a slipped reference");
    if (bad > 0) n_mismatch_caught++;
    pulse(abort);

    $display("fills=%0d numbers=%0d waits=%0d mid-fill aborts=%0d mismatches caught=%0d",
             n_fill, n_numbers, n_wait, n_abort_mid, n_mismatch_caught);
    chk(n_fill == 5 * SEEDS * FILLS, "all buffers filled");
    chk(n_wait > 0, "host think time exercised");
    chk(n_abort_mid > 0, "abort in mid-fill exercised");
    chk(n_mismatch_caught > 0, "mismatch detection exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
