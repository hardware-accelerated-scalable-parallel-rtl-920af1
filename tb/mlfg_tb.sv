// mlfg_tb: self-checking testbench of the multiplicative lagged Fibonacci
// generator, at the lag pair (17, 5) and at (7, 3), the shortest short lag
// the write-back pipeline allows.
//
// The reference keeps the whole sequence in a queue and computes
// Z(n) = Z(n-k)*Z(n-l) mod 2^64 directly. Odd random initial values
// Z(0)..Z(l-1) are loaded; the generator's numbers are compared with
// Z(l), Z(l+1), ... Phase 1 keeps en_i high and checks one number per clock
// after the two-clock pipeline fill; phase 2 stalls at random.
module mlfg_tb;
  localparam int unsigned N1 = 300;
  localparam int unsigned N2 = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0, done = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gi = 0; gi < 2; gi++) begin : g_lag
    localparam int unsigned L = (gi == 0) ? 17 : 7;
    localparam int unsigned K = (gi == 0) ? 5 : 3;
    logic [63:0] ld_data, rn;
    logic        ld_valid = 1'b0, en = 1'b0, rn_valid, ready;
    longint unsigned zs[$];

    mlfg #(.W(64), .LAG_L(L), .LAG_K(K)) dut (
      .clk, .rst_n, .ld_valid_i(ld_valid), .ld_data_i(ld_data), .en_i(en),
      .rn_o(rn), .rn_valid_o(rn_valid), .ready_o(ready)
    );

    task automatic check_one(input int n);
      longint unsigned e;
      e = zs[zs.size() - K] * zs[zs.size() - L];
      zs.push_back(e);
      checks++;
      if (rn !== e) begin
        failures++;
        if (failures < 10) $display("L=%0d n=%0d got %h exp %h", L, n, rn, e);
      end
    endtask

    initial begin
      int got, cyc;
      @(posedge rst_n);
      @(negedge clk);
      for (int i = 0; i < L; i++) begin
        zs.push_back({$urandom, $urandom} | 64'd1);
        ld_valid = 1'b1; ld_data = zs[$];
        @(negedge clk);
      end
      ld_valid = 1'b0;
      checks++;
      if (!ready) failures++;
      en = 1'b1; got = 0; cyc = 0;
      while (got < N1) begin
        #1;
        cyc++;
        if (rn_valid) begin check_one(got); got++; end
        @(negedge clk);
      end
      checks++;
      if (cyc != N1 + 2) begin failures++; $display("L=%0d rate: %0d clocks for %0d", L, cyc, N1); end
      got = 0;
      while (got < N2) begin
        en = ($urandom_range(0, 2) != 0);
        #1;
        if (rn_valid) begin check_one(got); got++; end
        @(negedge clk);
      end
      en = 1'b0;
      done++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
