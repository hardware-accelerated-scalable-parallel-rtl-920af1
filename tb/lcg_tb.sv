// lcg_tb: self-checking testbench of the look-ahead LCG, at W = 48 and
// W = 64 side by side.
//
// For each width the testbench picks a random multiplier, odd addend and
// seed, computes the sequence Z(n) = a*Z(n-1) + p mod 2^W one step at a
// time, derives the look-ahead constants a^8 and p*(a^7+...+1) the way the
// seeding host would, loads Z(0)..Z(7) and compares every number the
// generator emits against Z(8), Z(9), ... Phase 1 keeps en_i high and checks
// one number per clock and the one-clock start after the last load; phase 2
// toggles en_i at random to check that stalls lose and repeat nothing;
// phase 3 reseeds mid-stream.
module lcg_tb;
  localparam int unsigned N1 = 200;  // numbers at full rate
  localparam int unsigned N2 = 300;  // numbers with random stalls

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   done = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gi = 0; gi < 2; gi++) begin : g_w
    localparam int unsigned W = (gi == 0) ? 48 : 64;
    localparam longint unsigned MASK = (W == 64) ? 64'hFFFF_FFFF_FFFF_FFFF
                                                 : ((64'd1 << W) - 1);
    logic [W-1:0] a8, p8, ld_data, rn;
    logic         ld_valid = 1'b0, en = 1'b0, rn_valid, ready;

    lcg #(.W(W)) dut (
      .clk, .rst_n, .a8_i(a8), .p8_i(p8), .ld_valid_i(ld_valid),
      .ld_data_i(ld_data), .en_i(en), .rn_o(rn), .rn_valid_o(rn_valid),
      .ready_o(ready)
    );

    longint unsigned a, p, z;

    function automatic longint unsigned step(longint unsigned x);
      return (a * x + p) & MASK;
    endfunction

    task automatic seed_and_load();
      longint unsigned ap, ps;
      a  = {$urandom, $urandom} & MASK;
      p  = ({$urandom, $urandom} | 64'd1) & MASK;
      z  = {$urandom, $urandom} & MASK;
      ap = 1; ps = 0;
      for (int i = 0; i < 8; i++) begin
        ps = (ps + ap) & MASK;
        ap = (ap * a) & MASK;
      end
      a8 = W'(ap);
      p8 = W'((p * ps) & MASK);
      for (int i = 0; i < 8; i++) begin
        @(negedge clk);
        ld_valid = 1'b1; ld_data = W'(z); en = 1'b1;
        z = step(z);            // after the loop z = Z(8)
      end
      @(negedge clk);
      ld_valid = 1'b0; en = 1'b0;
    endtask

    initial begin
      int got, cyc;
      @(posedge rst_n);
      repeat (2) @(negedge clk);
      seed_and_load();
      // Phase 1: full rate, one number per clock from the first clock.
      checks++;
      if (!ready) begin failures++; $display("W=%0d not ready after 8 loads", W); end
      en = 1'b1; got = 0; cyc = 0;
      while (got < N1) begin
        #1;
        cyc++;
        if (rn_valid) begin
          checks++;
          if (rn !== W'(z)) begin
            failures++;
            if (failures < 10) $display("W=%0d n=%0d got %h exp %h", W, got, rn, z);
          end
          z = step(z); got++;
        end
        @(negedge clk);
      end
      checks++;
      if (cyc != N1) begin failures++; $display("W=%0d rate: %0d clocks for %0d", W, cyc, N1); end
      // Phase 2: random stalls.
      got = 0;
      while (got < N2) begin
        en = ($urandom_range(0, 2) != 0);
        #1;
        if (rn_valid) begin
          checks++;
          if (rn !== W'(z)) begin
            failures++;
            if (failures < 10) $display("W=%0d stall n=%0d got %h exp %h", W, got, rn, z);
          end
          z = step(z); got++;
        end
        if (rn_valid !== (en & ready)) begin checks++; failures++; end
        @(negedge clk);
      end
      // Phase 3: reseed with a new stream.
      en = 1'b0;
      seed_and_load();
      en = 1'b1; got = 0;
      while (got < 50) begin
        #1;
        if (rn_valid) begin
          checks++;
          if (rn !== W'(z)) failures++;
          z = step(z); got++;
        end
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
