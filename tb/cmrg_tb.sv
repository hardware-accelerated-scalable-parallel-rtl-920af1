// cmrg_tb: self-checking testbench of the combined multiple recursive
// generator.
//
// The reference computes X(n) = a*X(n-1) + p mod 2^64 and
// Y(n) = 107374182*Y(n-1) + 104480*Y(n-5) mod (2^31-1) with the % operator,
// and Z(n) = X(n) + Y(n)*2^32 mod 2^64. The testbench seeds X(0)..X(7)
// and Y(3)..Y(7), then checks Z(8), Z(9), ... Phase 1 keeps en_i high and
// checks the rate of one number every other clock; phase 2 stalls at random.
module cmrg_tb;
  localparam longint unsigned M31 = 64'h7FFF_FFFF;
  localparam int unsigned N1 = 200;
  localparam int unsigned N2 = 200;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [63:0] a8, p8, ld_data, rn;
  logic        ld_valid = 1'b0, ld_sel = 1'b0, en = 1'b0, rn_valid, ready;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  cmrg dut (
    .clk, .rst_n, .a8_i(a8), .p8_i(p8), .ld_valid_i(ld_valid),
    .ld_sel_i(ld_sel), .ld_data_i(ld_data), .en_i(en), .rn_o(rn),
    .rn_valid_o(rn_valid), .ready_o(ready)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned a, p, x;
  longint unsigned y[$];

  function automatic longint unsigned next_z();
    longint unsigned yn;
    x  = a * x + p;
    yn = (64'd107374182 * y[$] + 64'd104480 * y[$-4]) % M31;
    y.push_back(yn);
    void'(y.pop_front());
    return x + (yn << 32);
  endfunction

  task automatic check_one(input int n);
    longint unsigned e;
    e = next_z();
    checks++;
    if (rn !== e) begin
      failures++;
      if (failures < 10) $display("n=%0d got %h exp %h", n, rn, e);
    end
  endtask

  initial begin
    longint unsigned ap, ps;
    int got, cyc;
    a = {$urandom, $urandom}; p = {$urandom, $urandom} | 64'd1;
    x = {$urandom, $urandom};
    ap = 1; ps = 0;
    for (int i = 0; i < 8; i++) begin ps += ap; ap *= a; end
    a8 = ap; p8 = p * ps;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Seed the LCG half with X(0)..X(7); x then holds X(7).
    for (int i = 0; i < 8; i++) begin
      if (i > 0) x = a * x + p;
      ld_valid = 1'b1; ld_sel = 1'b0; ld_data = x;
      @(negedge clk);
    end
    // Seed the lag half with Y(3)..Y(7).
    for (int i = 0; i < 5; i++) begin
      y.push_back(64'($urandom_range(1, 32'h7FFF_FFFE)));
      ld_valid = 1'b1; ld_sel = 1'b1; ld_data = y[$];
      @(negedge clk);
    end
    ld_valid = 1'b0;
    checks++;
    if (!ready) begin failures++; $display("not ready after seeding"); end
    // Phase 1: full rate.
    en = 1'b1; got = 0; cyc = 0;
    while (got < N1) begin
      #1;
      cyc++;
      if (rn_valid) begin check_one(got); got++; end
      @(negedge clk);
    end
    checks++;
    if (cyc != 2 * N1) begin
      failures++; $display("rate: %0d clocks for %0d numbers", cyc, N1);
    end
    // Phase 2: random stalls.
    got = 0;
    while (got < N2) begin
      en = ($urandom_range(0, 2) != 0);
      #1;
      if (rn_valid) begin check_one(got); got++; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
