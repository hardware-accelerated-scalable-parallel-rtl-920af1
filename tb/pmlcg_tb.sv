// pmlcg_tb: self-checking testbench of the prime modulus LCG.
//
// The reference computes Z(n) = a*Z(n-1)*2^32 mod (2^61-1) with 128-bit
// multiplication and the % operator. It loads a random state, checks that
// numbers follow at one every other clock, then stalls at random, and
// finally reseeds with operands close to the modulus.
module pmlcg_tb;
  localparam logic [127:0] M = (128'd1 << 61) - 1;
  localparam int unsigned N1 = 200;
  localparam int unsigned N2 = 200;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [60:0] a, ld_data, rn;
  logic        ld_valid = 1'b0, en = 1'b0, rn_valid, ready;
  int          checks = 0, failures = 0;
  logic [127:0] z;

  always #5 clk = ~clk;

  pmlcg dut (
    .clk, .rst_n, .a_i(a), .ld_valid_i(ld_valid), .ld_data_i(ld_data),
    .en_i(en), .rn_o(rn), .rn_valid_o(rn_valid), .ready_o(ready)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int n);
    z = ((((128'(a) * z) % M) << 32) % M);
    checks++;
    if (128'(rn) !== z) begin
      failures++;
      if (failures < 10) $display("n=%0d got %h exp %h", n, rn, z);
    end
  endtask

  task automatic load(input logic [60:0] s);
    @(negedge clk);
    ld_valid = 1'b1; ld_data = s; z = 128'(s);
    @(negedge clk);
    ld_valid = 1'b0;
  endtask

  task automatic run(input int n, input bit stall, output int cyc);
    int got;
    got = 0; cyc = 0;
    while (got < n) begin
      en = stall ? ($urandom_range(0, 2) != 0) : 1'b1;
      #1;
      cyc++;
      if (rn_valid) begin check_one(got); got++; end
      @(negedge clk);
    end
    en = 1'b0;
  endtask

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    a = 61'({$urandom, $urandom}) % 61'(M);
    load(61'({$urandom, $urandom}) % 61'(M - 1) + 1);
    checks++;
    if (!ready) failures++;
    run(N1, 1'b0, cyc);
    checks++;
    if (cyc != 2 * N1) begin failures++; $display("rate: %0d clocks for %0d", cyc, N1); end
    run(N2, 1'b1, cyc);
    a = 61'(M - 2);
    load(61'(M - 1));
    run(50, 1'b0, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
