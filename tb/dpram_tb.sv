// dpram_tb: self-checking testbench of the simple dual-port RAM.
//
// A 64 x 16 RAM is written at random and read at random in the same clocks;
// a shadow array predicts every read, including reads of the address being
// written (old data) and reads with re_i low (output held).
module dpram_tb;
  localparam int unsigned DW = 16;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned AW = 6;

  logic          clk = 1'b0;
  logic          we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] shadow [DEPTH];
  logic [DW-1:0] exp_q;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  dpram #(.DW(DW), .DEPTH(DEPTH)) dut (
    .clk, .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .re_i(re),
    .raddr_i(raddr), .rdata_o(rdata)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int same = 0;
    // Fill every word first.
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = DW'($urandom); shadow[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    re = 1'b1; raddr = '0;
    @(negedge clk);
    exp_q = shadow[0];
    for (int i = 0; i < 1000; i++) begin
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        if (failures < 10) $display("i=%0d got %h exp %h", i, rdata, exp_q);
      end
      we = $urandom_range(0, 1) == 1; waddr = AW'($urandom);
      wdata = DW'($urandom);
      re = $urandom_range(0, 3) != 0;
      raddr = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom);
      if (we && re && raddr == waddr) same++;
      if (re) exp_q = shadow[raddr];
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
    end
    checks++;
    if (same == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
