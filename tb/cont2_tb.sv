// cont2_tb: self-checking testbench of the master controller.
//
// The testbench plays both the local controller (full_i) and the processor
// (start_i, check_done_i, abort_i) and checks the enable, clear, buffer
// ready and iteration outputs through start, several full/check cycles
// with random delays, and an abort.
module cont2_tb;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0, abort = 1'b0, full = 1'b0, check_done = 1'b0;
  logic        gen_en, clear, buf_ready;
  logic [31:0] iter;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  cont2 #(.ITW(32)) dut (
    .clk, .rst_n, .start_i(start), .abort_i(abort), .full_i(full),
    .check_done_i(check_done), .gen_en_o(gen_en), .clear_o(clear),
    .buf_ready_o(buf_ready), .iter_o(iter)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("fail: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!gen_en && !buf_ready, "idle after reset");
    start = 1'b1; #1;
    chk(clear, "start clears the buffer counter");
    @(negedge clk);
    start = 1'b0;
    for (int it = 0; it < 4; it++) begin
      repeat ($urandom_range(1, 10)) begin
        #1 chk(gen_en && !buf_ready, "running");
        @(negedge clk);
      end
      full = 1'b1; #1;
      chk(!gen_en, "stopped in the clock full rises");
      @(negedge clk);
      repeat ($urandom_range(1, 10)) begin
        #1 chk(!gen_en && buf_ready && !clear, "paused");
        @(negedge clk);
      end
      check_done = 1'b1; #1;
      chk(clear, "clear on check done");
      @(negedge clk);
      check_done = 1'b0; full = 1'b0; #1;
      chk(gen_en && iter == 32'(it + 1), "resumed and counted");
      @(negedge clk);
    end
    abort = 1'b1;
    @(negedge clk);
    abort = 1'b0; #1;
    chk(!gen_en && !buf_ready, "idle after abort");
    repeat (3) @(negedge clk);
    chk(!gen_en, "stays idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
