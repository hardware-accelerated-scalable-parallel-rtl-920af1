// cont1_tb: self-checking testbench of the local controller.
//
// With a 16-word buffer, numbers arrive with random gaps. The testbench
// checks that every number is written at the next address with its data,
// that full_o rises exactly after the sixteenth write (and the source is
// then held off, as the master controller does), that it stays high, and
// that clear_i empties the buffer for the next iteration.
module cont1_tb;
  localparam int unsigned DW = 32;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned AW = 4;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          rn_valid = 1'b0, clear = 1'b0;
  logic [DW-1:0] rn_data = '0;
  logic          ram_we, full;
  logic [AW-1:0] ram_waddr;
  logic [DW-1:0] ram_wdata;
  logic [AW:0]   count;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  cont1 #(.DW(DW), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .rn_valid_i(rn_valid), .rn_data_i(rn_data),
    .clear_i(clear), .ram_we_o(ram_we), .ram_waddr_o(ram_waddr),
    .ram_wdata_o(ram_wdata), .full_o(full), .count_o(count)
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
    for (int it = 0; it < 3; it++) begin
      int n;
      n = 0;
      @(negedge clk);
      chk(!full && count == 0, "empty at start of iteration");
      while (!full) begin
        rn_valid = $urandom_range(0, 2) != 0;
        rn_data = $urandom;
        #1;
        if (rn_valid) begin
          chk(ram_we, "write enable");
          chk(ram_waddr == AW'(n), "write address");
          chk(ram_wdata == rn_data, "write data");
          n++;
        end else begin
          chk(!ram_we, "no write without a number");
        end
        @(negedge clk);
        rn_valid = 1'b0;
      end
      chk(n == DEPTH, $sformatf("full after DEPTH writes (n=%0d)", n));
      repeat (3) @(negedge clk);
      chk(full && !ram_we, "stays full");
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
