// tb_addr_gen: self-check of the address generator.
//
// Counts through all 256 addresses, comparing the address with a counter
// kept in the bench and adone with "address is 255"; checks the wrap to 0,
// holding with en low and clr priority.
module tb_addr_gen;
  localparam int AW = 8;
  logic clk = 0, clr, en;
  logic [AW-1:0] address;
  logic adone;
  int checks = 0, failures = 0;
  int exp_addr;
  int adone_count;

  addr_gen dut (.clk, .clr, .en, .address, .adone);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int exp);
    checks++;
    if (address !== AW'(exp) || adone !== (exp == 255)) begin
      failures++;
      $display("FAIL addr %0d adone %0b expected %0d", address, adone, exp);
    end
  endtask

  initial begin
    clr = 1; en = 1;
    @(posedge clk); #1;
    check(0);
    clr = 0;
    exp_addr = 0;
    adone_count = 0;
    for (int k = 0; k < 600; k++) begin
      if (adone) adone_count++;
      @(posedge clk); #1;
      exp_addr = (exp_addr + 1) % 256;
      check(exp_addr);
    end
    checks++;
    if (adone_count != 2) begin failures++; $display("FAIL adone seen %0d times", adone_count); end
    en = 0;
    repeat (4) @(posedge clk); #1;
    check(exp_addr);
    en = 1; clr = 1;
    @(posedge clk); #1;
    check(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
