// tb_bist_ctrl: self-check of the BIST controller on its own.
//
// The bench plays the address generator (a counter over N addresses that
// raises adone on the last one) and the MISR (it supplies sign_in). For
// each test it builds the expected control word of every clock from the
// documented schedule - INIT, N write clocks, LATCH, N read clocks, DRAIN,
// COMPARE, DONE - and compares all outputs every clock. It runs one test
// with matching signatures (ram_faulty must stay low) and one with a
// different signature at COMPARE (ram_faulty must rise), checks the cycle
// count 2N + 5 and that nothing is enabled in normal mode.
module tb_bist_ctrl;
  import bist_pkg::*;
  localparam int N = 8;
  logic clk = 0, reset, test, adone;
  logic [7:0] sign_in;
  logic addr_reset, addr_enable, wdg_reset, wdg_enable, wr, rd, select1;
  logic misr_reset, misr_enable, ram_faulty, test_done;
  bist_state_e state;
  int checks = 0, failures = 0;
  int cnt;

  bist_ctrl dut (.clk, .reset, .test, .adone, .sign_in,
                 .addr_reset, .addr_enable, .wdg_reset, .wdg_enable, .wr, .rd,
                 .select1, .misr_reset, .misr_enable, .ram_faulty, .test_done, .state);

  always #5 clk = ~clk;

  // address generator stand-in
  always_ff @(posedge clk) begin
    if (addr_reset)       cnt <= 0;
    else if (addr_enable) cnt <= (cnt + 1) % N;
  end
  assign adone = (cnt == N - 1);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {addr_reset, addr_enable, wdg_reset, wdg_enable, wr, rd, select1, misr_reset, misr_enable}
  function automatic logic [8:0] ctl();
    return {addr_reset, addr_enable, wdg_reset, wdg_enable, wr, rd, select1, misr_reset, misr_enable};
  endfunction

  task automatic expect_ctl(logic [8:0] exp, string what);
    checks++;
    if (ctl() !== exp) begin
      failures++;
      $display("FAIL %s: control %b expected %b", what, ctl(), exp);
    end
  endtask

  task automatic run_test(bit make_fault);
    int cycles;
    test = 1;
    // controller is in IDLE; it samples test at the next edge
    expect_ctl(9'b0, "idle before start");
    cycles = 0;
    @(posedge clk); #1; cycles++;
    expect_ctl(9'b1_0_1_0_0_0_0_1_0, "init");
    @(posedge clk); #1; cycles++;
    for (int i = 0; i < N; i++) begin
      expect_ctl(9'b0_1_0_1_1_0_0_0_1, "write");
      @(posedge clk); #1; cycles++;
    end
    expect_ctl(9'b1_0_0_0_0_0_0_1_0, "latch");
    @(posedge clk); #1; cycles++;
    for (int i = 0; i < N; i++) begin
      // misr_enable follows rd by one clock
      expect_ctl({5'b0_1_0_0_0, 1'b1, 1'b1, 1'b0, (i != 0)}, "read");
      @(posedge clk); #1; cycles++;
    end
    expect_ctl(9'b0_0_0_0_0_0_1_0_1, "drain");
    if (make_fault) sign_in = sign_in ^ 8'h40;
    @(posedge clk); #1; cycles++;
    expect_ctl(9'b0, "compare");
    checks++;
    if (test_done) begin failures++; $display("FAIL test_done early"); end
    @(posedge clk); #1; cycles++;
    checks++;
    if (!test_done || cycles != 2 * N + 5) begin
      failures++; $display("FAIL test_done=%0b after %0d clocks, expected %0d", test_done, cycles, 2 * N + 5);
    end
    checks++;
    if (ram_faulty !== make_fault) begin
      failures++; $display("FAIL ram_faulty=%0b expected %0b", ram_faulty, make_fault);
    end
    // result held while test stays high
    repeat (3) @(posedge clk); #1;
    checks++;
    if (!test_done || ram_faulty !== make_fault) begin failures++; $display("FAIL result not held"); end
    expect_ctl(9'b0, "done");
    test = 0;
    @(posedge clk); #1;
    checks++;
    if (test_done || state != ST_IDLE) begin failures++; $display("FAIL did not return to idle"); end
  endtask

  initial begin
    reset = 1; test = 0; sign_in = 8'hA5;
    repeat (2) @(posedge clk); #1;
    reset = 0;
    repeat (5) begin
      @(posedge clk); #1;
      expect_ctl(9'b0, "normal mode");
    end
    run_test(0);
    sign_in = 8'h3C;
    run_test(1);
    sign_in = 8'h11;
    run_test(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
