// tb_bist_top_small: the end-to-end test of tb_bist_top on a 4-word x
// 4-bit RAM with an 8-bit signature, the size of the source's module
// simulations (pattern polynomial x^4 + x + 1, 4'h3), so that the data words
// are narrower than the signature register.
//
// Sequence:
//   1. normal mode: the system port writes random data to every address
//      and reads it back;
//   2. self-test of a good RAM, while the system port keeps issuing
//      writes that the collar must ignore: test_done must come on the
//      517th edge, ram_faulty must be low, and the signature must equal
//      the one a bench model computes from the pattern sequence;
//   3. back in normal mode, the RAM must hold the generated patterns;
//   4. two self-tests with a fault put into the RAM array from the bench
//      (one word upset after it was written, one bit flipped before it is
//      read): ram_faulty must rise each time;
//   5. one more test of the now good RAM passes again.
// Each mechanism (normal access, ignored system write during test, pass,
// fault detected, return to normal mode) is counted, and one that never
// happened counts as a failure.
module tb_bist_top_small;
  import bist_pkg::*;
  localparam int AW = 2, DW = 4, SW = 8, N = 2 ** AW;
  localparam logic [DW-1:0] WTAPS = 4'h3;
  localparam logic [SW-1:0] MTAPS = 8'h8D;

  logic clk = 0, reset, test;
  logic sys_we, sys_rd;
  logic [AW-1:0] sys_addr;
  logic [DW-1:0] sys_wdata, sys_rdata;
  logic test_done, ram_faulty;
  logic [SW-1:0] signature;
  bist_state_e bist_state;

  int checks = 0, failures = 0;
  int n_normal = 0, n_ignored = 0, n_pass = 0, n_detect = 0, n_back = 0;

  bist_top #(.ADDR_W(AW), .DATA_W(DW), .SIG_W(SW), .WDG_TAPS(WTAPS),
             .WDG_SEED(4'h1), .MISR_TAPS(MTAPS)) dut (.clk, .reset, .test, .sys_we, .sys_rd, .sys_addr, .sys_wdata,
                .sys_rdata, .test_done, .ram_faulty, .signature, .bist_state);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- bench models ----------------------------------------------------
  // Steps written as right shifts XORing the reversed polynomial when the
  // bit shifted out is 1: 4'hC for x^4 + x + 1 (patterns), 8'hB1 for
  // x^8 + x^7 + x^3 + x^2 + 1 (signature). Words enter the signature's
  // upper bits.
  function automatic logic [DW-1:0] pat_step(logic [DW-1:0] s);
    return (s >> 1) ^ (s[0] ? 4'hC : 4'h0);
  endfunction
  function automatic logic [SW-1:0] sig_step(logic [SW-1:0] s);
    return (s >> 1) ^ (s[0] ? 8'hB1 : 8'h00);
  endfunction

  logic [DW-1:0] pattern [N];
  logic [SW-1:0] good_sig;

  function automatic void build_model();
    logic [DW-1:0] s;
    s = 4'h1;
    good_sig = '0;
    for (int i = 0; i < N; i++) begin
      pattern[i] = s;
      good_sig = sig_step(good_sig) ^ {s, 4'h0};   // MISR step with input word
      s = pat_step(s);
    end
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- one self-test ------------------------------------------------------
  // fault_kind: 0 none, 1 upset a written word during the write pass,
  //             2 flip one bit of an unread word during the read pass
  task automatic self_test(int fault_kind);
    int cycles;
    test = 1;
    cycles = 0;
    while (!test_done) begin
      // system keeps trying to write; the collar must block it
      sys_we = 1; sys_rd = 1; sys_addr = AW'($urandom); sys_wdata = DW'($urandom);
      @(posedge clk); #1;
      cycles++;
      if (bist_state != ST_IDLE && bist_state != ST_INIT) begin
        check(sys_rdata == '0, "system read data masked during test");
        n_ignored++;
      end
      if (fault_kind == 1 && bist_state == ST_WRITE && dut.u_addr.address == 2'd2)
        dut.u_ram.mem[1] = ~dut.u_ram.mem[1];
      if (fault_kind == 2 && bist_state == ST_READ && dut.u_addr.address == 2'd1)
        dut.u_ram.mem[3][2] = ~dut.u_ram.mem[3][2];
      if (cycles > 3 * N + 10) break;
    end
    sys_we = 0; sys_rd = 0;
    check(cycles == 2 * N + 5, $sformatf("test took %0d clocks, expected %0d", cycles, 2 * N + 5));
    check(ram_faulty == (fault_kind != 0),
          $sformatf("ram_faulty=%0b with fault kind %0d", ram_faulty, fault_kind));
    if (fault_kind == 0) begin
      check(signature == good_sig, $sformatf("signature %h expected %h", signature, good_sig));
      if (!ram_faulty) n_pass++;
    end else begin
      check(signature != good_sig, "faulty RAM signature differs from good one");
      if (ram_faulty) n_detect++;
    end
    // result held until test is lowered
    repeat (2) @(posedge clk); #1;
    check(test_done && ram_faulty == (fault_kind != 0), "result held");
    test = 0;
    @(posedge clk); #1;
    check(bist_state == ST_IDLE && !test_done, "back to normal mode");
    if (bist_state == ST_IDLE) n_back++;
  endtask

  // ---- normal-mode access ------------------------------------------------
  task automatic sys_write(int a, logic [DW-1:0] d);
    sys_we = 1; sys_rd = 0; sys_addr = AW'(a); sys_wdata = d;
    @(posedge clk); #1;
    sys_we = 0;
  endtask

  task automatic sys_read_check(int a, logic [DW-1:0] exp, string what);
    sys_rd = 1; sys_addr = AW'(a);
    @(posedge clk); #1;
    sys_rd = 0;
    check(sys_rdata == exp, $sformatf("%s addr %0d: got %h expected %h", what, a, sys_rdata, exp));
    n_normal++;
  endtask

  logic [DW-1:0] shadow [N];

  initial begin
    build_model();
    reset = 1; test = 0; sys_we = 0; sys_rd = 0; sys_addr = 0; sys_wdata = 0;
    repeat (3) @(posedge clk); #1;
    reset = 0;
    check(bist_state == ST_IDLE && !test_done && !ram_faulty, "reset state");

    // 1. normal mode
    for (int i = 0; i < N; i++) begin
      shadow[i] = DW'($urandom);
      sys_write(i, shadow[i]);
    end
    for (int i = 0; i < N; i++) sys_read_check(i, shadow[i], "normal read");

    // 2. good RAM
    self_test(0);

    // 3. patterns left in the RAM
    for (int i = 0; i < N; i++) sys_read_check(i, pattern[i], "pattern after test");

    // 4. faulty RAM
    self_test(1);
    self_test(2);

    // 5. good again
    self_test(0);

    check(n_normal  > 0, "normal-mode access never happened");
    check(n_ignored > 0, "system access during test never happened");
    check(n_pass    > 0, "passing test never happened");
    check(n_detect  > 0, "fault detection never happened");
    check(n_back    > 0, "return to normal mode never happened");
    $display("mechanisms: normal=%0d blocked=%0d pass=%0d detect=%0d back=%0d",
             n_normal, n_ignored, n_pass, n_detect, n_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
