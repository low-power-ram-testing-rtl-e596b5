// tb_test_collar: self-check of the RAM test collar.
//
// Drives random values on both ports in both modes and checks that the RAM
// side follows the system port in normal mode and the BIST port in test
// mode, and where the read data goes.
module tb_test_collar;
  localparam int AW = 8, DW = 8;
  logic test_mode;
  logic sys_we, sys_rd, bist_we, bist_rd, ram_we, ram_rd;
  logic [AW-1:0] sys_addr, bist_addr, ram_addr;
  logic [DW-1:0] sys_wdata, bist_wdata, ram_wdata, sys_rdata, bist_rdata, ram_rdata;
  int checks = 0, failures = 0;
  logic clk = 0;

  test_collar dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      test_mode = 1'($urandom);
      {sys_we, sys_rd, bist_we, bist_rd} = 4'($urandom);
      sys_addr = AW'($urandom); bist_addr = AW'($urandom);
      sys_wdata = DW'($urandom); bist_wdata = DW'($urandom); ram_rdata = DW'($urandom);
      @(posedge clk);
      checks++;
      if (test_mode) begin
        if ({ram_we, ram_rd, ram_addr, ram_wdata} !== {bist_we, bist_rd, bist_addr, bist_wdata}
            || sys_rdata !== '0 || bist_rdata !== ram_rdata) begin
          failures++; $display("FAIL test mode routing");
        end
      end else begin
        if ({ram_we, ram_rd, ram_addr, ram_wdata} !== {sys_we, sys_rd, sys_addr, sys_wdata}
            || sys_rdata !== ram_rdata || bist_rdata !== ram_rdata) begin
          failures++; $display("FAIL normal mode routing");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
