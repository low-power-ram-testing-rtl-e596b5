// tb_ram: self-check of the 256 x 8 RAM.
//
// Writes random words to every address, reads them back in random order and
// compares with a copy held in the bench; checks the one-clock read latency,
// that data_out holds when rd is low, that we low does not write, and
// read-before-write on a simultaneous access to one address.
module tb_ram;
  localparam int AW = 8, DW = 8;
  logic clk = 0, we, rd;
  logic [AW-1:0] address;
  logic [DW-1:0] data_in, data_out;
  logic [DW-1:0] shadow [256];
  int checks = 0, failures = 0;

  ram dut (.clk, .we, .rd, .address, .data_in, .data_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [DW-1:0] exp, string what);
    checks++;
    if (data_out !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, data_out, exp);
    end
  endtask

  int a;
  logic [DW-1:0] held;

  initial begin
    we = 0; rd = 0; address = 0; data_in = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 256; i++) begin
      we = 1; address = AW'(i); data_in = DW'($urandom); shadow[i] = data_in;
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 400; i++) begin
      a = $urandom_range(255);
      rd = 1; address = AW'(a);
      @(posedge clk); #1;
      check(shadow[a], "readback");
    end
    // hold while rd low
    rd = 0; held = data_out; address = address + 1'b1;
    repeat (3) @(posedge clk); #1;
    check(held, "hold");
    // we low: no write
    data_in = ~shadow[7]; address = 7; we = 0; rd = 0;
    @(posedge clk); #1;
    rd = 1; @(posedge clk); #1;
    check(shadow[7], "no write with we low");
    // simultaneous read and write: old word, then new
    we = 1; rd = 1; address = 9; data_in = ~shadow[9];
    @(posedge clk); #1;
    check(shadow[9], "read-before-write");
    we = 0; shadow[9] = data_in;
    @(posedge clk); #1;
    check(shadow[9], "new word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
