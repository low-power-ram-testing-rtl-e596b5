// tb_wdg: self-check of the write data generator.
//
// An independent reference model is compared with the block every clock:
// the Galois step written as a right shift of the output word that XORs
// 8'hB1 (x^8 + x^7 + x^3 + x^2 + 1 in reversed bit order) when the bit
// shifted out is 1. The
// bench also checks that clr reloads the seed, that en low holds the
// pattern, and that the 8-bit default polynomial has the maximal period of
// 255 non-zero words.
module tb_wdg;
  localparam int W = 8;
  logic clk = 0, clr, en;
  logic [W-1:0] data_wdg;
  int checks = 0, failures = 0;

  wdg dut (.clk, .clr, .en, .data_wdg);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: right shift, reversed polynomial 8'hB1
  function automatic logic [7:0] ref_step(logic [7:0] s);
    return (s >> 1) ^ (s[0] ? 8'hB1 : 8'h00);
  endfunction

  task automatic check(logic [W-1:0] exp, string what);
    checks++;
    if (data_wdg !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, data_wdg, exp);
    end
  endtask

  logic [W-1:0] model;
  logic [W-1:0] first;
  bit seen [256];
  int period;

  initial begin
    clr = 1; en = 0;
    @(posedge clk); #1;
    check(8'h01, "seed after clr");
    clr = 0;
    model = 8'h01;
    en = 1;
    // full period
    period = 0;
    for (int k = 0; k < 255; k++) begin
      @(posedge clk); #1;
      model = ref_step(model);
      check(model, "step");
      checks++;
      if (data_wdg == '0) begin failures++; $display("FAIL zero word"); end
      if (seen[data_wdg]) begin
        if (k != 254) begin failures++; $display("FAIL early repeat at %0d", k); end
      end
      seen[data_wdg] = 1;
      period++;
    end
    checks++;
    if (data_wdg != 8'h01) begin failures++; $display("FAIL period is not 255"); end
    // hold
    en = 0;
    first = data_wdg;
    repeat (3) @(posedge clk); #1;
    check(first, "hold");
    // clr priority over en
    en = 1; repeat (7) @(posedge clk); #1;
    clr = 1; @(posedge clk); #1;
    check(8'h01, "clr priority");
    clr = 0; en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
