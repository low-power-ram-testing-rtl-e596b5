// tb_misr: self-check of the multiple-input signature register.
//
// A reference model steps the signature as a right shift that XORs 8'hB1
// (x^8 + x^7 + x^3 + x^2 + 1 in reversed bit order) when the bit shifted out
// is 1, and XORs in the word. The bench drives random words on both inputs
// with random select and enable and compares every clock; it checks that
// clr clears, that a single flipped bit in one word of a stream changes the
// final signature, and that compressing the 4-bit word 1010 (fed as
// 8'b1010_0000) from state 00100000 gives the printed reference trace
// 10110..., 11111..., 11011..., 11001..., 11000..., 01110..., 10011...,
// 01011..., 00111..., 00001110.
module tb_misr;
  localparam int SW = 8, DW = 8;
  logic clk = 0, clr, en, select;
  logic [DW-1:0] data_wdg, data_ram;
  logic [SW-1:0] signature;
  int checks = 0, failures = 0;

  misr dut (.clk, .clr, .en, .select, .data_wdg, .data_ram, .signature);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_step(logic [7:0] s, logic [7:0] m);
    return (s >> 1) ^ (s[0] ? 8'hB1 : 8'h00) ^ m;
  endfunction

  // reference trace: upper 5 bits of nine successive signatures, then a full one
  localparam logic [4:0] TRACE5 [9] = '{5'b10110, 5'b11111, 5'b11011, 5'b11001, 5'b11000,
                                        5'b01110, 5'b10011, 5'b01011, 5'b00111};
  localparam logic [7:0] TRACE_LAST = 8'b00001110;

  task automatic check(logic [SW-1:0] exp, string what);
    checks++;
    if (signature !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, signature, exp);
    end
  endtask

  logic [SW-1:0] model, sig_a, sig_b;
  logic [DW-1:0] words [64];

  initial begin
    clr = 1; en = 0; select = 0; data_wdg = 0; data_ram = 0;
    @(posedge clk); #1;
    check('0, "clear");
    clr = 0;
    model = '0;
    for (int k = 0; k < 1000; k++) begin
      en = 1'($urandom); select = 1'($urandom);
      data_wdg = DW'($urandom); data_ram = DW'($urandom);
      @(posedge clk); #1;
      if (en) model = ref_step(model, select ? data_ram : data_wdg);
      check(model, "random");
    end
    // clean stream vs. stream with one flipped bit
    for (int i = 0; i < 64; i++) words[i] = DW'($urandom);
    for (int pass = 0; pass < 2; pass++) begin
      clr = 1; en = 0; @(posedge clk); #1; clr = 0;
      for (int i = 0; i < 64; i++) begin
        en = 1; select = 1; data_ram = words[i];
        if (pass == 1 && i == 17) data_ram[3] = ~data_ram[3];
        @(posedge clk); #1;
      end
      en = 0;
      if (pass == 0) sig_a = signature; else sig_b = signature;
    end
    checks++;
    if (sig_a == sig_b) begin failures++; $display("FAIL single-bit error not detected"); end
    // reference trace: reach 00100000 from 0 with data 1010_0000, then ten steps
    clr = 1; en = 0; @(posedge clk); #1; clr = 0;
    en = 1; select = 1; data_ram = 8'b1010_0000; data_wdg = 8'h00;
    model = '0;
    while (model != 8'b0010_0000) begin
      @(posedge clk); #1;
      model = ref_step(model, data_ram);
    end
    check(8'b0010_0000, "trace start");
    for (int k = 0; k < 9; k++) begin
      @(posedge clk); #1;
      checks++;
      if (signature[7:3] !== TRACE5[k]) begin
        failures++; $display("FAIL trace step %0d: %b", k, signature);
      end
    end
    @(posedge clk); #1;
    check(TRACE_LAST, "trace end");
    // clr has priority
    en = 1; clr = 1; @(posedge clk); #1;
    check('0, "clr priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
