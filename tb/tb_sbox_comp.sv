// tb_sbox_comp: exhaustive check of the composite-field S-boxes.
// All four kinds are checked on all 256 inputs against the reference model,
// both unpipelined and with all three sub-pipeline cuts (3-cycle latency,
// one new input per clock), plus the first table entries of each box.
module tb_sbox_comp;
  import aria_pkg::*;
  import aria_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  byte_t x;
  byte_t y0 [4];
  byte_t y3 [4];

  sbox_comp #(.KIND(S1))    c0 (.clk, .x, .y(y0[0]));
  sbox_comp #(.KIND(S2))    c1 (.clk, .x, .y(y0[1]));
  sbox_comp #(.KIND(S1INV)) c2 (.clk, .x, .y(y0[2]));
  sbox_comp #(.KIND(S2INV)) c3 (.clk, .x, .y(y0[3]));
  sbox_comp #(.KIND(S1),    .CUT_PRE_INV(1), .CUT_POST_INV(1), .CUT_PRE_OUT(1)) p0 (.clk, .x, .y(y3[0]));
  sbox_comp #(.KIND(S2),    .CUT_PRE_INV(1), .CUT_POST_INV(1), .CUT_PRE_OUT(1)) p1 (.clk, .x, .y(y3[1]));
  sbox_comp #(.KIND(S1INV), .CUT_PRE_INV(1), .CUT_POST_INV(1), .CUT_PRE_OUT(1)) p2 (.clk, .x, .y(y3[2]));
  sbox_comp #(.KIND(S2INV), .CUT_PRE_INV(1), .CUT_POST_INV(1), .CUT_PRE_OUT(1)) p3 (.clk, .x, .y(y3[3]));

  task automatic check(byte_t got, byte_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %02x exp %02x", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // known first entries of the four tables
    x = 8'h00; #1;
    check(y0[0], 8'h63, "S1(0)"); check(y0[1], 8'he2, "S2(0)");
    check(y0[2], 8'h52, "S1inv(0)"); check(y0[3], 8'h30, "S2inv(0)");
    x = 8'h01; #1;
    check(y0[0], 8'h7c, "S1(1)"); check(y0[1], 8'h4e, "S2(1)");
    check(y0[2], 8'h09, "S1inv(1)"); check(y0[3], 8'h68, "S2inv(1)");
    // exhaustive, streaming one input per clock; pipelined result 3 clocks later
    for (int i = 0; i < 256 + 3; i++) begin
      @(negedge clk);
      x = byte_t'(i);
      #1;
      if (i < 256)
        for (int k = 0; k < 4; k++) check(y0[k], sb(k, byte_t'(i)), $sformatf("comb kind %0d x %02x", k, i));
      if (i >= 3)
        for (int k = 0; k < 4; k++) check(y3[k], sb(k, byte_t'(i - 3)), $sformatf("pipe kind %0d x %02x", k, i - 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
