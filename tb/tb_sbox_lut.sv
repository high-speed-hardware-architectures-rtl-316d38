// tb_sbox_lut: exhaustive check of the four ROM S-boxes against the
// reference model, and that each inverse box undoes its forward box.
module tb_sbox_lut;
  import aria_pkg::*;
  import aria_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  byte_t x, xi1, xi2;
  byte_t y [4];
  byte_t r1, r2;

  sbox_lut #(.KIND(S1))    u0 (.x, .y(y[0]));
  sbox_lut #(.KIND(S2))    u1 (.x, .y(y[1]));
  sbox_lut #(.KIND(S1INV)) u2 (.x, .y(y[2]));
  sbox_lut #(.KIND(S2INV)) u3 (.x, .y(y[3]));
  sbox_lut #(.KIND(S1INV)) v1 (.x(xi1), .y(r1));
  sbox_lut #(.KIND(S2INV)) v2 (.x(xi2), .y(r2));
  assign xi1 = y[0];
  assign xi2 = y[1];

  task automatic check(byte_t got, byte_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %02x exp %02x", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      x = byte_t'(i);
      #1;
      for (int k = 0; k < 4; k++) check(y[k], sb(k, byte_t'(i)), $sformatf("kind %0d x %02x", k, i));
      check(r1, byte_t'(i), "S1inv(S1(x))");
      check(r2, byte_t'(i), "S2inv(S2(x))");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
