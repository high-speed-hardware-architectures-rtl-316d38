// tb_subst_layer: the shared odd/even substitution layer against the
// reference, for table S-boxes, combinational composite S-boxes, and the
// fully cut composite layer (3-cycle latency) fed a new block and a new
// odd/even choice every clock.
module tb_subst_layer;
  import aria_pkg::*;
  import aria_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   odd;
  block_t din, y_lut, y_comp, y_pipe;

  subst_layer #(.IMPL(SBOX_LUT))  u_lut  (.clk, .odd, .din, .dout(y_lut));
  subst_layer #(.IMPL(SBOX_COMP)) u_comp (.clk, .odd, .din, .dout(y_comp));
  subst_layer #(.IMPL(SBOX_COMP), .CUT_PRE_INV(1), .CUT_POST_INV(1), .CUT_PRE_OUT(1))
    u_pipe (.clk, .odd, .din, .dout(y_pipe));

  task automatic check(block_t got, block_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %032x exp %032x", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  block_t hist_d [$];
  logic   hist_o [$];

  initial begin
    for (int i = 0; i < 403; i++) begin
      @(negedge clk);
      odd = 1'($urandom);
      din = {$urandom, $urandom, $urandom, $urandom};
      hist_d.push_back(din);
      hist_o.push_back(odd);
      #1;
      check(y_lut, sl(odd, din), "lut");
      check(y_comp, sl(odd, din), "comp");
      if (i >= 3) begin
        check(y_pipe, sl(hist_o[0], hist_d[0]), "pipelined");
        void'(hist_d.pop_front());
        void'(hist_o.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
