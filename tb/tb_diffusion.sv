// tb_diffusion: the T-shared diffusion circuit against the plain
// seven-term equations of the reference, on unit vectors (which pins down
// the whole matrix) and random blocks; also checks it is an involution.
module tb_diffusion;
  import aria_pkg::*;
  import aria_ref_pkg::*;

  int checks = 0, failures = 0;
  block_t din, dout, dout2;

  diffusion u_dut (.din, .dout);
  diffusion u_dut2 (.din(dout), .dout(dout2));

  task automatic check(block_t got, block_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %032x exp %032x", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      din = block_t'(1) << i;
      #1;
      check(dout, dl(din), $sformatf("unit %0d", i));
    end
    for (int i = 0; i < 200; i++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check(dout, dl(din), "random");
      check(dout2, din, "involution");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
