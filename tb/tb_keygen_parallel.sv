// tb_keygen_parallel: all seventeen round-key registers after one load, for
// random W0..W3, every key length and both directions, against the
// reference schedule; also the valid flag (load sets, clear clears) and
// that the registers hold while load is low.
module tb_keygen_parallel;
  import aria_pkg::*;
  import aria_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic    rst_n, load, clear, decrypt, valid;
  keylen_e keylen;
  block_t  w [4];
  block_t  rk [18];

  keygen_parallel u_dut (.clk, .rst_n, .load, .clear, .decrypt, .keylen, .w, .valid, .rk);

  task automatic check(block_t got, block_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %032x exp %032x", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    keys_t k;
    blk_t  wr [4];
    rst_n = 0; load = 0; clear = 0; decrypt = 0; keylen = KL128;
    for (int i = 0; i < 4; i++) w[i] = '0;
    #12;
    check(block_t'(valid), '0, "valid after reset");
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      for (int i = 0; i < 4; i++) begin
        w[i]  = {$urandom, $urandom, $urandom, $urandom};
        wr[i] = w[i];
      end
      for (int kl = 0; kl < 3; kl++) begin
        for (int dec = 0; dec < 2; dec++) begin
          keys_from_w(wr, kl, dec[0], k);
          @(negedge clk);
          keylen = keylen_e'(kl); decrypt = dec[0]; load = 1;
          @(negedge clk);
          load = 0;
          // change the inputs: the registers must hold
          decrypt = ~decrypt;
          keylen  = keylen_e'((kl + 1) % 3);
          @(negedge clk);
          check(block_t'(valid), 128'd1, "valid after load");
          for (int i = 1; i <= 17; i++)
            check(rk[i], k[i], $sformatf("kl%0d dec%0d rk%0d", kl, dec, i));
        end
      end
      clear = 1;
      @(negedge clk);
      clear = 0;
      check(block_t'(valid), '0, "valid after clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
