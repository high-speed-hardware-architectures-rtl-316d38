// tb_keysched_otf: every round key index, both directions and all three key
// lengths, for random W0..W3, against the reference key schedule; the
// combinational key and the round-key register (loaded one clock later,
// holding when load is low, cleared by reset) are both checked.
module tb_keysched_otf;
  import aria_pkg::*;
  import aria_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst_n, decrypt, load;
  keylen_e    keylen;
  logic [4:0] idx;
  block_t     w [4];
  block_t     key_comb, rk;

  keysched_otf u_dut (.clk, .rst_n, .w, .keylen, .decrypt, .idx, .load, .key_comb, .rk);

  task automatic check(block_t got, block_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %032x exp %032x", what, got, exp);
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
    keys_t  k;
    blk_t   wr [4];
    block_t held;
    rst_n = 0; load = 0; idx = 1; decrypt = 0; keylen = KL128;
    for (int i = 0; i < 4; i++) w[i] = '0;
    #12;
    check(rk, '0, "reset");
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < 4; i++) begin
        w[i]  = {$urandom, $urandom, $urandom, $urandom};
        wr[i] = w[i];
      end
      for (int kl = 0; kl < 3; kl++) begin
        for (int dec = 0; dec < 2; dec++) begin
          keys_from_w(wr, kl, dec[0], k);
          keylen  = keylen_e'(kl);
          decrypt = dec[0];
          for (int i = 1; i <= nrounds(kl) + 1; i++) begin
            @(negedge clk);
            idx  = 5'(i);
            load = 1;
            #1;
            check(key_comb, k[i], $sformatf("comb kl%0d dec%0d k%0d", kl, dec, i));
            @(negedge clk);
            check(rk, k[i], $sformatf("reg kl%0d dec%0d k%0d", kl, dec, i));
            held = rk;
            load = 0;
            idx  = 5'd1;
            @(negedge clk);
            check(rk, held, "hold");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
