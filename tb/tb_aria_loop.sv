// tb_aria_loop: the iterative core with table S-boxes and with
// composite-field S-boxes side by side.
//  * the published ARIA test vectors (128/192/256-bit keys) encrypt and
//    decrypt correctly (the reference model is checked on them too);
//  * random keys, blocks, lengths and directions match the reference;
//  * done comes exactly 3 + 12/14/16 = 15/17/19 clock edges after the
//    accepting edge, busy is high meanwhile and a start while busy is
//    ignored;
//  * blocks are issued back to back (start in the cycle done is high).
module tb_aria_loop;
  import aria_pkg::*;
  import aria_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rst_n, start, decrypt;
  keylen_e      keylen;
  logic [255:0] key;
  block_t       din;
  logic         busy [2], done [2];
  block_t       dout [2];

  aria_loop #(.IMPL(SBOX_LUT))  u_lut  (.clk, .rst_n, .start, .decrypt, .keylen, .key, .din,
                                        .busy(busy[0]), .done(done[0]), .dout(dout[0]));
  aria_loop #(.IMPL(SBOX_COMP)) u_comp (.clk, .rst_n, .start, .decrypt, .keylen, .key, .din,
                                        .busy(busy[1]), .done(done[1]), .dout(dout[1]));

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

  // Run one block; start is driven in the current cycle (called right after
  // a negedge), result checked when done rises.
  task automatic run(logic [255:0] k, int kl, bit dec, block_t d, block_t exp, string what);
    int cyc;
    key = k; keylen = keylen_e'(kl); decrypt = dec; din = d; start = 1;
    @(negedge clk);
    cyc   = 0;
    start = 1;        // held high while busy: must be ignored
    din   = ~d;
    while (!done[0]) begin
      check(block_t'({busy[0], busy[1]}), 128'd3, "busy");
      @(negedge clk);
      cyc++;
    end
    start = 0;
    check(block_t'(cyc), block_t'(3 + nrounds(kl)), {what, " latency"});
    check(block_t'(done[1]), 128'd1, {what, " comp done"});
    check(dout[0], exp, {what, " lut"});
    check(dout[1], exp, {what, " comp"});
  endtask

  initial begin
    logic [255:0] kv [3];
    block_t       pt, cv [3];
    rst_n = 0; start = 0; decrypt = 0; keylen = KL128; key = '0; din = '0;
    kv[0] = {128'h000102030405060708090a0b0c0d0e0f, 128'h0};
    kv[1] = {192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'h0};
    kv[2] = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    cv[0] = 128'hd718fbd6ab644c739da95f3be6451778;
    cv[1] = 128'h26449c1805dbe7aa25a468ce263a9e79;
    cv[2] = 128'hf92bd7c79fb72e2f2b8f80c1972d24fc;
    pt    = 128'h00112233445566778899aabbccddeeff;
    for (int kl = 0; kl < 3; kl++) begin
      check(crypt(kv[kl], kl, 0, pt), cv[kl], "reference model vector");
      check(crypt(kv[kl], kl, 1, cv[kl]), pt, "reference model inverse");
    end
    #22 rst_n = 1;
    @(negedge clk);
    // published vectors, issued back to back
    for (int kl = 0; kl < 3; kl++) begin
      run(kv[kl], kl, 0, pt, cv[kl], $sformatf("vector enc kl%0d", kl));
      run(kv[kl], kl, 1, cv[kl], pt, $sformatf("vector dec kl%0d", kl));
    end
    // random
    for (int t = 0; t < 60; t++) begin
      logic [255:0] k;
      block_t       d;
      int           kl;
      bit           dec;
      k   = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      d   = {$urandom, $urandom, $urandom, $urandom};
      kl  = $urandom % 3;
      dec = 1'($urandom);
      if (t % 5 == 0) repeat (2) @(negedge clk);   // idle gaps now and then
      run(k, kl, dec, d, crypt(k, kl, dec, d), $sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
