// tb_aria_top: end-to-end test of both processors at their default
// configuration (table S-box loop core, 4-stage sub-pipelined core), run
// concurrently.
//  * loop core: the published vectors and random blocks for every key
//    length, encrypting and decrypting, issued back to back, with the
//    15/17/19-cycle latency checked and a start while busy ignored;
//  * pipelined core: a CTR-style stream of counter blocks per key, one per
//    clock with occasional bubbles, for every key length and both
//    directions, checked against the reference and for its
//    nr*4-cycle latency; keys are changed between streams.
// Each mechanism (both directions, the three final-round taps / round
// counts, back-to-back issue, ignored start, full-rate streaming, bubbles,
// re-keying) is counted, and one that never happened is a failure.
module tb_aria_top;
  import aria_pkg::*;
  import aria_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic         rst_n;
  logic         loop_start, loop_decrypt, loop_busy, loop_done;
  keylen_e      loop_keylen;
  logic [255:0] loop_key;
  block_t       loop_din, loop_dout;
  logic         pipe_key_start, pipe_decrypt, pipe_key_ready, pipe_in_valid, pipe_out_valid, pipe_busy;
  keylen_e      pipe_keylen;
  logic [255:0] pipe_key;
  block_t       pipe_din, pipe_dout;

  aria_top u_dut (.*);

  // mechanism counters
  int n_loop_enc = 0, n_loop_dec = 0, n_loop_kl [3] = '{0, 0, 0}, n_loop_b2b = 0, n_loop_ignored = 0;
  int n_pipe_enc = 0, n_pipe_dec = 0, n_pipe_kl [3] = '{0, 0, 0}, n_pipe_fullrate = 0;
  int n_pipe_bubble = 0, n_pipe_rekey = 0;

  task automatic check(block_t got, block_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %032x exp %032x", what, got, exp);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [255:0] kv [3];
  block_t       pt, cv [3];
  initial begin
    kv[0] = {128'h000102030405060708090a0b0c0d0e0f, 128'h0};
    kv[1] = {192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'h0};
    kv[2] = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    cv[0] = 128'hd718fbd6ab644c739da95f3be6451778;
    cv[1] = 128'h26449c1805dbe7aa25a468ce263a9e79;
    cv[2] = 128'hf92bd7c79fb72e2f2b8f80c1972d24fc;
    pt    = 128'h00112233445566778899aabbccddeeff;
  end

  // ------------------------------------------------------------ loop core
  bit loop_finished = 0;

  task automatic loop_run(logic [255:0] k, int kl, bit dec, block_t d, block_t exp, string what);
    int cyc;
    if (loop_done) n_loop_b2b++;
    loop_key = k; loop_keylen = keylen_e'(kl); loop_decrypt = dec; loop_din = d; loop_start = 1;
    @(negedge clk);
    cyc = 0;
    loop_din = ~d;          // start stays high: ignored while busy
    if (loop_busy) n_loop_ignored++;
    while (!loop_done) begin
      @(negedge clk);
      cyc++;
    end
    loop_start = 0;
    check(block_t'(cyc), block_t'(3 + nrounds(kl)), {what, " loop latency"});
    check(loop_dout, exp, {what, " loop result"});
    if (dec) n_loop_dec++; else n_loop_enc++;
    n_loop_kl[kl]++;
  endtask

  initial begin
    loop_start = 0; loop_decrypt = 0; loop_keylen = KL128; loop_key = '0; loop_din = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int kl = 0; kl < 3; kl++) begin
      loop_run(kv[kl], kl, 0, pt, cv[kl], $sformatf("vector enc kl%0d", kl));
      loop_run(kv[kl], kl, 1, cv[kl], pt, $sformatf("vector dec kl%0d", kl));
    end
    for (int t = 0; t < 30; t++) begin
      logic [255:0] k;
      block_t       d;
      int           kl;
      bit           dec;
      k   = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      d   = {$urandom, $urandom, $urandom, $urandom};
      kl  = t % 3;
      dec = 1'(t / 3);
      loop_run(k, kl, dec, d, crypt(k, kl, dec, d), $sformatf("loop random %0d", t));
    end
    loop_finished = 1;
  end

  // ------------------------------------------------------- pipelined core
  bit     pipe_finished = 0;
  block_t expq [$];
  int     tinq [$];
  int     cur_nr = 12;
  int     last_out = -10;

  always @(negedge clk) begin
    if (rst_n && pipe_out_valid) begin
      if (expq.size() == 0) begin
        check(pipe_dout, '1, "pipe unexpected output");
      end else begin
        check(pipe_dout, expq.pop_front(), "pipe result");
        check(block_t'(cycle - tinq.pop_front()), block_t'(cur_nr * 4), "pipe latency");
        if (last_out == cycle - 1) n_pipe_fullrate++;
        last_out = cycle;
      end
    end
  end

  task automatic pipe_key_setup(logic [255:0] k, int kl, bit dec);
    pipe_key = k; pipe_keylen = keylen_e'(kl); pipe_decrypt = dec; pipe_key_start = 1;
    @(negedge clk);
    pipe_key_start = 0;
    while (!pipe_key_ready) @(negedge clk);
    cur_nr = nrounds(kl);
    n_pipe_rekey++;
  endtask

  task automatic pipe_stream(logic [255:0] k, int kl, bit dec, block_t ctr0, int n);
    for (int b = 0; b < n; b++) begin
      block_t d;
      d = ctr0 + block_t'(b);
      pipe_din = d; pipe_in_valid = 1;
      expq.push_back(crypt(k, kl, dec, d));
      tinq.push_back(cycle);
      @(negedge clk);
      pipe_in_valid = 0;
      if (b % 17 == 16) begin
        @(negedge clk);
        n_pipe_bubble++;
      end
    end
    while (pipe_busy) @(negedge clk);
    @(negedge clk);
    check(block_t'(expq.size()), '0, "pipe stream drained");
    if (dec) n_pipe_dec += n; else n_pipe_enc += n;
    n_pipe_kl[kl] += n;
  endtask

  initial begin
    pipe_key_start = 0; pipe_decrypt = 0; pipe_keylen = KL128; pipe_key = '0;
    pipe_in_valid = 0; pipe_din = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int kl = 0; kl < 3; kl++) begin
      pipe_key_setup(kv[kl], kl, 0);
      pipe_stream(kv[kl], kl, 0, pt, 1);
      pipe_key_setup(kv[kl], kl, 1);
      pipe_stream(kv[kl], kl, 1, cv[kl], 1);
    end
    for (int t = 0; t < 6; t++) begin
      logic [255:0] k;
      int           kl;
      bit           dec;
      k   = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      kl  = t % 3;
      dec = 1'(t / 3);
      pipe_key_setup(k, kl, dec);
      pipe_stream(k, kl, dec, {$urandom, $urandom, 64'h0}, 50);
    end
    pipe_finished = 1;
  end

  // ------------------------------------------------------------ main
  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    rst_n = 0;
    #22 rst_n = 1;
    wait (loop_finished && pipe_finished);
    @(negedge clk);
    $display("loop: enc %0d dec %0d kl128 %0d kl192 %0d kl256 %0d back-to-back %0d ignored-start %0d",
             n_loop_enc, n_loop_dec, n_loop_kl[0], n_loop_kl[1], n_loop_kl[2], n_loop_b2b, n_loop_ignored);
    $display("pipe: enc %0d dec %0d kl128 %0d kl192 %0d kl256 %0d full-rate %0d bubbles %0d rekeys %0d",
             n_pipe_enc, n_pipe_dec, n_pipe_kl[0], n_pipe_kl[1], n_pipe_kl[2], n_pipe_fullrate,
             n_pipe_bubble, n_pipe_rekey);
    need(n_loop_enc, "loop encrypt");   need(n_loop_dec, "loop decrypt");
    for (int i = 0; i < 3; i++) begin
      need(n_loop_kl[i], $sformatf("loop key length %0d", i));
      need(n_pipe_kl[i], $sformatf("pipe key length / final tap %0d", i));
    end
    need(n_loop_b2b, "loop back-to-back start");
    need(n_loop_ignored, "loop start ignored while busy");
    need(n_pipe_enc, "pipe encrypt");   need(n_pipe_dec, "pipe decrypt");
    need(n_pipe_fullrate, "pipe one result per clock");
    need(n_pipe_bubble, "pipe input bubble");
    need(n_pipe_rekey > 1 ? 1 : 0, "pipe re-keying");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
