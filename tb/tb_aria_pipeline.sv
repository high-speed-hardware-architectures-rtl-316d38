// tb_aria_pipeline: the unrolled core in four configurations fed the same
// stimulus: composite S-boxes with 4 (default), 3 and 2 sub-stages per
// round, and table S-boxes with outer-round pipelining only.
//  * key setup: key_ready exactly 4 edges after the key_start edge
//    (3 init steps + loading the 17 round-key registers);
//  * streams of blocks, mostly one per clock with occasional gaps, for all
//    key lengths and both directions: every result matches the reference,
//    in order, exactly nr*SUB_STAGES cycles after the cycle it was offered;
//  * the published test vectors pass through the default configuration.
module tb_aria_pipeline;
  import aria_pkg::*;
  import aria_ref_pkg::*;

  localparam int NI = 4;
  localparam int STG [NI] = '{4, 3, 2, 1};

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic         rst_n, key_start, decrypt, in_valid;
  keylen_e      keylen;
  logic [255:0] key;
  block_t       din;
  logic         key_ready [NI], out_valid [NI], busy [NI];
  block_t       dout [NI];

  aria_pipeline u0 (.clk, .rst_n, .key_start, .decrypt, .keylen, .key, .key_ready(key_ready[0]),
                    .in_valid, .din, .out_valid(out_valid[0]), .dout(dout[0]), .busy(busy[0]));
  aria_pipeline #(.SUB_STAGES(3)) u1 (.clk, .rst_n, .key_start, .decrypt, .keylen, .key,
                    .key_ready(key_ready[1]), .in_valid, .din, .out_valid(out_valid[1]),
                    .dout(dout[1]), .busy(busy[1]));
  aria_pipeline #(.SUB_STAGES(2)) u2 (.clk, .rst_n, .key_start, .decrypt, .keylen, .key,
                    .key_ready(key_ready[2]), .in_valid, .din, .out_valid(out_valid[2]),
                    .dout(dout[2]), .busy(busy[2]));
  aria_pipeline #(.SUB_STAGES(1), .IMPL(SBOX_LUT)) u3 (.clk, .rst_n, .key_start, .decrypt, .keylen,
                    .key, .key_ready(key_ready[3]), .in_valid, .din, .out_valid(out_valid[3]),
                    .dout(dout[3]), .busy(busy[3]));

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

  // expected results and their input cycles, per instance
  block_t expq [NI][$];
  int     tinq [NI][$];
  int     cur_nr = 12;
  int     outs = 0;

  always @(negedge clk) begin
    for (int i = 0; i < NI; i++) begin
      if (rst_n && out_valid[i]) begin
        if (expq[i].size() == 0) begin
          check(dout[i], '1, $sformatf("inst %0d unexpected output", i));
        end else begin
          check(dout[i], expq[i].pop_front(), $sformatf("inst %0d data", i));
          check(block_t'(cycle - tinq[i].pop_front()), block_t'(cur_nr * STG[i]),
                $sformatf("inst %0d latency", i));
          outs++;
        end
      end
    end
  end

  task automatic setup_key(logic [255:0] k, int kl, bit dec);
    int cyc;
    key = k; keylen = keylen_e'(kl); decrypt = dec; key_start = 1;
    @(negedge clk);
    key_start = 0;
    key = ~k;
    cyc = 0;
    while (!key_ready[0]) begin
      @(negedge clk);
      cyc++;
    end
    check(block_t'(cyc), 128'd4, "key setup latency");
    for (int i = 1; i < NI; i++) check(block_t'(key_ready[i]), 128'd1, "key_ready all");
    cur_nr = nrounds(kl);
  endtask

  task automatic send(block_t d, block_t exp);
    din = d; in_valid = 1;
    for (int i = 0; i < NI; i++) begin
      expq[i].push_back(exp);
      tinq[i].push_back(cycle);   // cycle in which the block is presented
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic drain();
    while (busy[0] || busy[1] || busy[2] || busy[3]) @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < NI; i++) check(block_t'(expq[i].size()), '0, "all results delivered");
  endtask

  initial begin
    logic [255:0] kv [3];
    block_t       pt, cv [3];
    rst_n = 0; key_start = 0; decrypt = 0; keylen = KL128; key = '0; din = '0; in_valid = 0;
    kv[0] = {128'h000102030405060708090a0b0c0d0e0f, 128'h0};
    kv[1] = {192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'h0};
    kv[2] = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    cv[0] = 128'hd718fbd6ab644c739da95f3be6451778;
    cv[1] = 128'h26449c1805dbe7aa25a468ce263a9e79;
    cv[2] = 128'hf92bd7c79fb72e2f2b8f80c1972d24fc;
    pt    = 128'h00112233445566778899aabbccddeeff;
    #22 rst_n = 1;
    @(negedge clk);
    for (int kl = 0; kl < 3; kl++) begin
      setup_key(kv[kl], kl, 0);
      send(pt, cv[kl]);
      drain();
      setup_key(kv[kl], kl, 1);
      send(cv[kl], pt);
      drain();
    end
    for (int t = 0; t < 12; t++) begin
      logic [255:0] k;
      int           kl;
      bit           dec;
      k   = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      kl  = t % 3;
      dec = 1'(t / 3);
      setup_key(k, kl, dec);
      for (int b = 0; b < 40; b++) begin
        block_t d;
        d = {$urandom, $urandom, $urandom, $urandom};
        send(d, crypt(k, kl, dec, d));
        if ($urandom % 8 == 0) @(negedge clk);   // occasional bubble
      end
      drain();
    end
    check(block_t'(outs), block_t'(NI * (6 + 12 * 40)), "number of results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
