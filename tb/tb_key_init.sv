// tb_key_init: W0..W3 for random master keys of all three lengths against
// the reference Feistel, plus the busy/done timing (done exactly 3 clock
// edges after the start edge, busy in between, start ignored while busy).
module tb_key_init;
  import aria_pkg::*;
  import aria_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rst_n, start, busy, done;
  keylen_e      keylen;
  logic [255:0] key;
  block_t       w [4];

  key_init u_dut (.clk, .rst_n, .start, .keylen, .key, .busy, .done, .w);

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
    blk_t wr [4];
    int   cyc;
    rst_n = 0; start = 0; keylen = KL128; key = '0;
    #12 rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int kl;
      kl = t % 3;
      @(negedge clk);
      key    = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      keylen = keylen_e'(kl);
      start  = 1;
      winit(key, kl, wr);
      @(negedge clk);
      start = (t % 2 == 0);   // a start while busy must be ignored
      key   = ~key;
      cyc   = 0;   // edges after the accepting edge
      check(block_t'(busy), 128'd1, "busy");
      while (!done) begin
        @(negedge clk);
        start = 0;
        cyc++;
      end
      check(block_t'(cyc), 128'd3, "latency");
      for (int i = 0; i < 4; i++) check(w[i], wr[i], $sformatf("kl%0d W%0d", kl, i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
