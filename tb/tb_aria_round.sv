// tb_aria_round: the round unit's ordinary and final outputs against the
// reference (DL(SL(x^k)) and SL(x^k)^k'), combinational with table and
// composite S-boxes, and sub-pipelined with 2, 3 and 4 stages, where the
// result must appear exactly SUB_STAGES-1 clocks after the input.
module tb_aria_round;
  import aria_pkg::*;
  import aria_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   odd;
  block_t din, rk, rk_fin;
  block_t dl_o [5], fin_o [5];

  aria_round #(.IMPL(SBOX_LUT),  .SUB_STAGES(1)) u0 (.clk, .odd, .din, .rk, .rk_fin, .dl_out(dl_o[0]), .fin_out(fin_o[0]));
  aria_round #(.IMPL(SBOX_COMP), .SUB_STAGES(1)) u1 (.clk, .odd, .din, .rk, .rk_fin, .dl_out(dl_o[1]), .fin_out(fin_o[1]));
  aria_round #(.IMPL(SBOX_COMP), .SUB_STAGES(2)) u2 (.clk, .odd, .din, .rk, .rk_fin, .dl_out(dl_o[2]), .fin_out(fin_o[2]));
  aria_round #(.IMPL(SBOX_COMP), .SUB_STAGES(3)) u3 (.clk, .odd, .din, .rk, .rk_fin, .dl_out(dl_o[3]), .fin_out(fin_o[3]));
  aria_round #(.IMPL(SBOX_COMP), .SUB_STAGES(4)) u4 (.clk, .odd, .din, .rk, .rk_fin, .dl_out(dl_o[4]), .fin_out(fin_o[4]));

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

  block_t hd [$];
  logic   ho [$];

  initial begin
    // keys held constant (as in the pipelined core), data and parity vary
    rk     = {$urandom, $urandom, $urandom, $urandom};
    rk_fin = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      odd = 1'($urandom);
      din = {$urandom, $urandom, $urandom, $urandom};
      hd.push_front(din);
      ho.push_front(odd);
      #1;
      for (int u = 0; u <= 1; u++) begin
        check(dl_o[u], dl(sl(odd, din ^ rk)), $sformatf("u%0d dl", u));
        check(fin_o[u], sl(odd, din ^ rk) ^ rk_fin, $sformatf("u%0d fin", u));
      end
      for (int s = 2; s <= 4; s++) begin
        if (i >= s - 1) begin
          check(dl_o[s], dl(sl(ho[s-1], hd[s-1] ^ rk)), $sformatf("stages %0d dl", s));
          check(fin_o[s], sl(ho[s-1], hd[s-1] ^ rk) ^ rk_fin, $sformatf("stages %0d fin", s));
        end
      end
      if (hd.size() > 4) begin
        void'(hd.pop_back());
        void'(ho.pop_back());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
