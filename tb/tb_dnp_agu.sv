// Self-checking test of dnp_agu: random loads, post-increment/decrement and indexed
// accesses on both ports against a model of the four address registers.
module tb_dnp_agu;
  import dnp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en0, en1, ld_en;
  logic [1:0] sel0, sel1, ld_sel;
  amode_e mode0, mode1;
  word_t index;
  logic [8:0] ea0, ea1, ld_val;
  logic [8:0] areg [4];
  logic [8:0] m [4];
  int checks = 0, failures = 0;

  dnp_agu dut (.clk, .rst_n, .en0, .sel0, .mode0, .en1, .sel1, .mode1, .index, .ea0, .ea1,
               .ld_en, .ld_sel, .ld_val, .areg);
  always #5 clk = ~clk;

  function automatic logic [8:0] eff(logic [8:0] a, amode_e md, word_t idx);
    return md == AM_INDEX ? a + idx[8:0] : a;
  endfunction
  function automatic logic [8:0] post(logic [8:0] a, amode_e md);
    return md == AM_INC ? a + 1 : (md == AM_DEC ? a - 1 : a);
  endfunction

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en0 = 0; en1 = 0; ld_en = 0; sel0 = 0; sel1 = 0; ld_sel = 0; mode0 = AM_PLAIN; mode1 = AM_PLAIN;
    index = 0; ld_val = 0;
    foreach (m[i]) m[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      en0 = $urandom; en1 = $urandom; ld_en = ($urandom % 5) == 0;
      sel0 = $urandom; sel1 = $urandom; ld_sel = $urandom;
      if (sel1 == sel0) sel1 = sel0 + 1;
      if (ld_sel == sel0 || ld_sel == sel1) ld_en = 0;
      mode0 = amode_e'($urandom); mode1 = amode_e'($urandom);
      index = word_t'($urandom); ld_val = 9'($urandom);
      #1;
      checks++;
      if (ea0 !== eff(m[sel0], mode0, index) || ea1 !== eff(m[sel1], mode1, index)) begin
        failures++;
        if (failures < 10) $display("FAIL ea0=%h exp %h ea1=%h exp %h", ea0, eff(m[sel0], mode0, index), ea1, eff(m[sel1], mode1, index));
      end
      @(posedge clk);
      if (en0) m[sel0] = post(m[sel0], mode0);
      if (en1) m[sel1] = post(m[sel1], mode1);
      if (ld_en) m[ld_sel] = ld_val;
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (areg[i] !== m[i]) begin
          failures++;
          if (failures < 10) $display("FAIL A%0d=%h exp %h", i, areg[i], m[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
