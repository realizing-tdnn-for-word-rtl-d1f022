// Self-checking test of dnp_regfile: random writes and dual reads against a shadow copy.
module tb_dnp_regfile;
  import dnp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] ra, rb, wa;
  word_t da, db, wd;
  logic we;
  word_t shadow [8];
  int checks = 0, failures = 0;

  dnp_regfile dut (.clk, .rst_n, .ra, .rb, .da, .db, .we, .wa, .wd);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ra = 0; rb = 0; wa = 0; wd = 0;
    foreach (shadow[i]) shadow[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      ra = $urandom; rb = $urandom;
      #1;
      checks++;
      if (da !== shadow[ra] || db !== shadow[rb]) begin
        failures++;
        if (failures < 10) $display("FAIL ra=%0d da=%h exp %h rb=%0d db=%h exp %h", ra, da, shadow[ra], rb, db, shadow[rb]);
      end
      we = $urandom; wa = $urandom; wd = word_t'($urandom);
      @(posedge clk);
      if (we) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
