// Self-checking test of dnp_mult: a stream of random signed operands, one per clock, with
// gaps; each product must appear exactly one clock after its operands.
module tb_dnp_mult;
  import dnp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_tag, out_valid, out_tag;
  word_t a, b;
  logic signed [31:0] p;
  int checks = 0, failures = 0;
  logic signed [31:0] exp_p;
  logic exp_v, exp_t;

  dnp_mult dut (.clk, .rst_n, .in_valid, .in_tag, .a, .b, .out_valid, .out_tag, .p);

  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_tag = 0; a = 0; b = 0; exp_v = 0; exp_t = 0; exp_p = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      in_tag = $urandom;
      a = (k < 4) ? 16'h8000 : word_t'($urandom);
      b = (k < 2) ? 16'h8000 : word_t'($urandom);
      exp_v = in_valid; exp_t = in_tag; exp_p = $signed(a) * $signed(b);
      @(posedge clk); #1;
      checks++;
      if (out_valid !== exp_v || (exp_v && (p !== exp_p || out_tag !== exp_t))) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d a=%h b=%h p=%h exp=%h", k, a, b, p, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
