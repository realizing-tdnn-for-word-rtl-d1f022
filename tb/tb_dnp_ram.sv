// Self-checking test of dnp_ram at its default 512-word size: random writes from both
// ports (the host port wins a same-address collision) and reads from both ports against
// a shadow array.
module tb_dnp_ram;
  import dnp_pkg::*;
  localparam int D = 512;
  logic clk = 0;
  logic a_we, b_we;
  logic [8:0] a_addr, b_addr;
  word_t a_wdata, b_wdata, a_rdata, b_rdata;
  word_t shadow [D];
  int checks = 0, failures = 0;

  dnp_ram dut (.clk, .a_we, .a_addr, .a_wdata, .a_rdata, .b_we, .b_addr, .b_wdata, .b_rdata);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through port B
    for (int k = 0; k < D; k++) begin
      @(negedge clk); b_we = 1; b_addr = 9'(k); b_wdata = word_t'($urandom); shadow[k] = b_wdata;
    end
    @(negedge clk); b_we = 0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      a_addr = 9'($urandom); b_addr = (k % 7 == 0) ? a_addr : 9'($urandom);
      a_we = $urandom; b_we = ($urandom % 3) == 0;
      a_wdata = word_t'($urandom); b_wdata = word_t'($urandom);
      #1;
      checks++;
      if (a_rdata !== shadow[a_addr] || b_rdata !== shadow[b_addr]) begin
        failures++;
        if (failures < 10) $display("FAIL read a[%0d]=%h exp %h b[%0d]=%h exp %h", a_addr, a_rdata, shadow[a_addr], b_addr, b_rdata, shadow[b_addr]);
      end
      @(posedge clk);
      if (a_we) shadow[a_addr] = a_wdata;
      if (b_we) shadow[b_addr] = b_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
