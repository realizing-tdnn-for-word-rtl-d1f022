// Self-checking test of dnp2_chip.
//
// Every PE gets a program that (1) relays a word between its two external sides in both
// directions, adding its own constant, and (2) passes a token once round the chip's
// internal ring PE(0,0) -> PE(0,1) -> PE(1,1) -> PE(1,0) -> PE(0,0), each PE adding its
// constant. Testbench link endpoints sit on all eight external ports. This checks the
// wiring of all external and internal links, per-PE host access and the halted flags.
module tb_dnp2_chip;
  import dnp_pkg::*;
  import tb_asm_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic halted [4];
  host_req_t host [4];
  word_t host_rdata [4];
  link_fwd_t ext_tx [4][2], ext_rx [4][2];
  logic ext_tx_ack [4][2], ext_rx_ack [4][2];
  always #5 clk = ~clk;

  dnp2_chip dut (.clk, .rst_n, .start, .halted, .host, .host_rdata,
                 .ext_tx, .ext_tx_ack, .ext_rx, .ext_rx_ack);

  logic  iv [4][2], ir_ [4][2], ov [4][2], or_ [4][2];
  word_t id [4][2], od [4][2];
  for (genvar s = 0; s < 4; s++) begin : g_s
    for (genvar k = 0; k < 2; k++) begin : g_k
      link_tx u_src (.clk, .rst_n, .tx(ext_rx[s][k]), .tx_ack(ext_rx_ack[s][k]),
                     .valid(iv[s][k]), .ready(ir_[s][k]), .data(id[s][k]));
      link_rx u_snk (.clk, .rst_n, .rx(ext_tx[s][k]), .rx_ack(ext_tx_ack[s][k]),
                     .valid(ov[s][k]), .ready(or_[s][k]), .data(od[s][k]));
    end
  end

  int checks = 0, failures = 0;
  initial begin
    #3000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per PE: external sides a and b (with position k), ring in/out directions
  dir_e side_a [4] = '{DIR_S, DIR_S, DIR_N, DIR_N};
  int   pos_a  [4] = '{0, 1, 0, 1};
  dir_e side_b [4] = '{DIR_W, DIR_E, DIR_W, DIR_E};
  int   pos_b  [4] = '{0, 0, 1, 1};
  dir_e ring_in  [4] = '{DIR_N, DIR_W, DIR_E, DIR_S};
  dir_e ring_out [4] = '{DIR_E, DIR_N, DIR_S, DIR_W};
  word_t cst [4];

  task automatic hwrite(int p, memsel_e m, int a, word_t d);
    @(negedge clk);
    host[p].we = 1; host[p].mem = m; host[p].addr = 9'(a); host[p].wdata = d;
    @(negedge clk);
    host[p].we = 0;
  endtask

  function automatic void mkprog(int p, ref word_t pr[$]);
    logic [11:0] iopr = {2'(ring_in[p]), 2'(ring_out[p]), 2'(side_b[p]), 2'(side_a[p]),
                         2'(side_a[p]), 2'(side_b[p])};
    pr = {};
    pr.push_back(i_ldi(0, iopr[11:8]));
    pr.push_back(i_ldi(1, 8));
    pr.push_back(i_alu(0, 1, ALU_SHL));
    pr.push_back(i_ldi(1, iopr[7:0]));
    pr.push_back(i_alu(0, 1, ALU_OR));
    pr.push_back(i_setiopr(0));
    pr.push_back(i_lda(0, 0));
    pr.push_back(i_ldx(7, 0));
    pr.push_back(i_recv(2, 0)); pr.push_back(i_alu(2, 7, ALU_ADD)); pr.push_back(i_send(2, 0));
    pr.push_back(i_recv(2, 1)); pr.push_back(i_alu(2, 7, ALU_ADD)); pr.push_back(i_send(2, 1));
    if (p == 0) begin
      pr.push_back(i_alu(2, 7, ALU_MOV));
      pr.push_back(i_send(2, 2));
      pr.push_back(i_recv(2, 2));
      pr.push_back(i_lda(1, 1));
      pr.push_back(i_stx(2, 1));
    end else begin
      pr.push_back(i_recv(2, 2)); pr.push_back(i_alu(2, 7, ALU_ADD)); pr.push_back(i_send(2, 2));
    end
    pr.push_back(i_halt());
  endfunction

  task automatic relay(dir_e si, int ki, dir_e so, int ko, word_t v, word_t exp);
    @(negedge clk);
    iv[si][ki] = 1; id[si][ki] = v;
    while (!ir_[si][ki]) @(negedge clk);
    @(negedge clk); iv[si][ki] = 0;
    or_[so][ko] = 1;
    while (!ov[so][ko]) @(negedge clk);
    checks++;
    if (od[so][ko] !== exp) begin
      failures++; $display("FAIL relay %0d.%0d -> %0d.%0d: %h expected %h", si, ki, so, ko, od[so][ko], exp);
    end
    @(negedge clk); or_[so][ko] = 0;
  endtask

  word_t pr [$];
  word_t v;
  initial begin
    foreach (host[p]) host[p] = '0;
    foreach (iv[s, k]) begin iv[s][k] = 0; id[s][k] = 0; or_[s][k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 4; p++) begin
      cst[p] = word_t'(16'h0100 * (p + 1) + 16'($urandom_range(0, 255)));
      hwrite(p, MEM_X, 0, cst[p]);
      mkprog(p, pr);
      foreach (pr[i]) hwrite(p, MEM_P, i, pr[i]);
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int p = 0; p < 4; p++) begin
      v = word_t'($urandom);
      relay(side_a[p], pos_a[p], side_b[p], pos_b[p], v, v + cst[p]);
      v = word_t'($urandom);
      relay(side_b[p], pos_b[p], side_a[p], pos_a[p], v, v + cst[p]);
    end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      if (halted[0] && halted[1] && halted[2] && halted[3]) break;
    end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (!halted[p]) begin failures++; $display("FAIL PE %0d did not halt", p); end
    end
    host[0].mem = MEM_X; host[0].addr = 1; #1;
    checks++;
    if (host_rdata[0] !== word_t'(cst[0] + cst[1] + cst[2] + cst[3])) begin
      failures++; $display("FAIL ring token %h", host_rdata[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
