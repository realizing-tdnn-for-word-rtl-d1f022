// Self-checking program-level test of one DNP-II PE.
//
// The PE's north output is looped back into its south input and its west output into
// its east input (a 1 x 1 torus); its west input and east output go to testbench link
// endpoints. Programs are loaded through the host bus, started, and the results read back
// from the X memory and compared with values computed here. Covered: multiply-accumulate
// with the repeat counter, accumulator shift/saturation, ALU, DJNZ loop, CALL/RET,
// indexed table look-up, SEND/RECV over the loop-back links, a RECV that stalls until the
// testbench delivers a word, IOPR rewrite, and the timing claims: one MAC per clock and
// two clocks for a SEND into a free port.
module tb_dnp_pe;
  import dnp_pkg::*;
  import tb_asm_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, halted;
  host_req_t host;
  word_t host_rdata;
  link_fwd_t tx [4], rx [4];
  logic tx_ack [4], rx_ack [4];
  always #5 clk = ~clk;

  dnp_pe dut (.clk, .rst_n, .start, .halted, .host, .host_rdata, .tx, .tx_ack, .rx, .rx_ack);

  // loop-backs
  assign rx[DIR_S] = tx[DIR_N];
  assign tx_ack[DIR_N] = rx_ack[DIR_S];
  assign rx[DIR_E] = tx[DIR_W];
  assign tx_ack[DIR_W] = rx_ack[DIR_E];
  // testbench endpoints on W input and E output
  logic tb_in_valid, tb_in_ready, tb_out_valid, tb_out_ready;
  word_t tb_in_data, tb_out_data;
  link_tx u_src (.clk, .rst_n, .tx(rx[DIR_W]), .tx_ack(rx_ack[DIR_W]),
                 .valid(tb_in_valid), .ready(tb_in_ready), .data(tb_in_data));
  link_rx u_snk (.clk, .rst_n, .rx(tx[DIR_E]), .rx_ack(tx_ack[DIR_E]),
                 .valid(tb_out_valid), .ready(tb_out_ready), .data(tb_out_data));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    #2000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hwrite(memsel_e m, int a, word_t d);
    @(negedge clk);
    host.we = 1; host.mem = m; host.addr = 9'(a); host.wdata = d;
    @(negedge clk);
    host.we = 0;
  endtask

  task automatic hread(memsel_e m, int a, output word_t d);
    @(negedge clk);
    host.we = 0; host.mem = m; host.addr = 9'(a);
    #1 d = host_rdata;
  endtask

  task automatic load(word_t p[$]);
    foreach (p[i]) hwrite(MEM_P, i, p[i]);
  endtask

  task automatic run(output int cycles);
    int c0;
    @(negedge clk); start = 1; c0 = cyc;
    @(negedge clk); start = 0;
    while (!halted) @(negedge clk);
    cycles = cyc - c0;
  endtask

  task automatic expect_eq(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  word_t xs [8], ws [8];
  word_t prog [$];
  word_t r;
  int n1, n2, c_mac16, c_mac64, c_send, c_nop;
  longint acc;

  initial begin
    host = '0; tb_in_valid = 0; tb_in_data = 0; tb_out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // data: X[0..7], W[0..7], table W[100..115] = 1000 + 7*i
    acc = 0;
    for (int i = 0; i < 8; i++) begin
      xs[i] = word_t'($urandom_range(0, 2000)) - 16'd1000;
      ws[i] = word_t'($urandom_range(0, 2000)) - 16'd1000;
      hwrite(MEM_X, i, xs[i]);
      hwrite(MEM_W, i, ws[i]);
      acc += longint'($signed(xs[i])) * longint'($signed(ws[i]));
    end
    for (int i = 0; i < 16; i++) hwrite(MEM_W, 100 + i, word_t'(1000 + 7*i));

    // ---------------- program 1: functional
    prog = {};
    prog.push_back(i_lda(0, 0));                 // 0
    prog.push_back(i_lda(1, 0));                 // 1
    prog.push_back(i_lda(2, 64));                // 2  result pointer
    prog.push_back(i_mac(0, 1, AM_INC, AM_INC, 1)); // 3 first product
    prog.push_back(i_rpt(7));                    // 4
    prog.push_back(i_mac(0, 1, AM_INC, AM_INC, 0)); // 5
    prog.push_back(i_acc2r(1, 4));               // 6  R1 = sat(acc >>> 4)
    prog.push_back(i_stx(1, 2, AM_INC));         // 7  X[64]
    prog.push_back(i_ldi(2, 100));               // 8
    prog.push_back(i_ldi(3, -5));                // 9
    prog.push_back(i_alu(2, 3, ALU_ADD));        // 10 R2 = 95
    prog.push_back(i_stx(2, 2, AM_INC));         // 11 X[65]
    prog.push_back(i_ldi(4, 5));                 // 12
    prog.push_back(i_ldi(5, 0));                 // 13
    prog.push_back(i_alu(5, 2, ALU_ADD));        // 14 loop: R5 += R2
    prog.push_back(i_djnz(4, 14));               // 15
    prog.push_back(i_stx(5, 2, AM_INC));         // 16 X[66] = 475
    prog.push_back(i_call(40));                  // 17
    prog.push_back(i_stx(6, 2, AM_INC));         // 18 X[67] = 77
    prog.push_back(i_send(1, 0));                // 19 N -> loops to S
    prog.push_back(i_recv(7, 0));                // 20 from S
    prog.push_back(i_stx(7, 2, AM_INC));         // 21 X[68] = R1
    prog.push_back(i_recv(0, 1));                // 22 from W (testbench), stalls
    prog.push_back(i_ldi(3, 1));                 // 23
    prog.push_back(i_alu(0, 3, ALU_ADD));        // 24
    prog.push_back(i_send(0, 1));                // 25 to E (testbench)
    prog.push_back(i_lda(3, 100));               // 26
    prog.push_back(i_ldi(0, 3));                 // 27
    prog.push_back(i_ldw(6, 3, AM_INDEX, 0));    // 28 R6 = W[100+3]
    prog.push_back(i_stx(6, 2, AM_INC));         // 29 X[69] = 1021
    // rewrite IOPR: pair 0 = (in E, out W)
    prog.push_back(i_ldi(0, {2'(DIR_E), 2'(DIR_W)}));  // 30
    prog.push_back(i_setiopr(0));                // 31
    prog.push_back(i_send(2, 0));                // 32 W -> loops to E
    prog.push_back(i_recv(7, 0));                // 33
    prog.push_back(i_stx(7, 2, AM_INC));         // 34 X[70] = 95
    prog.push_back(i_ldi(0, -3));                // 35
    prog.push_back(i_ldi(3, 2));                 // 36
    prog.push_back(i_alu(0, 3, ALU_SHL));        // 37 R0 = -12
    prog.push_back(i_stx(0, 2, AM_INC));         // 38 X[71]
    prog.push_back(i_halt());                    // 39
    prog.push_back(i_ldi(6, 77));                // 40 subroutine
    prog.push_back(i_ret());                     // 41
    load(prog);

    fork
      run(n1);
      begin
        // deliver the word for the RECV at 22 only after a long wait
        repeat (200) @(negedge clk);
        checks++;
        if (halted) begin failures++; $display("FAIL PE did not wait for the input word"); end
        tb_in_valid = 1; tb_in_data = 16'h1234;
        while (!tb_in_ready) @(negedge clk);
        @(negedge clk); tb_in_valid = 0;
        tb_out_ready = 1;
        while (!tb_out_valid) @(negedge clk);
        expect_eq("word sent east", tb_out_data, 16'h1235);
        @(negedge clk); tb_out_ready = 0;
      end
    join

    hread(MEM_X, 64, r); expect_eq("MAC result", r, sat_shift(acc, 4));
    hread(MEM_X, 65, r); expect_eq("ALU add", r, 16'd95);
    hread(MEM_X, 66, r); expect_eq("DJNZ loop", r, 16'd475);
    hread(MEM_X, 67, r); expect_eq("CALL/RET", r, 16'd77);
    hread(MEM_X, 68, r); expect_eq("N->S loop-back", r, sat_shift(acc, 4));
    hread(MEM_X, 69, r); expect_eq("indexed table", r, 16'd1021);
    hread(MEM_X, 70, r); expect_eq("IOPR rewrite W->E", r, 16'd95);
    hread(MEM_X, 71, r); expect_eq("ALU shift", r, -16'sd12);

    // saturation: acc = 0x7fff * 0x7fff * 8 > 16 bits after >>> 4
    hwrite(MEM_X, 0, 16'h7fff); hwrite(MEM_W, 0, 16'h7fff);
    prog = '{i_lda(0, 0), i_lda(1, 0), i_mac(0, 1, AM_PLAIN, AM_PLAIN, 1), i_rpt(7),
             i_mac(0, 1, AM_PLAIN, AM_PLAIN, 0), i_acc2r(1, 4), i_lda(2, 80), i_stx(1, 2),
             i_ldi(3, -1), i_r2acc(3), i_acc2r(4, 0), i_stx(4, 2, AM_INDEX, 3), i_halt()};
    load(prog);
    run(n2);
    hread(MEM_X, 80, r); expect_eq("saturation", r, 16'h7fff);
    hread(MEM_X, 79, r); expect_eq("reg->acc->reg", r, 16'hffff);

    // timing: one product per clock
    prog = '{i_lda(0, 0), i_lda(1, 0), i_rpt(16), i_mac(0, 1, AM_INC, AM_INC, 0),
             i_acc2r(1, 0), i_halt()};
    load(prog); run(c_mac16);
    prog[2] = i_rpt(64);
    load(prog); run(c_mac64);
    checks++;
    if (c_mac64 - c_mac16 != 48) begin
      failures++; $display("FAIL MAC rate: 48 extra MACs took %0d clocks", c_mac64 - c_mac16);
    end
    // timing: SEND into a free port takes two clocks, like two NOPs
    prog = '{i_send(1, 1), i_halt()};
    tb_out_ready = 1;
    load(prog); run(c_send);
    prog = '{i_nop(), i_nop(), i_halt()};
    load(prog); run(c_nop);
    checks++;
    if (c_send != c_nop) begin
      failures++; $display("FAIL SEND took %0d clocks, two NOPs %0d", c_send, c_nop);
    end
    $display("clocks: prog1 %0d, 16 MAC %0d, 64 MAC %0d, SEND %0d", n1, c_mac16, c_mac64, c_send);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
