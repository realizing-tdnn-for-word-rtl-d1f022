// Self-checking test of dnp_comm: two communication blocks on different clocks (10 ns and
// 14 ns) are joined port to port. Side A streams random words on all four port pairs,
// first with the reset IOPR and then with a rewritten one; side B receives them through
// its own IOPR. Each port's words must arrive complete and in order, a busy output latch
// must refuse a second word, and both directions are exercised.
module tb_dnp_comm;
  import dnp_pkg::*;
  logic clka = 0, clkb = 0, rst_n = 0;
  always #5 clka = ~clka;
  always #7 clkb = ~clkb;

  logic a_iopr_we, b_iopr_we, a_send_en, b_send_en, a_take, b_take;
  word_t a_iopr_wd, b_iopr_wd, a_iopr, b_iopr, a_sd, b_sd, a_rd, b_rd;
  logic [1:0] a_sp, b_sp, a_rp, b_rp;
  logic a_sready, b_sready, a_rvalid, b_rvalid;
  link_fwd_t a_tx [4], b_tx [4];
  logic a_tx_ack [4], b_tx_ack [4], a_rx_ack [4], b_rx_ack [4];
  link_fwd_t a_rx [4], b_rx [4];

  dnp_comm ua (.clk(clka), .rst_n, .iopr_we(a_iopr_we), .iopr_wdata(a_iopr_wd), .iopr(a_iopr),
               .send_en(a_send_en), .send_pair(a_sp), .send_data(a_sd), .send_ready(a_sready),
               .recv_take(a_take), .recv_pair(a_rp), .recv_valid(a_rvalid), .recv_data(a_rd),
               .tx(a_tx), .tx_ack(a_tx_ack), .rx(a_rx), .rx_ack(a_rx_ack));
  dnp_comm ub (.clk(clkb), .rst_n, .iopr_we(b_iopr_we), .iopr_wdata(b_iopr_wd), .iopr(b_iopr),
               .send_en(b_send_en), .send_pair(b_sp), .send_data(b_sd), .send_ready(b_sready),
               .recv_take(b_take), .recv_pair(b_rp), .recv_valid(b_rvalid), .recv_data(b_rd),
               .tx(b_tx), .tx_ack(b_tx_ack), .rx(b_rx), .rx_ack(b_rx_ack));

  for (genvar d = 0; d < 4; d++) begin : g_w
    assign b_rx[d] = a_tx[d];
    assign a_tx_ack[d] = b_rx_ack[d];
    assign a_rx[d] = b_tx[d];
    assign b_tx_ack[d] = a_rx_ack[d];
  end

  int checks = 0, failures = 0;
  word_t q [4][$];   // words in flight A -> B per physical port
  word_t qb [4][$];  // words in flight B -> A per physical port
  int sent = 0, rcvd = 0, refused = 0;
  localparam int NWORDS = 400;

  initial begin
    #2000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A sends; a second attempt right after a send must see the latch busy
  task automatic a_sender(int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clka);
      a_sp = 2'($urandom); a_sd = word_t'($urandom);
      while (!a_sready) @(negedge clka);
      a_send_en = 1;
      q[a_iopr[4*a_sp +: 2]].push_back(a_sd);
      @(negedge clka);
      a_send_en = 0;
      checks++;
      if (a_sready) begin
        // latch just filled cannot be free one clock later (ack needs a round trip)
        failures++; $display("FAIL latch free right after a send");
      end
      sent++;
    end
  endtask

  initial begin
    a_iopr_we = 0; b_iopr_we = 0; a_send_en = 0; b_send_en = 0; a_take = 0; b_take = 0;
    a_iopr_wd = 0; b_iopr_wd = 0; a_sd = 0; b_sd = 0; a_sp = 0; b_sp = 0; a_rp = 0; b_rp = 0;
    #33 rst_n = 1;
    // reset IOPR: pair p uses out port {N,E,S,W}[p]
    checks++;
    if (a_iopr !== {2'd1,2'd3,2'd0,2'd2,2'd3,2'd1,2'd2,2'd0}) begin
      failures++; $display("FAIL IOPR reset %h", a_iopr);
    end
    a_sender(NWORDS / 2);
    // rewrite IOPR of A: pair p -> out port (3-p), in port p
    @(negedge clka);
    a_iopr_we = 1;
    a_iopr_wd = {2'd3, 2'd0, 2'd2, 2'd1, 2'd1, 2'd2, 2'd0, 2'd3};
    @(negedge clka);
    a_iopr_we = 0;
    checks++;
    if (a_iopr !== {2'd3, 2'd0, 2'd2, 2'd1, 2'd1, 2'd2, 2'd0, 2'd3}) begin
      failures++; $display("FAIL IOPR write");
    end
    a_sender(NWORDS / 2);
  end

  // B receives on all ports: pair p of the reset IOPR has input port S,W,N,E for p=0..3,
  // so poll each pair in turn and take what is there
  initial begin
    @(posedge rst_n);
    while (rcvd < NWORDS) begin
      @(negedge clkb);
      b_rp = 2'($urandom);
      #1;
      if (b_rvalid) begin
        automatic logic [1:0] port = b_iopr[4*b_rp + 2 +: 2];
        b_take = 1;
        checks++;
        if (q[port].size() == 0 || q[port][0] !== b_rd) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d got %h", port, b_rd);
        end else void'(q[port].pop_front());
        rcvd++;
        @(negedge clkb);
        b_take = 0;
      end
    end
  end

  // B -> A traffic at the same time (uses the reset IOPR on both sides)
  int bsent = 0, arcvd = 0;
  initial begin
    @(posedge rst_n);
    for (int k = 0; k < 100; k++) begin
      @(negedge clkb);
      b_sp = 2'($urandom); b_sd = word_t'($urandom);
      while (!b_sready) @(negedge clkb);
      b_send_en = 1;
      qb[b_iopr[4*b_sp +: 2]].push_back(b_sd);
      @(negedge clkb);
      b_send_en = 0;
      bsent++;
    end
  end
  initial begin
    @(posedge rst_n);
    while (arcvd < 100) begin
      @(negedge clka);
      a_rp = 2'($urandom);
      #1;
      if (a_rvalid) begin
        automatic logic [1:0] port = a_iopr[4*a_rp + 2 +: 2];
        a_take = 1;
        checks++;
        if (qb[port].size() == 0 || qb[port][0] !== a_rd) begin
          failures++;
          if (failures < 10) $display("FAIL B->A port %0d got %h", port, a_rd);
        end else void'(qb[port].pop_front());
        arcvd++;
        @(negedge clka);
        a_take = 0;
      end
    end
  end

  initial begin
    wait (rcvd == NWORDS && arcvd == 100);
    #200;
    for (int d = 0; d < 4; d++) begin
      checks++;
      if (q[d].size() != 0 || qb[d].size() != 0) begin failures++; $display("FAIL words lost on port %0d", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
