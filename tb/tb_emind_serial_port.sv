// Self-checking test of emind_serial_port. Link endpoints stand in for PE(0,M-1) (side A)
// and PE(0,0) (side B). With serial_en = 0 words must pass A -> B and B -> A; with
// serial_en = 1 words from A must reach the host stream and host words must reach A.
// The mode is switched several times; every word is checked in order and none may go
// to the wrong side.
module tb_emind_serial_port;
  import dnp_pkg::*;
  logic clk = 0, rst_n = 0, serial_en;
  always #5 clk = ~clk;

  link_fwd_t a_rx, a_tx, b_rx, b_tx;
  logic a_rx_ack, a_tx_ack, b_rx_ack, b_tx_ack;
  logic hov, hor, hiv, hir;
  word_t hod, hid;

  emind_serial_port dut (.clk, .rst_n, .serial_en,
    .a_rx, .a_rx_ack, .a_tx, .a_tx_ack, .b_rx, .b_rx_ack, .b_tx, .b_tx_ack,
    .host_out_valid(hov), .host_out_ready(hor), .host_out_data(hod),
    .host_in_valid(hiv), .host_in_ready(hir), .host_in_data(hid));

  // endpoints: A sends (into a_rx) and receives (from a_tx); same for B
  logic asv, asr, arv, arr, bsv, bsr, brv, brr;
  word_t asd, ard, bsd, brd;
  link_tx u_as (.clk, .rst_n, .tx(a_rx), .tx_ack(a_rx_ack), .valid(asv), .ready(asr), .data(asd));
  link_rx u_ar (.clk, .rst_n, .rx(a_tx), .rx_ack(a_tx_ack), .valid(arv), .ready(arr), .data(ard));
  link_tx u_bs (.clk, .rst_n, .tx(b_rx), .tx_ack(b_rx_ack), .valid(bsv), .ready(bsr), .data(bsd));
  link_rx u_br (.clk, .rst_n, .rx(b_tx), .rx_ack(b_tx_ack), .valid(brv), .ready(brr), .data(brd));

  int checks = 0, failures = 0;
  initial begin
    #2000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // push one word from a source and wait for it at a sink; wrong sinks must stay empty
  task automatic xfer(int src, int dst, word_t v);
    @(negedge clk);
    case (src)
      0: begin asv = 1; asd = v; while (!asr) @(negedge clk); @(negedge clk); asv = 0; end
      1: begin bsv = 1; bsd = v; while (!bsr) @(negedge clk); @(negedge clk); bsv = 0; end
      default: begin hiv = 1; hid = v; while (!hir) @(negedge clk); @(negedge clk); hiv = 0; end
    endcase
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      if (dst == 0 && arv) break;
      if (dst == 1 && brv) break;
      if (dst == 2 && hov) break;
    end
    checks++;
    case (dst)
      0: begin if (!arv || ard !== v) begin failures++; $display("FAIL at A %h", ard); end arr = 1; end
      1: begin if (!brv || brd !== v) begin failures++; $display("FAIL at B %h", brd); end brr = 1; end
      default: begin if (!hov || hod !== v) begin failures++; $display("FAIL at host %h", hod); end hor = 1; end
    endcase
    checks++;
    if ((dst != 0 && arv) || (dst != 1 && brv) || (dst != 2 && hov)) begin
      failures++; $display("FAIL word at a wrong side");
    end
    @(negedge clk); arr = 0; brr = 0; hor = 0;
  endtask

  initial begin
    serial_en = 0; asv = 0; bsv = 0; hiv = 0; arr = 0; brr = 0; hor = 0; asd = 0; bsd = 0; hid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 6; r++) begin
      serial_en = r[0];
      for (int k = 0; k < 10; k++) begin
        if (!serial_en) begin
          xfer(0, 1, word_t'($urandom));
          xfer(1, 0, word_t'($urandom));
        end else begin
          xfer(0, 2, word_t'($urandom));
          xfer(2, 0, word_t'($urandom));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
