// Self-checking test of emind_host_if at M = 16: random column-mode, row-mode and
// broadcast accesses; every PE's write enable and data, and every read-back bus, are
// compared with the expected routing.
module tb_emind_host_if;
  import dnp_pkg::*;
  localparam int M = 16;
  logic we, by_row, bcast;
  memsel_e mem;
  logic [8:0] addr;
  logic [3:0] sel;
  word_t wdata [M], rdata [M];
  host_req_t pe_req [M][M];
  word_t pe_rdata [M][M];
  int checks = 0, failures = 0;

  emind_host_if dut (.we, .mem, .addr, .by_row, .bcast, .sel, .wdata, .rdata,
                              .pe_req, .pe_rdata);

  initial begin
    for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) pe_rdata[i][j] = word_t'(i * 256 + j);
    for (int k = 0; k < 400; k++) begin
      we = $urandom; by_row = $urandom; bcast = ($urandom % 4) == 0;
      mem = memsel_e'($urandom_range(0, 2)); addr = 9'($urandom); sel = 4'($urandom);
      foreach (wdata[b]) wdata[b] = word_t'($urandom);
      #1;
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < M; j++) begin
          automatic bit hit = bcast || (by_row ? (sel == j) : (sel == i));
          automatic word_t d = by_row ? wdata[i] : wdata[j];
          checks++;
          if (pe_req[i][j].we !== (we && hit) || pe_req[i][j].addr !== addr ||
              pe_req[i][j].mem !== mem || pe_req[i][j].wdata !== d) begin
            failures++;
            if (failures < 10) $display("FAIL PE(%0d,%0d) we=%b", i, j, pe_req[i][j].we);
          end
        end
      end
      for (int b = 0; b < M; b++) begin
        checks++;
        if (rdata[b] !== (by_row ? word_t'(b * 256 + sel) : word_t'(sel * 256 + b))) begin
          failures++;
          if (failures < 10) $display("FAIL rdata[%0d]=%h", b, rdata[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
