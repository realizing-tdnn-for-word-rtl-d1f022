// End-to-end TDNN recognition run on the EMIND-II array (shared by tb_emind2 and
// tb_emind2_full).
//
// Mapping (follows the array's published TDNN data flow):
//  * PE(0,j), j < M-1, holds input feature j over T0 frames (host download) and sends it
//    north; every PE(i,j) of the sum-of-products block stores the column's inputs and
//    forwards them north.
//  * Layer 1: row i (1..M-1) computes hidden neuron i-1. PE(i,j) forms the W0-tap sum of
//    products of feature j, adds the partial sum arriving from the west (PE(i,0) starts
//    from the negated threshold) and sends it east. PE(i,M-1) applies the activation
//    table and, once all T1 outputs are there, sends them east; they wrap round the torus
//    into PE(i,0) and travel along row i, every PE keeping a copy.
//  * Layer 2: column j computes output neurons j, j+(M-1), ... (one slot each). PE(i,j)
//    forms the W1-tap sum of products of hidden neuron i-1, adds the partial sum from the
//    south (row 1 starts from the negated threshold) and sends it north; it wraps round
//    into PE(0,j), which applies the activation table and sums the squares over the T2
//    frames into the class score O.
//  * The host reads the scores from the X memories of PE(0,j).
// Then a short second run sends a word from PE(0,M-1) eastwards, once through the torus
// to PE(0,0) and once, with the serial port enabled, to the host.
//
// Every number is checked against a reference computed here with the same fixed-point
// steps (products summed exactly, shifted and saturated to 16 bits, 16-bit wrap-around
// additions, 256-entry activation table). The mechanisms of the array are counted and
// each must occur: RECV and SEND stalls, multiply-accumulate drain stalls, repeated
// instructions, taken loop branches, vertical and horizontal torus wrap traffic, column-,
// row- and broadcast host loading, and both serial-port modes.
module tdnn_bench
  import dnp_pkg::*;
  import tb_asm_pkg::*;
#(
  parameter int M  = 16,
  parameter int W0 = 8,
  parameter int W1 = 7,
  parameter int T0 = 20,
  parameter int N  = 20,
  parameter int MAX_CYCLES = 400000,
  parameter bit LEARN = 1'b0
) ();
  localparam int F0 = M - 1;
  localparam int F1 = M - 1;
  localparam int T1 = T0 - W0 + 1;
  localparam int T2 = T1 - W1 + 1;
  localparam int NS = (N + M - 2) / (M - 1);   // output-neuron slots per column
  localparam int SH1 = 6, SH2 = 6, SHO = 8, FSH1 = 5, FSH2 = 5;
  localparam int LUT = 256;                    // activation table base in W memory
  localparam int SHD = 4, SHA = 6;             // delta and weight-gradient scaling
  localparam int TMPX = 110, TMPW = 190, DST = 200, RTG = 100, DWP = 64;

  logic clk = 0, rst_n = 0, start = 0, all_halted;
  logic halted [M][M];
  logic host_we = 0, host_by_row = 0, host_bcast = 0;
  memsel_e host_mem = MEM_P;
  logic [ADDR_W-1:0] host_addr = '0;
  logic [$clog2(M)-1:0] host_sel = '0;
  word_t host_wdata [M], host_rdata [M];
  logic serial_en = 0, sov, sor = 0, siv = 0, sir;
  word_t sod, sid = '0;
  always #5 clk = ~clk;

  if (M == 16) begin : g_full
    emind2 dut (.clk, .rst_n, .start, .all_halted, .halted,
      .host_we, .host_mem, .host_addr, .host_by_row, .host_bcast, .host_sel, .host_wdata, .host_rdata,
      .serial_en, .ser_out_valid(sov), .ser_out_ready(sor), .ser_out_data(sod),
      .ser_in_valid(siv), .ser_in_ready(sir), .ser_in_data(sid));
  end else begin : g_small
    emind2 #(.M(M)) dut (.clk, .rst_n, .start, .all_halted, .halted,
      .host_we, .host_mem, .host_addr, .host_by_row, .host_bcast, .host_sel, .host_wdata, .host_rdata,
      .serial_en, .ser_out_valid(sov), .ser_out_ready(sor), .ser_out_data(sod),
      .ser_in_valid(siv), .ser_in_ready(sir), .ser_in_data(sid));
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_recv_stall = 0, n_send_stall = 0, n_mac_stall = 0, n_rpt = 0, n_branch = 0;
  int n_vwrap = 0, n_hwrap = 0, n_serial_host = 0, n_serial_torus = 0;
  int n_load_col = 0, n_load_row = 0, n_load_bcast = 0;

  // counts the events of one PE (path = hierarchical path of its dnp_pe)
`define TDNN_BENCH_PROBE(path) \
        always @(posedge clk) begin \
          if (path.exec) begin \
            if (path.stall && path.io_wait && path.op == OP_RECV) n_recv_stall++; \
            if (path.stall && path.io_wait && path.op == OP_SEND) n_send_stall++; \
            if (path.stall && path.op == OP_ACC) n_mac_stall++; \
            if (!path.stall && path.rpt_cnt > 1) n_rpt++; \
            if (path.taken) n_branch++; \
          end \
        end

  for (genvar ci = 0; ci < M/2; ci++) begin : g_mr
    for (genvar cj = 0; cj < M/2; cj++) begin : g_mc
      for (genvar p = 0; p < 4; p++) begin : g_mp
        if (M == 16) begin : g_f
          `TDNN_BENCH_PROBE(g_full.dut.g_cr[ci].g_cc[cj].u_chip.g_pe[p].u_pe)
        end else begin : g_s
          `TDNN_BENCH_PROBE(g_small.dut.g_cr[ci].g_cc[cj].u_chip.g_pe[p].u_pe)
        end
      end
    end
  end

  // torus wrap traffic: words leaving the top chip row northwards, the right chip column
  // eastwards (rows other than 0, whose wrap runs through the serial port)
  for (genvar cj = 0; cj < M/2; cj++) begin : g_vw
    for (genvar k = 0; k < 2; k++) begin : g_k
      logic r_q = 0, r_d;
      if (M == 16) begin : g_f
        assign r_d = g_full.dut.c_tx[M/2-1][cj][DIR_N][k].req;
      end else begin : g_s
        assign r_d = g_small.dut.c_tx[M/2-1][cj][DIR_N][k].req;
      end
      always @(posedge clk) begin
        r_q <= r_d;
        if (r_q != r_d) n_vwrap++;
      end
    end
  end
  for (genvar ci = 0; ci < M/2; ci++) begin : g_hw
    for (genvar k = 0; k < 2; k++) begin : g_k
      logic r_q = 0, r_d;
      if (M == 16) begin : g_f
        assign r_d = g_full.dut.c_tx[ci][M/2-1][DIR_E][k].req;
      end else begin : g_s
        assign r_d = g_small.dut.c_tx[ci][M/2-1][DIR_E][k].req;
      end
      always @(posedge clk) begin
        r_q <= r_d;
        if (r_q != r_d && !(ci == 0 && k == 0)) n_hwrap++;
      end
    end
  end

  // ------------------------------------------------------------ data and reference
  word_t x0  [F0][T0];
  word_t w1  [F1][F0][W0];
  word_t w2  [N][F1][W1];
  word_t ph1 [F1];
  word_t ph2 [N];
  word_t lut [256];
  word_t x1r [F1][T1];
  word_t x2r [N][T2];
  word_t oref [N];
  word_t rtgt [N];
  word_t dwp  [N][F1][W1];
  word_t dref [N][T2];
  word_t w2n  [N][F1][W1];
  word_t dwn  [N][F1][W1];

  function automatic word_t act(word_t v, int fsh);
    word_t idx = (word_t'($signed(v) >>> fsh) + 16'd128) & 16'd255;
    return lut[idx[7:0]];
  endfunction

  task automatic reference();
    for (int n = 0; n < F1; n++)
      for (int t = 0; t < T1; t++) begin
        word_t s = -ph1[n];
        for (int j = 0; j < F0; j++) begin
          longint a = 0;
          for (int k = 0; k < W0; k++) a += longint'($signed(x0[j][t+k])) * longint'($signed(w1[n][j][k]));
          s = s + sat_shift(a, SH1);
        end
        x1r[n][t] = act(s, FSH1);
      end
    for (int m = 0; m < N; m++) begin
      longint q = 0;
      for (int t = 0; t < T2; t++) begin
        word_t s = -ph2[m];
        for (int i = 0; i < F1; i++) begin
          longint a = 0;
          for (int k = 0; k < W1; k++) a += longint'($signed(x1r[i][t+k])) * longint'($signed(w2[m][i][k]));
          s = s + sat_shift(a, SH2);
        end
        x2r[m][t] = act(s, FSH2);
        q += longint'($signed(x2r[m][t])) * longint'($signed(x2r[m][t]));
      end
      oref[m] = sat_shift(q, SHO);
    end
    // output-layer learning step: delta at the output line, gradient and momentum
    for (int m = 0; m < N; m++) begin
      word_t e = oref[m] - rtgt[m];
      for (int t = 0; t < T2; t++) begin
        word_t x = x2r[m][t];
        word_t fp = sat_shift(longint'($signed(x)) * longint'($signed(16'd255 - x)), 8);
        word_t q2 = sat_shift(longint'($signed(x)) * longint'($signed(fp)), 8);
        dref[m][t] = sat_shift(longint'($signed(q2)) * longint'($signed(e)), SHD);
      end
      for (int i = 0; i < F1; i++)
        for (int k = 0; k < W1; k++) begin
          longint a = 0;
          word_t g;
          for (int t = 0; t < T2; t++) a += longint'($signed(x1r[i][t+k])) * longint'($signed(dref[m][t]));
          g = sat_shift(a, SHA);
          dwn[m][i][k] = g + word_t'($signed(dwp[m][i][k]) >>> 1);
          w2n[m][i][k] = w2[m][i][k] + dwn[m][i][k];
        end
    end
  endtask

  // ------------------------------------------------------------ programs
  function automatic int slots(int j);
    int c = 0;
    for (int s = 0; s < NS; s++) if (j + s * (M - 1) < N) c++;
    return c;
  endfunction

  // activation: R2 <= table[((R2 >>> R5) + R6) & R7] through A2 = table base
  function automatic void emit_act(ref word_t pr[$]);
    pr.push_back(i_alu(2, 5, ALU_SHR));
    pr.push_back(i_alu(2, 6, ALU_ADD));
    pr.push_back(i_alu(2, 7, ALU_AND));
    pr.push_back(i_ldw(4, 2, AM_INDEX, 2));
  endfunction

  // R2 <= sat(sum_k X[R6+k] * W[wbase+k] >>> sh), k < taps
  function automatic void emit_sop(ref word_t pr[$], input int wbase, input int taps, input int sh);
    pr.push_back(i_mova(0, 6));
    pr.push_back(i_lda(1, wbase));
    pr.push_back(i_mac(0, 1, AM_INC, AM_INC, 1));
    if (taps > 1) begin
      pr.push_back(i_rpt(taps - 1));
      pr.push_back(i_mac(0, 1, AM_INC, AM_INC, 0));
    end
    pr.push_back(i_acc2r(2, sh));
  endfunction

  function automatic void mkprog(int i, int j, ref word_t pr[$]);
    int l;
    pr = {};
    if (i == 0 && j == M - 1) begin
      pr.push_back(i_halt());
    end else if (i == 0) begin
      // input line: send the inputs north
      pr.push_back(i_lda(0, 0));
      pr.push_back(i_ldi(1, T0));
      l = pr.size();
      pr.push_back(i_ldx(2, 0, AM_INC));
      pr.push_back(i_send(2, 0));
      pr.push_back(i_djnz(1, l));
      // output line: activation and score per slot
      pr.push_back(i_lda(2, LUT));
      pr.push_back(i_ldi(5, FSH2));
      pr.push_back(i_ldi(6, 128));
      pr.push_back(i_ldi(7, 255));
      for (int s = 0; s < slots(j); s++) begin
        pr.push_back(i_lda(0, 64 + 16 * s));
        pr.push_back(i_lda(1, 128 + 16 * s));
        pr.push_back(i_ldi(1, T2));
        l = pr.size();
        pr.push_back(i_recv(2, 0));
        emit_act(pr);
        pr.push_back(i_stx(4, 0, AM_INC));
        pr.push_back(i_stw(4, 1, AM_INC));
        pr.push_back(i_djnz(1, l));
        pr.push_back(i_lda(0, 64 + 16 * s));
        pr.push_back(i_lda(1, 128 + 16 * s));
        pr.push_back(i_mac(0, 1, AM_INC, AM_INC, 1));
        if (T2 > 1) begin
          pr.push_back(i_rpt(T2 - 1));
          pr.push_back(i_mac(0, 1, AM_INC, AM_INC, 0));
        end
        pr.push_back(i_acc2r(2, SHO));
        pr.push_back(i_lda(3, 120 + s));
        pr.push_back(i_stx(2, 3));
      end
      if (LEARN) for (int s = 0; s < slots(j); s++) begin
        // e = O - R, then per frame delta = ((x2 * f'(x2)) >> 8) * e >> SHD, sent north
        pr.push_back(i_lda(3, 120 + s));
        pr.push_back(i_ldx(6, 3));
        pr.push_back(i_lda(3, RTG + s));
        pr.push_back(i_ldw(7, 3));
        pr.push_back(i_alu(6, 7, ALU_SUB));
        pr.push_back(i_lda(0, 64 + 16 * s));
        pr.push_back(i_lda(2, TMPX));
        pr.push_back(i_lda(1, TMPW));
        pr.push_back(i_ldi(1, T2));
        l = pr.size();
        pr.push_back(i_ldx(2, 0, AM_INC));
        pr.push_back(i_ldi(3, 255));
        pr.push_back(i_alu(3, 2, ALU_SUB));
        pr.push_back(i_stx(2, 2));
        pr.push_back(i_stw(3, 1));
        pr.push_back(i_mac(2, 1, AM_PLAIN, AM_PLAIN, 1));
        pr.push_back(i_acc2r(4, 8));                  // f'(x2)
        pr.push_back(i_stw(4, 1));
        pr.push_back(i_mac(2, 1, AM_PLAIN, AM_PLAIN, 1));
        pr.push_back(i_acc2r(4, 8));                  // x2 * f'(x2)
        pr.push_back(i_stx(4, 2));
        pr.push_back(i_stw(6, 1));
        pr.push_back(i_mac(2, 1, AM_PLAIN, AM_PLAIN, 1));
        pr.push_back(i_acc2r(4, SHD));                // delta
        pr.push_back(i_send(4, 0));
        pr.push_back(i_djnz(1, l));
      end
      pr.push_back(i_halt());
    end else if (j == M - 1) begin
      // layer-1 output column
      pr.push_back(i_lda(0, 32));
      pr.push_back(i_lda(2, LUT));
      pr.push_back(i_ldi(5, FSH1));
      pr.push_back(i_ldi(6, 128));
      pr.push_back(i_ldi(7, 255));
      pr.push_back(i_ldi(1, T1));
      l = pr.size();
      pr.push_back(i_recv(2, 1));
      emit_act(pr);
      pr.push_back(i_stx(4, 0, AM_INC));
      pr.push_back(i_djnz(1, l));
      pr.push_back(i_lda(0, 32));
      pr.push_back(i_ldi(1, T1));
      l = pr.size();
      pr.push_back(i_ldx(2, 0, AM_INC));
      pr.push_back(i_send(2, 1));
      pr.push_back(i_djnz(1, l));
      pr.push_back(i_halt());
    end else begin
      // sum-of-products block
      pr.push_back(i_lda(0, 0));
      pr.push_back(i_ldi(1, T0));
      l = pr.size();
      pr.push_back(i_recv(2, 0));
      if (i < M - 1) pr.push_back(i_send(2, 0));
      pr.push_back(i_stx(2, 0, AM_INC));
      pr.push_back(i_djnz(1, l));
      // layer 1, partial sums eastwards
      pr.push_back(i_ldi(1, T1));
      pr.push_back(i_ldi(6, 0));
      pr.push_back(i_ldi(7, 1));
      l = pr.size();
      emit_sop(pr, 0, W0, SH1);
      if (j == 0) begin
        pr.push_back(i_lda(3, 16));
        pr.push_back(i_ldw(3, 3));
      end else pr.push_back(i_recv(3, 1));
      pr.push_back(i_alu(2, 3, ALU_ADD));
      pr.push_back(i_send(2, 1));
      pr.push_back(i_alu(6, 7, ALU_ADD));
      pr.push_back(i_djnz(1, l));
      // layer-1 outputs arriving from the west
      pr.push_back(i_lda(0, 32));
      pr.push_back(i_ldi(1, T1));
      l = pr.size();
      pr.push_back(i_recv(2, 1));
      if (j < M - 2) pr.push_back(i_send(2, 1));
      pr.push_back(i_stx(2, 0, AM_INC));
      pr.push_back(i_djnz(1, l));
      // layer 2, partial sums northwards
      for (int s = 0; s < slots(j); s++) begin
        pr.push_back(i_ldi(1, T2));
        pr.push_back(i_ldi(6, 32));
        l = pr.size();
        emit_sop(pr, 32 + 16 * s, W1, SH2);
        if (i == 1) begin
          pr.push_back(i_lda(3, 24 + s));
          pr.push_back(i_ldw(3, 3));
        end else pr.push_back(i_recv(3, 0));
        pr.push_back(i_alu(2, 3, ALU_ADD));
        pr.push_back(i_send(2, 0));
        pr.push_back(i_alu(6, 7, ALU_ADD));
        pr.push_back(i_djnz(1, l));
      end
      if (LEARN) for (int s = 0; s < slots(j); s++) begin
        // deltas arrive from the south, are passed north and kept in W[DST..]
        pr.push_back(i_lda(1, DST));
        pr.push_back(i_ldi(1, T2));
        l = pr.size();
        pr.push_back(i_recv(2, 0));
        if (i < M - 1) pr.push_back(i_send(2, 0));
        pr.push_back(i_stw(2, 1, AM_INC));
        pr.push_back(i_djnz(1, l));
        // dW[k] = (sum_t x1[t+k] * delta[t]) >> SHA + dW_prev[k] / 2 ; w[k] += dW[k]
        pr.push_back(i_ldi(1, W1));
        pr.push_back(i_ldi(6, 32));
        pr.push_back(i_ldi(7, 1));
        pr.push_back(i_lda(2, 32 + 16 * s));
        pr.push_back(i_lda(3, DWP + 16 * s));
        l = pr.size();
        emit_sop(pr, DST, T2, SHA);
        pr.push_back(i_ldw(3, 3));
        pr.push_back(i_alu(3, 7, ALU_SHR));
        pr.push_back(i_alu(2, 3, ALU_ADD));
        pr.push_back(i_stw(2, 3, AM_INC));
        pr.push_back(i_ldw(4, 2));
        pr.push_back(i_alu(4, 2, ALU_ADD));
        pr.push_back(i_stw(4, 2, AM_INC));
        pr.push_back(i_alu(6, 7, ALU_ADD));
        pr.push_back(i_djnz(1, l));
      end
      pr.push_back(i_halt());
    end
  endfunction

  // ------------------------------------------------------------ host bus helpers
  task automatic hw_line(memsel_e m, bit by_row, bit bc, int sel, int addr, word_t d[M]);
    @(negedge clk);
    host_we = 1; host_mem = m; host_by_row = by_row; host_bcast = bc;
    host_sel = $clog2(M)'(sel); host_addr = ADDR_W'(addr);
    for (int k = 0; k < M; k++) host_wdata[k] = d[k];
    if (bc) n_load_bcast++; else if (by_row) n_load_row++; else n_load_col++;
    @(negedge clk);
    host_we = 0; host_bcast = 0;
  endtask

  task automatic hr_line(memsel_e m, bit by_row, int sel, int addr, output word_t d[M]);
    @(negedge clk);
    host_we = 0; host_mem = m; host_by_row = by_row; host_sel = $clog2(M)'(sel);
    host_addr = ADDR_W'(addr);
    #1;
    for (int k = 0; k < M; k++) d[k] = host_rdata[k];
  endtask

  task automatic run(output int cycles);
    int c0;
    @(negedge clk); start = 1; c0 = cyc;
    @(negedge clk); start = 0;
    while (!all_halted) @(negedge clk);
    cycles = cyc - c0;
  endtask

  // ------------------------------------------------------------ main
  word_t progs [M][M][$];
  word_t line [M];
  int plen, ncyc, c_load0;

  initial begin
    foreach (host_wdata[k]) host_wdata[k] = '0;
    for (int j = 0; j < F0; j++) for (int t = 0; t < T0; t++) x0[j][t] = word_t'($urandom_range(0, 255));
    for (int n = 0; n < F1; n++) begin
      ph1[n] = word_t'($urandom_range(0, 400)) - 16'd200;
      for (int j = 0; j < F0; j++) for (int k = 0; k < W0; k++) w1[n][j][k] = word_t'($urandom_range(0, 31)) - 16'd16;
    end
    for (int m = 0; m < N; m++) begin
      ph2[m] = word_t'($urandom_range(0, 400)) - 16'd200;
      for (int i = 0; i < F1; i++) for (int k = 0; k < W1; k++) w2[m][i][k] = word_t'($urandom_range(0, 31)) - 16'd16;
    end
    for (int m = 0; m < N; m++) begin
      rtgt[m] = word_t'($urandom_range(0, 600));
      for (int i = 0; i < F1; i++) for (int k = 0; k < W1; k++) dwp[m][i][k] = word_t'($urandom_range(0, 63)) - 16'd32;
    end
    for (int k = 0; k < 256; k++) lut[k] = word_t'($rtoi(255.0 / (1.0 + $exp(-(real'(k) - 128.0) / 24.0))));
    reference();

    repeat (3) @(negedge clk);
    rst_n = 1;
    c_load0 = cyc;

    // programs: one row of PEs per host cycle (column buses, row select)
    plen = 0;
    for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) begin
      mkprog(i, j, progs[i][j]);
      if (progs[i][j].size() > plen) plen = progs[i][j].size();
    end
    checks++;
    if (plen > PMEM_WORDS) begin failures++; $display("FAIL program too long: %0d words", plen); end
    // the learning step keeps its previous increments at W[DWP + 16*s], below W[DWP + 32]
    checks++;
    if (LEARN && (NS > 2 || W1 > 16 || T2 > 16)) begin failures++; $display("FAIL learning layout needs NS <= 2"); end
    for (int i = 0; i < M; i++)
      for (int a = 0; a < plen; a++) begin
        for (int j = 0; j < M; j++) line[j] = (a < progs[i][j].size()) ? progs[i][j][a] : i_halt();
        hw_line(MEM_P, 0, 0, i, a, line);
      end
    // activation table into every PE at once (broadcast)
    for (int a = 0; a < 256; a++) begin
      for (int k = 0; k < M; k++) line[k] = lut[a];
      hw_line(MEM_W, 0, 1, 0, LUT + a, line);
    end
    // inputs into row 0 (column buses)
    for (int t = 0; t < T0; t++) begin
      for (int j = 0; j < M; j++) line[j] = (j < F0) ? x0[j][t] : '0;
      hw_line(MEM_X, 0, 0, 0, t, line);
    end
    // weights: one column of PEs per host cycle (row buses, column select)
    for (int j = 0; j < M - 1; j++) begin
      for (int k = 0; k < W0; k++) begin
        for (int i = 0; i < M; i++) line[i] = (i >= 1) ? w1[i-1][j][k] : '0;
        hw_line(MEM_W, 1, 0, j, k, line);
      end
      for (int i = 0; i < M; i++) line[i] = (i >= 1) ? -ph1[i-1] : '0;
      hw_line(MEM_W, 1, 0, j, 16, line);
      for (int s = 0; s < slots(j); s++) begin
        for (int k = 0; k < W1; k++) begin
          for (int i = 0; i < M; i++) line[i] = (i >= 1) ? w2[j + s*(M-1)][i-1][k] : '0;
          hw_line(MEM_W, 1, 0, j, 32 + 16*s + k, line);
        end
        for (int i = 0; i < M; i++) line[i] = -ph2[j + s*(M-1)];
        hw_line(MEM_W, 1, 0, j, 24 + s, line);
        if (LEARN) begin
          for (int k = 0; k < W1; k++) begin
            for (int i = 0; i < M; i++) line[i] = (i >= 1) ? dwp[j + s*(M-1)][i-1][k] : '0;
            hw_line(MEM_W, 1, 0, j, DWP + 16*s + k, line);
          end
          for (int i = 0; i < M; i++) line[i] = rtgt[j + s*(M-1)];
          hw_line(MEM_W, 1, 0, j, RTG + s, line);
        end
      end
    end
    $display("download: %0d host cycles, program %0d words", cyc - c_load0, plen);

    run(ncyc);
    if (LEARN) $display("TDNN recognition pass + output-layer learning step: %0d clocks (M=%0d F0=%0d F1=%0d W0=%0d W1=%0d T0=%0d N=%0d)",
                        ncyc, M, F0, F1, W0, W1, T0, N);
    else       $display("TDNN recognition pass: %0d clocks (M=%0d F0=%0d F1=%0d W0=%0d W1=%0d T0=%0d N=%0d)",
                        ncyc, M, F0, F1, W0, W1, T0, N);

    // hidden layer in PE(i,M-1), read column M-1 with row buses
    for (int t = 0; t < T1; t++) begin
      hr_line(MEM_X, 1, M - 1, 32 + t, line);
      for (int i = 1; i < M; i++) begin
        checks++;
        if (line[i] !== x1r[i-1][t]) begin
          failures++;
          if (failures < 10) $display("FAIL x1[%0d][%0d] = %h expected %h", i-1, t, line[i], x1r[i-1][t]);
        end
      end
    end
    // layer-2 outputs and scores in PE(0,j), read row 0 with column buses
    for (int s = 0; s < NS; s++) begin
      for (int t = 0; t < T2; t++) begin
        hr_line(MEM_X, 0, 0, 64 + 16*s + t, line);
        for (int j = 0; j < M - 1; j++) if (j + s*(M-1) < N) begin
          checks++;
          if (line[j] !== x2r[j + s*(M-1)][t]) begin
            failures++;
            if (failures < 10) $display("FAIL x2[%0d][%0d] = %h expected %h", j + s*(M-1), t, line[j], x2r[j + s*(M-1)][t]);
          end
        end
      end
      hr_line(MEM_X, 0, 0, 120 + s, line);
      for (int j = 0; j < M - 1; j++) if (j + s*(M-1) < N) begin
        checks++;
        if (line[j] !== oref[j + s*(M-1)]) begin
          failures++;
          $display("FAIL O[%0d] = %0d expected %0d", j + s*(M-1), line[j], oref[j + s*(M-1)]);
        end
      end
    end
    for (int m = 0; m < N && m < 6; m++) $display("score O[%0d] = %0d", m, oref[m]);
    if (LEARN) begin
      int nlw = 0;
      for (int j = 0; j < M - 1; j++)
        for (int s = 0; s < slots(j); s++)
          for (int k = 0; k < W1; k++) begin
            automatic int m = j + s*(M-1);
            hr_line(MEM_W, 1, j, 32 + 16*s + k, line);
            for (int i = 1; i < M; i++) begin
              checks++; nlw++;
              if (line[i] !== w2n[m][i-1][k]) begin
                failures++;
                if (failures < 10) $display("FAIL updated w2[%0d][%0d][%0d] = %0d expected %0d", m, i-1, k, $signed(line[i]), $signed(w2n[m][i-1][k]));
              end
            end
            hr_line(MEM_W, 1, j, DWP + 16*s + k, line);
            for (int i = 1; i < M; i++) begin
              checks++;
              if (line[i] !== dwn[m][i-1][k]) begin
                failures++;
                if (failures < 10) $display("FAIL increment dw2[%0d][%0d][%0d] = %0d expected %0d", m, i-1, k, $signed(line[i]), $signed(dwn[m][i-1][k]));
              end
            end
          end
      $display("learning: %0d layer-2 weights updated and checked; delta[0][0..] = %0d %0d %0d", nlw,
               $signed(dref[0][0]), $signed(dref[0][1]), $signed(dref[0][T2-1]));
    end

    // ---------------- second run: PE(0,M-1) sends east, torus then serial port
    for (int a = 0; a < 8; a++) begin
      for (int k = 0; k < M; k++) line[k] = i_halt();
      hw_line(MEM_P, 0, 1, 0, a, line);
    end
    for (int j = 0; j < M; j++) line[j] = i_halt();
    line[0] = i_recv(2, 1);
    line[M-1] = i_ldi(2, 77);
    hw_line(MEM_P, 0, 0, 0, 0, line);
    line[0] = i_lda(0, 100);
    line[M-1] = i_send(2, 1);
    hw_line(MEM_P, 0, 0, 0, 1, line);
    line[0] = i_stx(2, 0);
    line[M-1] = i_recv(3, 3);      // reply from the east (only in serial mode)
    hw_line(MEM_P, 0, 0, 0, 2, line);
    line[0] = i_halt();
    line[M-1] = i_lda(0, 101);
    hw_line(MEM_P, 0, 0, 0, 3, line);
    line[M-1] = i_stx(3, 0);
    hw_line(MEM_P, 0, 0, 0, 4, line);
    line[M-1] = i_halt();
    hw_line(MEM_P, 0, 0, 0, 5, line);
    // torus mode: PE(0,M-1) would wait for a reply; give it none, just check PE(0,0)
    serial_en = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (100) @(negedge clk);
    hr_line(MEM_X, 0, 0, 100, line);
    checks++;
    if (line[0] !== 16'd77) begin failures++; $display("FAIL torus row-0 wrap: %0d", line[0]); end
    else n_serial_torus++;
    // serial mode: the word goes to the host, the host replies, PE(0,M-1) stores the
    // reply and halts (PE(0,0) is left waiting and is cleared by the reset)
    rst_n = 0; @(negedge clk); rst_n = 1;
    serial_en = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    sor = 1;
    while (!sov) @(negedge clk);
    checks++;
    if (sod !== 16'd77) begin failures++; $display("FAIL serial out %0d", sod); end
    else n_serial_host++;
    @(negedge clk); sor = 0;
    siv = 1; sid = 16'd5;
    while (!sir) @(negedge clk);
    @(negedge clk); siv = 0;
    while (!halted[0][M-1]) @(negedge clk);
    hr_line(MEM_X, 0, 0, 101, line);
    checks++;
    if (line[M-1] !== 16'd5) begin failures++; $display("FAIL serial in %0d", line[M-1]); end
    rst_n = 0; @(negedge clk); rst_n = 1;

    $display("mechanisms: recv_stall=%0d send_stall=%0d mac_drain_stall=%0d repeat=%0d branch=%0d",
             n_recv_stall, n_send_stall, n_mac_stall, n_rpt, n_branch);
    $display("mechanisms: vertical_wrap=%0d horizontal_wrap=%0d load_col=%0d load_row=%0d load_bcast=%0d serial_torus=%0d serial_host=%0d",
             n_vwrap, n_hwrap, n_load_col, n_load_row, n_load_bcast, n_serial_torus, n_serial_host);
    begin
      int mech [13];
      mech = '{n_recv_stall, n_send_stall, n_mac_stall, n_rpt, n_branch, n_vwrap, n_hwrap,
                        n_load_col, n_load_row, n_load_bcast, n_serial_torus, n_serial_host, 1};
      foreach (mech[k]) begin
        checks++;
        if (mech[k] == 0) begin failures++; $display("FAIL mechanism %0d never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
