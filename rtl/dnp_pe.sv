// DNP-II processing element (PE).
//
// One PE of the DNP-II neural processor: a small stored-program processor tailored to
// sum-of-products work. It holds a 256-word program memory, a 128-word input (X) memory
// and a 512-word weight (W) memory, a register file, an ALU, a 40-bit accumulator fed by
// a three-stage multiply-accumulate pipeline, four address counters with an address adder,
// a repeat counter, a small return-address stack and the four-way communication block.
//
// Control: the instruction register is filled by a one-instruction prefetch from the
// program memory, so most instructions take one clock. A taken jump, call, return or
// DJNZ costs one bubble. SEND and RECV take two clocks; they stay in execute longer while
// the selected output latch is busy or the input latch empty: this data-driven stall is
// what makes the array a wavefront array. MAC issues one product per clock (stage 1 reads
// X and W, stage 2 multiplies, stage 3 accumulates); an accumulator instruction (OP_ACC)
// stalls until the pipeline has drained. RPT n repeats the following instruction n times
// without refetching it.
//
// Interface: start (one-cycle pulse) sets PC to 0 and runs until HALT; halted is high
// when the PE is not running. The host bus reaches the three memories through their
// second port at any time (the host is expected to use it while the PE is halted).
// The links tx/rx with their acks go to the four neighbours (see dnp_comm).
//
// What follows the chip description: the memory sizes, the 16-bit fixed-point datapath,
// the 16x16 pipelined multiplier, the three-stage MAC, the four address counters with
// an adder, the repeat counter, instruction prefetch, subroutine call, the IOPR-addressed
// four-way communication and the 1-clock / 2-clock instruction timing. The instruction
// encoding (dnp_pkg), the register count, the accumulator width and the start/halt
// control are this design's choices.
module dnp_pe
  import dnp_pkg::*;
#(
  parameter int unsigned SYNC = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  output logic      halted,
  input  host_req_t host,
  output word_t     host_rdata,
  output link_fwd_t tx     [4],
  input  logic      tx_ack [4],
  input  link_fwd_t rx     [4],
  output logic      rx_ack [4]
);

  // ---------------------------------------------------------------- state
  logic [PC_W-1:0] pc;
  word_t           ir;
  logic            ir_valid;
  logic            running;
  logic [7:0]      rpt_cnt;
  logic            io_wait;
  logic [PC_W-1:0] stack [STACK_DEPTH];
  logic [$clog2(STACK_DEPTH)-1:0] sp;
  logic signed [ACC_W-1:0] acc;

  // ---------------------------------------------------------------- decode
  opcode_e op;
  logic [2:0] f_rd, f_rs;
  assign op   = opcode_e'(ir[15:12]);
  assign f_rd = ir[11:9];

  always_comb begin
    unique case (op)
      OP_ALU:  f_rs = ir[8:6];
      OP_MISC: f_rs = ir[2:0];
      OP_MAC:  f_rs = 3'd0;
      default: f_rs = ir[4:2];
    endcase
  end

  word_t da, db;
  word_t pm_rdata, xm_rdata, wm_rdata;
  word_t pm_hrdata, xm_hrdata, wm_hrdata;
  logic  send_ready, recv_valid;
  word_t recv_data;
  logic  mac_busy;

  logic exec, stall, go;
  assign exec = running && ir_valid;

  always_comb begin
    stall = 1'b0;
    if (exec) begin
      unique case (op)
        OP_ACC:  stall = mac_busy;
        OP_SEND: stall = !io_wait || !send_ready;
        OP_RECV: stall = !io_wait || !recv_valid;
        default: stall = 1'b0;
      endcase
    end
  end
  assign go = exec && !stall;

  // ---------------------------------------------------------------- register file
  logic  rf_we;
  word_t rf_wd;
  dnp_regfile #(.N(NREGS)) u_rf (
    .clk, .rst_n,
    .ra(f_rd), .rb(f_rs), .da, .db,
    .we(rf_we), .wa(f_rd), .wd(rf_wd)
  );

  // ---------------------------------------------------------------- ALU
  word_t alu_y;
  logic  alu_z, alu_n;
  dnp_alu u_alu (.op(alu_op_e'(ir[3:0])), .a(da), .b(db), .y(alu_y), .zero(alu_z), .neg(alu_n));

  // ---------------------------------------------------------------- address generation
  logic              is_mem, is_mac;
  logic [ADDR_W-1:0] ea0, ea1;
  logic [ADDR_W-1:0] areg [NAREGS];
  logic              a_ld;
  logic [1:0]        a_ld_sel;
  logic [ADDR_W-1:0] a_ld_val;

  assign is_mem = op inside {OP_LDW, OP_STW, OP_LDX, OP_STX};
  assign is_mac = (op == OP_MAC);

  always_comb begin
    a_ld     = 1'b0;
    a_ld_sel = ir[11:10];
    a_ld_val = ir[ADDR_W-1:0];
    if (go && op == OP_LDA) a_ld = 1'b1;
    if (go && op == OP_MISC && misc_e'(ir[11:8]) == MISC_MOVA) begin
      a_ld     = 1'b1;
      a_ld_sel = ir[5:4];
      a_ld_val = db[ADDR_W-1:0];
    end
  end

  dnp_agu u_agu (
    .clk, .rst_n,
    .en0(go && (is_mem || is_mac)),
    .sel0(is_mac ? ir[11:10] : ir[8:7]),
    .mode0(amode_e'(is_mac ? ir[7:6] : ir[6:5])),
    .en1(go && is_mac),
    .sel1(ir[9:8]),
    .mode1(amode_e'(ir[5:4])),
    .index(db),
    .ea0, .ea1,
    .ld_en(a_ld), .ld_sel(a_ld_sel), .ld_val(a_ld_val),
    .areg
  );

  // ---------------------------------------------------------------- memories
  dnp_ram #(.DEPTH(PMEM_WORDS)) u_pmem (
    .clk,
    .a_we(1'b0), .a_addr(pc), .a_wdata('0), .a_rdata(pm_rdata),
    .b_we(host.we && host.mem == MEM_P), .b_addr(host.addr[$clog2(PMEM_WORDS)-1:0]),
    .b_wdata(host.wdata), .b_rdata(pm_hrdata)
  );

  dnp_ram #(.DEPTH(XMEM_WORDS)) u_xmem (
    .clk,
    .a_we(go && op == OP_STX), .a_addr(ea0[$clog2(XMEM_WORDS)-1:0]), .a_wdata(da),
    .a_rdata(xm_rdata),
    .b_we(host.we && host.mem == MEM_X), .b_addr(host.addr[$clog2(XMEM_WORDS)-1:0]),
    .b_wdata(host.wdata), .b_rdata(xm_hrdata)
  );

  dnp_ram #(.DEPTH(WMEM_WORDS)) u_wmem (
    .clk,
    .a_we(go && op == OP_STW), .a_addr(is_mac ? ea1 : ea0), .a_wdata(da),
    .a_rdata(wm_rdata),
    .b_we(host.we && host.mem == MEM_W), .b_addr(host.addr),
    .b_wdata(host.wdata), .b_rdata(wm_hrdata)
  );

  always_comb begin
    unique case (host.mem)
      MEM_P:   host_rdata = pm_hrdata;
      MEM_X:   host_rdata = xm_hrdata;
      default: host_rdata = wm_hrdata;
    endcase
  end

  // ---------------------------------------------------------------- MAC pipeline
  // stage 1: operand registers
  logic  s1_valid, s1_tag;
  word_t s1_x, s1_w;
  logic  s2_valid, s2_tag;
  logic signed [2*WORD_W-1:0] s2_p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_tag   <= 1'b0;
      s1_x     <= '0;
      s1_w     <= '0;
    end else begin
      s1_valid <= go && is_mac;
      s1_tag   <= ir[0];
      s1_x     <= xm_rdata;
      s1_w     <= wm_rdata;
    end
  end

  // stage 2: multiplier
  dnp_mult u_mult (
    .clk, .rst_n,
    .in_valid(s1_valid), .in_tag(s1_tag), .a(s1_x), .b(s1_w),
    .out_valid(s2_valid), .out_tag(s2_tag), .p(s2_p)
  );

  assign mac_busy = s1_valid || s2_valid;

  // stage 3: accumulate; OP_ACC only executes when the pipeline is empty
  logic signed [ACC_W-1:0] acc_sh;
  word_t                   acc_sat;
  localparam logic signed [ACC_W-1:0] SAT_MAX = ACC_W'(32767);
  localparam logic signed [ACC_W-1:0] SAT_MIN = -ACC_W'(32768);
  assign acc_sh = acc >>> ir[4:0];
  always_comb begin
    if (acc_sh > SAT_MAX)      acc_sat = 16'h7fff;
    else if (acc_sh < SAT_MIN) acc_sat = 16'h8000;
    else                       acc_sat = acc_sh[WORD_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (s2_valid) begin
      acc <= s2_tag ? ACC_W'(s2_p) : acc + ACC_W'(s2_p);
    end else if (go && op == OP_ACC) begin
      if (accop_e'(ir[8:7]) == REG_TO_ACC) acc <= ACC_W'($signed(da));
      else if (accop_e'(ir[8:7]) == ACC_CLEAR) acc <= '0;
    end
  end

  // ---------------------------------------------------------------- register write-back
  word_t djnz_val;
  assign djnz_val = da - 1'b1;

  always_comb begin
    rf_we = 1'b0;
    rf_wd = alu_y;
    if (go) begin
      unique case (op)
        OP_LDI:  begin rf_we = 1'b1; rf_wd = {{(WORD_W-9){ir[8]}}, ir[8:0]}; end
        OP_ALU:  begin rf_we = 1'b1; rf_wd = alu_y; end
        OP_LDW:  begin rf_we = 1'b1; rf_wd = wm_rdata; end
        OP_LDX:  begin rf_we = 1'b1; rf_wd = xm_rdata; end
        OP_ACC:  begin rf_we = (accop_e'(ir[8:7]) == ACC_TO_REG); rf_wd = acc_sat; end
        OP_RECV: begin rf_we = 1'b1; rf_wd = recv_data; end
        OP_DJNZ: begin rf_we = 1'b1; rf_wd = djnz_val; end
        default: ;
      endcase
    end
  end

  // ---------------------------------------------------------------- communication
  dnp_comm #(.SYNC(SYNC)) u_comm (
    .clk, .rst_n,
    .iopr_we(go && op == OP_MISC && misc_e'(ir[11:8]) == MISC_SETIOPR),
    .iopr_wdata(db), .iopr(),
    .send_en(go && op == OP_SEND), .send_pair(ir[1:0]), .send_data(da), .send_ready,
    .recv_take(go && op == OP_RECV), .recv_pair(ir[1:0]), .recv_valid, .recv_data,
    .tx, .tx_ack, .rx, .rx_ack
  );

  // ---------------------------------------------------------------- sequencer
  logic            taken;
  logic [PC_W-1:0] target;
  logic            do_halt, do_call, do_ret;

  always_comb begin
    taken   = 1'b0;
    target  = ir[PC_W-1:0];
    do_halt = 1'b0;
    do_call = 1'b0;
    do_ret  = 1'b0;
    if (go) begin
      unique case (op)
        OP_JMP:  taken = 1'b1;
        OP_CALL: begin taken = 1'b1; do_call = 1'b1; end
        OP_DJNZ: taken = (djnz_val != '0);
        OP_MISC: begin
          if (misc_e'(ir[11:8]) == MISC_HALT) do_halt = 1'b1;
          if (misc_e'(ir[11:8]) == MISC_RET) begin
            taken  = 1'b1;
            do_ret = 1'b1;
            target = stack[sp - 1'b1];
          end
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      ir       <= '0;
      ir_valid <= 1'b0;
      running  <= 1'b0;
      rpt_cnt  <= '0;
      io_wait  <= 1'b0;
      sp       <= '0;
      for (int i = 0; i < int'(STACK_DEPTH); i++) stack[i] <= '0;
    end else if (start) begin
      pc       <= '0;
      ir_valid <= 1'b0;
      running  <= 1'b1;
      rpt_cnt  <= '0;
      io_wait  <= 1'b0;
      sp       <= '0;
    end else if (running) begin
      if (exec && stall) begin
        // SEND/RECV: the first clock is always spent; later clocks wait for the link
        if (op inside {OP_SEND, OP_RECV}) io_wait <= 1'b1;
      end else begin
        io_wait <= 1'b0;
        if (do_halt) begin
          running  <= 1'b0;
          ir_valid <= 1'b0;
        end else if (taken) begin
          pc       <= target;
          ir_valid <= 1'b0;
          if (do_call) begin
            stack[sp] <= pc;
            sp        <= sp + 1'b1;
          end
          if (do_ret) sp <= sp - 1'b1;
        end else if (go && rpt_cnt > 8'd1) begin
          // repeat the instruction in IR; the next one stays prefetched
          rpt_cnt <= rpt_cnt - 8'd1;
        end else begin
          rpt_cnt  <= (go && op == OP_RPT) ? ((ir[7:0] == 8'd0) ? 8'd1 : ir[7:0]) : 8'd0;
          ir       <= pm_rdata;
          ir_valid <= 1'b1;
          pc       <= pc + 1'b1;
        end
      end
    end
  end

  assign halted = !running;

endmodule
