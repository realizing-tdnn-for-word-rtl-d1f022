// DNP-II address generation unit.
//
// Four address registers A0..A3 (9 bits, the width of the 512-word weight memory) act as
// increment/decrement counters. Two accesses can be made per cycle (port 0 and port 1;
// the multiply-accumulate instruction uses both, one for the input memory and one for the
// weight memory). For each access the instruction names a register and a mode: plain
// (ea = A), post-increment, post-decrement, or indexed through the address adder
// (ea = A + index). Effective addresses are combinational; the post-modification happens
// at the clock edge when the access is enabled. A register can also be loaded (ld_en);
// a load beats a post-modification of the same register, and port 1 beats port 0.
// The four counters and the adder follow the chip description; the mode set is this
// design's choice.
module dnp_agu
  import dnp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en0,
  input  logic [1:0]        sel0,
  input  amode_e            mode0,
  input  logic              en1,
  input  logic [1:0]        sel1,
  input  amode_e            mode1,
  input  word_t             index,
  output logic [ADDR_W-1:0] ea0,
  output logic [ADDR_W-1:0] ea1,
  input  logic              ld_en,
  input  logic [1:0]        ld_sel,
  input  logic [ADDR_W-1:0] ld_val,
  output logic [ADDR_W-1:0] areg [NAREGS]
);

  function automatic logic [ADDR_W-1:0] eff(logic [ADDR_W-1:0] a, amode_e m, word_t idx);
    return (m == AM_INDEX) ? a + idx[ADDR_W-1:0] : a;
  endfunction

  function automatic logic [ADDR_W-1:0] post(logic [ADDR_W-1:0] a, amode_e m);
    unique case (m)
      AM_INC:  return a + 1'b1;
      AM_DEC:  return a - 1'b1;
      default: return a;
    endcase
  endfunction

  assign ea0 = eff(areg[sel0], mode0, index);
  assign ea1 = eff(areg[sel1], mode1, index);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NAREGS); i++) areg[i] <= '0;
    end else begin
      if (en0) areg[sel0] <= post(areg[sel0], mode0);
      if (en1) areg[sel1] <= post(areg[sel1], mode1);
      if (ld_en) areg[ld_sel] <= ld_val;
    end
  end

endmodule
