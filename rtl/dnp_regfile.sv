// DNP-II general purpose register file.
//
// NREGS (8) registers of 16 bits with two asynchronous read ports and one synchronous write
// port; a write is visible to reads in the next cycle. All registers clear on reset. The
// chip description names the register file but gives neither its size nor its ports, so
// both are this design's choice.
module dnp_regfile
  import dnp_pkg::*;
#(
  parameter int unsigned N = NREGS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] ra,
  input  logic [$clog2(N)-1:0] rb,
  output word_t                da,
  output word_t                db,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] wa,
  input  word_t                wd
);

  word_t regs [N];

  assign da = regs[ra];
  assign db = regs[rb];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

endmodule
