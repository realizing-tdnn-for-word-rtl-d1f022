// DNP-II 16x16 parallel pipelined multiplier.
//
// Signed 16 x 16 -> 32-bit multiplier with one register stage: operands presented with
// in_valid in cycle n give p and out_valid in cycle n+1, one product per cycle. The tag
// bit travels with the product (the PE uses it to mark the first product of a new sum).
// Inside the PE it is the middle stage of the three-stage multiply-accumulate pipeline
// (operand fetch, multiply, accumulate) the chip description gives; the single register
// stage is this design's choice.
module dnp_mult
  import dnp_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_tag,
  input  word_t                 a,
  input  word_t                 b,
  output logic                  out_valid,
  output logic                  out_tag,
  output logic signed [2*WORD_W-1:0] p
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= in_valid;
      out_tag   <= in_tag;
      if (in_valid) p <= $signed(a) * $signed(b);
    end
  end

endmodule
