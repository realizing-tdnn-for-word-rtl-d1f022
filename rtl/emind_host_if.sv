// EMIND-II host load/store interface.
//
// The host fills the PE memories through M parallel buses, one word per bus per clock, so
// a whole column (or row) of PEs is written in one cycle. In column mode (by_row = 0) bus k
// carries the word for PE(sel, k): sel picks the row, each bus reaches its own column. In
// row mode (by_row = 1) bus k carries the word for PE(k, sel). With bcast = 1 word k is
// written into every PE of line k (all rows of column k, or all columns of row k), which
// downloads a program or table into many PEs at once. Reads use the same selection
// (bcast is ignored) and return, combinationally, one word per bus.
//
// The parallel column/row loading is the array description's; the bus protocol, the
// broadcast option and combinational read-back are this design's choices.
module emind_host_if
  import dnp_pkg::*;
#(
  parameter int unsigned M = 16
) (
  input  logic              we,
  input  memsel_e           mem,
  input  logic [ADDR_W-1:0] addr,
  input  logic              by_row,
  input  logic              bcast,
  input  logic [$clog2(M)-1:0] sel,
  input  word_t             wdata [M],
  output word_t             rdata [M],
  output host_req_t         pe_req   [M][M],
  input  word_t             pe_rdata [M][M]
);

  for (genvar i = 0; i < M; i++) begin : g_row
    for (genvar j = 0; j < M; j++) begin : g_col
      logic hit;
      assign hit = by_row ? (bcast || sel == $clog2(M)'(j)) : (bcast || sel == $clog2(M)'(i));
      assign pe_req[i][j].we    = we && hit;
      assign pe_req[i][j].mem   = mem;
      assign pe_req[i][j].addr  = addr;
      assign pe_req[i][j].wdata = by_row ? wdata[i] : wdata[j];
    end
  end

  for (genvar k = 0; k < M; k++) begin : g_bus
    assign rdata[k] = by_row ? pe_rdata[k][sel] : pe_rdata[sel][k];
  end

endmodule
