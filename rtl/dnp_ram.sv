// DNP-II memory: program, input (X) and weight (W) memory.
//
// A DEPTH x 16-bit memory with two ports. Port A belongs to the PE, port B to the host's
// load/store bus. Both ports read asynchronously (data follows the address in the same
// cycle) and write on the rising clock edge. If both ports write the same cycle, the host
// port wins. The chip has 256 words of program memory, 128 words of input memory and 512
// words of weight memory; DEPTH selects which. The two-port organisation, asynchronous
// read and host priority are this design's choices: they let the PE execute single-cycle
// loads and let the host fill every PE's memories in parallel.
module dnp_ram
  import dnp_pkg::*;
#(
  parameter int unsigned DEPTH = WMEM_WORDS
) (
  input  logic                     clk,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  word_t                    a_wdata,
  output word_t                    a_rdata,
  input  logic                     b_we,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  word_t                    b_wdata,
  output word_t                    b_rdata
);

  word_t mem [DEPTH];

  assign a_rdata = mem[a_addr];
  assign b_rdata = mem[b_addr];

  always_ff @(posedge clk) begin
    if (a_we && !(b_we && b_addr == a_addr)) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
  end

endmodule
