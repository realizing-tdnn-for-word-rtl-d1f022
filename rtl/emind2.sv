// EMIND-II neurocomputer: an M x M toroidal wavefront mesh of DNP-II processing elements.
//
// The array is built from (M/2) x (M/2) DNP-II chips (four PEs each), so the default
// M = 16 is the 8 x 8-chip board. PE(i,j) sits in row i (0 = south) and column j
// (0 = west). Every PE talks to its four neighbours over asynchronous two-phase links, and
// the links on opposite boundaries are joined, which closes the mesh into a torus. There
// is no global control of the computation: each PE runs its own program and waits on its
// links, so data wavefronts move through the array as the programs send and receive.
//
// Roles in the TDNN mapping: PE(i,j) with j < M-1 form the sum-of-products block, the
// bottom row PE(0,j) and the right column PE(i,M-1) are the parallel input/output lines
// and PE(0,M-1) is the serial host interface. The hardware does not fix these roles;
// the programs loaded into the PEs do.
//
// Host side:
//  * load/store buses (emind_host_if): M words per clock into one row or column of PEs,
//    or broadcast into all of them; combinational read-back;
//  * start: one-cycle pulse that starts every PE at address 0; halted[i][j] and
//    all_halted report which PEs have executed HALT;
//  * serial port (emind_serial_port) in the row-0 wrap link at PE(0,M-1): with
//    serial_en = 1 the east port of PE(0,M-1) talks to the host stream interfaces
//    instead of PE(0,0).
//
// The mesh size, chip count, torus wiring, parallel loading and the corner serial port
// follow the array description; the host bus protocol, the single clock shared by all
// PEs (the links would also work between different clocks) and the start/halt handshake
// are this design's choices.
module emind2
  import dnp_pkg::*;
#(
  parameter int unsigned M    = 16,
  parameter int unsigned SYNC = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              all_halted,
  output logic              halted [M][M],
  // parallel load/store buses
  input  logic              host_we,
  input  memsel_e           host_mem,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic              host_by_row,
  input  logic              host_bcast,
  input  logic [$clog2(M)-1:0] host_sel,
  input  word_t             host_wdata [M],
  output word_t             host_rdata [M],
  // serial host port at PE(0,M-1)
  input  logic              serial_en,
  output logic              ser_out_valid,
  input  logic              ser_out_ready,
  output word_t             ser_out_data,
  input  logic              ser_in_valid,
  output logic              ser_in_ready,
  input  word_t             ser_in_data
);

  localparam int unsigned MC = M / 2;

  host_req_t pe_req   [M][M];
  word_t     pe_rdata [M][M];

  link_fwd_t c_tx     [MC][MC][4][2];
  logic      c_tx_ack [MC][MC][4][2];
  link_fwd_t c_rx     [MC][MC][4][2];
  logic      c_rx_ack [MC][MC][4][2];

  emind_host_if #(.M(M)) u_host (
    .we(host_we), .mem(host_mem), .addr(host_addr), .by_row(host_by_row),
    .bcast(host_bcast), .sel(host_sel), .wdata(host_wdata), .rdata(host_rdata),
    .pe_req, .pe_rdata
  );

  for (genvar ci = 0; ci < MC; ci++) begin : g_cr
    for (genvar cj = 0; cj < MC; cj++) begin : g_cc
      host_req_t ch_req   [4];
      word_t     ch_rdata [4];
      logic      ch_halt  [4];

      for (genvar p = 0; p < 4; p++) begin : g_p
        assign ch_req[p] = pe_req[2*ci + p/2][2*cj + p%2];
        assign pe_rdata[2*ci + p/2][2*cj + p%2] = ch_rdata[p];
        assign halted[2*ci + p/2][2*cj + p%2]   = ch_halt[p];
      end

      dnp2_chip #(.SYNC(SYNC)) u_chip (
        .clk, .rst_n, .start, .halted(ch_halt),
        .host(ch_req), .host_rdata(ch_rdata),
        .ext_tx(c_tx[ci][cj]), .ext_tx_ack(c_tx_ack[ci][cj]),
        .ext_rx(c_rx[ci][cj]), .ext_rx_ack(c_rx_ack[ci][cj])
      );

      for (genvar k = 0; k < 2; k++) begin : g_k
        // vertical links (north side of this chip to south side of the chip above)
        assign c_rx[(ci+1)%MC][cj][DIR_S][k]     = c_tx[ci][cj][DIR_N][k];
        assign c_tx_ack[ci][cj][DIR_N][k]        = c_rx_ack[(ci+1)%MC][cj][DIR_S][k];
        assign c_rx[ci][cj][DIR_N][k]            = c_tx[(ci+1)%MC][cj][DIR_S][k];
        assign c_tx_ack[(ci+1)%MC][cj][DIR_S][k] = c_rx_ack[ci][cj][DIR_N][k];
        // horizontal links (east side of this chip to west side of the chip to the right),
        // except the row-0 wrap link, which runs through the serial port
        if (!(ci == 0 && k == 0 && cj == MC-1)) begin : g_h
          assign c_rx[ci][(cj+1)%MC][DIR_W][k]     = c_tx[ci][cj][DIR_E][k];
          assign c_tx_ack[ci][cj][DIR_E][k]        = c_rx_ack[ci][(cj+1)%MC][DIR_W][k];
          assign c_rx[ci][cj][DIR_E][k]            = c_tx[ci][(cj+1)%MC][DIR_W][k];
          assign c_tx_ack[ci][(cj+1)%MC][DIR_W][k] = c_rx_ack[ci][cj][DIR_E][k];
        end
      end
    end
  end

  emind_serial_port #(.SYNC(SYNC)) u_ser (
    .clk, .rst_n, .serial_en,
    .a_rx(c_tx[0][MC-1][DIR_E][0]), .a_rx_ack(c_tx_ack[0][MC-1][DIR_E][0]),
    .a_tx(c_rx[0][MC-1][DIR_E][0]), .a_tx_ack(c_rx_ack[0][MC-1][DIR_E][0]),
    .b_rx(c_tx[0][0][DIR_W][0]),    .b_rx_ack(c_tx_ack[0][0][DIR_W][0]),
    .b_tx(c_rx[0][0][DIR_W][0]),    .b_tx_ack(c_rx_ack[0][0][DIR_W][0]),
    .host_out_valid(ser_out_valid), .host_out_ready(ser_out_ready), .host_out_data(ser_out_data),
    .host_in_valid(ser_in_valid),   .host_in_ready(ser_in_ready),   .host_in_data(ser_in_data)
  );

  always_comb begin
    all_halted = 1'b1;
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(M); j++)
        if (!halted[i][j]) all_halted = 1'b0;
  end

endmodule
