// DNP-II neural processor chip: four PEs.
//
// The chip holds four identical PEs (dnp_pe) arranged as a 2 x 2 tile of the mesh:
// local PE (r,c) with r the row (0 = south) and c the column (0 = west); its index in the
// per-PE port arrays is 2*r + c. The links between the four PEs are wired inside; the
// eight links that leave the tile are brought out per side as ext_tx/ext_rx[side][k],
// side in dir_e order (N, E, S, W) and k the position along that side (column for N and
// S, row for E and W). Each PE keeps its own host access bus, start is shared and halted
// is reported per PE.
//
// Four PEs per chip is the chip description's number; the 2 x 2 arrangement is this
// design's reading of how a board of 8 x 8 chips forms a 16 x 16 PE mesh.
module dnp2_chip
  import dnp_pkg::*;
#(
  parameter int unsigned SYNC = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  output logic      halted     [4],
  input  host_req_t host       [4],
  output word_t     host_rdata [4],
  output link_fwd_t ext_tx     [4][2],
  input  logic      ext_tx_ack [4][2],
  input  link_fwd_t ext_rx     [4][2],
  output logic      ext_rx_ack [4][2]
);

  link_fwd_t tx     [4][4];
  logic      tx_ack [4][4];
  link_fwd_t rx     [4][4];
  logic      rx_ack [4][4];

  for (genvar p = 0; p < 4; p++) begin : g_pe
    dnp_pe #(.SYNC(SYNC)) u_pe (
      .clk, .rst_n, .start, .halted(halted[p]),
      .host(host[p]), .host_rdata(host_rdata[p]),
      .tx(tx[p]), .tx_ack(tx_ack[p]), .rx(rx[p]), .rx_ack(rx_ack[p])
    );
  end

  for (genvar k = 0; k < 2; k++) begin : g_wire
    // vertical pair in column k: PE(0,k) = k, PE(1,k) = 2+k
    assign rx[2+k][DIR_S]     = tx[k][DIR_N];
    assign tx_ack[k][DIR_N]   = rx_ack[2+k][DIR_S];
    assign rx[k][DIR_N]       = tx[2+k][DIR_S];
    assign tx_ack[2+k][DIR_S] = rx_ack[k][DIR_N];
    // horizontal pair in row k: PE(k,0) = 2k, PE(k,1) = 2k+1
    assign rx[2*k+1][DIR_W]   = tx[2*k][DIR_E];
    assign tx_ack[2*k][DIR_E] = rx_ack[2*k+1][DIR_W];
    assign rx[2*k][DIR_E]     = tx[2*k+1][DIR_W];
    assign tx_ack[2*k+1][DIR_W] = rx_ack[2*k][DIR_E];
    // north side: PE(1,k); south side: PE(0,k); east side: PE(k,1); west side: PE(k,0)
    assign ext_tx[DIR_N][k]       = tx[2+k][DIR_N];
    assign tx_ack[2+k][DIR_N]     = ext_tx_ack[DIR_N][k];
    assign rx[2+k][DIR_N]         = ext_rx[DIR_N][k];
    assign ext_rx_ack[DIR_N][k]   = rx_ack[2+k][DIR_N];
    assign ext_tx[DIR_S][k]       = tx[k][DIR_S];
    assign tx_ack[k][DIR_S]       = ext_tx_ack[DIR_S][k];
    assign rx[k][DIR_S]           = ext_rx[DIR_S][k];
    assign ext_rx_ack[DIR_S][k]   = rx_ack[k][DIR_S];
    assign ext_tx[DIR_E][k]       = tx[2*k+1][DIR_E];
    assign tx_ack[2*k+1][DIR_E]   = ext_tx_ack[DIR_E][k];
    assign rx[2*k+1][DIR_E]       = ext_rx[DIR_E][k];
    assign ext_rx_ack[DIR_E][k]   = rx_ack[2*k+1][DIR_E];
    assign ext_tx[DIR_W][k]       = tx[2*k][DIR_W];
    assign tx_ack[2*k][DIR_W]     = ext_tx_ack[DIR_W][k];
    assign rx[2*k][DIR_W]         = ext_rx[DIR_W][k];
    assign ext_rx_ack[DIR_W][k]   = rx_ack[2*k][DIR_W];
  end

endmodule
