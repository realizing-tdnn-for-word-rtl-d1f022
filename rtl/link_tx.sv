// Sending end of a two-phase link, fed by a valid/ready stream.
//
// A word offered with valid is taken (ready high) when the previous word has been
// acknowledged; the sender then toggles req and holds the data until the synchronised
// ack equals req. Used by the host serial port; the PEs' own links use the same protocol.
module link_tx
  import dnp_pkg::*;
#(
  parameter int unsigned SYNC = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  output link_fwd_t tx,
  input  logic      tx_ack,
  input  logic      valid,
  output logic      ready,
  input  word_t     data
);

  logic [SYNC-1:0] ack_sync;
  assign ready = (tx.req == ack_sync[SYNC-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_sync <= '0;
      tx       <= '0;
    end else begin
      ack_sync <= {ack_sync[SYNC-2:0], tx_ack};
      if (valid && ready) begin
        tx.data <= data;
        tx.req  <= ~tx.req;
      end
    end
  end

endmodule
