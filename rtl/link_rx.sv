// Receiving end of a two-phase link, presented as a valid/ready stream.
//
// A one-word latch takes the word when the synchronised req differs from ack, then ack
// follows req. valid is high while the latch holds a word; the word leaves when ready is
// high. Used by the host serial port; the PEs' own links use the same protocol (dnp_comm).
module link_rx
  import dnp_pkg::*;
#(
  parameter int unsigned SYNC = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  link_fwd_t rx,
  output logic      rx_ack,
  output logic      valid,
  input  logic      ready,
  output word_t     data
);

  logic [SYNC-1:0] req_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_sync <= '0;
      rx_ack   <= 1'b0;
      valid    <= 1'b0;
      data     <= '0;
    end else begin
      req_sync <= {req_sync[SYNC-2:0], rx.req};
      if (ready) valid <= 1'b0;
      if (req_sync[SYNC-1] != rx_ack && (!valid || ready)) begin
        data   <= rx.data;
        valid  <= 1'b1;
        rx_ack <= req_sync[SYNC-1];
      end
    end
  end

endmodule
