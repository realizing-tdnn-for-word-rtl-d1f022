// DNP-II four-way asynchronous communication block with the I/O port-pair register IOPR.
//
// Each PE has four 16-bit links, one to each neighbour (N, E, S, W). A link carries a word
// with a two-phase handshake: the sender places the word on data and toggles req; the
// receiver, once it has stored the word, makes its ack equal to req. Data is held stable
// from the req toggle until the ack arrives (bundled data). req and ack are brought into
// the local clock domain through SYNC-stage synchronisers, so neighbours may run from
// different clocks, as in a wavefront array.
//
// Every output port has a one-word output latch, every input port a one-word input latch.
// The core addresses ports through IOPR, which holds four pairs of port numbers:
// pair p occupies IOPR[4p+3:4p], with the input port in [4p+3:4p+2] and the output port in
// [4p+1:4p]. send_* writes the output latch of the pair's output port (send_ready tells
// whether it is free); recv_* reads and empties the input latch of the pair's input port
// (recv_valid tells whether it holds a word).
//
// The four links, the asynchronous operation and the IOPR with four port pairs follow the
// chip description. The two-phase protocol, latch depth of one, synchroniser depth and
// IOPR bit layout are this design's choices. IOPR resets to pair 0 = (in S, out N),
// pair 1 = (in W, out E), pair 2 = (in N, out S), pair 3 = (in E, out W), so that the
// wavefront flows of the TDNN mapping (north and east) need no IOPR setup.
module dnp_comm
  import dnp_pkg::*;
#(
  parameter int unsigned SYNC = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  // IOPR
  input  logic      iopr_we,
  input  word_t     iopr_wdata,
  output word_t     iopr,
  // core side
  input  logic      send_en,
  input  logic [1:0] send_pair,
  input  word_t     send_data,
  output logic      send_ready,
  input  logic      recv_take,
  input  logic [1:0] recv_pair,
  output logic      recv_valid,
  output word_t     recv_data,
  // links, indexed by dir_e
  output link_fwd_t tx     [4],
  input  logic      tx_ack [4],
  input  link_fwd_t rx     [4],
  output logic      rx_ack [4]
);

  localparam word_t IOPR_RESET = {2'(DIR_E), 2'(DIR_W), 2'(DIR_N), 2'(DIR_S),
                                  2'(DIR_W), 2'(DIR_E), 2'(DIR_S), 2'(DIR_N)};

  logic [1:0] out_port, in_port;
  logic [SYNC-1:0] ack_sync [4];
  logic [SYNC-1:0] req_sync [4];
  logic            in_full  [4];
  word_t           in_data  [4];
  logic            out_busy [4];

  assign out_port = iopr[4*send_pair +: 2];
  assign in_port  = iopr[4*recv_pair + 2 +: 2];

  assign send_ready = !out_busy[out_port];
  assign recv_valid = in_full[in_port];
  assign recv_data  = in_data[in_port];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) iopr <= IOPR_RESET;
    else if (iopr_we) iopr <= iopr_wdata;
  end

  for (genvar d = 0; d < 4; d++) begin : g_port
    logic ack_s, req_s;
    assign ack_s    = ack_sync[d][SYNC-1];
    assign req_s    = req_sync[d][SYNC-1];
    // An output latch is busy while its last word is not yet acknowledged.
    assign out_busy[d] = (tx[d].req != ack_s);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ack_sync[d] <= '0;
        req_sync[d] <= '0;
        tx[d]       <= '0;
        rx_ack[d]   <= 1'b0;
        in_full[d]  <= 1'b0;
        in_data[d]  <= '0;
      end else begin
        ack_sync[d] <= {ack_sync[d][SYNC-2:0], tx_ack[d]};
        req_sync[d] <= {req_sync[d][SYNC-2:0], rx[d].req};
        // output side
        if (send_en && out_port == 2'(d) && !out_busy[d]) begin
          tx[d].data <= send_data;
          tx[d].req  <= ~tx[d].req;
        end
        // input side: take a new word when the latch is free
        if (recv_take && in_port == 2'(d)) in_full[d] <= 1'b0;
        if (req_s != rx_ack[d] && (!in_full[d] || (recv_take && in_port == 2'(d)))) begin
          in_data[d] <= rx[d].data;
          in_full[d] <= 1'b1;
          rx_ack[d]  <= req_s;
        end
      end
    end
  end

  // A word must not be sent into a busy output latch.
  assert property (@(posedge clk) disable iff (!rst_n) send_en |-> send_ready)
    else $error("dnp_comm: send into a busy output latch");
  assert property (@(posedge clk) disable iff (!rst_n) recv_take |-> recv_valid)
    else $error("dnp_comm: receive from an empty input latch");

endmodule
