// EMIND-II serial host port at PE(0,M-1).
//
// PE(0,M-1) is the array's serial interface to the host. This block sits in the torus
// wrap-around link of row 0, between the east port of PE(0,M-1) (side A) and the west port
// of PE(0,0) (side B), and relays words in both directions as a store-and-forward stage.
// With serial_en = 0 it closes the torus: A -> B and B -> A. With serial_en = 1 the words
// PE(0,M-1) sends east go to the host (host_out_*), words from the host (host_in_*) go
// into PE(0,M-1)'s east port, and side B is idle. Because the block terminates both links
// itself, changing serial_en never produces a spurious word; a word already latched goes
// where the mode in force when it leaves says.
//
// That PE(0,M-1) serves as serial host interface is the array description's; placing the
// port in the row-0 wrap link and the relay structure are this design's choices.
module emind_serial_port
  import dnp_pkg::*;
#(
  parameter int unsigned SYNC = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      serial_en,
  // side A: east port of PE(0,M-1)
  input  link_fwd_t a_rx,
  output logic      a_rx_ack,
  output link_fwd_t a_tx,
  input  logic      a_tx_ack,
  // side B: west port of PE(0,0)
  input  link_fwd_t b_rx,
  output logic      b_rx_ack,
  output link_fwd_t b_tx,
  input  logic      b_tx_ack,
  // host side
  output logic      host_out_valid,
  input  logic      host_out_ready,
  output word_t     host_out_data,
  input  logic      host_in_valid,
  output logic      host_in_ready,
  input  word_t     host_in_data
);

  logic  a_in_valid, a_in_ready, b_in_valid, b_in_ready;
  word_t a_in_data, b_in_data;
  logic  a_out_valid, a_out_ready, b_out_valid, b_out_ready;
  word_t a_out_data;

  link_rx #(.SYNC(SYNC)) u_a_rx (.clk, .rst_n, .rx(a_rx), .rx_ack(a_rx_ack),
                                 .valid(a_in_valid), .ready(a_in_ready), .data(a_in_data));
  link_rx #(.SYNC(SYNC)) u_b_rx (.clk, .rst_n, .rx(b_rx), .rx_ack(b_rx_ack),
                                 .valid(b_in_valid), .ready(b_in_ready), .data(b_in_data));
  link_tx #(.SYNC(SYNC)) u_a_tx (.clk, .rst_n, .tx(a_tx), .tx_ack(a_tx_ack),
                                 .valid(a_out_valid), .ready(a_out_ready), .data(a_out_data));
  link_tx #(.SYNC(SYNC)) u_b_tx (.clk, .rst_n, .tx(b_tx), .tx_ack(b_tx_ack),
                                 .valid(b_out_valid), .ready(b_out_ready), .data(a_in_data));

  // words leaving PE(0,M-1)
  assign host_out_valid = serial_en && a_in_valid;
  assign host_out_data  = a_in_data;
  assign b_out_valid    = !serial_en && a_in_valid;
  assign a_in_ready     = serial_en ? host_out_ready : b_out_ready;

  // words entering PE(0,M-1)
  assign a_out_valid   = serial_en ? host_in_valid : b_in_valid;
  assign a_out_data    = serial_en ? host_in_data : b_in_data;
  assign host_in_ready = serial_en && a_out_ready;
  assign b_in_ready    = !serial_en && a_out_ready;

endmodule
