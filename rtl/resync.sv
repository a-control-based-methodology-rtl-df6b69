// resync: edge-sensitive two-way handshake resynchronizer for one link.
//
// Carries flits over a link whose two ends are clocked by different,
// unrelated clocks (two DFS frequency islands). Only two single-bit lines are
// added to the data link: a request and an acknowledge, both signalling by
// toggling (one edge per flit).
//
// Sender (clk_tx): a new flit toggles the request flop and loads the data
// flops that drive the data link. The acknowledge line is brought into the
// sender's domain by two flops (ack', ack). busy = req XOR synchronized ack
// is high from the send until the acknowledge comes back, and the data link
// is held stable meanwhile. tx_ready = !busy AND tx_credit: the router may
// only allocate the output port when the link is free and the downstream
// buffer has a credit.
// Receiver (clk_rx): two flops (req', req stable) synchronise the request; a
// third flop delays it, and data_valid = req stable XOR its delayed copy
// marks one cycle per request edge. The data flops capture the data link on
// the clock edge at which req stable toggles, so rx_data and rx_valid appear
// together; the link is still stable then because the sender only moves on
// once req stable has come back to it as the acknowledge.
//
// The structure (toggle request, two-flop synchronizers, the XOR for busy and
// data valid, data flops at both ends, busy combined with the credits)
// follows the document's figure and text. The document words the combination
// as busy AND credits; since a port must not be allocated while the link is
// busy, this design uses the negated busy. Reset values (all zero) and the
// exact edge at which the receiver's data flops load are this design's
// choices.
//
// Timing: rx_valid (one clk_rx cycle wide, with rx_data) rises at the second
// or third clk_rx edge after the send; tx_ready returns two to three clk_tx
// edges after that, so one flit crosses per handshake round trip.
module resync #(
  parameter int unsigned W = 64
) (
  // sender domain
  input  logic         clk_tx,
  input  logic         rst_tx_n,
  input  logic         tx_valid,    // offer tx_data; it is sent (new_flit) when tx_ready
  input  logic [W-1:0] tx_data,
  input  logic         tx_credit,   // downstream buffer has room
  output logic         tx_busy,
  output logic         tx_ready,
  // receiver domain
  input  logic         clk_rx,
  input  logic         rst_rx_n,
  output logic         rx_valid,
  output logic [W-1:0] rx_data
);

  // sender side
  logic         req_q, ack_s1, ack_s2;
  logic [W-1:0] link_q;
  // receiver side
  logic         req_s1, req_s2, req_s3;
  logic         data_valid;
  logic         ack;
  logic         req_edge;

  always_ff @(posedge clk_tx or negedge rst_tx_n) begin
    if (!rst_tx_n) begin
      req_q  <= 1'b0;
      ack_s1 <= 1'b0;
      ack_s2 <= 1'b0;
      link_q <= '0;
    end else begin
      req_q  <= req_q ^ (tx_valid & tx_ready);
      ack_s1 <= ack;
      ack_s2 <= ack_s1;
      if (tx_valid & tx_ready) link_q <= tx_data;
    end
  end

  assign tx_busy  = req_q ^ ack_s2;
  assign tx_ready = !tx_busy && tx_credit;

  always_ff @(posedge clk_rx or negedge rst_rx_n) begin
    if (!rst_rx_n) begin
      req_s1  <= 1'b0;
      req_s2  <= 1'b0;
      req_s3  <= 1'b0;
      rx_data <= '0;
    end else begin
      req_s1  <= req_q;
      req_s2  <= req_s1;
      req_s3  <= req_s2;
      // capture on the edge at which req stable toggles: the sender cannot
      // change the link before it has seen that toggle come back as ack
      if (req_edge) rx_data <= link_q;
    end
  end

  assign req_edge   = req_s1 ^ req_s2;
  assign data_valid = req_s2 ^ req_s3;
  assign ack        = req_s2;
  assign rx_valid   = data_valid;

  // Handshake rule: the data link holds still while a handshake is open.
  a_link_stable: assert property (@(posedge clk_tx) disable iff (!rst_tx_n)
    tx_busy |=> $stable(link_q))
    else $error("resync: data link changed during a handshake");

endmodule
