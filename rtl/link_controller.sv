// link_controller: connects a network adapter running on the PE clock to the local port of
// its router running on the network clock.
//
// The network clock is four times the PE clock in the framework's main configuration, but
// nothing here depends on the ratio. Two dual-clock FIFOs do the rate matching: the
// injection FIFO carries flits from the adapter into the router's local input, and the
// ejection FIFO stores flits the router delivers until the slower PE side takes them.
// Their pointers cross domains through synchronization registers (see async_fifo).
// Both sides use valid/ready; towards the router these are the SEND and READY of the
// local link. The FIFOs and synchronization registers are the document's; their
// dual-clock Gray-pointer construction and the default depth of 16 are this design's own.
module link_controller
  import noc_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic  rst_n,
  // PE (network adapter) side
  input  logic  clk_pe,
  input  logic  na_tx_valid,
  input  flit_t na_tx_flit,
  output logic  na_tx_ready,
  output logic  na_rx_valid,
  output flit_t na_rx_flit,
  input  logic  na_rx_ready,
  // router local port side
  input  logic  clk_noc,
  output link_t rt_tx,        // into the router's local input
  input  logic  rt_tx_ready,
  input  link_t rt_rx,        // from the router's local output
  output logic  rt_rx_ready
);

  logic [FLIT_W-1:0] inj_data, ej_data;

  async_fifo #(.W(FLIT_W), .DEPTH(DEPTH)) u_inject (
    .rst_n,
    .wr_clk   (clk_pe),
    .wr_valid (na_tx_valid),
    .wr_data  (na_tx_flit),
    .wr_ready (na_tx_ready),
    .rd_clk   (clk_noc),
    .rd_valid (rt_tx.send),
    .rd_data  (inj_data),
    .rd_ready (rt_tx_ready)
  );
  assign rt_tx.flit = flit_t'(inj_data);

  async_fifo #(.W(FLIT_W), .DEPTH(DEPTH)) u_eject (
    .rst_n,
    .wr_clk   (clk_noc),
    .wr_valid (rt_rx.send),
    .wr_data  (rt_rx.flit),
    .wr_ready (rt_rx_ready),
    .rd_clk   (clk_pe),
    .rd_valid (na_rx_valid),
    .rd_data  (ej_data),
    .rd_ready (na_rx_ready)
  );
  assign na_rx_flit = flit_t'(ej_data);

endmodule
