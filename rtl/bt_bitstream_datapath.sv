// bt_bitstream_datapath: Bluetooth baseband bitstream datapath, transmit and
// receive side by side.
//
// The transmit half turns a 10-bit packet header and a serial payload into
// the whitened bit stream header | HEC | payload | CRC; the receive half
// de-whitens such a stream and checks its HEC and CRC. FEC encoding and
// decoding, payload encryption and the RF interface sit between the two in a
// radio and are not part of this design, so the transmit output (tx_*) and
// the receive input (rx_*) are brought out as ports; a loopback of tx_bit to
// rx_bit (with tx_ready tied high) exercises the full chain.
//
// Interfaces and timing are those of bt_tx_datapath (tx_* and pl_*) and
// bt_rx_datapath (rx_*), one bit per clock cycle at most. Both halves share
// clk and rst_n and have their own packet set-up inputs.
module bt_bitstream_datapath
  import bt_pkg::*;
#(
  parameter int unsigned LEN_W = 13   // payload length counter width (bits)
) (
  input  logic             clk,
  input  logic             rst_n,
  // transmit packet set-up
  input  logic             tx_start,
  input  logic [UAP_W-1:0] tx_uap,
  input  logic [6:1]       tx_clk_bits,
  input  logic [HDR_W-1:0] tx_hdr,
  input  logic [LEN_W-1:0] tx_pl_len,
  // transmit payload
  input  logic             tx_pl_bit,
  input  logic             tx_pl_valid,
  output logic             tx_pl_ready,
  // transmit stream towards FEC encoding
  output logic             tx_bit,
  output logic             tx_valid,
  input  logic             tx_ready,
  output logic             tx_busy,
  output logic             tx_done,
  // receive packet set-up
  input  logic             rx_start,
  input  logic [UAP_W-1:0] rx_uap,
  input  logic [6:1]       rx_clk_bits,
  input  logic [LEN_W-1:0] rx_pl_len,
  // receive stream from FEC decoding
  input  logic             rx_bit,
  input  logic             rx_valid,
  // receive results
  output logic [HDR_W-1:0] rx_hdr,
  output logic             rx_hdr_valid,
  output logic             rx_hec_ok,
  output logic             rx_pl_bit,
  output logic             rx_pl_valid,
  output logic             rx_crc_ok,
  output logic             rx_busy,
  output logic             rx_done
);

  bt_tx_datapath #(.LEN_W(LEN_W)) u_tx (
    .clk, .rst_n,
    .start(tx_start), .uap(tx_uap), .clk_bits(tx_clk_bits), .hdr(tx_hdr),
    .pl_len(tx_pl_len), .pl_bit(tx_pl_bit), .pl_valid(tx_pl_valid),
    .pl_ready(tx_pl_ready), .tx_bit, .tx_valid, .tx_ready,
    .busy(tx_busy), .done(tx_done)
  );

  bt_rx_datapath #(.LEN_W(LEN_W)) u_rx (
    .clk, .rst_n,
    .start(rx_start), .uap(rx_uap), .clk_bits(rx_clk_bits), .pl_len(rx_pl_len),
    .rx_bit, .rx_valid,
    .hdr(rx_hdr), .hdr_valid(rx_hdr_valid), .hec_ok(rx_hec_ok),
    .pl_bit(rx_pl_bit), .pl_valid(rx_pl_valid), .crc_ok(rx_crc_ok),
    .busy(rx_busy), .done(rx_done)
  );

endmodule
