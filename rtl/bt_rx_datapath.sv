// bt_rx_datapath: receive bit processes of one Bluetooth packet.
//
// The inverse of the transmit chain, applied to the bit stream that leaves
// FEC decoding (not part of this design): de-whitening with the same LFSR and
// the same initial value as the transmitter, HEC checking of the header and
// CRC checking of the payload. A checker is the generator circuit itself,
// preloaded with the same UAP: after it has taken the data and the received
// check bits its register must be all zero.
//
// Sequence after a start pulse:
//   WINIT  7 cycles   HEC <- UAP, CRC <- {0, UAP}; whitening LFSR written
//                     with 1, CLK6 ... CLK1
//   HDR   18 bits     10 header bits and 8 HEC bits, de-whitened, into the
//                     HEC checker; the first 10 are also collected in hdr
//   PL    PL bits     de-whitened payload bits out on pl_bit/pl_valid and
//                     into the CRC checker
//   CRC   16 bits     received CRC into the CRC checker
// A bit is taken on every clock with rx_valid = 1 in HDR, PL and CRC;
// rx_valid = 0 pauses all LFSRs. One cycle after the 18th header bit,
// hdr_valid pulses and hdr and hec_ok are valid (they hold until the next
// start). done pulses one cycle after the last bit of the packet, with
// crc_ok valid (crc_ok = 1 for a packet without payload). pl_len = 0 ends the
// packet after the HEC. The packet is processed to its end even when the HEC
// fails; rejecting it is left to the link controller.
//
// From the document: the inverse order of the processes, de-whitening with
// the same whitening word, and the zero-remainder checks. This design's
// choices: the state machine, the payload length input, the status outputs.
module bt_rx_datapath
  import bt_pkg::*;
#(
  parameter int unsigned LEN_W = 13   // payload length counter width (bits)
) (
  input  logic             clk,
  input  logic             rst_n,
  // packet set-up, sampled on start
  input  logic             start,
  input  logic [UAP_W-1:0] uap,
  input  logic [6:1]       clk_bits,   // Bluetooth clock CLK6..CLK1
  input  logic [LEN_W-1:0] pl_len,     // payload length in bits, 0 = none
  // received bit stream from FEC decoding
  input  logic             rx_bit,
  input  logic             rx_valid,
  // header results
  output logic [HDR_W-1:0] hdr,
  output logic             hdr_valid,
  output logic             hec_ok,
  // de-whitened payload, LSB first
  output logic             pl_bit,
  output logic             pl_valid,
  // packet results
  output logic             crc_ok,
  output logic             busy,
  output logic             done
);

  localparam int unsigned HDR_HEC_W = HDR_W + HEC_W;

  typedef enum logic [2:0] {S_IDLE, S_WINIT, S_HDR, S_PL, S_CRC} state_e;

  state_e           state_q, state_d;
  logic [LEN_W-1:0] cnt_q, cnt_d;
  logic [LEN_W-1:0] len_q;
  logic [WHT_W-1:0] wini_q;
  logic [HDR_W-1:0] hdr_q;
  logic             step, last, dbit;

  logic hec_en, hec_init, hec_dout, hec_zero;
  logic crc_en, crc_init, crc_dout, crc_zero;
  logic wht_en;
  rw_e  wht_rw;

  hec_gen u_hec (
    .clk, .rst_n, .en(hec_en), .init(hec_init), .uap, .rw(RW_WRITE),
    .din(dbit), .dout(hec_dout), .zero(hec_zero)
  );

  crc_gen u_crc (
    .clk, .rst_n, .en(crc_en), .init(crc_init), .uap, .rw(RW_WRITE),
    .din(dbit), .dout(crc_dout), .zero(crc_zero)
  );

  data_whitening u_wht (
    .clk, .rst_n, .en(wht_en), .rw(wht_rw), .din(rx_bit),
    .dinz(wini_q[WHT_W-1]), .dout(dbit)
  );

  assign step = rx_valid && (state_q == S_HDR || state_q == S_PL || state_q == S_CRC);
  assign last = (cnt_q == '0);

  always_comb begin
    hec_init = (state_q == S_IDLE) && start;
    crc_init = hec_init;
    hec_en   = hec_init || (step && state_q == S_HDR);
    crc_en   = crc_init || (step && (state_q == S_PL || state_q == S_CRC));
    wht_rw   = (state_q == S_WINIT) ? RW_WRITE : RW_READ;
    wht_en   = (state_q == S_WINIT) || step;
  end

  always_comb begin
    state_d = state_q;
    cnt_d   = cnt_q;
    unique case (state_q)
      S_IDLE:
        if (start) begin
          state_d = S_WINIT;
          cnt_d   = LEN_W'(WHT_W - 1);
        end
      S_WINIT: begin
        cnt_d = cnt_q - 1'b1;
        if (last) begin
          state_d = S_HDR;
          cnt_d   = LEN_W'(HDR_HEC_W - 1);
        end
      end
      S_HDR, S_PL, S_CRC:
        if (step) begin
          cnt_d = cnt_q - 1'b1;
          if (last) begin
            unique case (state_q)
              S_HDR: begin
                state_d = (len_q == '0) ? S_IDLE : S_PL;
                cnt_d   = len_q - 1'b1;
              end
              S_PL: begin
                state_d = S_CRC;
                cnt_d   = LEN_W'(CRC_W - 1);
              end
              default: state_d = S_IDLE;
            endcase
          end
        end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      cnt_q     <= '0;
      len_q     <= '0;
      wini_q    <= '0;
      hdr_q     <= '0;
      hdr_valid <= 1'b0;
      done      <= 1'b0;
    end else begin
      state_q   <= state_d;
      cnt_q     <= cnt_d;
      hdr_valid <= step && (state_q == S_HDR) && last;
      done      <= (state_q != S_IDLE) && (state_d == S_IDLE);
      if (state_q == S_IDLE && start) begin
        len_q  <= pl_len;
        wini_q <= {1'b1, clk_bits};
      end else if (state_q == S_WINIT) begin
        wini_q <= {wini_q[WHT_W-2:0], 1'b0};
      end
      // the first ten header-phase bits are the header information
      if (step && state_q == S_HDR && cnt_q >= LEN_W'(HEC_W))
        hdr_q <= {dbit, hdr_q[HDR_W-1:1]};
    end
  end

  assign hdr      = hdr_q;
  assign hec_ok   = hec_zero;
  assign pl_bit   = dbit;
  assign pl_valid = step && (state_q == S_PL);
  assign crc_ok   = (len_q == '0) || crc_zero;
  assign busy     = (state_q != S_IDLE);

  // in receive mode the checkers' serial outputs are not used
  logic unused_ok;
  assign unused_ok = hec_dout ^ crc_dout;

endmodule
