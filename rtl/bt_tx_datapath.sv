// bt_tx_datapath: transmit bit processes of one Bluetooth packet.
//
// Chains the header and payload processes of the transmitter: HEC generation
// on the 10-bit header, CRC generation on the payload, and whitening of
// header, HEC, payload and CRC with one whitening LFSR that is initialised
// once per packet and never re-initialised between header and payload. The
// output is the serial bit stream handed to FEC encoding (not part of this
// design), LSB of the header first.
//
// Sequence after a start pulse (state machine, one bit per step):
//   WINIT  7 cycles  HEC <- UAP, CRC <- {0, UAP} (first cycle); whitening
//                    LFSR written with 1, CLK6 ... CLK1
//   HDR   10 bits    header bits through the HEC divider and the whitener
//   HEC    8 bits    HEC read out (position 7 first) through the whitener
//   PL    PL bits    payload bits from pl_bit/pl_valid/pl_ready through the
//                    CRC divider and the whitener
//   CRC   16 bits    CRC read out (position 15 first) through the whitener
// With pl_len = 0 the packet ends after the HEC (no payload, no CRC).
//
// Flow control: a bit leaves on tx_bit when tx_valid and tx_ready are both
// 1. tx_ready = 0, or pl_valid = 0 during the payload, stalls the whole
// chain: every LFSR enable drops, so the state is held (clock gated) and the
// packet resumes unchanged. pl_ready = 1 means the payload bit on pl_bit is
// taken this cycle if pl_valid is 1. done pulses for one cycle after the last
// bit has been taken. start is ignored while busy.
//
// From the document: the order of the processes, the initial values and the
// whitening continuity. This design's choices: the state machine, the
// valid/ready handshakes, the payload length input and the stall behaviour.
//
// Lint note: the two handshake assertions use rst_n in 'disable iff', which
// a linter reports as a reset used both synchronously and asynchronously;
// only the assertions read it synchronously, the logic does not.
module bt_tx_datapath
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
  input  logic [HDR_W-1:0] hdr,        // 10-bit header information
  input  logic [LEN_W-1:0] pl_len,     // payload length in bits, 0 = none
  // payload bits, LSB first
  input  logic             pl_bit,
  input  logic             pl_valid,
  output logic             pl_ready,
  // whitened bit stream towards FEC encoding
  output logic             tx_bit,
  output logic             tx_valid,
  input  logic             tx_ready,
  // status
  output logic             busy,
  output logic             done
);

  typedef enum logic [2:0] {S_IDLE, S_WINIT, S_HDR, S_HEC, S_PL, S_CRC} state_e;

  state_e           state_q, state_d;
  logic [LEN_W-1:0] cnt_q, cnt_d;
  logic [HDR_W-1:0] hdr_q;
  logic [LEN_W-1:0] len_q;
  logic [WHT_W-1:0] wini_q;           // whitening initial word, shifted out MSB first
  logic             step;             // one bit moves through the chain
  logic             last;

  // block controls
  logic hec_en, hec_init, hec_din, hec_dout, hec_zero;
  logic crc_en, crc_init, crc_din, crc_dout, crc_zero;
  logic wht_en, wht_din, wht_dout;
  rw_e  hec_rw, crc_rw, wht_rw;

  hec_gen u_hec (
    .clk, .rst_n, .en(hec_en), .init(hec_init), .uap, .rw(hec_rw),
    .din(hec_din), .dout(hec_dout), .zero(hec_zero)
  );

  crc_gen u_crc (
    .clk, .rst_n, .en(crc_en), .init(crc_init), .uap, .rw(crc_rw),
    .din(crc_din), .dout(crc_dout), .zero(crc_zero)
  );

  data_whitening u_wht (
    .clk, .rst_n, .en(wht_en), .rw(wht_rw), .din(wht_din),
    .dinz(wini_q[WHT_W-1]), .dout(wht_dout)
  );

  always_comb begin
    tx_valid = 1'b0;
    pl_ready = 1'b0;
    unique case (state_q)
      S_HDR, S_HEC, S_CRC: tx_valid = 1'b1;
      S_PL: begin
        tx_valid = pl_valid;
        pl_ready = tx_ready;
      end
      default: ;
    endcase
  end

  assign step = tx_valid && tx_ready;
  assign last = (cnt_q == '0);

  // datapath steering
  always_comb begin
    hec_init = (state_q == S_IDLE) && start;
    crc_init = hec_init;
    hec_en   = hec_init || (step && (state_q == S_HDR || state_q == S_HEC));
    crc_en   = crc_init || (step && (state_q == S_PL  || state_q == S_CRC));
    hec_rw   = (state_q == S_HEC) ? RW_READ : RW_WRITE;
    crc_rw   = (state_q == S_CRC) ? RW_READ : RW_WRITE;
    hec_din  = hdr_q[0];
    crc_din  = pl_bit;
    wht_rw   = (state_q == S_WINIT) ? RW_WRITE : RW_READ;
    wht_en   = (state_q == S_WINIT) || step;
    unique case (state_q)
      S_HDR, S_HEC: wht_din = hec_dout;
      S_PL, S_CRC:  wht_din = crc_dout;
      default:      wht_din = 1'b0;
    endcase
  end

  assign tx_bit = wht_dout;

  // sequencer
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
          cnt_d   = LEN_W'(HDR_W - 1);
        end
      end
      S_HDR, S_HEC, S_PL, S_CRC:
        if (step) begin
          cnt_d = cnt_q - 1'b1;
          if (last) begin
            unique case (state_q)
              S_HDR: begin
                state_d = S_HEC;
                cnt_d   = LEN_W'(HEC_W - 1);
              end
              S_HEC: begin
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
      state_q <= S_IDLE;
      cnt_q   <= '0;
      hdr_q   <= '0;
      len_q   <= '0;
      wini_q  <= '0;
      done    <= 1'b0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
      done    <= (state_q != S_IDLE) && (state_d == S_IDLE);
      if (state_q == S_IDLE && start) begin
        hdr_q  <= hdr;
        len_q  <= pl_len;
        wini_q <= {1'b1, clk_bits};
      end else begin
        if (state_q == S_WINIT)
          wini_q <= {wini_q[WHT_W-2:0], 1'b0};
        if (state_q == S_HDR && step)
          hdr_q <= hdr_q >> 1;
      end
    end
  end

  assign busy = (state_q != S_IDLE);

  // the divider remainders are only read inside the receiver
  logic unused_ok;
  assign unused_ok = hec_zero ^ crc_zero;

  // an offered bit outside the payload stays offered and unchanged until taken
  assert property (@(posedge clk) disable iff (!rst_n)
                   (tx_valid && !tx_ready && state_q != S_PL) |=> (tx_valid && $stable(tx_bit)));
  // payload bits are only accepted in the payload phase
  assert property (@(posedge clk) disable iff (!rst_n) pl_ready |-> (state_q == S_PL));

endmodule
